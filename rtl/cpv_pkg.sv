// cpv_pkg: constants and types shared by the CPV front-end readout RTL.
//
// The numbers that come from the readout architecture itself are the 18-bit
// DiLogic event word with a 12-bit amplitude, five DiLogic chips per 5-DiLogic
// card, a 512-word FIFO in each chip, 480 pads per column read through ten
// DiLogic chips (48 channels each) and the 10-word Common Data Header.
// Everything else here is this design's own choice: the split of the DiLogic
// word into a 6-bit channel address above the amplitude, the 32-bit parallel
// link word with one K-flag per byte (the parallel side of an 8B/10B
// transceiver), the control codes carried in byte lane 0 behind a K28.5 comma,
// and the command and status codes of the DDL2 side.
package cpv_pkg;

  // ---------------------------------------------------------------- DiLogic
  localparam int unsigned DL_WORD_W       = 18;  // event word on the IOBUS
  localparam int unsigned DL_AMP_W        = 12;  // ADC amplitude
  localparam int unsigned DL_ADDR_W       = DL_WORD_W - DL_AMP_W; // channel address
  localparam int unsigned DL_CHIPS        = 5;   // DiLogic chips per 5-DiLogic card
  localparam int unsigned DL_FIFO_DEPTH   = 512; // words per DiLogic FIFO
  localparam int unsigned DL_CARD_WORDS   = DL_CHIPS * DL_FIFO_DEPTH; // 2560
  localparam int unsigned PADS_PER_COLUMN = 480;
  localparam int unsigned CH_PER_CHIP     = PADS_PER_COLUMN / (2 * DL_CHIPS); // 48

  typedef logic [DL_WORD_W-1:0] dl_word_t;

  // ---------------------------------------------------------------- link
  // One 32-bit word per link clock; k[i] marks byte i as a control character.
  typedef struct packed {
    logic [3:0]  k;
    logic [31:0] data;
  } link_word_t;

  localparam logic [7:0] K28_5 = 8'hBC;  // comma, always in byte lane 0

  // Control codes, byte 1 of a control word; bytes 3:2 carry an argument.
  typedef enum logic [7:0] {
    LC_IDLE = 8'h00,
    LC_TRIG = 8'h10,   // RCB -> column: trigger, argument = event number
    LC_SOF  = 8'h20,   // column -> RCB: start of frame, argument = event number
    LC_EOF  = 8'h30    // column -> RCB: end of frame, argument = data word count
  } link_code_e;

  // Data word of a column frame carrying one DiLogic word:
  // [31:30] = 2'b10, [29:28] card index, [18] parity error seen in the
  // column FIFO, [17:0] the DiLogic word.
  localparam logic [1:0] LW_TAG_DATA = 2'b10;
  // Frame header word: [31:30] = 2'b01, [29:24] column id,
  // [23:20] number of cards, [15:0] number of data words that follow.
  localparam logic [1:0] LW_TAG_HDR  = 2'b01;

  localparam link_word_t LINK_IDLE = '{k: 4'b0001, data: {16'h0000, LC_IDLE, K28_5}};

  function automatic link_word_t link_ctrl(link_code_e code, logic [15:0] arg);
    return '{k: 4'b0001, data: {arg, code, K28_5}};
  endfunction

  function automatic logic link_is_ctrl(link_word_t w, link_code_e code);
    return (w.k == 4'b0001) && (w.data[7:0] == K28_5) && (w.data[15:8] == code);
  endfunction

  // ---------------------------------------------------------------- CRC
  // CRC-32, polynomial 04C11DB7, MSB first, one 32-bit word per step.
  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // ---------------------------------------------------------------- CDH
  localparam int unsigned CDH_WORDS   = 10;  // 40 bytes
  localparam logic [7:0]  CDH_VERSION = 8'h02;

  // ---------------------------------------------------------------- DDL2
  localparam logic [7:0] DDL_RDYRX = 8'h14;  // ready to receive (open)
  localparam logic [7:0] DDL_EOBTR = 8'hB4;  // end of block transfer (close)
  localparam logic [7:0] DDL_CTSTW = 8'h02;  // command transmission status word
  localparam logic [7:0] DDL_FESTW = 8'h04;  // front-end status word

endpackage
