// column_controller: the FPGA on the column controller card.
//
// It serves N_CARDS 5-DiLogic cards (four: the two columns of a segment
// board) and one full-duplex link to the RCB. A trigger control word from the
// RCB starts one event:
//   1. gassiplex_ctrl holds the Gassiplex charges (Track/Hold) and clocks the
//      multiplexed channels out to the DiLogic ADCs;
//   2. one dilogic_reader per card then reads all cards at the same time,
//      each into its own parity-protected FIFO (the CONTROL/FIFO sections);
//   3. when every card is finished, column_framer sends the event frame back
//      to the RCB.
// A trigger that arrives while an event is in progress is not started and is
// counted in trig_dropped.
//
// Interface: rx/tx are the parallel sides of the link transceiver (32-bit
// word with per-byte K flags). The card ports are per card; gas_th and
// gas_clk are shared by the Gassiplex cards of both columns. busy is high
// from trigger to the end of the frame.
//
// From the readout: the Gassiplex and DiLogic control split, concurrent
// readout of the cards at 10 MHz, and the link to the RCB. This design's
// choices: one clock domain (40 MHz by default, the strobe divided from it),
// trigger delivery as a link control word, reading the whole event into the
// FPGA before sending, and the frame format.
module column_controller
  import cpv_pkg::*;
#(
  parameter int unsigned N_CARDS    = 4,
  parameter int unsigned STRB_DIV   = 4,
  parameter int unsigned N_PULSES   = CH_PER_CHIP,
  parameter int unsigned PULSE_HALF = 2,
  parameter int unsigned HOLD_SETUP = 8,
  parameter int unsigned FIFO_DEPTH = DL_CARD_WORDS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [5:0]           col_id,
  // link to the RCB
  input  link_word_t           rx,
  output link_word_t           tx,
  // 5-DiLogic cards
  output logic [N_CARDS-1:0]   dl_en_in_n,
  output logic [N_CARDS-1:0]   dl_str_in_n,
  input  logic [N_CARDS-1:0]   dl_en_out_n,
  input  dl_word_t             dl_data [N_CARDS],
  // Gassiplex cards
  output logic                 gas_th,
  output logic                 gas_clk,
  // status
  output logic                 busy,
  output logic [15:0]          event_no,
  output logic [15:0]          trig_dropped,
  output logic [15:0]          perr_count
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  typedef enum logic [1:0] {S_IDLE, S_GAS, S_READ, S_SEND} state_e;
  state_e state;

  logic                trig;
  logic                gas_start, gas_done, gas_busy;
  logic                rd_start;
  logic [N_CARDS-1:0]  rd_busy, rd_done, rd_valid, fin;
  dl_word_t            rd_word  [N_CARDS];
  logic [N_CARDS-1:0]  f_full, f_empty, f_pop, f_perr;
  dl_word_t            f_data   [N_CARDS];
  logic [CW-1:0]       f_count  [N_CARDS];
  logic                fr_start, fr_busy, fr_done;

  assign trig = link_is_ctrl(rx, LC_TRIG);

  gassiplex_ctrl #(.N_PULSES(N_PULSES), .PULSE_HALF(PULSE_HALF), .HOLD_SETUP(HOLD_SETUP)) u_gas (
    .clk, .rst_n, .start(gas_start), .th(gas_th), .gclk(gas_clk), .busy(gas_busy), .done(gas_done)
  );

  for (genvar c = 0; c < N_CARDS; c++) begin : g_card
    logic [$clog2(FIFO_DEPTH+1)-1:0] n_words;
    dilogic_reader #(.STRB_DIV(STRB_DIV), .MAX_WORDS(FIFO_DEPTH)) u_rd (
      .clk, .rst_n, .start(rd_start),
      .en_in_n(dl_en_in_n[c]), .str_in_n(dl_str_in_n[c]),
      .en_out_n(dl_en_out_n[c]), .dl_data(dl_data[c]),
      .fifo_full(f_full[c]), .word_valid(rd_valid[c]), .word(rd_word[c]),
      .busy(rd_busy[c]), .done(rd_done[c]), .n_words(n_words)
    );
    parity_fifo #(.W(DL_WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clr(1'b0),
      .wr_en(rd_valid[c]), .wr_data(rd_word[c]),
      .rd_en(f_pop[c]), .rd_data(f_data[c]), .rd_perr(f_perr[c]),
      .empty(f_empty[c]), .full(f_full[c]), .count(f_count[c])
    );
  end

  column_framer #(.N_CARDS(N_CARDS), .CW(CW)) u_framer (
    .clk, .rst_n, .start(fr_start), .event_no, .col_id,
    .fifo_empty(f_empty), .fifo_data(f_data), .fifo_perr(f_perr), .fifo_count(f_count),
    .fifo_pop(f_pop), .tx, .busy(fr_busy), .done(fr_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      event_no     <= '0;
      trig_dropped <= '0;
      perr_count   <= '0;
      fin          <= '0;
      gas_start    <= 1'b0;
      rd_start     <= 1'b0;
      fr_start     <= 1'b0;
    end else begin
      gas_start <= 1'b0;
      rd_start  <= 1'b0;
      fr_start  <= 1'b0;
      if (trig && state != S_IDLE) trig_dropped <= trig_dropped + 1'b1;
      if (|(f_pop & f_perr))       perr_count   <= perr_count + 1'b1;
      unique case (state)
        S_IDLE: if (trig) begin
          event_no  <= rx.data[31:16];
          gas_start <= 1'b1;
          state     <= S_GAS;
        end
        S_GAS: if (gas_done) begin
          rd_start <= 1'b1;
          fin      <= '0;
          state    <= S_READ;
        end
        S_READ: begin
          fin <= fin | rd_done;
          if (&(fin | rd_done)) begin
            fr_start <= 1'b1;
            state    <= S_SEND;
          end
        end
        S_SEND: if (fr_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  logic unused;
  assign unused = ^{gas_busy, rd_busy, fr_busy};
endmodule
