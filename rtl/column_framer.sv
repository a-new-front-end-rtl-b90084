// column_framer: builds the link frame of one event in a column controller.
//
// When start is pulsed, every card FIFO holds the complete event of its card.
// The framer then sends, one 32-bit word per clock on the transceiver's
// parallel side:
//   SOF   control word, K28.5 in byte lane 0, argument = event number
//   HDR   column id, number of cards, number of data words that follow
//   DATA  one word per DiLogic word, card 0 first, each tagged with its card
//         index and the FIFO's parity-error flag
//   CRC   CRC-32 over HDR and all DATA words (see crc32_d32)
//   EOF   control word, argument = number of data words
// Between frames, and for the one clock in which it finds a card FIFO empty
// and moves on to the next card, it sends the IDLE control word. Because every control word has its comma in
// byte lane 0, the receiver can find the frame start in a known lane.
//
// Timing: SOF to EOF of a frame with n data words spans n + 4 + N_CARDS
// clocks; SOF leaves one clock after start and done pulses with the EOF word.
// Sending the event words to the RCB over the link with a CRC follows the
// readout; the frame layout is this design's own.
module column_framer
  import cpv_pkg::*;
#(
  parameter int unsigned N_CARDS = 4,
  parameter int unsigned CW      = 12   // width of a FIFO count
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [15:0]           event_no,
  input  logic [5:0]            col_id,
  input  logic [N_CARDS-1:0]    fifo_empty,
  input  dl_word_t              fifo_data  [N_CARDS],
  input  logic [N_CARDS-1:0]    fifo_perr,
  input  logic [CW-1:0]         fifo_count [N_CARDS],
  output logic [N_CARDS-1:0]    fifo_pop,
  output link_word_t            tx,
  output logic                  busy,
  output logic                  done
);
  localparam int unsigned CIW = (N_CARDS > 1) ? $clog2(N_CARDS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_SOF, S_HDR, S_DATA, S_CRC, S_EOF} state_e;
  state_e      state, state_n;
  logic [CIW-1:0] card, card_n;
  logic [15:0] total;
  logic [15:0] ev_q;
  link_word_t  tx_n;
  logic        crc_init, crc_en;
  logic [31:0] crc, crc_nx;

  crc32_d32 u_crc (
    .clk, .rst_n, .init(crc_init), .en(crc_en), .data(tx_n.data),
    .crc, .crc_next(crc_nx)
  );

  logic [15:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < N_CARDS; i++) sum += 16'(fifo_count[i]);
  end

  always_comb begin
    state_n  = state;
    card_n   = card;
    tx_n     = LINK_IDLE;
    fifo_pop = '0;
    crc_init = 1'b0;
    crc_en   = 1'b0;
    unique case (state)
      S_IDLE: if (start) state_n = S_SOF;
      S_SOF: begin
        tx_n     = link_ctrl(LC_SOF, ev_q);
        crc_init = 1'b1;
        state_n  = S_HDR;
      end
      S_HDR: begin
        tx_n    = '{k: 4'b0000, data: {LW_TAG_HDR, col_id, 4'(N_CARDS), 4'h0, total}};
        crc_en  = 1'b1;
        card_n  = '0;
        state_n = S_DATA;
      end
      S_DATA: begin
        if (!fifo_empty[card]) begin
          tx_n = '{k: 4'b0000,
                   data: {LW_TAG_DATA, 2'(card), 9'h0, fifo_perr[card], fifo_data[card]}};
          fifo_pop[card] = 1'b1;
          crc_en = 1'b1;
        end else if (card == CIW'(N_CARDS - 1)) begin
          state_n = S_CRC;
        end else begin
          card_n = card + 1'b1;
        end
      end
      S_CRC: begin
        tx_n    = '{k: 4'b0000, data: crc};
        state_n = S_EOF;
      end
      S_EOF: begin
        tx_n    = link_ctrl(LC_EOF, total);
        state_n = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      card  <= '0;
      total <= '0;
      ev_q  <= '0;
      tx    <= LINK_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      card  <= card_n;
      tx    <= tx_n;
      done  <= (state == S_EOF);
      if (state == S_IDLE && start) begin
        total <= sum;
        ev_q  <= event_no;
      end
    end
  end

  assign busy = (state != S_IDLE);
  // crc_nx is not needed on the sending side
  logic unused;
  assign unused = ^crc_nx;
endmodule
