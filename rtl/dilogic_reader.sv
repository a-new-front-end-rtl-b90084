// dilogic_reader: readout state machine for one 5-DiLogic card.
//
// The five DiLogic chips of a card form a chain on one 18-bit data bus. The
// reader pulls EnIn_N of the first chip low, which puts the chain in readout
// mode, and then issues StrIn_N strobes. On every strobe the chip that holds
// the enable puts its next event word (channel address and amplitude) on the
// bus; a chip whose FIFO is empty hands the enable on through EnOut_N to the
// next chip. When the last chip of the card has handed on, its EnOut_N,
// which comes back to the FPGA, goes low and the card is finished.
//
// Strobe timing: one strobe period is STRB_DIV clocks (10 MHz from a 40 MHz
// clock by default); StrIn_N is low for the first half. The word on the bus
// is sampled in the last clock of the low half. If en_out_n is low at that
// point the strobe found the whole card empty: no word is taken, EnIn_N is
// released and done pulses, (words + 1) * STRB_DIV + 1 clocks after start
// when the FIFO never fills. Words go to a FIFO through word_valid/word; the
// reader waits while fifo_full is high. n_words counts the words of the
// event.
//
// From the readout: the chained EnIn_N/EnOut_N/StrIn_N handshake, the 18-bit
// bus and the 10 MHz strobe. This design's choice: that the enable passes on
// within the strobe, so that a strobe ending with EnOut_N low carries no word,
// and the sampling point.
module dilogic_reader
  import cpv_pkg::*;
#(
  parameter int unsigned STRB_DIV  = 4,
  parameter int unsigned MAX_WORDS = DL_CARD_WORDS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  // card bus
  output logic                         en_in_n,
  output logic                         str_in_n,
  input  logic                         en_out_n,
  input  dl_word_t                     dl_data,
  // to the card FIFO
  input  logic                         fifo_full,
  output logic                         word_valid,
  output dl_word_t                     word,
  // status
  output logic                         busy,
  output logic                         done,
  output logic [$clog2(MAX_WORDS+1)-1:0] n_words
);
  localparam int unsigned LOW_CLKS = (STRB_DIV < 2) ? 1 : STRB_DIV / 2;

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;
  state_e      state;
  logic [7:0]  tmr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      tmr        <= '0;
      en_in_n    <= 1'b1;
      str_in_n   <= 1'b1;
      word_valid <= 1'b0;
      word       <= '0;
      done       <= 1'b0;
      n_words    <= '0;
    end else begin
      word_valid <= 1'b0;
      done       <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          en_in_n <= 1'b0;
          n_words <= '0;
          tmr     <= 8'(STRB_DIV - LOW_CLKS);  // settle before first strobe
          state   <= S_HIGH;
        end
        S_HIGH: begin
          if (tmr <= 8'd1) begin
            if (!fifo_full) begin
              str_in_n <= 1'b0;
              tmr      <= 8'(LOW_CLKS);
              state    <= S_LOW;
            end
          end else tmr <= tmr - 1'b1;
        end
        S_LOW: begin
          if (tmr <= 8'd1) begin
            str_in_n <= 1'b1;
            if (!en_out_n) begin
              en_in_n <= 1'b1;
              done    <= 1'b1;
              state   <= S_IDLE;
            end else begin
              word_valid <= 1'b1;
              word       <= dl_data;
              n_words    <= n_words + 1'b1;
              tmr        <= 8'(STRB_DIV - LOW_CLKS);
              state      <= S_HIGH;
            end
          end else tmr <= tmr - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
