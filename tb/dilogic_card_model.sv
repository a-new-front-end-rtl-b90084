// dilogic_card_model: behavioural model of one 5-DiLogic card with its
// Gassiplex front end, for simulation only (not synthesizable).
//
// occ sets the hit probability per channel in 1/256 units.
// Each rising edge of th starts a new event (numbered from 1). Each gclk pulse
// while th is high digitises the next channel of every chip; channels that
// cpv_tb_pkg::pad_hit marks as hit are stored in that chip's FIFO as
// {channel, amplitude}. With en_in_n low, each falling edge of str_in_n puts
// the next word of the first non-empty chip on the bus; when all chips are
// empty the last EnOut_N goes low instead. Raising en_in_n releases EnOut_N.
module dilogic_card_model
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
#(
  parameter int unsigned CARD = 0,
  parameter int unsigned SEED = 1
) (
  input  int unsigned occ,       // hit probability in 1/256
  input  logic     th,
  input  logic     gclk,
  input  logic     en_in_n,
  input  logic     str_in_n,
  output logic     en_out_n,
  output dl_word_t data
);
  dl_word_t    fifo [DL_CHIPS][$];
  int unsigned ev    = 0;
  int unsigned ch    = 0;
  int unsigned cur   = 0;

  initial begin
    en_out_n = 1'b1;
    data     = '0;
  end

  always @(posedge th) begin
    ev++;
    ch = 0;
  end

  always @(posedge gclk) begin
    if (th) begin
      for (int unsigned c = 0; c < DL_CHIPS; c++)
        if (ch < CH_PER_CHIP && pad_hit(SEED, ev, CARD, c, ch, occ) &&
            fifo[c].size() < DL_FIFO_DEPTH)
          fifo[c].push_back(pad_word(SEED, ev, CARD, c, ch));
      ch++;
    end
  end

  always @(negedge str_in_n) begin
    if (!en_in_n && en_out_n) begin
      while (cur < DL_CHIPS && fifo[cur].size() == 0) cur++;
      if (cur == DL_CHIPS) en_out_n = 1'b0;
      else data = fifo[cur].pop_front();
    end
  end

  always @(posedge en_in_n) begin
    en_out_n = 1'b1;
    cur = 0;
  end
endmodule
