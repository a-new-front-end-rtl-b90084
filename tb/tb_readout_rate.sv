// tb_readout_rate: busy time of the full readout for the event sizes of the
// readout-rate table (about 536, 1196, 1752, 2152 and 2600 bytes) and for a
// typical 1.3 kbyte Pb-Pb event, at the default sizes, GBT path, no
// back-pressure, 40 MHz clock.
// For each size the hit probability of the card models is chosen so that the
// event comes out near the target size; the testbench checks the number of
// words and the CDH block length against the prediction from the hit pattern,
// prints the busy time, and checks that the 1.3 kbyte event is read within
// the 20 us of a 50 kHz readout.
module tb_readout_rate;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned NL = 4, NC = 4, SEED = 5, CLK_PER_US = 40;

  logic clk = 0, rst_n = 0, l0 = 0, busy;
  logic [NC-1:0] dl_en_in_n [NL], dl_str_in_n [NL], dl_en_out_n [NL];
  dl_word_t dl_data [NL][NC];
  logic [NL-1:0] gas_th, gas_clk, col_busy;
  logic siu_en = 0, ddl_cmd_valid = 0, ddl_fc_stop = 0, gbt_ready = 1;
  logic [31:0] ddl_cmd = '0;
  logic ddl_valid, ddl_ctrl, ddl_open, gbt_valid, gbt_last;
  logic [31:0] ddl_data, gbt_data;
  logic [15:0] event_no, buf_perr_count;
  logic [31:0] l0_accepted, l0_refused, timeouts, ddl_blocks;
  logic [15:0] crc_err [NL], lane_err [NL], format_err [NL];
  logic [15:0] col_trig_dropped [NL], col_perr_count [NL];
  int unsigned occ = 0;
  int checks = 0, failures = 0, cyc = 0;

  cpv_readout_top dut (.*);

  for (genvar l = 0; l < NL; l++) begin : g_l
    for (genvar c = 0; c < NC; c++) begin : g_c
      dilogic_card_model #(.CARD(l * NC + c), .SEED(SEED)) card (
        .occ, .th(gas_th[l]), .gclk(gas_clk[l]), .en_in_n(dl_en_in_n[l][c]),
        .str_in_n(dl_str_in_n[l][c]), .en_out_n(dl_en_out_n[l][c]), .data(dl_data[l][c])
      );
    end
  end

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] got[$];
  always @(posedge clk) if (gbt_valid && gbt_ready) got.push_back(gbt_data);

  initial begin
    // target bytes and the hit probability (1/256) that gives about that size
    int unsigned target[6] = '{1300, 536, 1196, 1752, 2152, 2600};
    int unsigned occs[6]   = '{20, 9, 21, 25, 37, 43};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int e = 0; e < 6; e++) begin
      int t0, t_busy, words;
      occ = occs[e];
      words = CDH_WORDS + NL;
      for (int k = 0; k < NL * NC; k++) words += card_words(SEED, e + 1, k, occ);
      got.delete();
      @(negedge clk);
      l0 = 1; t0 = cyc;
      @(negedge clk);
      l0 = 0;
      wait (!busy);
      t_busy = cyc - t0;
      repeat (3) @(negedge clk);
      check(got.size() == words, $sformatf("event of %0d words: got %0d", words, got.size()));
      check(got.size() > 0 && got[0] == 32'(words * 4), "CDH block length");
      $display("target %0d bytes: event %0d bytes, busy %0d clocks = %0.2f us",
               target[e], words * 4, t_busy, real'(t_busy) / CLK_PER_US);
      if (e == 0) check(t_busy < 20 * CLK_PER_US, "1.3 kbyte event within 20 us (50 kHz)");
      repeat (10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
