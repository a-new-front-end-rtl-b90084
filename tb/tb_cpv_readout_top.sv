// tb_cpv_readout_top: end-to-end test of the readout at its default sizes
// (one RCB, four column controllers, sixteen 5-DiLogic cards).
//
// Sixteen behavioural card models sit on the card ports. For every L0 the
// testbench predicts the complete event from the hit pattern of each card
// (Common Data Header, link headers, every DiLogic word in link and card
// order) and compares it with what leaves on the GBT side or, after the
// switch to the DDL2 path, on the SIU side. Along the way it makes each
// mechanism of the design happen and counts it:
//   - busy from L0 to the last word, L0 refused during busy
//   - Track/Hold and 48-pulse Gassiplex burst on every column controller
//   - all sixteen cards read at the same time
//   - GBT output path with back-pressure, then DDL2 path: RDYRX/CTSTW,
//     FESTW(EODB) per event, flow control, EOBTR/CTSTW
//   - a corrupted link word caught by the RCB's CRC check
//   - a flipped bit in an RCB buffer caught by the parity check
// It checks the busy time at about 1% occupancy with no back-pressure
// against the 20 us of a 50 kHz readout (800 clocks of the 40 MHz clock).
module tb_cpv_readout_top;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned NL = 4, NC = 4, SEED = 23;
  localparam int unsigned CLK_PER_US = 40;

  logic clk = 0, rst_n = 0, l0 = 0;
  logic busy;
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
  int unsigned occ = 3;
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

  always #12.5 clk = ~clk;   // 40 MHz
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- mechanism counters
  int n_busy = 0, n_refused = 0, n_hold = 0, n_concurrent = 0, n_gbt_bp = 0;
  int n_gbt_ev = 0, n_siu_ev = 0, n_fc = 0, n_ctstw = 0, n_festw = 0;
  int gas_pulses [NL];
  logic busy_d = 0;
  always @(posedge clk) begin
    bit all_on;
    if (busy && !busy_d && rst_n) n_busy++;
    busy_d = busy;
    all_on = 1;
    for (int l = 0; l < NL; l++) if (dl_en_in_n[l] != '0) all_on = 0;
    if (all_on) n_concurrent++;
    if (gbt_valid && !gbt_ready) n_gbt_bp++;
    if (ddl_fc_stop && dut.u_rcb.s_valid && siu_en) n_fc++;
  end
  for (genvar l = 0; l < NL; l++) begin : g_mon
    always @(posedge gas_th[l]) if (l == 0 && rst_n) n_hold++;
    always @(posedge gas_clk[l]) if (gas_th[l] && rst_n) gas_pulses[l]++;
  end

  // ---------------------------------------------------------- output capture
  logic [31:0] got[$];
  logic [31:0] ctrl_words[$];
  always @(posedge clk) begin
    if (gbt_valid && gbt_ready) begin
      got.push_back(gbt_data);
      if (gbt_last) n_gbt_ev++;
    end
    if (ddl_valid) begin
      if (ddl_ctrl) ctrl_words.push_back(ddl_data);
      else got.push_back(ddl_data);
    end
  end

  // ---------------------------------------------------------- expected event
  function automatic void expect_event(int unsigned ev, int unsigned o, int unsigned acc,
                                       int unsigned ref_, logic [3:0] bad,
                                       ref logic [31:0] exp[$]);
    int unsigned words;
    exp.delete();
    words = CDH_WORDS;
    for (int l = 0; l < NL; l++) begin
      words++;
      for (int c = 0; c < NC; c++) words += card_words(SEED, ev, l * NC + c, o);
    end
    exp.push_back(words * 4);
    exp.push_back({CDH_VERSION, 8'h00, 16'(ev)});
    exp.push_back(acc);
    exp.push_back({16'h0, 8'h0F, 4'h0, bad});
    exp.push_back(ref_);
    for (int i = 5; i < CDH_WORDS; i++) exp.push_back(0);
    for (int l = 0; l < NL; l++) begin
      int unsigned n;
      n = 0;
      for (int c = 0; c < NC; c++) n += card_words(SEED, ev, l * NC + c, o);
      exp.push_back({2'b11, 3'(l), 1'b1, !bad[l], 3'h0, 6'(l), 16'(n)});
      for (int c = 0; c < NC; c++)
        for (int i = 0; i < card_words(SEED, ev, l * NC + c, o); i++)
          exp.push_back({LW_TAG_DATA, 2'(c), 9'h0, 1'b0, card_word(SEED, ev, l * NC + c, o, i)});
    end
  endfunction

  // compare, skipping the CRC-corrupted link's payload and one flipped word
  task automatic compare(int unsigned ev, logic [31:0] exp[$], int skip_from, int skip_to,
                         int flip_at);
    check(got.size() == exp.size(), $sformatf("event %0d: %0d words, expected %0d",
                                              ev, got.size(), exp.size()));
    if (got.size() == exp.size())
      foreach (exp[i]) begin
        if (i >= skip_from && i < skip_to) continue;
        if (i == flip_at) begin
          check(got[i] != exp[i], "flipped word arrives changed");
          continue;
        end
        check(got[i] == exp[i], $sformatf("event %0d word %0d: %h expected %h",
                                          ev, i, got[i], exp[i]));
      end
  endtask

  task automatic trigger(output int t_busy);
    int t0;
    @(negedge clk);
    l0 = 1; t0 = cyc;
    @(negedge clk);
    l0 = 0;
    check(busy, "busy right after L0");
    wait (!busy);
    t_busy = cyc - t0;
    repeat (4) @(negedge clk);   // DDL2 words leave up to two clocks later
  endtask

  task automatic ddl_command(logic [7:0] code, logic [3:0] id);
    @(negedge clk);
    ddl_cmd_valid = 1; ddl_cmd = {20'h0, id, code};
    @(negedge clk);
    ddl_cmd_valid = 0;
  endtask

  // random back-pressure / flow control
  bit bp_on = 0, fc_on = 0;
  always @(negedge clk) begin
    gbt_ready   = bp_on ? (($urandom % 3) != 0) : 1'b1;
    ddl_fc_stop = fc_on ? (($urandom % 4) == 0) : 1'b0;
  end

  initial begin
    logic [31:0] exp[$];
    int t_busy, ev, refused;
    for (int l = 0; l < NL; l++) gas_pulses[l] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    ev = 0; refused = 0;

    // 1. about 1% occupancy, GBT path, no back-pressure: busy time
    occ = 3; ev++;
    got.delete();
    trigger(t_busy);
    expect_event(ev, occ, ev, refused, 4'h0, exp);
    compare(ev, exp, -1, -1, -1);
    $display("event %0d: %0d words, busy %0d clocks = %0.2f us", ev, exp.size(), t_busy,
             real'(t_busy) / CLK_PER_US);
    check(t_busy < 20 * CLK_PER_US, "busy below 20 us (50 kHz) at 1% occupancy");
    for (int l = 0; l < NL; l++)
      check(gas_pulses[l] == CH_PER_CHIP, $sformatf("column %0d: %0d Gassiplex pulses",
                                                   l, gas_pulses[l]));

    // 2. higher occupancy with back-pressure; an L0 during busy is refused
    occ = 40; ev++; bp_on = 1;
    got.delete();
    fork
      trigger(t_busy);
      begin
        repeat (100) @(negedge clk);
        l0 = 1; @(negedge clk); l0 = 0;
      end
    join
    refused++;
    expect_event(ev, occ, ev, refused, 4'h0, exp);
    compare(ev, exp, -1, -1, -1);
    bp_on = 0;
    check(l0_refused == 1, "L0 during busy refused");
    check(col_trig_dropped[0] == 0, "column controllers saw no extra trigger");

    // 3. switch to the DDL2 path; busy is held until RDYRX opens the transfer
    siu_en = 1;
    occ = 10; ev++;
    got.delete(); ctrl_words.delete();
    fork
      trigger(t_busy);
      begin
        repeat (2000) @(negedge clk);
        check(busy, "held busy while the DDL2 transfer is closed");
        ddl_command(DDL_RDYRX, 4'h1);
      end
    join
    expect_event(ev, occ, ev, refused, 4'h0, exp);
    compare(ev, exp, -1, -1, -1);
    check(ctrl_words.size() == 2 && ctrl_words[0][7:0] == DDL_CTSTW &&
          ctrl_words[1] == {1'b1, 19'(exp.size()), 4'h1, DDL_FESTW},
          "CTSTW then FESTW(EODB) with the block length");
    n_ctstw += (ctrl_words.size() > 0 && ctrl_words[0][7:0] == DDL_CTSTW);

    // 4. full occupancy on the DDL2 path with flow control
    occ = 256; ev++; fc_on = 1;
    got.delete(); ctrl_words.delete();
    trigger(t_busy);
    expect_event(ev, occ, ev, refused, 4'h0, exp);
    compare(ev, exp, -1, -1, -1);
    $display("event %0d: %0d words (all pads hit), busy %0d clocks", ev, exp.size(), t_busy);
    check(ctrl_words.size() == 1 && ctrl_words[0][31] && ctrl_words[0][7:0] == DDL_FESTW,
          "FESTW(EODB) after the block");
    n_festw = ddl_blocks;
    fc_on = 0;

    // 5. CRC: corrupt one data word on link 1; parity: flip a bit in link 0's buffer
    occ = 60; ev++;
    got.delete(); ctrl_words.delete();
    fork
      trigger(t_busy);
      begin
        wait (dut.up[1].k == 4'b0000 && dut.up[1].data[31:30] == LW_TAG_DATA);
        @(negedge clk);
        force dut.up[1].data = dut.up[1].data ^ 32'h0000_0010;
        @(negedge clk);
        release dut.up[1].data;
      end
      begin
        wait (dut.u_rcb.frame_valid[0]);
        #1 dut.u_rcb.g_link[0].u_rx.u_buf.mem[dut.u_rcb.g_link[0].u_rx.u_buf.rptr][0] ^= 1'b1;
      end
    join
    expect_event(ev, occ, ev, refused, 4'b0010, exp);
    begin
      int l1_from, l1_n;
      l1_from = CDH_WORDS + 1;
      for (int c = 0; c < NC; c++) l1_from += card_words(SEED, ev, c, occ);
      l1_from += 1;   // link 1 header
      l1_n = 0;
      for (int c = 0; c < NC; c++) l1_n += card_words(SEED, ev, NC + c, occ);
      compare(ev, exp, l1_from, l1_from + l1_n, CDH_WORDS + 1);
    end
    check(crc_err[1] == 1 && crc_err[0] == 0 && crc_err[2] == 0 && crc_err[3] == 0,
          "CRC error caught on link 1 only");
    check(buf_perr_count == 1, $sformatf("parity error caught in RCB buffer (%0d)", buf_perr_count));

    // 6. close the transfer
    ddl_command(DDL_EOBTR, 4'h2);
    repeat (10) @(negedge clk);
    check(!ddl_open && ctrl_words.size() >= 2 && ctrl_words[$][7:0] == DDL_CTSTW,
          "EOBTR answered by CTSTW, transfer closed");
    n_ctstw += (ctrl_words.size() > 0 && ctrl_words[$][7:0] == DDL_CTSTW);
    n_siu_ev = ddl_blocks;
    n_refused = l0_refused;

    // mechanism coverage
    $display("mechanisms: busy=%0d refused=%0d hold=%0d concurrent_clocks=%0d gbt_events=%0d gbt_backpressure=%0d siu_blocks=%0d flow_control=%0d ctstw=%0d crc_err=%0d parity_err=%0d",
             n_busy, n_refused, n_hold, n_concurrent, n_gbt_ev, n_gbt_bp, n_siu_ev, n_fc,
             n_ctstw, crc_err[1], buf_perr_count);
    check(n_busy == ev, "busy once per event");
    check(n_refused > 0, "mechanism: L0 refused during busy");
    check(n_hold == ev, "mechanism: Track/Hold once per event");
    check(n_concurrent > 0, "mechanism: all cards read at once");
    check(n_gbt_ev == 2, "mechanism: GBT path");
    check(n_gbt_bp > 0, "mechanism: GBT back-pressure");
    check(n_siu_ev == 3, "mechanism: DDL2 blocks");
    check(n_fc > 0, "mechanism: DDL2 flow control");
    check(n_ctstw == 2, "mechanism: RDYRX and EOBTR answered");
    check(crc_err[1] > 0, "mechanism: CRC check");
    check(buf_perr_count > 0, "mechanism: parity check");
    for (int l = 0; l < NL; l++)
      check(lane_err[l] == 0 && format_err[l] == 0 && col_perr_count[l] == 0,
            "no unexpected link errors");
    check(timeouts == 0, "no timeouts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
