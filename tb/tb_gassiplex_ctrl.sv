// tb_gassiplex_ctrl: self-checking test of gassiplex_ctrl at its default
// sizes (48 pulses). For several sequences it counts the gclk pulses seen
// while th is high, measures the pulse widths, the setup time from th to the
// first pulse and the length of th, and checks that gclk never pulses while
// th is low and that a start during a sequence is ignored.
module tb_gassiplex_ctrl;
  localparam int unsigned N = 48, PH = 2, HS = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic th, gclk, busy, done;
  int checks = 0, failures = 0;
  int cyc = 0;

  gassiplex_ctrl #(.N_PULSES(N), .PULSE_HALF(PH), .HOLD_SETUP(HS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  int pulses, th_rise, th_fall, first_rise, hi_len, bad_pulse, dones;
  logic gclk_d = 0, th_d = 0;
  always @(posedge clk) begin
    #1;
    if (th && !th_d) begin th_rise = cyc; pulses = 0; first_rise = -1; end
    if (!th && th_d) th_fall = cyc;
    if (gclk && !gclk_d) begin
      if (!th) bad_pulse++;
      pulses++;
      if (first_rise < 0) first_rise = cyc;
      hi_len = 0;
    end
    if (gclk) hi_len++;
    if (!gclk && gclk_d && hi_len != PH) begin
      failures++; checks++; $display("FAIL: pulse width %0d", hi_len);
    end
    if (done) dones++;
    gclk_d = gclk;
    th_d = th;
  end

  initial begin
    bad_pulse = 0; dones = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!th && !gclk && !busy, "quiet after reset");
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      // a second start in the middle must be ignored
      repeat (50) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      wait (done);
      @(negedge clk); @(negedge clk);
      check(pulses == N, $sformatf("pulse count %0d", pulses));
      check(first_rise - th_rise == HS, $sformatf("setup %0d", first_rise - th_rise));
      check(th_fall - th_rise == HS + 2 * PH * N, $sformatf("hold length %0d", th_fall - th_rise));
      check(!busy && !th, "idle after done");
      repeat (10) @(negedge clk);
    end
    check(bad_pulse == 0, "no pulse without hold");
    check(dones == 4, $sformatf("done count %0d", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
