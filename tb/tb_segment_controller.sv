// tb_segment_controller: self-checking test of segment_controller.
// The link receivers are modelled by the testbench: after each trigger it
// makes frames of random size appear on the links after a random delay. It
// checks that busy rises after L0 and falls only after the last event word,
// the trigger word on every link, the whole output event (CDH with length,
// event number, trigger counts and link masks; link headers; data in link
// order; out_last on the final word), under random back-pressure. It also
// checks that an L0 during busy is refused and counted and that a link that
// never answers ends the wait after TIMEOUT clocks and is marked absent.
module tb_segment_controller;
  import cpv_pkg::*;
  localparam int unsigned N = 4, TIMEOUT = 3000;
  logic clk = 0, rst_n = 0, l0 = 0, busy;
  link_word_t link_tx [N];
  logic [N-1:0] frame_valid = '0, frame_ok = '0, frame_ack, buf_empty, buf_pop;
  logic [15:0] frame_words [N];
  logic [5:0]  frame_col [N];
  logic [31:0] buf_data [N];
  logic [31:0] out_data;
  logic out_valid, out_last, out_ready = 0;
  logic [15:0] event_no;
  logic [31:0] l0_accepted, l0_refused, timeouts;
  int checks = 0, failures = 0;
  logic [31:0] q [N][$];

  segment_controller #(.N_LINKS(N), .TIMEOUT(TIMEOUT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void refresh();
    for (int i = 0; i < N; i++) begin
      buf_empty[i] = (q[i].size() == 0);
      buf_data[i]  = q[i].size() ? q[i][0] : '0;
    end
  endfunction
  initial refresh();

  logic [N-1:0] pop_s = '0, ack_s = '0;
  always @(negedge clk) begin #2 pop_s = buf_pop; ack_s = frame_ack; end
  always @(posedge clk) begin
    #1;
    for (int i = 0; i < N; i++) begin
      if (pop_s[i] && q[i].size()) void'(q[i].pop_front());
      if (ack_s[i]) frame_valid[i] = 1'b0;
    end
    refresh();
  end

  // output collector with random back-pressure
  logic [31:0] got[$];
  int lasts = 0;
  always @(negedge clk) out_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (out_valid && out_ready) begin
    got.push_back(out_data);
    if (out_last) lasts++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin frame_words[i] = '0; frame_col[i] = 6'(i + 20); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 1; e <= 6; e++) begin
      logic [31:0] exp[$];
      int words, absent;
      absent = (e == 5) ? 2 : -1;   // link 2 never answers in event 5
      got.delete();
      lasts = 0;
      l0 = 1;
      @(negedge clk);
      l0 = 0;
      check(busy, "busy after L0");
      @(negedge clk);
      for (int i = 0; i < N; i++)
        check(link_is_ctrl(link_tx[i], LC_TRIG) && link_tx[i].data[31:16] == 16'(e),
              $sformatf("trigger on link %0d", i));
      // second L0 during the event
      l0 = 1; @(negedge clk); l0 = 0;
      // frames arrive
      words = 0;
      exp.delete();
      for (int i = 0; i < N; i++) begin
        int n;
        repeat ($urandom % 50) @(negedge clk);
        n = (e == 1) ? 0 : $urandom % 100;
        if (i == absent) begin
          exp.push_back({2'b11, 3'(i), 1'b0, 1'b0, 3'h0, 6'(i + 20), 16'h0});
          continue;
        end
        exp.push_back({2'b11, 3'(i), 1'b1, (e != 3 || i != 1), 3'h0, 6'(i + 20), 16'(n)});
        for (int k = 0; k < n; k++) begin
          logic [31:0] r;
          r = $urandom;
          q[i].push_back(r);
          exp.push_back(r);
        end
        refresh();
        frame_words[i] = 16'(n);
        frame_ok[i]    = (e != 3 || i != 1);   // a CRC error on link 1 in event 3
        frame_valid[i] = 1'b1;
      end
      wait (!busy);
      @(negedge clk);
      for (int i = 0; i < N; i++) words += 1 + ((i == absent) ? 0 : frame_words[i]);
      words += CDH_WORDS;
      check(got.size() == words, $sformatf("event %0d: %0d words out, expected %0d",
                                           e, got.size(), words));
      check(lasts == 1, "one out_last per event");
      if (got.size() == words) begin
        int idx;
        logic [7:0] pres, bad;
        pres = 8'hF & ~((absent >= 0) ? 8'(1 << absent) : 8'h0);
        bad  = (e == 3) ? 8'h02 : 8'h00;
        check(got[0] == 32'(words * 4), "CDH block length");
        check(got[1] == {CDH_VERSION, 8'h00, 16'(e)}, "CDH event number");
        check(got[2] == 32'(e), "CDH accepted L0 count");
        check(got[3] == {16'h0, pres, bad}, $sformatf("CDH link masks %h", got[3]));
        check(got[4] == 32'(e), "CDH refused L0 count");
        for (int i = 5; i < CDH_WORDS; i++) check(got[i] == 0, "CDH reserved word");
        idx = CDH_WORDS;
        foreach (exp[k]) begin
          check(got[idx] == exp[k], $sformatf("event %0d word %0d: %h expected %h",
                                              e, idx, got[idx], exp[k]));
          idx++;
        end
      end
      @(negedge clk);
      @(negedge clk);
      check(!(|frame_valid & ~((absent >= 0) ? N'(1 << absent) : '0)), "frames acknowledged");
      if (absent >= 0) begin
        frame_valid = '0;
        q[absent].delete();
        refresh();
      end
      repeat (10) @(negedge clk);
    end
    check(l0_accepted == 6 && l0_refused == 6, $sformatf("L0 counts %0d/%0d",
                                                         l0_accepted, l0_refused));
    check(timeouts == 1, "one timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
