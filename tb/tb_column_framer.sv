// tb_column_framer: self-checking test of column_framer.
// Four card FIFOs are modelled as queues with random contents (some empty).
// The testbench checks the frame word by word: SOF with the event number,
// the header (column id, card count, word count), every data word with its
// card index and parity flag in card order, the CRC word against a long-
// division reference, EOF with the word count, and the frame length in
// clocks (data words + 4 + one clock per card to move past its empty FIFO).
module tb_column_framer;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned N = 4, CW = 13;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] event_no = '0;
  logic [5:0]  col_id = 6'd5;
  logic [N-1:0] fifo_empty, fifo_perr, fifo_pop;
  dl_word_t fifo_data [N];
  logic [CW-1:0] fifo_count [N];
  link_word_t tx;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0;
  dl_word_t q [N][$];
  bit       pq[N][$];

  column_framer #(.N_CARDS(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic void refresh();
    for (int c = 0; c < N; c++) begin
      fifo_empty[c] = (q[c].size() == 0);
      fifo_data[c]  = q[c].size() ? q[c][0] : '0;
      fifo_perr[c]  = pq[c].size() ? pq[c][0] : 1'b0;
      fifo_count[c] = CW'(q[c].size());
    end
  endfunction

  initial refresh();

  // sample the pops away from the clock edge to avoid racing the DUT
  logic [N-1:0] pop_s = '0;
  always @(negedge clk) #2 pop_s = fifo_pop;

  always @(posedge clk) begin
    #1;
    for (int c = 0; c < N; c++)
      if (pop_s[c] && q[c].size()) begin
        void'(q[c].pop_front());
        void'(pq[c].pop_front());
      end
    refresh();
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  link_word_t seen[$];
  bit         rec = 0;
  always @(negedge clk) if (rec) seen.push_back(tx);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      logic [31:0] exp[$];
      logic [31:0] crcmsg[$];
      int total, empties, idx;
      link_word_t w[$];
      total = 0; empties = 0;
      exp.delete(); crcmsg.delete(); w.delete();
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        int n;
        n = (t == 0) ? 0 : (($urandom % 3 == 0) ? 0 : $urandom % 50);
        if (n == 0) empties++;
        for (int i = 0; i < n; i++) begin
          dl_word_t d;
          bit p;
          d = dl_word_t'($urandom);
          p = ($urandom % 17 == 0);
          q[c].push_back(d);
          pq[c].push_back(p);
          exp.push_back({LW_TAG_DATA, 2'(c), 9'h0, p, d});
        end
        total += n;
      end
      refresh();
      event_no = 16'h3354 + 16'(t);
      seen.delete();
      start = 1; rec = 1;
      @(negedge clk);
      start = 0;
      wait (done);
      @(negedge clk);
      #1 rec = 0;
      // frame length: SOF..EOF inclusive
      begin
        int sof, eof;
        sof = -1; eof = -1;
        foreach (seen[i]) begin
          if (sof < 0 && link_is_ctrl(seen[i], LC_SOF)) sof = i;
          if (link_is_ctrl(seen[i], LC_EOF)) eof = i;
        end
        check(sof >= 0 && eof - sof + 1 == total + 4 + N,
              $sformatf("frame %0d: %0d clocks SOF to EOF, expected %0d", t, eof - sof + 1,
                        total + 4 + N));
      end
      // drop idles inside the frame
      foreach (seen[i]) if (!link_is_ctrl(seen[i], LC_IDLE)) w.push_back(seen[i]);
      check(w.size() == total + 4, "non-idle word count");
      if (w.size() == total + 4) begin
        check(link_is_ctrl(w[0], LC_SOF) && w[0].data[31:16] == event_no, "SOF");
        check(w[1].k == 0 && w[1].data == {LW_TAG_HDR, col_id, 4'(N), 4'h0, 16'(total)},
              $sformatf("header %h", w[1].data));
        crcmsg.push_back(w[1].data);
        idx = 2;
        foreach (exp[i]) begin
          check(w[idx].k == 0 && w[idx].data == exp[i],
                $sformatf("data %0d: %h expected %h", i, w[idx].data, exp[i]));
          crcmsg.push_back(exp[i]);
          idx++;
        end
        check(w[idx].k == 0 && w[idx].data == ref_crc(crcmsg), "CRC word");
        check(link_is_ctrl(w[idx + 1], LC_EOF) && w[idx + 1].data[31:16] == 16'(total), "EOF");
      end
      for (int c = 0; c < N; c++) check(q[c].size() == 0, "FIFO drained");
      @(negedge clk);
      check(link_is_ctrl(tx, LC_IDLE) && !busy, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
