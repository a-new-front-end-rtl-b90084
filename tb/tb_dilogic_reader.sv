// tb_dilogic_reader: self-checking test of dilogic_reader against the
// behavioural 5-DiLogic card model.
// For events of different occupancy (none, sparse, dense, every channel) the
// testbench digitises an event into the card model, starts the reader and
// compares every captured word, in order, with the words predicted from the
// hit pattern. It checks the strobe period (STRB_DIV clocks: 10 MHz at a
// 40 MHz clock), that EnIn_N is low exactly while reading, that a full FIFO
// stops the strobes, and the total readout time: (words + 1) strobe periods
// plus one clock from start to done.
module tb_dilogic_reader;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned STRB_DIV = 4, SEED = 7, CARD = 3;
  logic clk = 0, rst_n = 0, start = 0, fifo_full = 0;
  logic en_in_n, str_in_n, en_out_n, word_valid, busy, done;
  dl_word_t dl_data, word;
  logic [$clog2(DL_CARD_WORDS+1)-1:0] n_words;
  logic th = 0, gclk = 0;
  int checks = 0, failures = 0, cyc = 0;

  dilogic_reader #(.STRB_DIV(STRB_DIV)) dut (.*);
  int unsigned occ = 0;
  dilogic_card_model #(.CARD(CARD), .SEED(SEED)) card (
    .occ, .th, .gclk, .en_in_n, .str_in_n, .en_out_n, .data(dl_data)
  );

  always #5 clk = ~clk;
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

  // strobe monitor
  int last_fall = -1, bad_period = 0, strobes = 0, strobe_no_enable = 0;
  logic str_d = 1;
  always @(posedge clk) begin
    #1;
    if (!str_in_n && str_d) begin
      strobes++;
      if (en_in_n) strobe_no_enable++;
      if (last_fall >= 0 && !fifo_full && (cyc - last_fall) != STRB_DIV) bad_period++;
      last_fall = cyc;
    end
    if (fifo_full) last_fall = -1;
    str_d = str_in_n;
  end

  dl_word_t got[$];
  always @(posedge clk) if (word_valid) got.push_back(word);

  task automatic digitise();
    @(negedge clk) th = 1;
    for (int i = 0; i < CH_PER_CHIP; i++) begin
      #3 gclk = 1; #3 gclk = 0;
    end
    #3 th = 0;
  endtask

  initial begin
    int unsigned ev = 0;
    int unsigned occs[5] = '{0, 8, 60, 256, 20};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 5; e++) begin
      int n, t0, t1;
      occ = occs[e];
      ev++;
      digitise();
      n = card_words(SEED, ev, CARD, occs[e]);
      got.delete();
      strobes = 0;
      last_fall = -1;
      @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
      check(!en_in_n, "EnIn_N low while reading");
      if (e == 4) begin
        repeat (20) @(negedge clk);
        fifo_full = 1;
        begin
          int s0;
          s0 = strobes;
          repeat (40) @(negedge clk);
          check(strobes - s0 <= 1, "no strobes while FIFO full");
        end
        fifo_full = 0;
      end
      wait (done);
      t1 = cyc;
      repeat (3) @(negedge clk);
      check(en_in_n, "EnIn_N released after the card");
      check(got.size() == n, $sformatf("event %0d: %0d words, expected %0d", ev, got.size(), n));
      check(n_words == n, "n_words");
      for (int i = 0; i < got.size() && i < n; i++)
        check(got[i] == card_word(SEED, ev, CARD, occs[e], i),
              $sformatf("event %0d word %0d: %h", ev, i, got[i]));
      check(strobes == n + 1, $sformatf("strobes %0d for %0d words", strobes, n));
      if (e != 4)
        check(t1 - t0 == (n + 1) * STRB_DIV + 1, $sformatf("readout time %0d clocks for %0d words",
                                                         t1 - t0, n));
      repeat (5) @(negedge clk);
    end
    check(bad_period == 0, $sformatf("%0d strobe periods differ from %0d", bad_period, STRB_DIV));
    check(strobe_no_enable == 0, "strobe without enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
