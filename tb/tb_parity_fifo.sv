// tb_parity_fifo: self-checking test of parity_fifo.
// Random pushes and pops against a queue model, full/empty/count checks at a
// small depth (7, not a power of two), wrap-around, flush, and a bit flipped
// inside the storage to show that rd_perr catches it.
module tb_parity_fifo;
  localparam int unsigned W = 18, DEPTH = 7;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic rd_perr, empty, full;
  logic [$clog2(DEPTH):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  parity_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check head before the edge
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(count == model.size(), "count");
      if (model.size() > 0) begin
        check(rd_data == model[0], $sformatf("head data %h vs %h", rd_data, model[0]));
        check(!rd_perr, "no parity error on clean data");
      end
      wr_en   = ($urandom % 100) < 55;
      rd_en   = ($urandom % 100) < 50;
      wr_data = W'($urandom);
      begin
        int sz;
        sz = model.size();
        @(posedge clk);
        #1;
        if (rd_en && sz > 0) void'(model.pop_front());
        if (wr_en && sz < DEPTH) model.push_back(wr_data);
      end
    end
    // parity error: fill 3 words, flip one stored data bit of the head
    @(negedge clk);
    wr_en = 0; rd_en = 0; clr = 1;
    @(negedge clk);
    clr = 0;
    model.delete();
    check(empty && count == 0, "flush");
    for (int i = 0; i < 3; i++) begin
      wr_en = 1; wr_data = W'(i * 37 + 5);
      @(negedge clk);
    end
    wr_en = 0;
    check(count == 3 && rd_data == W'(5) && !rd_perr, "three words stored");
    dut.mem[dut.rptr][2] = ~dut.mem[dut.rptr][2];
    #1;
    check(rd_perr, "parity error detected after bit flip");
    rd_en = 1;
    @(negedge clk);
    rd_en = 0;
    check(!rd_perr && rd_data == W'(42), "next word clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
