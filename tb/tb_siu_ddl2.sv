// tb_siu_ddl2: self-checking test of siu_ddl2.
// It plays the readout receiver: the data source is held back while the
// transfer is closed; RDYRX must be answered by CTSTW carrying its
// transaction id; each event block must be forwarded word for word and be
// followed by FESTW with EODB and the block length; flow control (fc_stop)
// must stop the data; an EOBTR that arrives in the middle of a block must be
// answered only after that block's FESTW, after which the transfer is closed.
module tb_siu_ddl2;
  import cpv_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0, fc_stop = 0;
  logic [31:0] cmd = '0;
  logic ddl_valid, ddl_ctrl;
  logic [31:0] ddl_data;
  logic [31:0] in_data;
  logic in_valid, in_last, in_ready, is_open;
  logic [31:0] blocks;
  int checks = 0, failures = 0;

  siu_ddl2 dut (.*);

  always #5 clk = ~clk;

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

  // source: queue of {last, data}
  logic [32:0] src[$];
  function automatic void refresh();
    in_valid = src.size() > 0;
    {in_last, in_data} = (src.size() > 0) ? src[0] : 33'h0;
  endfunction
  initial refresh();
  bit fire_s = 0;
  always @(negedge clk) #2 fire_s = in_valid && in_ready;
  always @(posedge clk) begin
    #1;
    if (fire_s) void'(src.pop_front());
    refresh();
  end

  // sink
  logic [32:0] out[$];   // {ctrl, data}
  int stop_viol = 0;
  always @(posedge clk) begin
    if (rst_n && ddl_valid) out.push_back({ddl_ctrl, ddl_data});
    if (fc_stop && in_ready) stop_viol++;
  end

  task automatic command(logic [7:0] code, logic [3:0] id);
    @(negedge clk);
    cmd_valid = 1; cmd = {20'h0, id, code};
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic push_block(int n, int seed);
    for (int i = 0; i < n; i++) src.push_back({(i == n - 1), 32'(seed * 1000 + i)});
    refresh();
  endtask

  initial begin
    int k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    push_block(5, 1);
    repeat (20) @(negedge clk);
    check(!is_open && !in_ready && src.size() == 5 && out.size() == 0, "held while closed");
    command(DDL_RDYRX, 4'h3);
    repeat (30) @(negedge clk);
    check(out.size() == 7, $sformatf("after RDYRX %0d words", out.size()));
    if (out.size() == 7) begin
      check(out[0] == {1'b1, 1'b0, 19'h0, 4'h3, DDL_CTSTW}, "CTSTW with transaction id");
      for (int i = 0; i < 5; i++) check(out[1+i] == {1'b0, 32'(1000 + i)}, "block 1 data");
      check(out[6] == {1'b1, 1'b1, 19'd5, 4'h3, DDL_FESTW}, $sformatf("FESTW %h", out[6]));
    end
    // flow control: stop, push a block, nothing may pass
    out.delete();
    fc_stop = 1;
    push_block(40, 2);
    repeat (20) @(negedge clk);
    check(out.size() == 0 && src.size() == 40, "flow control holds data");
    fc_stop = 0;
    repeat (10) @(negedge clk);
    fc_stop = 1;
    repeat (10) @(negedge clk);
    fc_stop = 0;
    // close in the middle of the block
    command(DDL_EOBTR, 4'h5);
    repeat (60) @(negedge clk);
    check(out.size() == 42, $sformatf("block 2 + FESTW + CTSTW: %0d words", out.size()));
    if (out.size() == 42) begin
      k = 0;
      for (int i = 0; i < 40; i++) check(out[i] == {1'b0, 32'(2000 + i)}, "block 2 data");
      check(out[40] == {1'b1, 1'b1, 19'd40, 4'h5, DDL_FESTW}, "FESTW block 2");
      check(out[41] == {1'b1, 1'b0, 19'h0, 4'h5, DDL_CTSTW}, "CTSTW for EOBTR after block");
    end
    check(!is_open && blocks == 2, "closed after EOBTR");
    check(stop_viol == 0, "no data accepted under flow control");
    // closed again: data held
    out.delete();
    push_block(3, 3);
    repeat (10) @(negedge clk);
    check(out.size() == 0, "held after close");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
