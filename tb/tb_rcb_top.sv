// tb_rcb_top: self-checking test of rcb_top with behavioural column
// controllers.
// Each link answers a trigger word, after a random delay, with a frame of
// random data words (built with the reference CRC and idle words mixed in).
// The testbench checks every output word of each event (CDH, link headers,
// data in link order) on the GBT side and then on the DDL2 side, the busy
// flag, the path switch, the FESTW block length, and that a link frame with a
// wrong CRC is reported in the CDH error mask and the link header.
module tb_rcb_top;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 0, rst_n = 0, l0 = 0, busy;
  link_word_t link_rx [N], link_tx [N];
  logic siu_en = 0, ddl_cmd_valid = 0, ddl_fc_stop = 0, gbt_ready = 1;
  logic [31:0] ddl_cmd = '0;
  logic ddl_valid, ddl_ctrl, ddl_open, gbt_valid, gbt_last;
  logic [31:0] ddl_data, gbt_data;
  logic [15:0] event_no, buf_perr_count;
  logic [31:0] l0_accepted, l0_refused, timeouts, ddl_blocks;
  logic [15:0] crc_err [N], lane_err [N], format_err [N];
  int checks = 0, failures = 0;
  bit bad_crc_link1 = 0;

  rcb_top #(.N_LINKS(N), .BUF_DEPTH(1024)) dut (.*);

  always #5 clk = ~clk;

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

  // behavioural columns: the frames they sent, per link
  logic [31:0] sent [N][$];
  for (genvar i = 0; i < N; i++) begin : g_col
    initial begin
      link_rx[i] = LINK_IDLE;
      forever begin
        logic [15:0] ev;
        logic [31:0] msg[$];
        int n;
        @(negedge clk);
        if (link_is_ctrl(link_tx[i], LC_TRIG)) begin
          ev = link_tx[i].data[31:16];
          n = $urandom % 200;
          sent[i].delete();
          msg.delete();
          repeat ($urandom % 100) @(negedge clk);
          msg.push_back({LW_TAG_HDR, 6'(i), 4'd4, 4'h0, 16'(n)});
          for (int k = 0; k < n; k++) msg.push_back({LW_TAG_DATA, 30'($urandom)});
          link_rx[i] = link_ctrl(LC_SOF, ev);
          @(negedge clk);
          foreach (msg[k]) begin
            link_rx[i] = '{k: 4'b0000, data: msg[k]};
            if (k > 0) sent[i].push_back(msg[k]);
            @(negedge clk);
            if ($urandom % 8 == 0) begin link_rx[i] = LINK_IDLE; @(negedge clk); end
          end
          link_rx[i] = '{k: 4'b0000,
                         data: ref_crc(msg) ^ ((i == 1 && bad_crc_link1) ? 32'h1 : 32'h0)};
          @(negedge clk);
          link_rx[i] = link_ctrl(LC_EOF, 16'(n));
          @(negedge clk);
          link_rx[i] = LINK_IDLE;
        end
      end
    end
  end

  logic [31:0] got[$], ctrl_words[$];
  always @(posedge clk) begin
    if (gbt_valid && gbt_ready) got.push_back(gbt_data);
    if (ddl_valid) begin
      if (ddl_ctrl) ctrl_words.push_back(ddl_data);
      else got.push_back(ddl_data);
    end
  end
  always @(negedge clk) gbt_ready = ($urandom % 4) != 0;

  task automatic run_event(int ev, logic [3:0] bad);
    logic [31:0] exp[$];
    int words;
    got.delete();
    ctrl_words.delete();
    @(negedge clk);
    l0 = 1;
    @(negedge clk);
    l0 = 0;
    check(busy, "busy after L0");
    wait (!busy);
    repeat (4) @(negedge clk);
    words = CDH_WORDS;
    for (int i = 0; i < N; i++) words += 1 + sent[i].size();
    exp.push_back(words * 4);
    exp.push_back({CDH_VERSION, 8'h00, 16'(ev)});
    exp.push_back(ev);
    exp.push_back({16'h0, 8'h0F, 4'h0, bad});
    exp.push_back(0);
    for (int i = 5; i < CDH_WORDS; i++) exp.push_back(0);
    for (int i = 0; i < N; i++) begin
      exp.push_back({2'b11, 3'(i), 1'b1, !bad[i], 3'h0, 6'(i), 16'(sent[i].size())});
      foreach (sent[i][k]) exp.push_back(sent[i][k]);
    end
    check(got.size() == exp.size(), $sformatf("event %0d: %0d words, expected %0d",
                                              ev, got.size(), exp.size()));
    if (got.size() == exp.size())
      foreach (exp[k]) check(got[k] == exp[k], $sformatf("event %0d word %0d", ev, k));
    if (siu_en)
      check(ctrl_words.size() >= 1 && ctrl_words[$] == {1'b1, 19'(words), 4'h7, DDL_FESTW},
            "FESTW with block length");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int e = 1; e <= 3; e++) run_event(e, 4'h0);
    siu_en = 1;
    @(negedge clk);
    ddl_cmd_valid = 1; ddl_cmd = {20'h0, 4'h7, DDL_RDYRX};
    @(negedge clk);
    ddl_cmd_valid = 0;
    for (int e = 4; e <= 5; e++) run_event(e, 4'h0);
    bad_crc_link1 = 1;
    run_event(6, 4'b0010);
    check(crc_err[1] == 1, "CRC error counted on link 1");
    check(ddl_blocks == 3, "three DDL2 blocks");
    check(l0_accepted == 6 && timeouts == 0, "trigger and timeout counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
