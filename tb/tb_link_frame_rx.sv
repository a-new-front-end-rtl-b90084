// tb_link_frame_rx: self-checking test of link_frame_rx.
// The testbench builds column frames itself (SOF, header, data, CRC from the
// long-division reference, EOF) with idle words scattered inside, sends them
// and checks the frame report and the buffered data. It also sends a frame
// with a corrupted CRC (frame_ok low, crc_err counted), a comma in the wrong
// byte lane (lane_err counted, word ignored), a frame cut short by a new SOF
// (format_err counted, buffer flushed), and a frame while the previous one is
// still unacknowledged (refused).
module tb_link_frame_rx;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  link_word_t rx;
  logic frame_valid, frame_ok, frame_ack = 0, buf_empty, buf_perr, buf_pop = 0;
  logic [15:0] frame_event, frame_words, crc_err, lane_err, format_err;
  logic [5:0] frame_col;
  logic [31:0] buf_data;
  int checks = 0, failures = 0;

  link_frame_rx #(.BUF_DEPTH(600)) dut (.*);

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

  task automatic send(link_word_t w);
    rx = w;
    @(negedge clk);
    if ($urandom % 5 == 0) begin rx = LINK_IDLE; @(negedge clk); end
  endtask

  // send a frame; cut > 0 stops after that many data words
  task automatic send_frame(logic [15:0] ev, logic [5:0] col, logic [31:0] d[$],
                            bit bad_crc, int cut);
    logic [31:0] msg[$];
    logic [31:0] hdr;
    hdr = {LW_TAG_HDR, col, 4'd4, 4'h0, 16'(d.size())};
    msg.push_back(hdr);
    foreach (d[i]) msg.push_back(d[i]);
    send(link_ctrl(LC_SOF, ev));
    send('{k: 4'b0000, data: hdr});
    foreach (d[i]) begin
      if (cut > 0 && i == cut) return;
      send('{k: 4'b0000, data: d[i]});
    end
    send('{k: 4'b0000, data: ref_crc(msg) ^ (bad_crc ? 32'h0000_0100 : 32'h0)});
    send(link_ctrl(LC_EOF, 16'(d.size())));
    rx = LINK_IDLE;
  endtask

  task automatic drain_and_check(logic [31:0] d[$], logic [15:0] ev, logic [5:0] col, bit ok);
    int n;
    wait (frame_valid);
    @(negedge clk);
    check(frame_event == ev && frame_col == col && frame_words == 16'(d.size()),
          $sformatf("report ev %h col %0d words %0d", frame_event, frame_col, frame_words));
    check(frame_ok == ok, $sformatf("frame_ok %0d expected %0d", frame_ok, ok));
    n = 0;
    while (!buf_empty) begin
      check(n < d.size() && buf_data == d[n] && !buf_perr, $sformatf("buffer word %0d", n));
      buf_pop = 1;
      @(negedge clk);
      buf_pop = 0;
      n++;
    end
    check(n == d.size(), $sformatf("buffered %0d words, expected %0d", n, d.size()));
    frame_ack = 1;
    @(negedge clk);
    frame_ack = 0;
    @(negedge clk);
    check(!frame_valid, "report cleared by ack");
  endtask

  initial begin
    logic [31:0] d[$];
    rx = LINK_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // good frames of several sizes, including empty
    for (int f = 0; f < 8; f++) begin
      d.delete();
      for (int i = 0; i < (f == 0 ? 0 : $urandom % 500); i++) d.push_back({2'b10, 30'($urandom)});
      send_frame(16'(16'h3354 + f), 6'(f), d, 0, 0);
      drain_and_check(d, 16'(16'h3354 + f), 6'(f), 1);
    end
    check(crc_err == 0 && lane_err == 0 && format_err == 0, "no errors on good frames");
    // corrupted CRC
    d.delete();
    for (int i = 0; i < 20; i++) d.push_back({2'b10, 30'($urandom)});
    send_frame(16'h0042, 6'd3, d, 1, 0);
    drain_and_check(d, 16'h0042, 6'd3, 0);
    check(crc_err == 1, "CRC error counted");
    // comma in a wrong byte lane between frames: counted, ignored
    rx = '{k: 4'b0100, data: 32'h00BC_0000};
    @(negedge clk);
    rx = LINK_IDLE;
    @(negedge clk);
    check(lane_err == 1, "lane error counted");
    // truncated frame followed by a good one
    send_frame(16'h0050, 6'd1, d, 0, 7);
    d.delete();
    for (int i = 0; i < 9; i++) d.push_back({2'b10, 30'($urandom)});
    send_frame(16'h0051, 6'd1, d, 0, 0);
    check(format_err == 1, $sformatf("format error counted (%0d)", format_err));
    // a second frame before the first is acknowledged is refused
    send_frame(16'h0052, 6'd1, d, 0, 0);
    repeat (3) @(negedge clk);
    check(format_err >= 2, "unacknowledged frame refuses the next");
    drain_and_check(d, 16'h0051, 6'd1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
