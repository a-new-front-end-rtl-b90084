// tb_crc32_d32: self-checking test of crc32_d32.
// The reference is a plain polynomial long division: the message bits, with
// the first 32 inverted (initial value FFFFFFFF) and 32 zero bits appended,
// are divided by x^32 + 04C11DB7; the remainder is the expected CRC. Random
// messages of 1 to 40 words, with idle cycles (en low) mixed in, and a check
// that init restarts the register.
module tb_crc32_d32;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [31:0] data = '0, crc, crc_next;
  int checks = 0, failures = 0;

  crc32_d32 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_crc(logic [31:0] msg[$]);
    bit bits[$];
    bit [32:0] poly = 33'h1_04C1_1DB7;
    bit [31:0] rem;
    foreach (msg[i]) for (int b = 31; b >= 0; b--) bits.push_back(msg[i][b]);
    for (int i = 0; i < 32; i++) bits[i] = !bits[i];
    for (int i = 0; i < 32; i++) bits.push_back(1'b0);
    for (int i = 0; i + 32 < bits.size(); i++)
      if (bits[i]) for (int j = 0; j <= 32; j++) bits[i + j] ^= poly[32 - j];
    for (int j = 0; j < 32; j++) rem[31 - j] = bits[bits.size() - 32 + j];
    return rem;
  endfunction

  initial begin
    logic [31:0] msg[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (crc !== 32'hFFFF_FFFF) begin failures++; $display("FAIL: reset value"); end
    for (int t = 0; t < 200; t++) begin
      msg.delete();
      init = 1;
      @(negedge clk);
      init = 0;
      for (int n = 0; n < 1 + ($urandom % 40); n++) begin
        if ($urandom % 4 == 0) begin en = 0; @(negedge clk); end
        data = $urandom;
        en   = 1;
        msg.push_back(data);
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (crc !== ref_crc(msg)) begin
        failures++;
        $display("FAIL: msg %0d len %0d crc %h expected %h", t, msg.size(), crc, ref_crc(msg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
