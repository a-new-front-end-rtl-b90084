// crc32_d32: CRC-32 over a stream of 32-bit words, one word per clock.
//
// The CRC travels with the data between the column controllers and the RCB
// so that the RCB can detect corrupted frames. The readout plan names the CRC
// but not its polynomial: this block uses the common CRC-32 polynomial
// 04C11DB7, initial value FFFFFFFF, bits taken MSB first, no final inversion.
//
// Interface: init loads the initial value (and wins over en); en folds data
// into the register at the clock edge; crc is the running value, so after the
// last word it is the check word to send. crc_next is the value crc would take
// with en high this cycle, used by receivers to compare without a wait state.
module crc32_d32
  import cpv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [31:0] data,
  output logic [31:0] crc,
  output logic [31:0] crc_next
);
  function automatic logic [31:0] step(logic [31:0] c, logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 31; i >= 0; i--) begin
      if (r[31] ^ d[i]) r = {r[30:0], 1'b0} ^ CRC_POLY;
      else              r = {r[30:0], 1'b0};
    end
    return r;
  endfunction

  assign crc_next = step(crc, data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= CRC_INIT;
    else if (init) crc <= CRC_INIT;
    else if (en)   crc <= crc_next;
  end
endmodule
