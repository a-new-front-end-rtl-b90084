// parity_fifo: synchronous FIFO that keeps an even-parity bit beside every
// stored word, the parity-check scheme against single-event upsets in FPGA
// memory cells. The parity is computed on write and recomputed on read; a
// mismatch raises rd_perr together with the word at the head (rd_data).
//
// Interface: wr_en/wr_data push when not full; rd_en pops when not empty.
// The head word is shown first-word-fall-through: rd_data is valid whenever
// empty is low, and rd_en removes it at the clock edge. count is the number
// of stored words. DEPTH need not be a power of two.
//
// The parity protection follows the readout's SEU plan; the FIFO form, the
// first-word-fall-through head and the even parity are this design's choice.
module parity_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 2560,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,      // synchronous flush
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          rd_perr,
  output logic          empty,
  output logic          full,
  output logic [AW:0]   count
);
  logic [W:0]    mem [DEPTH];  // {parity, data}
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= {^wr_data, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= nxt(wptr);
      if (do_rd) rptr <= nxt(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  logic [W:0] head;
  assign head    = mem[rptr];
  assign rd_data = head[W-1:0];
  assign rd_perr = !empty && (head[W] != ^head[W-1:0]);

endmodule
