// mk_fifo: the sample FIFO between sample assembly and the network output.
// Each entry is a 128-bit trace sample plus bit 128, set when the sample
// also carries the resource counters (held in the shadow registers). A
// circular buffer of DEPTH entries; dout shows the oldest entry whenever
// the FIFO is not empty. push while full and pop while empty are ignored;
// push and pop in one cycle are both done. The width is the chip's; the
// depth of four is this design's choice ("a small internal FIFO").
module mk_fifo #(
  parameter int unsigned W     = 129,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_p, wr_p;
  logic [AW:0]   cnt;
  logic          do_push, do_pop;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && !full;
  assign dout    = mem[rd_p];

  function automatic logic [AW-1:0] nxt(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_p] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p <= '0; wr_p <= '0; cnt <= '0;
    end else if (srst) begin
      rd_p <= '0; wr_p <= '0; cnt <= '0;
    end else begin
      if (do_push) wr_p <= nxt(wr_p);
      if (do_pop)  rd_p <= nxt(rd_p);
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
