// mk_src_addr: the N source address registers (node.process identity of the
// process running on each processor). The processor writes and reads them
// by index (the three low address bits of offsets 16..23); a second read
// port, indexed by the encoded CPU ID of the processor taking a sample,
// supplies the source field of the trace sample. Writes land on the clock
// edge; both read ports are combinational. Reset to zero (this design's
// choice).
module mk_src_addr #(
  parameter int unsigned N = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  srst,
  input  logic                  we,
  input  logic [$clog2(N)-1:0]  waddr,
  input  logic [31:0]           wdata,
  input  logic [$clog2(N)-1:0]  raddr,
  output logic [31:0]           rdata,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [31:0]           sel_data
);
  logic [N-1:0][31:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    regs <= '0;
    else if (srst) regs <= '0;
    else if (we)   regs[waddr] <= wdata;
  end

  assign rdata    = regs[raddr];
  assign sel_data = regs[sel];
endmodule
