// mk_shadow: the single rank of resource-counter shadow registers.
// take copies every live counter at once and marks the rank busy (full) for
// a resource sample; the network interface raises free when the last byte
// of that sample has gone out (test mode shift-out also raises it).
// Processor reads of a counter go through here as well:
//   shadow free  -> cycle 1 copies all counters (busy stays clear), cycle 2
//                   returns the selected copy with bit 63 = 0;
//   shadow busy, read_wait = 1 -> rd_stall is raised until busy clears, then
//                   the read proceeds as above;
//   shadow busy, read_wait = 0 -> returns the busy rank's (wrong) value
//                   at once with bit 63 = 1, leaving the rank untouched.
// rd_req must be held until rd_done. The two-cycle read is this design's
// reading of the one extra bus cycle a counter read costs.
module mk_shadow #(
  parameter int unsigned K = 16,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                srst,
  input  logic [K-1:0][W-1:0] counts,
  input  logic                take,
  input  logic                free,
  input  logic                rd_req,
  input  logic [$clog2(K)-1:0] rd_idx,
  input  logic                read_wait,
  output logic                rd_done,
  output logic [63:0]         rd_data,
  output logic                rd_stall,
  output logic                busy,
  output logic [K-1:0][W-1:0] shadow
);
  logic copied;   // read copy made in the previous cycle
  logic rd_copy;

  assign rd_copy  = rd_req && !copied && !busy;
  assign rd_stall = rd_req && !copied && busy && read_wait;
  assign rd_done  = rd_req && (copied || (busy && !read_wait));

  always_comb begin
    rd_data = '0;
    rd_data[W-1:0] = shadow[rd_idx];
    rd_data[63]    = !copied;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow <= '0; busy <= 1'b0; copied <= 1'b0;
    end else if (srst) begin
      shadow <= '0; busy <= 1'b0; copied <= 1'b0;
    end else begin
      copied <= rd_copy;
      if (take || rd_copy) shadow <= counts;
      if (take)      busy <= 1'b1;
      else if (free) busy <= 1'b0;
    end
  end
endmodule
