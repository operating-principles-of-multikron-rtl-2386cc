// mk_net_if: the collection-network output (network interface mux).
// The chip drives a network clock (net_clk) at half the node clock and
// sends one ten-bit element per network clock: a data byte, its odd parity
// bit and an active-high end-of-message flag on the last byte of a sample.
// load_n (Load External FIFO, active low) marks a network clock whose byte
// the receiver must take on the rising net_clk edge; it is only asserted if
// ext_fifo_free (External FIFO Free, active high) was high at the previous
// rising net_clk edge. Outputs change on the node clock edge that takes
// net_clk low, half a network clock before the receiving edge.
// A trace sample is the 16 bytes of the FIFO head, header first and each
// field most significant byte first. If its bit 128 is set, the 64 bytes
// of the shadow registers follow (counter 0 first), making 80 bytes; after
// the last byte the FIFO entry is popped and, for a resource sample, the
// shadow registers are freed. The byte order inside a field is this
// design's choice. The test register can disable the output (net_dis);
// a sample already started then pauses. Peak rate: one byte per two node
// clocks (25 Mbyte/s at 50 MHz).
module mk_net_if
  import mk_pkg::*;
#(
  parameter int unsigned K = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 srst,
  input  logic [FIFO_W-1:0]    fifo_dout,
  input  logic                 fifo_empty,
  output logic                 fifo_pop,
  input  logic [K-1:0][31:0]   shadow,
  output logic                 shadow_free,
  input  logic                 net_dis,
  input  logic                 ext_fifo_free,
  output logic                 net_clk,
  output logic [7:0]           net_data,
  output logic                 net_parity,
  output logic                 net_eom,
  output logic                 load_n
);
  localparam int unsigned NB = 16 + 4 * K;  // bytes in a resource sample
  localparam int unsigned BW = $clog2(NB);

  logic          ph;       // network clock phase (= net_clk)
  logic          free_q;   // External FIFO Free at the last rising net_clk
  logic [BW-1:0] idx;      // next byte of the current sample
  logic [BW-1:0] last;
  logic          send, is_last;
  logic [7:0]    cur;
  logic [BW-1:0] j;

  assign net_clk = ph;
  assign last    = fifo_dout[TRACE_W] ? BW'(NB - 1) : BW'(15);
  assign send    = ph && !fifo_empty && free_q && !net_dis;
  assign is_last = (idx == last);
  assign fifo_pop    = send && is_last;
  assign shadow_free = send && is_last && fifo_dout[TRACE_W];

  always_comb begin
    j = idx - BW'(16);
    if (idx < BW'(16)) cur = fifo_dout[TRACE_W - 1 - 8 * idx -: 8];
    else               cur = shadow[j[BW-1:2]][31 - 8 * j[1:0] -: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= 1'b0; free_q <= 1'b0; idx <= '0;
      net_data <= '0; net_parity <= 1'b1; net_eom <= 1'b0; load_n <= 1'b1;
    end else if (srst) begin
      ph <= 1'b0; free_q <= 1'b0; idx <= '0;
      net_data <= '0; net_parity <= 1'b1; net_eom <= 1'b0; load_n <= 1'b1;
    end else begin
      ph <= !ph;
      if (!ph) free_q <= ext_fifo_free;   // rising net_clk edge
      else begin                          // falling net_clk edge
        load_n <= !send;
        if (send) begin
          net_data   <= cur;
          net_parity <= odd_parity(cur);
          net_eom    <= is_last;
          idx        <= is_last ? '0 : idx + 1'b1;
        end
      end
    end
  end
endmodule
