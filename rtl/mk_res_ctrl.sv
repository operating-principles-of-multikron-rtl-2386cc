// mk_res_ctrl: resource counter control registers.
// MUX SEL is a 64-bit register holding a two-bit source field per counter:
// the low bit of counter i's field is register bit i and the high bit is
// bit 32+i. Only counters 0..K-1 are implemented; the other bits read as
// zero. The Enable register sets enable bits where a one is written, the
// Disable register clears them where a one is written (zeros leave a bit
// alone). The Reset register is write-only and self-clearing: a one in bit i
// gives counter i a one-cycle clear pulse in the cycle of the write.
// Reset values (all counters disabled, slow clock selected) are this
// design's choice. Writes take effect on the clock edge of the write cycle.
module mk_res_ctrl #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         srst,
  input  logic         we_muxsel,
  input  logic         we_enable,
  input  logic         we_disable,
  input  logic         we_reset,
  input  logic [63:0]  wdata,
  output logic [63:0]  muxsel,
  output logic [K-1:0] enable,
  output logic [K-1:0] clr
);
  logic [K-1:0] sel_lo, sel_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_lo <= '0; sel_hi <= '0; enable <= '0;
    end else if (srst) begin
      sel_lo <= '0; sel_hi <= '0; enable <= '0;
    end else begin
      if (we_muxsel) begin
        sel_lo <= wdata[K-1:0];
        sel_hi <= wdata[32 +: K];
      end
      if (we_enable)       enable <= enable | wdata[K-1:0];
      else if (we_disable) enable <= enable & ~wdata[K-1:0];
    end
  end

  always_comb begin
    muxsel = '0;
    muxsel[K-1:0]  = sel_lo;
    muxsel[32 +: K] = sel_hi;
  end

  assign clr = we_reset ? wdata[K-1:0] : '0;
endmodule
