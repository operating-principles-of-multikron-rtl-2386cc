// mk_csr: Control and Status Register and Filter Register.
// CSR writes are commands: a one in a bit position performs that bit's
// action, a zero does nothing. Pairs of bits set and clear four mode bits:
// 0/1 sampling enable/disable, 2/3 write wait on overrun / discard,
// 4/5 read wait on busy shadow registers / return error, 14/15 slow clock
// 10 us / 1 us. If a write sets both bits of a pair, the clearing bit wins
// (this design's choice). A CSR read returns the mode bits in the even
// positions, the status bits FIFO full (6), shadow registers full (7),
// FIFO overrun (8), shadow overrun (9), FIFO output bit 128 (10), the wait
// state count (13:12), and zeros elsewhere. The wait-state count comes from
// two pins sampled while the hardware reset is held. All modes reset to off
// (sampling disabled, discard on overrun, no read wait, 1 us slow clock).
// The Filter register holds 16 enables, one per filter level; it resets to
// all zeros (this design's choice) and reads back in bits 15:0.
// rst_n is used both as the asynchronous reset of the mode bits and, in
// the wait-state latch, as a synchronous load enable; lint tools note the
// double use, which is intended.
module mk_csr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        we_csr,
  input  logic        we_filter,
  input  logic [31:0] wdata,
  input  logic [1:0]  ws_pins,
  input  logic        fifo_full,
  input  logic        shadow_full,
  input  logic        fifo_ovr,
  input  logic        rsrc_ovr,
  input  logic        fifo_bit128,
  output logic [31:0] csr_rdata,
  output logic [15:0] filter,
  output logic        sampling_en,
  output logic        wait_on_ovr,
  output logic        read_wait,
  output logic        slow_10us,
  output logic [1:0]  wait_states
);
  // Wait-state pins are valid only while the hardware reset is held.
  always_ff @(posedge clk) begin
    if (!rst_n) wait_states <= ws_pins;
  end

  function automatic logic setclr(input logic cur, input logic s, input logic c);
    return c ? 1'b0 : (s ? 1'b1 : cur);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sampling_en <= 1'b0; wait_on_ovr <= 1'b0; read_wait <= 1'b0; slow_10us <= 1'b0;
      filter <= '0;
    end else if (srst) begin
      sampling_en <= 1'b0; wait_on_ovr <= 1'b0; read_wait <= 1'b0; slow_10us <= 1'b0;
      filter <= '0;
    end else begin
      if (we_csr) begin
        sampling_en <= setclr(sampling_en, wdata[0],  wdata[1]);
        wait_on_ovr <= setclr(wait_on_ovr, wdata[2],  wdata[3]);
        read_wait   <= setclr(read_wait,   wdata[4],  wdata[5]);
        slow_10us   <= setclr(slow_10us,   wdata[14], wdata[15]);
      end
      if (we_filter) filter <= wdata[15:0];
    end
  end

  always_comb begin
    csr_rdata        = '0;
    csr_rdata[0]     = sampling_en;
    csr_rdata[2]     = wait_on_ovr;
    csr_rdata[4]     = read_wait;
    csr_rdata[6]     = fifo_full;
    csr_rdata[7]     = shadow_full;
    csr_rdata[8]     = fifo_ovr;
    csr_rdata[9]     = rsrc_ovr;
    csr_rdata[10]    = fifo_bit128;
    csr_rdata[13:12] = wait_states;
    csr_rdata[14]    = slow_10us;
  end
endmodule
