// mk_slowclk: slow counting source for the resource counters.
// Divides the timestamp tick by DIV_1US (period 1 us at a 10 MHz timestamp
// clock) or by DIV_10US (10 us), chosen by the CSR slow-clock bit; one
// slow_tick pulse, one node clock wide, is issued per period. A modulo
// counter of timestamp ticks is this design's way of doing the prescaling;
// the ratios are the chip's. Changing the selection restarts nothing: the
// counter simply wraps at the new modulus. Cleared by both resets.
module mk_slowclk #(
  parameter int unsigned DIV_1US  = 10,
  parameter int unsigned DIV_10US = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic srst,
  input  logic ts_tick,
  input  logic sel_10us,
  output logic slow_tick
);
  localparam int unsigned CW = $clog2(DIV_10US);
  logic [CW-1:0] cnt;
  logic [CW-1:0] last;

  assign last      = sel_10us ? CW'(DIV_10US - 1) : CW'(DIV_1US - 1);
  assign slow_tick = ts_tick && (cnt >= last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (srst)    cnt <= '0;
    else if (ts_tick) cnt <= (cnt >= last) ? '0 : cnt + 1'b1;
  end
endmodule
