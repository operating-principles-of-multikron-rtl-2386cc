// mk_timestamp: the 56-bit timestamp counter.
// The timestamp clock pin (nominally 10 MHz, common to every chip in the
// machine) is brought into the node clock domain through two flip-flops and
// its rising edges are detected; each edge adds one to the counter and is
// also offered as ts_tick to the slow-clock prescaler. Edge detection by
// sampling requires the timestamp clock to stay below one third of the node
// clock, the limit the chip specifies. Only the hardware reset clears the
// counter (the software reset leaves it alone); it is never written in
// normal operation. In test mode normal counting stops: test_set loads the
// counter with each bit of test_data repeated over a group of four counter
// bits, and test_inc adds one.
// Timing: count changes one node clock after the synchronised edge is seen,
// i.e. three node clocks after the pin rises.
module mk_timestamp #(
  parameter int unsigned TS_W = 56
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ts_clk,
  output logic                  ts_tick,
  output logic [TS_W-1:0]       count,
  input  logic                  test_mode,
  input  logic                  test_set,
  input  logic [TS_W/4-1:0]     test_data,
  input  logic                  test_inc
);
  logic [2:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], ts_clk};
  end

  assign ts_tick = sync_q[1] & ~sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (test_mode) begin
      if (test_set) begin
        for (int i = 0; i < TS_W/4; i++) count[4*i +: 4] <= {4{test_data[i]}};
      end else if (test_inc) count <= count + 1'b1;
    end else if (ts_tick) count <= count + 1'b1;
  end
endmodule
