// mk_res_counters: the K resource counters with their input multiplexers.
// Each 32-bit counter adds one per node clock in which its selected source
// fires and its enable bit is set. The sources (two-bit MUX SEL field) are:
// 00 the slow clock tick, 01 rising edges on the counter's own external
// pin, 10 a processor write to the counter's address, 11 every node clock.
// Counters saturate at all ones instead of wrapping, and a clear pulse from
// the Reset register sets a counter to zero (clear wins over counting).
// External pins may carry rising edges as fast as the node clock. Each pin
// therefore clocks a small 3-bit Gray-code counter of its own; the Gray
// value is synchronised into the node clock domain by two flip-flops and
// the number of new edges since the previous node clock (normally 0 or 1,
// at most 3) is added to the counter. This front end is this design's way
// of meeting the "up to the processor clock frequency" input rate; edges
// arrive in the count three node clocks after they occur.
// In test mode normal counting stops; test_set loads all counters with
// test_data and test_inc adds one to all.
module mk_res_counters
  import mk_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                srst,
  input  logic [63:0]         muxsel,
  input  logic [K-1:0]        enable,
  input  logic [K-1:0]        clr,
  input  logic                slow_tick,
  input  logic [K-1:0]        ext_in,
  input  logic [K-1:0]        sw_inc,
  input  logic                test_mode,
  input  logic                test_set,
  input  logic [W-1:0]        test_data,
  input  logic                test_inc,
  output logic [K-1:0][W-1:0] count
);
  logic [K-1:0][2:0] gray, g1, g2, g3;
  logic [K-1:0][2:0] ext_delta;
  logic [K-1:0]      ev;

  function automatic logic [2:0] gray2bin(input logic [2:0] g);
    return {g[2], g[2] ^ g[1], g[2] ^ g[1] ^ g[0]};
  endfunction

  function automatic logic [2:0] bin2gray(input logic [2:0] b);
    return b ^ (b >> 1);
  endfunction

  // Edge counters clocked by the external pins themselves
  for (genvar i = 0; i < K; i++) begin : g_ext
    logic [2:0] gq;
    always_ff @(posedge ext_in[i] or negedge rst_n) begin
      if (!rst_n) gq <= '0;
      else        gq <= bin2gray(gray2bin(gq) + 3'd1);
    end
    assign gray[i] = gq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= '0; g2 <= '0; g3 <= '0;
    end else begin
      g1 <= gray; g2 <= g1; g3 <= g2;
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++) ext_delta[i] = gray2bin(g2[i]) - gray2bin(g3[i]);
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      case (cnt_src_e'({muxsel[32+i], muxsel[i]}))
        SRC_SLOW: ev[i] = slow_tick;
        SRC_EXT:  ev[i] = (ext_delta[i] != 3'd0);
        SRC_SW:   ev[i] = sw_inc[i];
        default:  ev[i] = 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (srst) count <= '0;
    else begin
      for (int i = 0; i < K; i++) begin
        if (clr[i]) count[i] <= '0;
        else if (test_mode) begin
          if (test_set) count[i] <= test_data;
          else if (test_inc) count[i] <= count[i] + 1'b1;
        end else if (enable[i] && ev[i]) begin
          // add the events, sticking at all ones
          logic [W:0] sum;
          logic [1:0] src;
          src = {muxsel[32+i], muxsel[i]};
          sum = {1'b0, count[i]} + ((src == SRC_EXT) ? (W+1)'(ext_delta[i]) : (W+1)'(1));
          count[i] <= sum[W] ? '1 : sum[W-1:0];
        end
      end
    end
  end
endmodule
