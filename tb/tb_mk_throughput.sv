// tb_mk_throughput: the chip's collection-rate workload at default sizes.
// A processor issues back-to-back sample triggers with write-wait on
// overrun enabled, so none are lost, and the network receiver is always
// free. The test measures the spacing of end-of-message bytes in steady
// state: 16-byte trace samples must leave every 32 node clocks (at 50 MHz,
// 1.56 million samples/s) and 80-byte resource samples every 160 node
// clocks (0.31 million samples/s), i.e. one byte per network clock, 25
// Mbyte/s. It also checks that the shadow registers stay busy for 160
// node clocks per resource sample and that no sample is lost.
`timescale 1ns/1ps
module tb_mk_throughput;
  logic clk = 0, rst_n = 0, ts_clk = 0;
  logic [6:0] addr = 0;
  logic rd_n = 1, wr_n = 1, data_oe, rdy_n;
  logic [63:0] data_i = 0, data_o;
  logic [7:0] cpu_id = 8'h01;
  logic [1:0] ws_pins = 2'd0;
  logic [15:0] ext_in = 0;
  logic test_mode = 0, ext_fifo_free = 1;
  logic net_clk, net_parity, net_eom, load_ext_fifo_n;
  logic [7:0] net_data;

  multikron dut (.*);

  always #10 clk = ~clk;
  always #50 ts_clk = ~ts_clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint eom_t [$];
  int bytes = 0;
  int busy_len = 0, busy_max = 0;

  always @(posedge clk) begin
    cyc++;
    if (dut.shadow_busy) busy_len++;
    else begin if (busy_len > busy_max) busy_max = busy_len; busy_len = 0; end
  end
  always @(posedge net_clk) if (!load_ext_fifo_n) begin
    bytes++;
    if (net_eom) eom_t.push_back(cyc);
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input logic [6:0] a, input logic [63:0] d);
    @(negedge clk); addr = a; data_i = d; wr_n = 0;
    do @(posedge clk); while (rdy_n);
    @(negedge clk); wr_n = 1;
  endtask

  // issue n samples, return steady-state clocks per sample
  task automatic stream(input logic res, input int n, output int per, output int lost);
    int e0;
    e0 = eom_t.size();
    for (int i = 0; i < n; i++) wr({2'b11, res, 4'd0}, 64'(i));
    while (eom_t.size() < e0 + n && cyc < 200000) @(negedge clk);
    lost = e0 + n - eom_t.size();
    per = int'(eom_t[eom_t.size() - 1] - eom_t[eom_t.size() - 11]) / 10;
  endtask

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int per, lost, b0;
    repeat (6) @(negedge clk); rst_n = 1;
    wr(7'd4, 64'hFFFF);
    wr(7'd1, 64'h5);                 // sampling on, wait on overrun
    b0 = bytes;
    stream(0, 40, per, lost);
    $display("trace samples: %0d node clocks each", per);
    check(lost == 0, "no trace sample lost");
    check(per == 32, $sformatf("trace sample period %0d, expected 32", per));
    check(bytes - b0 == 40 * 16, "trace bytes");
    b0 = bytes;
    stream(1, 20, per, lost);
    $display("resource samples: %0d node clocks each", per);
    check(lost == 0, "no resource sample lost");
    check(per == 160, $sformatf("resource sample period %0d, expected 160", per));
    check(bytes - b0 == 20 * 80, "resource bytes");
    check(busy_max >= 155 && busy_max <= 165, $sformatf("shadow busy for %0d clocks", busy_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
