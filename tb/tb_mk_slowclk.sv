// tb_mk_slowclk: feeds 1000 timestamp ticks (one every three node clocks)
// and expects 100 slow ticks with the 1 us setting and 10 with the 10 us
// setting; also checks the spacing of the ticks and the software reset.
module tb_mk_slowclk;
  logic clk = 0, rst_n = 0, srst = 0, ts_tick = 0, sel_10us = 0, slow_tick;
  int checks = 0, failures = 0, n = 0, tk = 0, last_tk = -1, gap_bad = 0;

  mk_slowclk dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ts_tick) tk++;
    if (slow_tick) begin
      n++;
      if (last_tk >= 0 && (tk - last_tk) != (sel_10us ? 100 : 10)) gap_bad++;
      last_tk = tk;
    end
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic run(input int t);
    for (int i = 0; i < t; i++) begin
      @(negedge clk); ts_tick = 1; @(negedge clk); ts_tick = 0; @(negedge clk);
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(1000);
    check(n == 100, $sformatf("1us: %0d slow ticks", n));
    check(gap_bad == 0, "1us spacing 10 ticks");
    @(negedge clk); srst = 1; @(negedge clk); srst = 0;
    sel_10us = 1; n = 0; last_tk = -1; tk = 0;
    run(1000);
    check(n == 10, $sformatf("10us: %0d slow ticks", n));
    check(gap_bad == 0, "10us spacing 100 ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
