// tb_mk_timestamp: drives the timestamp clock at one fifth of the node
// clock and checks that the counter counts each rising edge exactly once,
// that ts_tick pulses once per edge, that the three-clock latency holds,
// that test mode stops counting and that test set/increment work.
module tb_mk_timestamp;
  logic clk = 0, rst_n = 0, ts_clk = 0;
  logic ts_tick, test_mode = 0, test_set = 0, test_inc = 0;
  logic [13:0] test_data = '0;
  logic [55:0] count;
  int checks = 0, failures = 0, ticks = 0;

  mk_timestamp dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ts_tick) ticks++;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    // 40 timestamp periods of 5 node clocks each
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); ts_clk = 1; repeat (2) @(negedge clk); ts_clk = 0; repeat (3) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    check(count == 56'd40, $sformatf("count %0d after 40 edges", count));
    check(ticks == 40, "ts_tick once per edge");
    // latency: pin rises, count changes three node clocks later
    @(negedge clk); ts_clk = 1;
    @(posedge clk); #1 check(count == 40, "no change after 1 clk");
    @(posedge clk); #1 check(count == 40, "no change after 2 clk");
    @(posedge clk); #1 check(count == 41, "change after 3 clk");
    @(negedge clk); ts_clk = 0;
    // test mode: normal counting stops, set and increment work
    test_mode = 1;
    repeat (3) begin @(negedge clk); ts_clk = 1; repeat (3) @(negedge clk); ts_clk = 0; repeat (3) @(negedge clk); end
    check(count == 41, "no counting in test mode");
    test_data = 14'b10_0000_0000_0101; test_set = 1; @(negedge clk); test_set = 0;
    check(count == 56'hF0_0000_0000_0F0F, $sformatf("test set pattern %h", count));
    test_inc = 1; @(negedge clk); test_inc = 0;
    check(count == 56'hF0_0000_0000_0F10, "test increment");
    test_mode = 0;
    // hardware reset clears
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(count == 0, "hardware reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
