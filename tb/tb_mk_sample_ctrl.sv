// tb_mk_sample_ctrl: checks every outcome of a trigger: filter/sampling
// drop, accepted trace and resource samples (word layout, header, take),
// discard on full FIFO or busy shadow with the sticky overrun flags and
// overrun count, the flags carried by and cleared after the next good
// sample, waiting when wait-on-overrun is set, and test-data samples.
module tb_mk_sample_ctrl;
  import mk_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0, req = 0, resource = 0;
  logic [3:0] level = 0;
  logic [47:0] user = 0;
  logic [2:0] cpu = 0;
  logic [31:0] src = 0, test_data = 0;
  logic [39:0] ts = 0;
  logic sampling_en = 0, wait_on_ovr = 0, fifo_full = 0, shadow_busy = 0, test_src = 0, test_load = 0;
  logic [15:0] filter = 0;
  logic done, stall, fifo_push, take, ovr_inc, fifo_ovr, rsrc_ovr;
  logic [128:0] fifo_din;
  int checks = 0, failures = 0;

  mk_sample_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // expected word, built independently of the package struct
  function automatic logic [128:0] exp_word(input logic r, input logic fo, input logic ro);
    return {r, cpu, r ? 2'b11 : 2'b10, fo, ro, 1'b0, ts, src, user};
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    user = 48'h1234_5678_9ABC; cpu = 3'd5; src = 32'hCAFE_0001; ts = 40'h12_3456_789A;
    // sampling disabled: dropped without overrun
    req = 1; level = 4'd3; #1;
    check(done && !fifo_push && !ovr_inc, "disabled: dropped");
    @(negedge clk); sampling_en = 1; filter = 16'h0008; level = 4'd2; #1;
    check(done && !fifo_push && !ovr_inc, "filtered out");
    level = 4'd3; #1;
    check(done && fifo_push && !take && fifo_din == exp_word(0, 0, 0), $sformatf("trace word %h", fifo_din));
    resource = 1; #1;
    check(done && fifo_push && take && fifo_din == exp_word(1, 0, 0), "resource word");
    // busy shadow, no wait: discarded, flag, count
    @(negedge clk); shadow_busy = 1; #1;
    check(done && !fifo_push && !take && ovr_inc && !stall, "resource overrun discard");
    @(negedge clk);
    check(rsrc_ovr && !fifo_ovr, "resource overrun flag");
    resource = 0; fifo_full = 1; #1;
    check(done && !fifo_push && ovr_inc, "fifo overrun discard");
    @(negedge clk);
    check(rsrc_ovr && fifo_ovr, "both flags");
    fifo_full = 0; #1;
    check(fifo_push && fifo_din == exp_word(0, 1, 1), "flags carried in header");
    @(negedge clk);
    check(!rsrc_ovr && !fifo_ovr, "flags cleared by good sample");
    // wait on overrun
    wait_on_ovr = 1; fifo_full = 1; #1;
    check(stall && !done && !ovr_inc && !fifo_push, "stall while full");
    @(negedge clk); fifo_full = 0; #1;
    check(!stall && done && fifo_push, "proceeds when space");
    @(negedge clk); req = 0;
    // test data source
    test_data = 32'h8765_4321; test_load = 1; #1;
    check(fifo_push && fifo_din == {1'b1, {4{32'h8765_4321}}}, "test load word");
    test_load = 0; test_src = 1; req = 1; resource = 1; shadow_busy = 1; wait_on_ovr = 0; #1;
    check(fifo_push && !take && fifo_din == {1'b1, {4{32'h8765_4321}}}, "test-source trigger");
    @(negedge clk); req = 0; test_src = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
