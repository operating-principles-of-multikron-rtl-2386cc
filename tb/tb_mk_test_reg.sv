// tb_mk_test_reg: checks that writes are ignored outside test mode, the
// decode of every instruction field into one-shot actions, the held modes
// (FIFO group, network disable, data source) and readback.
module tb_mk_test_reg;
  logic clk = 0, rst_n = 0, srst = 0, test_mode = 0, we = 0;
  logic [47:0] wdata = 0, q;
  logic [31:0] data;
  logic set_err, set_ts, set_rc, inc_err, inc_ts, inc_rc, net_dis, src_test, load, shift;
  logic [1:0] fifo_grp;
  int checks = 0, failures = 0;

  mk_test_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    we = 1; wdata = 48'hFFFF_FFFF_FFFF; #1;
    check(!set_rc && !inc_rc && !load && !shift, "ignored outside test mode");
    @(negedge clk); we = 0;
    check(q == 0 && !net_dis, "not stored outside test mode");
    test_mode = 1;
    for (int s = 0; s < 4; s++) for (int c = 0; c < 4; c++) begin
      we = 1; wdata = (48'(c) << 34) | (48'(s) << 32); #1;
      check(set_err == (s == 1) && set_ts == (s == 2) && set_rc == (s == 3), "set decode");
      check(inc_err == (c == 1) && inc_ts == (c == 2) && inc_rc == (c == 3), "inc decode");
      @(negedge clk);
    end
    we = 1; wdata = {7'h0, 1'b1, 1'b1, 1'b1, 2'b10, 4'h0, 32'hDEAD_BEEF}; #1;
    check(load && shift && data == 32'hDEAD_BEEF, "load/shift pulses");
    @(negedge clk); we = 0; #1;
    check(!load && !shift, "pulses end");
    check(fifo_grp == 2'b10 && net_dis && src_test && q[31:0] == 32'hDEAD_BEEF, "held modes");
    test_mode = 0; #1;
    check(fifo_grp == 0 && !net_dis && !src_test, "modes inactive outside test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
