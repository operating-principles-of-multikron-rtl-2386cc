// tb_mk_err_counters: counts random increment pulses against a model,
// checks clear on write, wrap-around past all ones, and the test-mode
// nibble-pattern set and common increment.
module tb_mk_err_counters;
  logic clk = 0, rst_n = 0, srst = 0, clr_wait = 0, clr_ovr = 0, inc_wait = 0, inc_ovr = 0;
  logic test_mode = 0, test_set = 0, test_inc = 0;
  logic [7:0] test_data = 0;
  logic [31:0] wait_cnt, ovr_cnt, mw, mo;
  int checks = 0, failures = 0;

  mk_err_counters dut (.*);
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
    repeat (2) @(negedge clk); rst_n = 1; mw = 0; mo = 0;
    for (int i = 0; i < 500; i++) begin
      inc_wait = 1'($urandom % 2); inc_ovr = ($urandom % 3) == 0;
      clr_wait = ($urandom % 97) == 0; clr_ovr = ($urandom % 89) == 0;
      mw = clr_wait ? 0 : mw + 32'(inc_wait); mo = clr_ovr ? 0 : mo + 32'(inc_ovr);
      @(negedge clk);
    end
    inc_wait = 0; inc_ovr = 0; clr_wait = 0; clr_ovr = 0;
    check(wait_cnt == mw && ovr_cnt == mo, $sformatf("counts %0d/%0d exp %0d/%0d", wait_cnt, ovr_cnt, mw, mo));
    test_mode = 1; test_data = 8'hA5; test_set = 1; @(negedge clk); test_set = 0;
    check(wait_cnt == 32'hF0F0_0F0F && ovr_cnt == 32'hF0F0_0F0F, $sformatf("pattern %h", wait_cnt));
    test_data = 8'hFF; test_set = 1; @(negedge clk); test_set = 0;
    test_inc = 1; @(negedge clk); test_inc = 0;
    check(wait_cnt == 0 && ovr_cnt == 0, "wrap to zero");
    inc_wait = 1; @(negedge clk); inc_wait = 0;
    check(wait_cnt == 0, "no normal count in test mode");
    test_mode = 0; inc_ovr = 1; @(negedge clk); inc_ovr = 0;
    check(ovr_cnt == 1, "normal count again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
