// tb_mk_res_ctrl: checks MUX SEL write/readback with the unused halves
// reading zero, the set-only Enable and clear-only Disable semantics, the
// self-clearing Reset pulse and the software reset, against a model.
module tb_mk_res_ctrl;
  logic clk = 0, rst_n = 0, srst = 0;
  logic we_muxsel = 0, we_enable = 0, we_disable = 0, we_reset = 0;
  logic [63:0] wdata = '0, muxsel;
  logic [15:0] enable, clr, m_en;
  int checks = 0, failures = 0;

  mk_res_ctrl dut (.*);
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
    check(enable == 0 && muxsel == 0, "reset values");
    @(negedge clk); wdata = 64'hFFFF_AAAA_FFFF_5555; we_muxsel = 1; @(negedge clk); we_muxsel = 0;
    check(muxsel == 64'h0000_AAAA_0000_5555, $sformatf("muxsel %h", muxsel));
    m_en = '0;
    for (int i = 0; i < 40; i++) begin
      logic [15:0] v; v = 16'($urandom);
      wdata = {48'hFFFF_FFFF_FFFF, v};
      if (i % 2 == 0) begin we_enable = 1;  m_en = m_en | v; end
      else            begin we_disable = 1; m_en = m_en & ~v; end
      @(negedge clk); we_enable = 0; we_disable = 0;
      check(enable == m_en, $sformatf("enable %h exp %h", enable, m_en));
    end
    wdata = 64'h0000_0000_0000_8001; we_reset = 1; #1;
    check(clr == 16'h8001, "reset pulse during write");
    @(negedge clk); we_reset = 0; #1;
    check(clr == 0, "reset self-clears");
    srst = 1; @(negedge clk); srst = 0;
    check(enable == 0 && muxsel == 0, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
