// tb_mk_src_addr: writes random identities into the eight registers and
// reads them back through both the bus port and the CPU-selected port.
module tb_mk_src_addr;
  logic clk = 0, rst_n = 0, srst = 0, we = 0;
  logic [2:0] waddr = 0, raddr = 0, sel = 0;
  logic [31:0] wdata = 0, rdata, sel_data;
  logic [31:0] m [8];
  int checks = 0, failures = 0;

  mk_src_addr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) m[i] = 0;
    for (int r = 0; r < 50; r++) begin
      we = 1; waddr = 3'($urandom); wdata = $urandom; m[waddr] = wdata;
      @(negedge clk); we = 0;
      for (int i = 0; i < 8; i++) begin
        raddr = 3'(i); sel = 3'(7 - i); #1;
        checks++;
        if (rdata != m[i] || sel_data != m[7-i]) begin
          failures++; $display("FAIL reg %0d: %h %h exp %h %h", i, rdata, sel_data, m[i], m[7-i]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
