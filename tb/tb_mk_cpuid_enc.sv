// tb_mk_cpuid_enc: every single active CPU line must give its own index;
// no active line gives valid = 0.
module tb_mk_cpuid_enc;
  logic [7:0] lines;
  logic [2:0] id;
  logic valid;
  int checks = 0, failures = 0;

  mk_cpuid_enc dut (.*);

  initial begin
    lines = 0; #1;
    checks++; if (valid) failures++;
    for (int i = 0; i < 8; i++) begin
      lines = 8'(1 << i); #1;
      checks++;
      if (!valid || id != 3'(i)) begin failures++; $display("FAIL line %0d -> %0d", i, id); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
