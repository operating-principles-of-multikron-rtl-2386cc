// tb_mk_fifo: random push/pop traffic against a queue model, including
// pushes while full and pops while empty; checks head data and flags.
module tb_mk_fifo;
  localparam int W = 129;
  logic clk = 0, rst_n = 0, srst = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  mk_fifo dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      push = ($urandom % 2) == 0; pop = ($urandom % 3) == 0;
      din = {$urandom, $urandom, $urandom, $urandom, 1'($urandom)};
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 4) || (q.size() > 0 && dout != q[0])) begin
        failures++; $display("FAIL at %0d size %0d", i, q.size());
      end
      if (full) fulls++;
      @(negedge clk);
      begin
        int pre; pre = q.size();
        if (pop && pre > 0) void'(q.pop_front());
        if (push && pre < 4) q.push_back(din);
      end
    end
    checks++; if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
