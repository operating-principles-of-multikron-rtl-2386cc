// tb_mk_csr: checks the set/clear command pairs of the CSR, the status
// bits and their positions, the reset defaults, the wait-state pins
// latched during reset and the filter register.
module tb_mk_csr;
  logic clk = 0, rst_n = 0, srst = 0, we_csr = 0, we_filter = 0;
  logic [31:0] wdata = 0, csr_rdata;
  logic [1:0] ws_pins = 2'd2, wait_states;
  logic fifo_full = 0, shadow_full = 0, fifo_ovr = 0, rsrc_ovr = 0, fifo_bit128 = 0;
  logic [15:0] filter;
  logic sampling_en, wait_on_ovr, read_wait, slow_10us;
  int checks = 0, failures = 0;

  mk_csr dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic wr(input logic [31:0] v);
    wdata = v; we_csr = 1; @(negedge clk); we_csr = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(negedge clk); rst_n = 1; ws_pins = 2'd1; @(negedge clk);
    check(wait_states == 2'd2, "wait states latched in reset");
    check(csr_rdata == 32'h0000_2000, $sformatf("reset CSR %h", csr_rdata));
    wr(32'h0000_4015);
    check(sampling_en && wait_on_ovr && read_wait && slow_10us, "set bits");
    check(csr_rdata == 32'h0000_6015, $sformatf("CSR %h", csr_rdata));
    wr(32'h0000_0000);
    check(csr_rdata == 32'h0000_6015, "zero write has no effect");
    wr(32'h0000_8008);
    check(sampling_en && !wait_on_ovr && read_wait && !slow_10us, "clear bits 3,15");
    wr(32'h0000_0022);
    check(!sampling_en && !read_wait, "clear bits 1,5");
    fifo_full = 1; shadow_full = 1; fifo_ovr = 1; rsrc_ovr = 1; fifo_bit128 = 1; #1;
    check(csr_rdata == 32'h0000_27C0, $sformatf("status %h", csr_rdata));
    wdata = 32'hFFFF_A5C3; we_filter = 1; @(negedge clk); we_filter = 0;
    check(filter == 16'hA5C3, "filter");
    wr(32'h1); srst = 1; @(negedge clk); srst = 0;
    check(!sampling_en && filter == 0 && wait_states == 2'd2, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
