// tb_mk_bus_if: plays a processor against the interface. Checks that RDY
// falls two clocks after the strobe is first sampled with no wait states,
// one more per wait state, later by exactly the cycles op_ready is held
// back, that read data is driven only with RDY, that the operation seen
// by the register side carries the address and data, and that RDY stays
// low until the strobe is released.
module tb_mk_bus_if;
  logic clk = 0, rst_n = 0, rd_n = 1, wr_n = 1, rdy_n, data_oe;
  logic op_valid, op_write, op_ready;
  logic [6:0] addr = 0, op_addr;
  logic [63:0] data_i = 0, data_o, op_wdata, op_rdata;
  logic [1:0] wait_states = 0;
  int checks = 0, failures = 0, extra = 0, hold = 0;

  mk_bus_if dut (.*);
  always #5 clk = ~clk;

  // register side: holds op_ready low for 'extra' cycles of each operation
  assign op_rdata = {57'h0, op_addr} ^ 64'hA5A5_0000_0000_0000;
  always @(posedge clk) hold <= op_valid ? hold + 1 : 0;
  assign op_ready = op_valid && (hold >= extra);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // one access; returns the number of rising edges up to and including the
  // one after which rdy_n is low, counting the edge that first samples the
  // strobe (so 3 means RDY falls two clocks after the strobe is seen)
  task automatic access(input logic wr, input logic [6:0] a, input logic [63:0] d,
                        output int n, output logic [63:0] rd);
    @(negedge clk); addr = a; data_i = d;
    if (wr) wr_n = 0; else rd_n = 0;
    n = 0;
    do begin @(posedge clk); #1 n++; end while (rdy_n && n < 100);
    rd = data_o;
    check(data_oe == !wr, "data_oe only on reads");
    @(negedge clk); @(negedge clk);
    check(!rdy_n, "rdy held while strobe low");
    wr_n = 1; rd_n = 1;
    @(posedge clk); #1 check(rdy_n && !data_oe, "rdy released");
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic seen_ok;
  always @(posedge clk) if (op_valid && op_write && op_addr == 7'd17 && op_wdata == 64'h1111_2222_3333_4444) seen_ok <= 1;

  initial begin
    int n; logic [63:0] rd;
    seen_ok = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      wait_states = 2'(w);
      access(1, 7'd17, 64'h1111_2222_3333_4444, n, rd);
      check(n == 3 + w, $sformatf("write with %0d wait states: %0d cycles", w, n));
    end
    check(seen_ok, "operation seen with address and data");
    wait_states = 0;
    access(0, 7'd33, 0, n, rd);
    check(n == 3 && rd == (64'hA5A5_0000_0000_0000 ^ 64'd33), $sformatf("read data %h", rd));
    extra = 5;
    access(0, 7'd34, 0, n, rd);
    check(n == 8, $sformatf("delayed op_ready: %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
