// tb_mk_shadow: checks the snapshot on take and the busy flag, and the
// three rows of the counter-read table: free rank (two cycles, bit 63 = 0,
// fresh value), busy with read wait (stalls until freed, then fresh
// value) and busy without read wait (immediate, bit 63 = 1, rank intact).
module tb_mk_shadow;
  localparam int K = 16;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [K-1:0][31:0] counts, shadow;
  logic take = 0, free = 0, rd_req = 0, read_wait = 0;
  logic [3:0] rd_idx = 0;
  logic rd_done, rd_stall, busy;
  logic [63:0] rd_data;
  int checks = 0, failures = 0, cyc;

  mk_shadow dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) for (int i = 0; i < K; i++) counts[i] <= counts[i] + 32'(i + 1);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // read counter idx; returns data and the cycles to rd_done
  task automatic do_read(input logic [3:0] idx, output logic [63:0] d, output int n,
                         output logic [31:0] at_copy);
    rd_req = 1; rd_idx = idx; n = 0; at_copy = 0;
    forever begin
      #1;
      if (!busy && !rd_done) at_copy = counts[idx];
      if (rd_done) break;
      @(negedge clk); n++;
      if (n > 500) break;
    end
    d = rd_data;
    @(negedge clk); rd_req = 0; n++;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] d; logic [31:0] exp_v; logic [K-1:0][31:0] snap; int n;
    for (int i = 0; i < K; i++) counts[i] = 32'(i * 1000);
    repeat (3) @(negedge clk); rst_n = 1;
    check(!busy, "idle after reset");
    // take
    snap = counts; take = 1; @(negedge clk); take = 0;
    check(busy, "busy after take");
    check(shadow == snap, "snapshot equals counters at take");
    // busy, no read wait: immediate wrong data, bit 63 set
    read_wait = 0; do_read(4'd3, d, n, exp_v);
    check(d[63] == 1'b1 && d[31:0] == snap[3] && n == 1, $sformatf("busy/no wait: n=%0d d=%h", n, d));
    check(shadow == snap, "rank untouched by failed read");
    // busy with read wait: stalls until free
    read_wait = 1;
    fork
      begin repeat (6) @(negedge clk); free = 1; @(negedge clk); free = 0; end
      do_read(4'd7, d, n, exp_v);
    join
    check(d[63] == 1'b0, "waited read bit 63 = 0");
    check(n >= 8, $sformatf("waited read took %0d cycles", n));
    check(!busy, "read does not leave the rank busy");
    // free rank: copy then return (two cycles)
    do_read(4'd9, d, n, exp_v);
    check(d[63] == 1'b0 && n == 2, $sformatf("free read cycles %0d", n));
    check(d[31:0] == exp_v, $sformatf("free read value %h exp %h", d[31:0], exp_v));
    srst = 1; @(negedge clk); srst = 0;
    check(!busy && shadow == '0, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
