// tb_mk_net_if: acts as the external FIFO on the collection network. It
// loads a queue of trace and resource samples, takes a byte on every
// rising net_clk edge with load_n low, and compares the stream with the
// expected bytes worked out from the sample words: order, odd parity, end
// of message on the last byte, pop and shadow-free at sample ends. It
// also checks the rate (one byte per two node clocks while the receiver
// is free), that nothing is sent while External FIFO Free is low, and the
// test-mode output disable.
module tb_mk_net_if;
  localparam int K = 16;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [128:0] fifo_dout;
  logic fifo_empty, fifo_pop, shadow_free, net_dis = 0, ext_fifo_free = 0;
  logic [K-1:0][31:0] shadow;
  logic net_clk, net_parity, net_eom, load_n;
  logic [7:0] net_data;
  logic [128:0] words [$];
  logic [7:0] expb [$];
  logic       expe [$];
  int checks = 0, failures = 0, got = 0, frees = 0, first_cyc = -1, last_cyc = 0, cyc = 0;
  logic busy_while_not_free = 0;

  mk_net_if dut (.*);
  always #5 clk = ~clk;

  assign fifo_empty = (words.size() == 0);
  assign fifo_dout  = fifo_empty ? '0 : words[0];

  always @(posedge clk) begin
    cyc++;
    if (fifo_pop) void'(words.pop_front());
    if (shadow_free) frees++;
  end

  // receiver: takes the byte at the rising network clock; a byte may only
  // be offered if the receiver said it was free at the previous rising edge
  logic prev_free = 0;
  always @(posedge net_clk) begin
    if (!load_n) begin
      checks++;
      if (!prev_free) begin failures++; $display("FAIL: load without External FIFO Free"); end
    end
    prev_free = ext_fifo_free;
  end
  always @(posedge net_clk) begin
    if (!load_n) begin
      logic [7:0] b; logic e;
      b = expb.pop_front(); e = expe.pop_front();
      checks++;
      if (net_data != b || net_eom != e || net_parity != ~(^net_data)) begin
        failures++; $display("FAIL byte %0d: %h/%b exp %h/%b par %b", got, net_data, net_eom, b, e, net_parity);
      end
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      got++;
    end
  end

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic add(input logic r);
    logic [128:0] w;
    w = {r, $urandom, $urandom, $urandom, $urandom};
    words.push_back(w);
    for (int i = 0; i < 16; i++) begin expb.push_back(w[127 - 8*i -: 8]); expe.push_back(!r && i == 15); end
    if (r) for (int c = 0; c < K; c++) for (int i = 0; i < 4; i++) begin
      expb.push_back(shadow[c][31 - 8*i -: 8]); expe.push_back(c == K - 1 && i == 3);
    end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < K; c++) shadow[c] = $urandom;
    repeat (3) @(negedge clk); rst_n = 1;
    add(0); add(1); add(0);
    repeat (40) @(negedge clk);
    check(got == 0, "nothing sent while External FIFO Free is low");
    ext_fifo_free = 1;
    wait (words.size() == 0);
    repeat (6) @(negedge clk);
    check(got == 112, $sformatf("bytes %0d of 112", got));
    check(last_cyc - first_cyc == 2 * 111, $sformatf("rate: %0d clocks for 112 bytes", last_cyc - first_cyc));
    check(frees == 1, "shadow freed once");
    // receiver throttling
    got = 0; add(1); add(0);
    fork
      forever begin @(negedge clk); ext_fifo_free = ($urandom % 3) != 0; end
      wait (words.size() == 0);
    join_any
    disable fork;
    ext_fifo_free = 1; repeat (6) @(negedge clk);
    check(got == 96 && expb.size() == 0, $sformatf("throttled bytes %0d", got));
    // test-mode disable
    net_dis = 1; got = 0; add(0); repeat (60) @(negedge clk);
    check(got == 0, "network output disabled");
    net_dis = 0; repeat (60) @(negedge clk);
    check(got == 16, "resumes when enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
