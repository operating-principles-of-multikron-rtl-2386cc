// tb_multikron: end-to-end test of the whole chip at its default sizes
// (16 counters, 8 CPUs, FIFO depth 4). A processor model performs bus
// reads and writes through the RD/WR/RDY handshake; a receiver model takes
// bytes from the collection network, checks parity and splits messages at
// the end-of-message flag; the testbench keeps its own count of timestamp
// clock edges. It runs, and counts, every mechanism of the chip: wait
// states from the pins, trace and resource samples decoded field by field,
// the filter, counting from node clock / slow clock / external pin /
// software writes, FIFO overrun and shadow overrun discards with their
// header flags and overrun counter, write wait and read wait with the wait
// counter, the counter read error bit, receiver back-pressure, software
// reset (timestamp kept), test mode (counter set, FIFO load, group read,
// shift out, network disable) and counter saturation. A mechanism that
// never happened counts as a failure.
`timescale 1ns/1ps
module tb_multikron;
  logic clk = 0, rst_n = 0, ts_clk = 0;
  logic [6:0] addr = 0;
  logic rd_n = 1, wr_n = 1, data_oe, rdy_n;
  logic [63:0] data_i = 0, data_o;
  logic [7:0] cpu_id = 0;
  logic [1:0] ws_pins = 2'd1;
  logic [15:0] ext_in = 0;
  logic test_mode = 0, ext_fifo_free = 0;
  logic net_clk, net_parity, net_eom, load_ext_fifo_n;
  logic [7:0] net_data;

  multikron dut (.*);

  always #10 clk = ~clk;        // 50 MHz node clock
  always #50 ts_clk = ~ts_clk;  // 10 MHz timestamp clock

  int checks = 0, failures = 0;
  longint ts_edges = 0;
  always @(posedge ts_clk) if (rst_n) ts_edges++;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // ---------------- mechanism tallies ----------------
  typedef enum int {M_WAITSTATE, M_TRACE, M_RESOURCE, M_FILTER, M_NODECLK, M_SLOWCLK, M_EXT, M_SWINC,
                    M_FIFO_OVR, M_RSRC_OVR, M_WRITE_WAIT, M_READ_WAIT, M_READ_ERR, M_BACKPRESSURE,
                    M_SOFT_RESET, M_TEST_MODE, M_SATURATE, M_NUM} mech_e;
  int mech [M_NUM];
  string mname [M_NUM] = '{"wait states", "trace sample", "resource sample", "filter drop",
                           "node clock count", "slow clock count", "external count", "software increment",
                           "FIFO overrun", "shadow overrun", "write wait", "read wait", "read error",
                           "receiver back-pressure", "software reset", "test mode", "saturation"};

  // ---------------- network receiver ----------------
  typedef logic [7:0] msg_t [$];
  msg_t cur;
  msg_t msgs [$];
  int parity_bad = 0;
  always @(posedge net_clk) begin
    if (!load_ext_fifo_n) begin
      if (net_parity != ~(^net_data)) parity_bad++;
      cur.push_back(net_data);
      if (net_eom) begin msgs.push_back(cur); cur = {}; end
    end
  end
  always @(posedge clk) if (!ext_fifo_free && !dut.fifo_empty) mech[M_BACKPRESSURE]++;

  // ---------------- processor bus model ----------------
  int last_cycles;
  task automatic bus(input logic wr, input logic [6:0] a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk); addr = a; data_i = d;
    if (wr) wr_n = 0; else rd_n = 0;
    last_cycles = 0;
    do begin @(posedge clk); #1 last_cycles++; end while (rdy_n && last_cycles < 100000);
    q = data_o;
    @(negedge clk); wr_n = 1; rd_n = 1;
    @(negedge clk);
  endtask
  task automatic wr(input logic [6:0] a, input logic [63:0] d);
    logic [63:0] q; bus(1, a, d, q);
  endtask
  task automatic rd(input logic [6:0] a, output logic [63:0] q);
    bus(0, a, 0, q);
  endtask
  // trigger a sample from CPU c
  task automatic trig(input int c, input logic res, input logic [3:0] lvl, input logic [47:0] u);
    cpu_id = 8'(1 << c);
    wr({1'b1, 1'b1, res, lvl}, {16'h0, u});
    cpu_id = 0;
  endtask

  // wait until the receiver holds n messages
  task automatic wait_msgs(input int n);
    int t; t = 0;
    while (msgs.size() < n && t < 20000) begin @(negedge clk); t++; end
    check(msgs.size() >= n, $sformatf("expected %0d messages, have %0d", n, msgs.size()));
  endtask

  // check a received message as a sample
  task automatic check_sample(input msg_t m, input int c, input logic res, input logic fo, input logic ro,
                              input logic [47:0] u, input longint ts_lo, input longint ts_hi);
    logic [39:0] ts; logic [31:0] src; logic [47:0] ud;
    check(m.size() == (res ? 80 : 16), $sformatf("sample length %0d", m.size()));
    if (m.size() < 16) return;
    check(m[0] == {3'(c), res ? 2'b11 : 2'b10, fo, ro, 1'b0}, $sformatf("header %h", m[0]));
    ts  = {m[1], m[2], m[3], m[4], m[5]};
    src = {m[6], m[7], m[8], m[9]};
    ud  = {m[10], m[11], m[12], m[13], m[14], m[15]};
    check(src == 32'h0A00_1000 + 32'(c), $sformatf("source %h", src));
    check(ud == u, $sformatf("user data %h", ud));
    check(longint'(ts) >= ts_lo && longint'(ts) <= ts_hi, $sformatf("timestamp %0d not in %0d..%0d", ts, ts_lo, ts_hi));
  endtask

  function automatic logic [31:0] ctr(input msg_t m, input int i);
    return {m[16+4*i], m[17+4*i], m[18+4*i], m[19+4*i]};
  endfunction

  initial begin
    #3ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] q, q2;
    longint t0, t1;
    int n0, w0;
    repeat (6) @(negedge clk); rst_n = 1; ws_pins = 2'd0;

    // ---- wait states latched at reset (1) ----
    rd(7'd1, q);
    check(q[13:12] == 2'd1, "wait states in CSR");
    check(last_cycles == 4, $sformatf("access with 1 wait state: %0d cycles", last_cycles));
    if (q[13:12] == 2'd1 && last_cycles == 4) mech[M_WAITSTATE]++;

    // ---- configuration ----
    for (int i = 0; i < 8; i++) wr(7'(16 + i), 64'h0A00_1000 + 64'(i));
    for (int i = 0; i < 8; i++) begin rd(7'(16 + i), q); check(q == 64'h0A00_1000 + 64'(i), "source address readback"); end
    wr(7'd4, 64'h0000_FFDF);                         // filter: level 5 off
    rd(7'd4, q); check(q == 64'h0000_FFDF, "filter readback");
    // counter sources: 0 node, 1 ext, 2 sw, 3 slow (1 us), others node
    wr(7'd8, {32'h0000_FFF5, 32'h0000_FFF3});
    rd(7'd8, q); check(q == {32'h0000_FFF5, 32'h0000_FFF3}, "MUX SEL readback");
    wr(7'd10, 64'hFFFF);                             // clear all counters
    wr(7'd1, 64'h1);                                 // enable sampling
    ext_fifo_free = 1;
    wr(7'd11, 64'h000F);                             // enable counters 0..3
    rd(7'd11, q); check(q == 64'h000F, "enable readback");
    t0 = ts_edges;
    for (int i = 0; i < 7; i++) begin ext_in[1] = 1; repeat (3) @(negedge clk); ext_in[1] = 0; repeat (3) @(negedge clk); end
    for (int i = 0; i < 5; i++) wr(7'd34, 64'h0);   // software increments of counter 2
    wr(7'd35, 64'h0);                                // counter 3 is not software sourced
    repeat (400) @(negedge clk);
    wr(7'd12, 64'h000F);                             // disable counters 0..3
    t1 = ts_edges;

    // ---- trace sample, filtered trigger ----
    n0 = msgs.size();
    t0 = ts_edges; trig(3, 0, 4'd2, 48'h1111_2222_3333); t1 = ts_edges;
    trig(4, 0, 4'd5, 48'h5555_5555_5555);           // filtered out
    wait_msgs(n0 + 1); repeat (100) @(negedge clk);
    check(msgs.size() == n0 + 1, "filtered trigger sent nothing");
    if (msgs.size() == n0 + 1) mech[M_FILTER]++;
    check_sample(msgs[n0], 3, 0, 0, 0, 48'h1111_2222_3333, t0 - 2, t1);
    mech[M_TRACE]++;

    // ---- resource sample ----
    n0 = msgs.size();
    trig(6, 1, 4'd0, 48'hABCD_EF01_2345);
    wait_msgs(n0 + 1);
    check_sample(msgs[n0], 6, 1, 0, 0, 48'hABCD_EF01_2345, 0, ts_edges);
    if (msgs[n0].size() == 80) begin
      logic [31:0] c0, c1, c2, c3;
      c0 = ctr(msgs[n0], 0); c1 = ctr(msgs[n0], 1); c2 = ctr(msgs[n0], 2); c3 = ctr(msgs[n0], 3);
      mech[M_RESOURCE]++;
      check(c0 > 400 && c0 < 700, $sformatf("node clock counter %0d", c0));
      if (c0 > 400) mech[M_NODECLK]++;
      check(c1 == 7, $sformatf("external counter %0d", c1));
      if (c1 == 7) mech[M_EXT]++;
      check(c2 == 5, $sformatf("software counter %0d", c2));
      if (c2 == 5) mech[M_SWINC]++;
      check(c3 >= 8 && c3 <= 16, $sformatf("slow clock counter %0d", c3));
      if (c3 > 0) mech[M_SLOWCLK]++;
      check(ctr(msgs[n0], 9) == 0, "disabled counter stays zero");
    end
    rd(7'd34, q); check(q == 64'd5 && last_cycles == 5, $sformatf("counter read %h in %0d cycles", q, last_cycles));

    // ---- overrun discards (discard mode) ----
    ext_fifo_free = 0;
    n0 = msgs.size();
    trig(0, 0, 4'd1, 48'hA1); trig(1, 0, 4'd1, 48'hA2); trig(2, 1, 4'd1, 48'hA3); trig(3, 0, 4'd1, 48'hA4);
    rd(7'd1, q); check(q[6] && q[7], "FIFO full and shadow full status");
    trig(4, 1, 4'd1, 48'hA5);                       // both FIFO and shadow are full
    rd(7'd1, q); check(q[8] && q[9], "overrun status bits");
    if (q[8]) mech[M_FIFO_OVR]++;
    if (q[9]) mech[M_RSRC_OVR]++;
    rd(7'd6, q); check(q == 1, $sformatf("overrun counter %0d", q));
    rd(7'd33, q); check(q[63] == 1'b1 && last_cycles == 4, "read of busy counter flags error at once");
    if (q[63]) mech[M_READ_ERR]++;
    ext_fifo_free = 1;
    wait_msgs(n0 + 4);
    trig(5, 0, 4'd1, 48'hA6);
    wait_msgs(n0 + 5);
    check_sample(msgs[n0 + 4], 5, 0, 1, 1, 48'hA6, 0, ts_edges);
    check_sample(msgs[n0 + 2], 2, 1, 0, 0, 48'hA3, 0, ts_edges);
    rd(7'd1, q); check(!q[8] && !q[9], "overrun flags cleared by next sample");
    wr(7'd6, 0); rd(7'd6, q); check(q == 0, "overrun counter cleared");

    // ---- write wait and read wait ----
    wr(7'd1, 64'h14);                                // wait on overrun, read wait
    ext_fifo_free = 0;
    n0 = msgs.size();
    trig(0, 0, 4'd1, 48'hB1); trig(1, 0, 4'd1, 48'hB2); trig(2, 1, 4'd1, 48'hB3); trig(3, 0, 4'd1, 48'hB4);
    fork
      begin repeat (60) @(negedge clk); ext_fifo_free = 1; end
      trig(4, 0, 4'd1, 48'hB5);
    join
    check(last_cycles > 60, $sformatf("write waited %0d cycles", last_cycles));
    if (last_cycles > 60) mech[M_WRITE_WAIT]++;
    rd(7'd5, q); w0 = int'(q[31:0]);
    check(w0 > 50, $sformatf("wait counter %0d", w0));
    // the resource sample B3 holds the shadow until it is sent: read waits
    wait_msgs(n0 + 1);
    ext_fifo_free = 0;
    repeat (40) @(negedge clk);
    fork
      begin repeat (80) @(negedge clk); ext_fifo_free = 1; end
      rd(7'd34, q);
    join
    check(q[63] == 1'b0 && q[31:0] == 5, $sformatf("waited counter read %h", q));
    check(last_cycles > 20, $sformatf("read waited %0d cycles", last_cycles));
    if (last_cycles > 20) mech[M_READ_WAIT]++;
    rd(7'd5, q); check(int'(q[31:0]) > w0, "wait counter grew on read wait");
    wait_msgs(n0 + 5);
    check_sample(msgs[n0 + 4], 4, 0, 0, 0, 48'hB5, 0, ts_edges);
    rd(7'd6, q); check(q == 0, "no overrun counted in wait mode");
    wr(7'd5, 0); rd(7'd5, q); check(q == 0, "wait counter cleared");

    // ---- software reset keeps the timestamp ----
    rd(7'd2, q);
    wr(7'd0, 0);
    rd(7'd2, q2);
    check(q2 >= q && q2 > 0, "timestamp survives software reset");
    rd(7'd1, q); check(q[0] == 0 && q[2] == 0 && q[13:12] == 2'd1, "CSR reset by software reset");
    rd(7'd17, q); check(q == 0, "source address cleared by software reset");
    if (q2 >= q) mech[M_SOFT_RESET]++;
    for (int i = 0; i < 8; i++) wr(7'(16 + i), 64'h0A00_1000 + 64'(i));

    // ---- test mode ----
    test_mode = 1;
    wr(7'd14, {24'h0, 8'b1100_0000, 32'h8765_4321}); // network off, load FIFO
    wr(7'd14, {24'h0, 8'b0110_0000, 32'h0});         // network off, group 2, normal source
    rd(7'd13, q); check(q == 64'h8765_4321, $sformatf("FIFO output group read %h", q));
    rd(7'd1, q); check(q[10] == 1'b1, "FIFO bit 128 in CSR");
    rd(7'd14, q); check(q[47:32] == 16'h0060, "TEST register readback");
    for (int i = 0; i < 3; i++) wr(7'd14, {24'h0, 8'b1100_0000, 32'h0000_0010});
    rd(7'd1, q); check(q[6], "FIFO full from test loads");
    wr(7'd14, {23'h0, 1'b1, 8'b0100_0000, 32'h0});   // shift out one entry
    rd(7'd1, q); check(!q[6], "shift out frees a FIFO entry");
    wr(7'd14, {24'h0, 8'b0100_0011, 32'hFFFF_FFF0}); // set all resource counters
    rd(7'd39, q); check(q == 64'hFFFF_FFF0, $sformatf("test set counter %h", q));
    wr(7'd14, {24'h0, 8'b0100_1000, 32'h0});         // increment timestamp
    wr(7'd14, {24'h0, 8'b0100_0001, 32'h0000_00FF}); // set error counters
    rd(7'd5, q); check(q == 64'hFFFF_FFFF, "test set wait counter");
    if (q == 64'hFFFF_FFFF) mech[M_TEST_MODE]++;
    wr(7'd0, 0);                                     // clears FIFO and test register
    test_mode = 0;
    for (int i = 0; i < 8; i++) wr(7'(16 + i), 64'h0A00_1000 + 64'(i));
    check(msgs.size() == n0 + 5, "nothing sent while network disabled");
    // saturation: reload near the top in test mode, then count node clocks
    test_mode = 1;
    wr(7'd14, {24'h0, 8'b0000_0011, 32'hFFFF_FFF0});
    test_mode = 0;
    wr(7'd8, {32'h0000_0080, 32'h0000_0080});        // counter 7 node clock
    wr(7'd11, 64'h0080);
    repeat (40) @(negedge clk);
    rd(7'd39, q); check(q == 64'hFFFF_FFFF, $sformatf("saturated counter %h", q));
    if (q == 64'hFFFF_FFFF) mech[M_SATURATE]++;

    // ---- normal operation afterwards ----
    wr(7'd4, 64'hFFFF); wr(7'd1, 64'h1);
    n0 = msgs.size();
    trig(7, 0, 4'd9, 48'hC0FF_EE00_0007);
    wait_msgs(n0 + 1);
    check_sample(msgs[n0], 7, 0, 0, 0, 48'hC0FF_EE00_0007, 0, ts_edges);

    check(parity_bad == 0, "odd parity on every byte");
    for (int i = 0; i < M_NUM; i++) begin
      check(mech[i] > 0, $sformatf("mechanism '%s' never happened", mname[i]));
      $display("mechanism %-24s %0d", mname[i], mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
