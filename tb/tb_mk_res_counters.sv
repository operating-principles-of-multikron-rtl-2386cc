// tb_mk_res_counters: exercises all four counting sources against a
// reference model kept in the testbench: node clock, slow tick, external
// pin rising edges (random slow waveform) and software pulses, with random
// enables; then 200 external edges at the full node clock rate, clear, saturation at all ones, and test mode
// set/increment with normal counting stopped.
module tb_mk_res_counters;
  localparam int K = 16;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [63:0] muxsel = '0;
  logic [K-1:0] enable = '0, clr = '0, ext_in = '0, sw_inc = '0;
  logic slow_tick = 0, test_mode = 0, test_set = 0, test_inc = 0;
  logic [31:0] test_data = '0;
  logic [K-1:0][31:0] count;
  logic [31:0] m [K];
  logic [K-1:0] e1, e2, e3;  // model's own copy of the pin pipeline
  int checks = 0, failures = 0;

  mk_res_counters dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m_);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m_); end
  endtask

  // Reference model, evaluated on the same edges
  always @(posedge clk) begin
    logic [K-1:0] edge_det;
    edge_det = e2 & ~e3;
    e3 <= e2; e2 <= e1; e1 <= ext_in;
    if (rst_n && !test_mode) begin
      for (int i = 0; i < K; i++) begin
        logic ev;
        case ({muxsel[32+i], muxsel[i]})
          2'b00: ev = slow_tick;
          2'b01: ev = edge_det[i];
          2'b10: ev = sw_inc[i];
          default: ev = 1'b1;
        endcase
        if (clr[i]) m[i] <= 0;
        else if (enable[i] && ev && m[i] != 32'hFFFF_FFFF) m[i] <= m[i] + 1;
      end
    end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < K; i++) m[i] = 0;
    e1 = 0; e2 = 0; e3 = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // counters i%4: 0 slow, 1 ext, 2 sw, 3 node
    for (int i = 0; i < K; i++) begin
      muxsel[i] = i[0]; muxsel[32+i] = i[1];
    end
    enable = '1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      slow_tick = ($urandom % 7) == 0;
      sw_inc = K'($urandom) & K'($urandom);
      if (($urandom % 3) == 0) ext_in = ext_in ^ K'($urandom);
      if (($urandom % 200) == 0) enable = K'($urandom);
      clr = (($urandom % 500) == 0) ? K'($urandom) : '0;
    end
    @(negedge clk); slow_tick = 0; sw_inc = 0; clr = 0;
    repeat (4) @(negedge clk);
    enable = 0; @(negedge clk);
    for (int i = 0; i < K; i++)
      check(count[i] == m[i], $sformatf("counter %0d = %0d, model %0d", i, count[i], m[i]));
    for (int s = 0; s < 4; s++) begin
      int nz; nz = 0;
      for (int i = s; i < K; i += 4) if (count[i] != 0) nz++;
      check(nz > 0, $sformatf("source %0d counted", s));
    end
    // external edges at the full node clock rate: one rising edge per clock
    ext_in = '0; repeat (4) @(negedge clk);
    enable = 16'h0002;
    begin
      logic [31:0] base; base = count[1];
      #1;
      repeat (200) begin ext_in[1] = 1; #3; ext_in[1] = 0; #7; end
      repeat (5) @(negedge clk);
      check(count[1] - base == 200, $sformatf("full-rate external edges: %0d of 200", count[1] - base));
    end
    enable = 0;
    // saturation: load near max in test mode, then count node clocks
    test_mode = 1; test_data = 32'hFFFF_FFFC; test_set = 1; @(negedge clk); test_set = 0;
    check(count[5] == 32'hFFFF_FFFC, "test set");
    test_inc = 1; @(negedge clk); test_inc = 0;
    check(count[9] == 32'hFFFF_FFFD, "test increment");
    muxsel = '1; enable = '1; repeat (3) @(negedge clk);
    check(count[3] == 32'hFFFF_FFFD, "no normal counting in test mode");
    test_mode = 0; repeat (10) @(negedge clk);
    check(count[3] == 32'hFFFF_FFFF && count[12] == 32'hFFFF_FFFF, "saturates at all ones");
    clr = 16'h0008; @(negedge clk); clr = 0; enable = 0; @(negedge clk);
    check(count[3] == 0 && count[4] == 32'hFFFF_FFFF, "clear");
    srst = 1; @(negedge clk); srst = 0;
    check(count[4] == 0, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
