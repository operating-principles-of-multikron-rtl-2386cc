// mk_err_counters: the Wait counter and the Overrun counter, 32 bits each,
// wrapping to zero after all ones. The wait counter adds one for each node
// clock in which the chip holds back RDY beyond the preset wait states
// because the FIFO or the shadow registers are full; the overrun counter
// adds one for each sample lost for the same reason. A processor write to
// either counter's address clears it. In test mode normal counting stops:
// test_set loads both counters with each bit of test_data repeated over a
// group of four counter bits, and test_inc adds one to both.
module mk_err_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        clr_wait,
  input  logic        clr_ovr,
  input  logic        inc_wait,
  input  logic        inc_ovr,
  input  logic        test_mode,
  input  logic        test_set,
  input  logic [7:0]  test_data,
  input  logic        test_inc,
  output logic [31:0] wait_cnt,
  output logic [31:0] ovr_cnt
);
  logic [31:0] pattern;

  always_comb begin
    for (int i = 0; i < 8; i++) pattern[4*i +: 4] = {4{test_data[i]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_cnt <= '0; ovr_cnt <= '0;
    end else if (srst) begin
      wait_cnt <= '0; ovr_cnt <= '0;
    end else if (test_mode) begin
      if (test_set) begin
        wait_cnt <= pattern; ovr_cnt <= pattern;
      end else if (test_inc) begin
        wait_cnt <= wait_cnt + 1'b1; ovr_cnt <= ovr_cnt + 1'b1;
      end
    end else begin
      if (clr_wait)      wait_cnt <= '0;
      else if (inc_wait) wait_cnt <= wait_cnt + 1'b1;
      if (clr_ovr)       ovr_cnt <= '0;
      else if (inc_ovr)  ovr_cnt <= ovr_cnt + 1'b1;
    end
  end
endmodule
