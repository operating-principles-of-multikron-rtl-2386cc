// mk_test_reg: the 48-bit TEST register, active only while the TEST mode
// pin is high. Bits 31:0 are test data, bits 47:32 the test instruction.
// A write stores the register and, in the same cycle, issues the one-shot
// actions it encodes:
//   inst 1:0  set counters from the data: 01 wait+overrun counters,
//             10 timestamp, 11 all resource counters (00 nothing);
//   inst 3:2  increment counters, same encoding;
//   inst 8    shift the FIFO out by one entry and free the shadow registers;
//   inst 7    when written as 1, load the test data into the FIFO at once.
// Held modes, read from the stored register: inst 5:4 selects which 32-bit
// group of the FIFO head is read at offset 13, inst 6 disables the network
// output, inst 7 makes later sample triggers load the test data instead of
// trace data. Outside test mode writes are ignored and every output is
// inactive (the register keeps its contents). data is the test data being
// written in a write cycle and the stored test data otherwise.
module mk_test_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        test_mode,
  input  logic        we,
  input  logic [47:0] wdata,
  output logic [47:0] q,
  output logic [31:0] data,
  output logic        set_err,
  output logic        set_ts,
  output logic        set_rc,
  output logic        inc_err,
  output logic        inc_ts,
  output logic        inc_rc,
  output logic [1:0]  fifo_grp,
  output logic        net_dis,
  output logic        src_test,
  output logic        load,
  output logic        shift
);
  logic wr;
  assign wr = we && test_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (srst) q <= '0;
    else if (wr)   q <= wdata;
  end

  assign data     = wr ? wdata[31:0] : q[31:0];
  assign set_err  = wr && (wdata[33:32] == 2'b01);
  assign set_ts   = wr && (wdata[33:32] == 2'b10);
  assign set_rc   = wr && (wdata[33:32] == 2'b11);
  assign inc_err  = wr && (wdata[35:34] == 2'b01);
  assign inc_ts   = wr && (wdata[35:34] == 2'b10);
  assign inc_rc   = wr && (wdata[35:34] == 2'b11);
  assign load     = wr && wdata[39];
  assign shift    = wr && wdata[40];
  assign fifo_grp = test_mode ? q[37:36] : 2'b00;
  assign net_dis  = test_mode && q[38];
  assign src_test = test_mode && q[39];
endmodule
