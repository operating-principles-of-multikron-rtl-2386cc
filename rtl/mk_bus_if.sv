// mk_bus_if: the processor interface. The processor drives seven address
// bits, 64 data bits and an active-low read (rd_n) or write (wr_n) strobe
// that the external base-address decoder only asserts when the chip is
// addressed; the chip answers with an active-low ready (rdy_n). Every
// signal is sampled on the rising node clock edge.
// Sequence: the edge that first sees a strobe low latches address and
// data; after wait_states further clocks the operation is presented on
// op_* (op_valid) and held until the register logic answers op_ready,
// with read data on op_rdata. On the next edge rdy_n goes low and, for a
// read, data_o is driven (data_oe high); both stay until the processor
// releases the strobe. With no wait states and an immediate op_ready, rdy_n
// falls on the second clock edge after the strobe was first seen (two
// cycles, as the chip's timing diagram shows); operations that answer
// op_ready later (counter reads, waits on a full FIFO or shadow) add their
// extra cycles. Unused read bits are returned as zero by the register
// logic. A new access needs the strobes to have been seen high first.
module mk_bus_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [6:0]  addr,
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic [63:0] data_i,
  input  logic [1:0]  wait_states,
  output logic        rdy_n,
  output logic [63:0] data_o,
  output logic        data_oe,
  output logic        op_valid,
  output logic        op_write,
  output logic [6:0]  op_addr,
  output logic [63:0] op_wdata,
  input  logic        op_ready,
  input  logic [63:0] op_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_EXEC, S_HOLD} state_e;
  state_e     st;
  logic [1:0] cnt;

  assign op_valid = (st == S_EXEC);
  assign rdy_n    = (st != S_HOLD);
  assign data_oe  = (st == S_HOLD) && !op_write;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; op_write <= 1'b0; op_addr <= '0; op_wdata <= '0; data_o <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (!rd_n || !wr_n) begin
          op_write <= !wr_n;
          op_addr  <= addr;
          op_wdata <= data_i;
          cnt      <= wait_states;
          st       <= S_WAIT;
        end
        S_WAIT: begin
          if (cnt == 2'd0) st <= S_EXEC;
          else             cnt <= cnt - 1'b1;
        end
        S_EXEC: if (op_ready) begin
          data_o <= op_write ? '0 : op_rdata;
          st     <= S_HOLD;
        end
        S_HOLD: if (rd_n && wr_n) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // Only one strobe may be active in an access.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(!rd_n && !wr_n));
endmodule
