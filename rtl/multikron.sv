// multikron: a single-chip performance measurement device for the nodes of
// a MIMD multiprocessor. Software running on the node's processors writes
// an event identification to a trigger address; the chip stamps it with a
// global 56-bit timestamp (40 bits kept), the identity of the writing CPU,
// that CPU's process/node identity (source address register) and error
// flags, and optionally with a snapshot of sixteen 32-bit resource
// counters, then ships the sample byte-serially over a private collection
// network. The resource counters count node clocks, a prescaled slow clock,
// external pin edges or software writes, and can also be read directly.
//
// Processor side (all sampled on rising clk, the node clock):
//   addr[6:0], data_i[63:0], rd_n, wr_n in; rdy_n, data_o, data_oe out.
//   Offsets: 0 software reset, 1 CSR, 2 timestamp (read), 4 filter,
//   5 wait counter, 6 overrun counter (write clears), 8 MUX SEL (64 bits),
//   10 counter reset, 11 enable, 12 disable, 13 FIFO output (test mode),
//   14 TEST register (test mode), 16..23 source address registers,
//   32..47 resource counters (read; write = software increment),
//   96..111 trigger a trace sample, 112..127 trigger a resource sample
//   (bits 3:0 = filter level, data_i[47:0] = user event data).
//   cpu_id[7:0]: unencoded CPU lines, one high during an access.
//   ws_pins[1:0]: wait states, sampled while rst_n is low.
// Network side: net_clk (clk/2), net_data, net_parity (odd), net_eom,
//   load_ext_fifo_n out; ext_fifo_free in.
// Other: ts_clk (timestamp clock, below clk/3), ext_in[K-1:0] counter
//   pins, test_mode pin, rst_n (hardware reset, asynchronous, active low).
// The register map, field widths and sample formats are the chip's; the
// glue (decode, read multiplexer) is written here in the simplest form.
module multikron
  import mk_pkg::*;
#(
  parameter int unsigned K          = 16,
  parameter int unsigned N          = 8,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ts_clk,
  input  logic [6:0]    addr,
  input  logic          rd_n,
  input  logic          wr_n,
  input  logic [63:0]   data_i,
  output logic [63:0]   data_o,
  output logic          data_oe,
  output logic          rdy_n,
  input  logic [N-1:0]  cpu_id,
  input  logic [1:0]    ws_pins,
  input  logic [K-1:0]  ext_in,
  input  logic          test_mode,
  output logic          net_clk,
  output logic [7:0]    net_data,
  output logic          net_parity,
  output logic          net_eom,
  output logic          load_ext_fifo_n,
  input  logic          ext_fifo_free
);
  // ---------------- processor interface ----------------
  logic        op_valid, op_write, op_ready;
  logic [6:0]  op_addr;
  logic [63:0] op_wdata, op_rdata;
  logic [1:0]  wait_states;

  mk_bus_if u_bus (
    .clk, .rst_n, .addr, .rd_n, .wr_n, .data_i, .wait_states,
    .rdy_n, .data_o, .data_oe,
    .op_valid, .op_write, .op_addr, .op_wdata, .op_ready, .op_rdata
  );

  logic wr_op, rd_op, is_src, is_rc, is_trig, srst;
  assign wr_op   = op_valid && op_write;
  assign rd_op   = op_valid && !op_write;
  assign is_src  = (op_addr[6:3] == 4'b0010);   // 16..23
  assign is_rc   = (op_addr[6:4] == 3'b010);    // 32..47
  assign is_trig = (op_addr[6:5] == 2'b11);     // 96..127
  assign srst    = wr_op && (op_addr == A_SWRESET);

  function automatic logic wr_at(input logic [6:0] a);
    return wr_op && (op_addr == a);
  endfunction

  // ---------------- test register ----------------
  logic [47:0] test_q;
  logic [31:0] test_data;
  logic t_set_err, t_set_ts, t_set_rc, t_inc_err, t_inc_ts, t_inc_rc;
  logic [1:0]  fifo_grp;
  logic        net_dis, src_test, t_load, t_shift;

  mk_test_reg u_test (
    .clk, .rst_n, .srst, .test_mode, .we(wr_at(A_TEST)), .wdata(op_wdata[47:0]),
    .q(test_q), .data(test_data),
    .set_err(t_set_err), .set_ts(t_set_ts), .set_rc(t_set_rc),
    .inc_err(t_inc_err), .inc_ts(t_inc_ts), .inc_rc(t_inc_rc),
    .fifo_grp, .net_dis, .src_test, .load(t_load), .shift(t_shift)
  );

  // ---------------- timestamp and slow clock ----------------
  logic              ts_tick, slow_tick, slow_10us;
  logic [TS_W-1:0]   ts;

  mk_timestamp #(.TS_W(TS_W)) u_ts (
    .clk, .rst_n, .ts_clk, .ts_tick, .count(ts),
    .test_mode, .test_set(t_set_ts), .test_data(test_data[TS_W/4-1:0]), .test_inc(t_inc_ts)
  );

  mk_slowclk u_slow (.clk, .rst_n, .srst, .ts_tick, .sel_10us(slow_10us), .slow_tick);

  // ---------------- CSR / filter ----------------
  logic [31:0] csr_rdata;
  logic [15:0] filter;
  logic sampling_en, wait_on_ovr, read_wait;
  logic fifo_full, fifo_empty, shadow_busy, fifo_ovr, rsrc_ovr;
  logic [FIFO_W-1:0] fifo_dout, fifo_din;

  mk_csr u_csr (
    .clk, .rst_n, .srst, .we_csr(wr_at(A_CSR)), .we_filter(wr_at(A_FILTER)),
    .wdata(op_wdata[31:0]), .ws_pins,
    .fifo_full, .shadow_full(shadow_busy), .fifo_ovr, .rsrc_ovr, .fifo_bit128(fifo_dout[TRACE_W]),
    .csr_rdata, .filter, .sampling_en, .wait_on_ovr, .read_wait, .slow_10us, .wait_states
  );

  // ---------------- resource counters ----------------
  logic [63:0]         muxsel;
  logic [K-1:0]        rc_enable, rc_clr, sw_inc;
  logic [K-1:0][31:0]  rc_count, shadow;

  mk_res_ctrl #(.K(K)) u_rctl (
    .clk, .rst_n, .srst,
    .we_muxsel(wr_at(A_MUXSEL)), .we_enable(wr_at(A_RENABLE)),
    .we_disable(wr_at(A_RDISABLE)), .we_reset(wr_at(A_RRESET)),
    .wdata(op_wdata), .muxsel, .enable(rc_enable), .clr(rc_clr)
  );

  always_comb begin
    sw_inc = '0;
    if (wr_op && is_rc && !test_mode && (int'(op_addr[3:0]) < K)) sw_inc[op_addr[3:0]] = 1'b1;
  end

  mk_res_counters #(.K(K), .W(32)) u_rc (
    .clk, .rst_n, .srst, .muxsel, .enable(rc_enable), .clr(rc_clr), .slow_tick,
    .ext_in, .sw_inc, .test_mode, .test_set(t_set_rc), .test_data, .test_inc(t_inc_rc),
    .count(rc_count)
  );

  logic        take, net_free, rd_done, rd_stall;
  logic [63:0] rc_rdata;

  mk_shadow #(.K(K), .W(32)) u_shadow (
    .clk, .rst_n, .srst, .counts(rc_count), .take, .free(net_free || t_shift),
    .rd_req(rd_op && is_rc), .rd_idx(op_addr[$clog2(K)-1:0]), .read_wait,
    .rd_done, .rd_data(rc_rdata), .rd_stall, .busy(shadow_busy), .shadow
  );

  // ---------------- event trace path ----------------
  logic [$clog2(N)-1:0] cpu;
  logic                 cpu_valid;
  logic [31:0]          src_rdata, src_sel;

  mk_cpuid_enc #(.N(N)) u_cpu (.lines(cpu_id), .id(cpu), .valid(cpu_valid));

  mk_src_addr #(.N(N)) u_src (
    .clk, .rst_n, .srst, .we(wr_op && is_src), .waddr(op_addr[$clog2(N)-1:0]),
    .wdata(op_wdata[31:0]), .raddr(op_addr[$clog2(N)-1:0]), .rdata(src_rdata),
    .sel(cpu), .sel_data(src_sel)
  );

  logic s_done, s_stall, s_push, ovr_inc;

  mk_sample_ctrl u_smp (
    .clk, .rst_n, .srst, .req(wr_op && is_trig), .resource(op_addr[4]), .level(op_addr[3:0]),
    .user(op_wdata[USER_W-1:0]), .cpu(3'(cpu)), .src(src_sel), .ts(ts[TS_S_W-1:0]),
    .sampling_en, .filter, .wait_on_ovr, .fifo_full, .shadow_busy,
    .test_src(src_test), .test_load(t_load), .test_data,
    .done(s_done), .stall(s_stall), .fifo_push(s_push), .fifo_din, .take, .ovr_inc,
    .fifo_ovr, .rsrc_ovr
  );

  logic net_pop;

  mk_fifo #(.W(FIFO_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .srst, .push(s_push), .din(fifo_din), .pop(net_pop || t_shift),
    .dout(fifo_dout), .empty(fifo_empty), .full(fifo_full)
  );

  // ---------------- error counters ----------------
  logic [31:0] wait_cnt, ovr_cnt;

  mk_err_counters u_err (
    .clk, .rst_n, .srst, .clr_wait(wr_at(A_WAITCNT)), .clr_ovr(wr_at(A_OVRCNT)),
    .inc_wait(s_stall || rd_stall), .inc_ovr(ovr_inc),
    .test_mode, .test_set(t_set_err), .test_data(test_data[7:0]), .test_inc(t_inc_err),
    .wait_cnt, .ovr_cnt
  );

  // ---------------- network output ----------------
  mk_net_if #(.K(K)) u_net (
    .clk, .rst_n, .srst, .fifo_dout, .fifo_empty, .fifo_pop(net_pop),
    .shadow, .shadow_free(net_free), .net_dis, .ext_fifo_free,
    .net_clk, .net_data, .net_parity, .net_eom, .load_n(load_ext_fifo_n)
  );

  // ---------------- completion and read multiplexer ----------------
  always_comb begin
    op_ready = 1'b1;
    if (is_trig && op_write)     op_ready = s_done;
    else if (is_rc && !op_write) op_ready = rd_done;
  end

  always_comb begin
    op_rdata = '0;
    if (is_src)      op_rdata[31:0] = src_rdata;
    else if (is_rc)  op_rdata = rc_rdata;
    else begin
      unique case (op_addr)
        A_CSR:     op_rdata[31:0] = csr_rdata;
        A_TS:      op_rdata[TS_W-1:0] = ts;
        A_FILTER:  op_rdata[15:0] = filter;
        A_WAITCNT: op_rdata[31:0] = wait_cnt;
        A_OVRCNT:  op_rdata[31:0] = ovr_cnt;
        A_MUXSEL:  op_rdata = muxsel;
        A_RENABLE: op_rdata[K-1:0] = rc_enable;
        A_FIFOOUT: if (test_mode) op_rdata[31:0] = fifo_dout[32*fifo_grp +: 32];
        A_TEST:    if (test_mode) op_rdata[47:0] = test_q;
        default:   op_rdata = '0;
      endcase
    end
  end
endmodule
