// mk_sample_ctrl: decides the fate of each sample trigger and assembles the
// sample. A trigger (req, held until done) is a processor write to offsets
// 96..127: address bits 5:4 give the class (10 trace, 11 trace plus
// resource counters) and bits 3:0 the filter level. In the cycle req is
// seen:
//   - sampling disabled or the level's filter bit clear: dropped, done;
//   - FIFO full, or a resource sample while the shadow registers are busy:
//       wait on overrun set   -> stall (the processor is held) and retry;
//       wait on overrun clear -> dropped, done, the matching sticky overrun
//                                flag set and the overrun counter bumped;
//   - otherwise: the 129-bit word is pushed into the FIFO, for a resource
//     sample the shadow registers take their snapshot (take), the sticky
//     overrun flags go into the header and are then cleared, done.
// Header: encoded CPU ID, class, FIFO overrun, shadow overrun, and a read
// error bit that is always 0 because a counter read clears it before it
// ends. In test mode with the test data source selected, the sample word is
// the 32-bit test data repeated four times with bit 128 = its bit 0, and
// test_load pushes such a word at once.
module mk_sample_ctrl
  import mk_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               srst,
  input  logic               req,
  input  logic               resource,
  input  logic [3:0]         level,
  input  logic [USER_W-1:0]  user,
  input  logic [2:0]         cpu,
  input  logic [SRC_W-1:0]   src,
  input  logic [TS_S_W-1:0]  ts,
  input  logic               sampling_en,
  input  logic [15:0]        filter,
  input  logic               wait_on_ovr,
  input  logic               fifo_full,
  input  logic               shadow_busy,
  input  logic               test_src,
  input  logic               test_load,
  input  logic [31:0]        test_data,
  output logic               done,
  output logic               stall,
  output logic               fifo_push,
  output logic [FIFO_W-1:0]  fifo_din,
  output logic               take,
  output logic               ovr_inc,
  output logic               fifo_ovr,
  output logic               rsrc_ovr
);
  logic       wanted, f_block, r_block, blocked, accept, drop_ovr;
  fifo_word_t w;
  logic [FIFO_W-1:0] test_word;

  assign wanted   = req && sampling_en && filter[level];
  assign f_block  = fifo_full;
  assign r_block  = resource && shadow_busy && !(test_src);
  assign blocked  = f_block || r_block;
  assign accept   = wanted && !blocked;
  assign drop_ovr = wanted && blocked && !wait_on_ovr;
  assign stall    = wanted && blocked && wait_on_ovr;
  assign done     = req && !stall;
  assign ovr_inc  = drop_ovr;

  assign test_word = {test_data[0], {4{test_data}}};

  always_comb begin
    w.has_rsrc     = resource;
    w.hdr.cpu_id   = cpu;
    w.hdr.stype    = resource ? ST_RESOURCE : ST_TRACE;
    w.hdr.fifo_ovr = fifo_ovr;
    w.hdr.rsrc_ovr = rsrc_ovr;
    w.hdr.rd_err   = 1'b0;
    w.ts           = ts;
    w.src          = src;
    w.user         = user;
  end

  assign fifo_push = accept || (test_load && !fifo_full);
  assign fifo_din  = (test_src || test_load) ? test_word : w;
  assign take      = accept && resource && !test_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_ovr <= 1'b0; rsrc_ovr <= 1'b0;
    end else if (srst) begin
      fifo_ovr <= 1'b0; rsrc_ovr <= 1'b0;
    end else if (accept) begin
      fifo_ovr <= 1'b0; rsrc_ovr <= 1'b0;
    end else if (drop_ovr) begin
      if (f_block) fifo_ovr <= 1'b1;
      if (r_block) rsrc_ovr <= 1'b1;
    end
  end
endmodule
