// mk_pkg: constants and types shared by the MULTIKRON performance
// instrumentation chip. It holds the register map (offsets of 32-bit
// locations from the chip's base address), the sample header and 129-bit
// trace FIFO word layouts, the counter source encoding and an odd-parity
// helper. Register offsets, field widths and encodings are the chip's;
// the bit placement of fields inside the trace word is this design's choice
// (the field sent first sits at the most significant end).
package mk_pkg;

  localparam int unsigned DATA_W   = 64;  // processor data bus
  localparam int unsigned ADDR_W   = 7;   // low-order address bits seen by the chip
  localparam int unsigned TS_W     = 56;  // timestamp counter
  localparam int unsigned TS_S_W   = 40;  // timestamp bits carried in a sample
  localparam int unsigned SRC_W    = 32;  // source address (node.process)
  localparam int unsigned USER_W   = 48;  // user-written event data
  localparam int unsigned RC_W     = 32;  // resource counter width
  localparam int unsigned NUM_RC   = 16;  // resource counters (K)
  localparam int unsigned NUM_SRC  = 8;   // source address registers / CPUs (N)
  localparam int unsigned TRACE_W  = 128; // trace sample bits
  localparam int unsigned FIFO_W   = TRACE_W + 1; // plus "has resource data" flag

  // Register offsets (Appendix-style map, 32-bit locations)
  localparam logic [6:0] A_SWRESET = 7'd0;
  localparam logic [6:0] A_CSR     = 7'd1;
  localparam logic [6:0] A_TS      = 7'd2;
  localparam logic [6:0] A_FILTER  = 7'd4;
  localparam logic [6:0] A_WAITCNT = 7'd5;
  localparam logic [6:0] A_OVRCNT  = 7'd6;
  localparam logic [6:0] A_MUXSEL  = 7'd8;
  localparam logic [6:0] A_RRESET  = 7'd10;
  localparam logic [6:0] A_RENABLE = 7'd11;
  localparam logic [6:0] A_RDISABLE= 7'd12;
  localparam logic [6:0] A_FIFOOUT = 7'd13;
  localparam logic [6:0] A_TEST    = 7'd14;
  // 16..23 source address registers, 32..47 resource counters,
  // 96..111 trace sample triggers, 112..127 resource sample triggers.

  // Sample class in the header and in address bits 5:4 of a trigger
  typedef enum logic [1:0] {
    ST_TRACE    = 2'b10,
    ST_RESOURCE = 2'b11
  } sample_type_e;

  // Resource counter source selection (two-bit MUX SEL field)
  typedef enum logic [1:0] {
    SRC_SLOW = 2'b00,
    SRC_EXT  = 2'b01,
    SRC_SW   = 2'b10,
    SRC_NODE = 2'b11
  } cnt_src_e;

  typedef struct packed {
    logic [2:0] cpu_id;
    logic [1:0] stype;
    logic       fifo_ovr;
    logic       rsrc_ovr;
    logic       rd_err;
  } header_t;

  typedef struct packed {
    logic               has_rsrc;  // bit 128
    header_t            hdr;       // 127:120
    logic [TS_S_W-1:0]  ts;        // 119:80
    logic [SRC_W-1:0]   src;       // 79:48
    logic [USER_W-1:0]  user;      // 47:0
  } fifo_word_t;

  // Odd parity bit: makes the number of ones in {data, parity} odd.
  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

endpackage
