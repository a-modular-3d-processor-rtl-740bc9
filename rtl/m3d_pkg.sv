// m3d_pkg: sizes and shared types of the modular two-layer core.
//
// The structure sizes are the stacked (two-layer) configuration of the
// design; each stackable structure halves itself when the stack_present
// strap is low, so the same RTL also is the single-layer baseline.
// Capacities (RS, LDQ, STQ, L2 LDQ/STQ, ROB, predictor tables, queues) follow
// the document's parameter table. Bit widths of PCs, addresses, data and
// sequence numbers are this design's own choice.
package m3d_pkg;

  // ---- widths chosen by this design ----
  localparam int unsigned PC_W   = 32;  // instruction address
  localparam int unsigned ADDR_W = 32;  // data address (word granular)
  localparam int unsigned DATA_W = 32;  // load/store data
  localparam int unsigned SEQ_W  = 19;  // sequence number: 11 SPCT index + 8 tag bits
  localparam int unsigned PTAG_W = 8;   // physical register tag (256 regs)

  // ---- document sizes (stacked configuration) ----
  localparam int unsigned RS_ENTRIES   = 64;   // 32 per layer
  localparam int unsigned EXEC_PORTS   = 6;    // ports 0..5
  localparam int unsigned ALLOC_WIDTH  = 4;    // rename/allocate per cycle
  localparam int unsigned L1_LDQ       = 32;
  localparam int unsigned L1_STQ       = 20;
  localparam int unsigned L2_LDQ       = 80;
  localparam int unsigned L2_STQ       = 50;
  localparam int unsigned SFP_SETS     = 1024;
  localparam int unsigned LRT_SETS     = 1024;
  localparam int unsigned SPCT_SETS    = 2048;
  localparam int unsigned SSBF_SETS    = 256;
  localparam int unsigned SSBF_WAYS    = 2;
  localparam int unsigned PTAG_BITS    = 8;    // partial tag of the tables above
  localparam int unsigned RCNT_W       = 10;   // resetting-counter width

  // Signed distance comparison of wrapping sequence numbers: a is younger
  // than b when (a - b) is positive in SEQ_W-bit two's complement.
  function automatic logic seq_younger(input logic [SEQ_W-1:0] a,
                                       input logic [SEQ_W-1:0] b);
    logic [SEQ_W-1:0] d;
    d = a - b;
    return (d != '0) && !d[SEQ_W-1];
  endfunction

  localparam int unsigned PORT_W = 3;   // execution port number 0..5
  localparam int unsigned OP_W   = 16;  // opaque operation field of a uop

  // What the payload RAM holds for an RS entry (read once, at issue).
  typedef struct packed {
    logic [PTAG_W-1:0] dst;   // destination physical register
    logic [OP_W-1:0]   op;    // operation, immediates, etc. (opaque here)
  } rs_payload_t;

  // A micro-op as the allocator hands it to the reservation station.
  typedef struct packed {
    logic [PTAG_W-1:0] src1;
    logic              src1_rdy;
    logic [PTAG_W-1:0] src2;
    logic              src2_rdy;
    logic [PORT_W-1:0] port;  // execution port the uop is bound to
    rs_payload_t       pl;
  } rs_uop_t;

  // Which half of the load/store queues an entry lives in.
  typedef enum logic {Q_L1 = 1'b0, Q_L2 = 1'b1} lsq_part_e;

endpackage
