// spct: Store PC Table. Links a store, named by its program-order sequence
// number, to the PC of the store instruction, so that when a committing load
// is found to have missed a value from an earlier store the PC of that
// offending store can be recovered and trained into the Store Forwarding
// Predictor.
//
// The table is direct-mapped: the low log2(SETS) bits of the sequence number
// index it and the next TAG_W bits are kept as a partial tag. A store writes
// its entry when it is allocated; a lookup hits when the partial tag matches.
// Size (2K sets) and tag width (8 bits) follow the document; what the table
// is indexed by and when it is written are this design's reading of "link
// stores to mis-ordered loads".
//
// Interface: write port at the clock edge, combinational lookup.
module spct
  import m3d_pkg::*;
#(
  parameter int unsigned SETS  = 2048,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  input  logic [SEQ_W-1:0] wr_seq,
  input  logic [PC_W-1:0]  wr_pc,
  input  logic [SEQ_W-1:0] lk_seq,
  output logic             lk_hit,
  output logic [PC_W-1:0]  lk_pc
);
  localparam int unsigned IW = $clog2(SETS);

  logic             valid [SETS];
  logic [TAG_W-1:0] tags  [SETS];
  logic [PC_W-1:0]  pcs   [SETS];

  logic [IW-1:0] wi, li;
  assign wi = wr_seq[IW-1:0];
  assign li = lk_seq[IW-1:0];

  assign lk_hit = valid[li] && tags[li] == lk_seq[IW+TAG_W-1:IW];
  assign lk_pc  = pcs[li];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) valid[i] <= 1'b0;
    end else if (wr_valid) begin
      valid[wi] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      tags[wi] <= wr_seq[IW+TAG_W-1:IW];
      pcs[wi]  <= wr_pc;
    end
  end

endmodule
