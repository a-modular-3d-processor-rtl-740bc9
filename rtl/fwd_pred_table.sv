// fwd_pred_table: PC-indexed table of resetting counters with partial tags.
// Two instances form the memory-dependence predictors of the load/store
// queues: the Store Forwarding Predictor (indexed by store PC) and the Load
// Receiving Table (indexed by load PC).
//
// Each set holds a valid bit, a partial tag and a saturating counter. A
// "set" request (a re-execution flush or a successful L1 store-to-load
// forward) installs the tag and loads the counter with its maximum value. A
// "decrement" request (the instruction committed without forwarding and
// without causing a flush) lowers a matching counter by one, stopping at
// zero. The lookup predicts "place in the searchable L1 queue" while the tag
// matches and the counter is non-zero. Table size, tag width and counter
// width follow the document (1K sets, 8-bit tags, 10-bit counters); the
// direct-mapped organization and the choice of PC bits for index and tag are
// this design's own.
//
// Interface: combinational lookup (lk_pc -> lk_pred); set and dec act at the
// clock edge, set wins when both name the same set.
module fwd_pred_table
  import m3d_pkg::*;
#(
  parameter int unsigned SETS  = 1024,
  parameter int unsigned TAG_W = 8,
  parameter int unsigned CNT_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] lk_pc,
  output logic            lk_pred,
  input  logic            set_valid,
  input  logic [PC_W-1:0] set_pc,
  input  logic            dec_valid,
  input  logic [PC_W-1:0] dec_pc
);
  localparam int unsigned IW = $clog2(SETS);

  logic             valid [SETS];
  logic [TAG_W-1:0] tags  [SETS];
  logic [CNT_W-1:0] cnt   [SETS];

  function automatic logic [IW-1:0] idx(input logic [PC_W-1:0] pc);
    return pc[IW-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tg(input logic [PC_W-1:0] pc);
    return pc[IW+TAG_W-1:IW];
  endfunction

  assign lk_pred = valid[idx(lk_pc)] && tags[idx(lk_pc)] == tg(lk_pc) && cnt[idx(lk_pc)] != '0;

  logic dec_hit;
  assign dec_hit = dec_valid && valid[idx(dec_pc)] && tags[idx(dec_pc)] == tg(dec_pc)
                   && cnt[idx(dec_pc)] != '0
                   && !(set_valid && idx(set_pc) == idx(dec_pc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SETS; i++) valid[i] <= 1'b0;
    end else if (set_valid) begin
      valid[idx(set_pc)] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (set_valid) begin
      tags[idx(set_pc)] <= tg(set_pc);
      cnt[idx(set_pc)]  <= '1;
    end
    if (dec_hit) cnt[idx(dec_pc)] <= cnt[idx(dec_pc)] - 1'b1;
  end

endmodule
