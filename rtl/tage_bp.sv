// tage_bp: two-algorithms-in-one branch predictor. Without the stacked
// layer it is a gshare predictor; with it, it is a TAGE predictor whose
// tagged tables live on the stacked layer.
//
// Structure. Table 0 (bottom layer) holds BASE_N 2-bit counters. Tables
// 1..NT (stacked layer) hold T_N entries each of a partial tag, a 3-bit
// signed-style counter (taken when >= 4) and a 2-bit useful counter, and are
// indexed and tagged with hashes of the PC and of HIST[i] bits of global
// history (geometric lengths). Table 0 is indexed by PC XOR global history
// when the layer is absent (gshare) and by the PC with the history replaced
// by zeros when it is present (bimodal). Without the layer the tag-compare
// HIT signals of tables 1..NT are forced to miss, so the logic behaves as a
// TAGE whose tagged tables always miss.
//
// Prediction: the hitting tagged table with the longest history provides
// the prediction; with no hit, table 0 does. Update (same cycle as the
// prediction, with the resolved outcome): the provider's counter moves
// towards the outcome (table 0 is trained only when it provided); the
// provider's useful counter moves up when it was right and the alternate
// prediction (next-longest hit, or table 0) differed, down when it was
// wrong in that case; on a misprediction an entry is allocated in the
// shortest longer table whose useful counter is zero, or all longer
// tables' useful counters are decremented if there is none. Global history
// shifts in the outcome.
//
// After reset the tables are cleared one index per cycle; init_busy is high
// meanwhile and branches are ignored.
//
// Follows the document: gshare/TAGE with 5 tables, table 0 gshare when
// alone and bimodal when stacked, forced misses of the tagged tables, and
// the storage budget (table 0 is 4 KB; tables 1..4 total 3.25 KB, so the
// stacked predictor stays under 8 KB). This design's own choices: table
// sizes, history lengths, hash functions, the simplified TAGE update (no
// periodic useful reset, no alternate-on-new-entry policy) and updating
// at prediction time rather than speculatively.
//
// Interface: br_valid/br_pc -> pred_taken, provider (combinational);
// br_taken is the resolved direction, applied at the clock edge.
module tage_bp
  import m3d_pkg::*;
#(
  parameter int unsigned BASE_N = 16384,   // 2-bit counters: 4 KB
  parameter int unsigned NT     = 4,       // tagged tables
  parameter int unsigned T_N    = 512,     // entries per tagged table
  parameter int unsigned TAG_W  = 8,
  parameter int unsigned GH_W   = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stack_present,
  input  logic             br_valid,
  input  logic [PC_W-1:0]  br_pc,
  input  logic             br_taken,
  output logic             pred_taken,
  output logic [2:0]       provider,     // 0 = table 0, i = tagged table i
  output logic             init_busy
);
  localparam int unsigned BW = $clog2(BASE_N);
  localparam int unsigned TW = $clog2(T_N);
  localparam int unsigned HIST [5] = '{0, 5, 11, 23, 47};   // geometric lengths

  logic [1:0]       base [BASE_N];
  logic [TAG_W-1:0] ttag [NT][T_N];
  logic [2:0]       tctr [NT][T_N];
  logic [1:0]       tu   [NT][T_N];
  logic             tval [NT][T_N];

  logic [GH_W-1:0] ghist;
  logic [BW-1:0]   init_idx;

  // fold the low len bits of h into w bits by XOR
  function automatic logic [15:0] fold(input logic [GH_W-1:0] h, input int unsigned len,
                                       input int unsigned w);
    logic [15:0] r;
    r = '0;
    for (int j = 0; j < GH_W; j++)
      if (j < int'(len)) r[j % w] ^= h[j];
    return r;
  endfunction

  // ---------------------------------------------------------- lookup
  logic [BW-1:0]    bidx;
  logic [TW-1:0]    tidx [NT];
  logic [TAG_W-1:0] tcmp [NT];
  logic [NT-1:0]    hit;

  always_comb begin
    // table 0: gshare alone, bimodal when stacked (history replaced by zeros)
    bidx = br_pc[BW-1:0] ^ (stack_present ? '0 : ghist[BW-1:0]);
    for (int t = 0; t < NT; t++) begin
      tidx[t] = br_pc[TW-1:0] ^ br_pc[2*TW-1:TW] ^ TW'(fold(ghist, HIST[t+1], TW));
      tcmp[t] = br_pc[TAG_W-1:0] ^ br_pc[TAG_W+TW-1:TW] ^ TAG_W'(fold(ghist, HIST[t+1], TAG_W) << 1)
                ^ TAG_W'(fold(ghist, HIST[t+1], TAG_W - 1));
      // without the stacked layer the HIT signals are wired to miss
      hit[t]  = stack_present && tval[t][tidx[t]] && ttag[t][tidx[t]] == tcmp[t];
    end
  end

  logic       base_pred, alt_pred, prov_pred;
  int         prov, alt;
  always_comb begin
    prov = 0;
    alt  = 0;
    for (int t = 1; t <= NT; t++) begin
      if (hit[t-1]) begin
        alt  = prov;
        prov = t;
      end
    end
    base_pred = base[bidx][1];
    prov_pred = (prov == 0) ? base_pred : tctr[prov-1][tidx[prov-1]][2];
    alt_pred  = (alt == 0)  ? base_pred : tctr[alt-1][tidx[alt-1]][2];
  end

  assign pred_taken = prov_pred;
  assign provider   = 3'(prov);

  // ---------------------------------------------------------- update
  logic upd, mispred;
  assign upd     = br_valid && !init_busy;
  assign mispred = prov_pred != br_taken;

  int alloc_t;   // table to allocate in (1..NT), 0 = none
  always_comb begin
    alloc_t = 0;
    for (int t = NT; t >= 1; t--)
      if (t > prov && !(tval[t-1][tidx[t-1]] && tu[t-1][tidx[t-1]] != 2'd0)) alloc_t = t;
  end

  function automatic logic [2:0] ctr3(input logic [2:0] c, input logic up);
    if (up)  return (c == 3'd7) ? c : c + 3'd1;
    else     return (c == 3'd0) ? c : c - 3'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghist     <= '0;
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == BW'(BASE_N - 1)) init_busy <= 1'b0;
    end else if (upd) begin
      ghist <= {ghist[GH_W-2:0], br_taken};
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      base[init_idx] <= 2'b01;
      if (init_idx < BW'(T_N))
        for (int t = 0; t < NT; t++) begin
          tval[t][init_idx[TW-1:0]] <= 1'b0;
          tu[t][init_idx[TW-1:0]]   <= 2'd0;
        end
    end else if (upd) begin
      if (prov == 0) begin
        if (br_taken && base[bidx] != 2'b11)  base[bidx] <= base[bidx] + 2'b01;
        if (!br_taken && base[bidx] != 2'b00) base[bidx] <= base[bidx] - 2'b01;
      end else begin
        tctr[prov-1][tidx[prov-1]] <= ctr3(tctr[prov-1][tidx[prov-1]], br_taken);
        if (prov_pred != alt_pred) begin
          if (!mispred && tu[prov-1][tidx[prov-1]] != 2'd3)
            tu[prov-1][tidx[prov-1]] <= tu[prov-1][tidx[prov-1]] + 2'd1;
          if (mispred && tu[prov-1][tidx[prov-1]] != 2'd0)
            tu[prov-1][tidx[prov-1]] <= tu[prov-1][tidx[prov-1]] - 2'd1;
        end
      end
      if (mispred && stack_present && prov < NT) begin
        if (alloc_t != 0) begin
          tval[alloc_t-1][tidx[alloc_t-1]] <= 1'b1;
          ttag[alloc_t-1][tidx[alloc_t-1]] <= tcmp[alloc_t-1];
          tctr[alloc_t-1][tidx[alloc_t-1]] <= br_taken ? 3'd4 : 3'd3;
          tu[alloc_t-1][tidx[alloc_t-1]]   <= 2'd0;
        end else begin
          for (int t = 1; t <= NT; t++)
            if (t > prov && tu[t-1][tidx[t-1]] != 2'd0)
              tu[t-1][tidx[t-1]] <= tu[t-1][tidx[t-1]] - 2'd1;
        end
      end
    end
  end

endmodule
