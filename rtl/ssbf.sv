// ssbf: store sets bloom filter, the filter of commit-time load
// re-execution.
//
// For each data address it remembers the sequence number of the last store
// that committed to it. A load records, when it executes, the sequence
// number of the newest store whose value it can have seen; at load commit
// the filter is read with the load's address, and only if the remembered
// store is younger than that does the load need to be re-executed.
//
// Organization: SETS sets x WAYS ways, indexed by the low address bits and
// holding an 8-bit partial tag and a sequence number. A committing store
// that matches a way overwrites its sequence number (stores commit in order,
// so the value only grows, and two addresses that share a partial tag merge
// into the newer number). Otherwise it fills an invalid way or the
// least-recently-written way; an evicted number is folded into a per-set
// floor, which a lookup that misses returns. The answer is therefore never
// older than the true last store, which keeps the filter safe: it may cause
// extra re-executions, never a missed one. Sizes (256 sets, 2 ways, 8-bit
// tags) follow the document; the contents of an entry, the floor and the
// replacement policy are this design's own.
//
// Interface: write port at the clock edge; combinational lookup returning
// lk_seq and lk_hit (lk_hit low means lk_seq is the floor).
module ssbf
  import m3d_pkg::*;
#(
  parameter int unsigned SETS  = 256,
  parameter int unsigned WAYS  = 2,
  parameter int unsigned TAG_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [SEQ_W-1:0]  wr_seq,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic [SEQ_W-1:0]  lk_seq
);
  localparam int unsigned IW = $clog2(SETS);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic             valid [SETS][WAYS];
  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [SEQ_W-1:0] seqs  [SETS][WAYS];
  logic [SEQ_W-1:0] floor_seq [SETS];
  logic [WW-1:0]    victim [SETS];

  logic [IW-1:0]    li, wi;
  logic [TAG_W-1:0] lt, wt;
  assign li = lk_addr[IW-1:0];
  assign lt = lk_addr[IW+TAG_W-1:IW];
  assign wi = wr_addr[IW-1:0];
  assign wt = wr_addr[IW+TAG_W-1:IW];

  always_comb begin
    lk_hit = 1'b0;
    lk_seq = floor_seq[li];
    for (int w = 0; w < WAYS; w++) begin
      if (valid[li][w] && tags[li][w] == lt) begin
        lk_hit = 1'b1;
        lk_seq = seqs[li][w];
      end
    end
  end

  logic          w_match, w_free;
  logic [WW-1:0] w_way;
  always_comb begin
    w_match = 1'b0;
    w_free  = 1'b0;
    w_way   = victim[wi];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[wi][w]) begin
        w_free = 1'b1;
        w_way  = WW'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid[wi][w] && tags[wi][w] == wt) begin
        w_match = 1'b1;
        w_way   = WW'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        floor_seq[s] <= '0;
        victim[s]    <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (wr_valid) begin
      valid[wi][w_way] <= 1'b1;
      tags[wi][w_way]  <= wt;
      seqs[wi][w_way]  <= wr_seq;
      if (!w_match && !w_free && seq_younger(seqs[wi][w_way], floor_seq[wi]))
        floor_seq[wi] <= seqs[wi][w_way];
      // the way just written becomes most recent; point the victim elsewhere
      victim[wi] <= (w_way == WW'(WAYS - 1)) ? '0 : w_way + 1'b1;
    end
  end

endmodule
