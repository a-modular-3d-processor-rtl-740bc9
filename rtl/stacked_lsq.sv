// stacked_lsq: load and store queues partitioned into a small searchable
// layer-0 part and a large non-searchable layer-1 part, with the
// memory-dependence predictors that steer memory uops between them and the
// commit-time load re-execution that keeps execution correct.
//
// Queues. The L1 LDQ and L1 STQ (layer 0) are fully associative: an
// executing load in the L1 LDQ searches the L1 STQ and takes the data of the
// youngest older store to the same address. The L2 LDQ and L2 STQ (layer 1)
// are plain position-indexed RAMs: an L2 load only reads memory and an L2
// store only holds its address and data until it writes memory at commit;
// neither can take part in forwarding. Each queue is a circular buffer in
// program order; every memory uop gets a sequence number at allocation.
//
// Allocation (one memory uop per cycle). A store whose PC hits a non-zero
// counter in the Store Forwarding Predictor (SFP), or a load whose PC hits
// in the Load Receiving Table (LRT), goes to the L1 queue; every other uop
// goes to the L2 queue unless that is full, in which case it falls back to
// the L1 queue. Without the stacked layer the L2 queues report full at all
// times (phantom queues), so everything goes to L1. alloc_ready drops when
// the chosen queue is full.
//
// Commit (one memory uop per cycle, in sequence order). A store writes
// memory, records (address, sequence) in the store filter (ssbf) and, if it
// did not forward, decrements its SFP counter. A load asks the filter for the
// last store committed to its address; only if that store is younger than
// the newest store whose value the load can have seen is the load
// re-executed, by reading memory again. A different value flushes the
// pipeline behind the load (cm_flush, all queues emptied); the offending
// store's PC is found through the Store PC Table (spct) and both the SFP
// entry of the store and the LRT entry of the load are set to the maximum.
// A load that did not forward and did not flush decrements its LRT counter.
// A successful L1 forward also sets the SFP and LRT entries of the pair.
//
// Timing: allocation, execution and commit are single-cycle and
// combinational in their results (alloc_idx, ld_data, cm_*); state changes
// at the clock edge. Memory is outside: one read port for executing loads,
// one for re-execution, one write port for committing stores.
//
// Follows the document: queue sizes, the two-level organization with no
// communication to/from the L2 queues, prediction-steered allocation with
// full fallback, phantom L2 queues, re-execution flush and the
// resetting-counter training. This design's own choices: one allocation,
// one commit per cycle, word-sized accesses (no partial overlap), the
// sequence-number form of the re-execution filter, and flushing everything
// younger than the offending load.
module stacked_lsq
  import m3d_pkg::*;
#(
  parameter int unsigned NL1LD = L1_LDQ,
  parameter int unsigned NL1ST = L1_STQ,
  parameter int unsigned NL2LD = L2_LDQ,
  parameter int unsigned NL2ST = L2_STQ,
  parameter int unsigned IDX_W = 7        // wide enough for the largest queue
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stack_present,
  input  logic              flush,        // external (e.g. branch) flush of all uncommitted
  // allocation
  input  logic              alloc_valid,
  input  logic              alloc_is_store,
  input  logic [PC_W-1:0]   alloc_pc,
  output logic              alloc_ready,
  output lsq_part_e         alloc_part,
  output logic [IDX_W-1:0]  alloc_idx,
  output logic [SEQ_W-1:0]  alloc_seq,
  output logic              alloc_fallback, // predicted L2 but L2 was full
  // store execution (address and data)
  input  logic              st_valid,
  input  lsq_part_e         st_part,
  input  logic [IDX_W-1:0]  st_idx,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [DATA_W-1:0] st_data,
  // load execution
  input  logic              ld_valid,
  input  lsq_part_e         ld_part,
  input  logic [IDX_W-1:0]  ld_idx,
  input  logic [ADDR_W-1:0] ld_addr,
  output logic [DATA_W-1:0] ld_data,
  output logic              ld_fwd,
  // commit
  input  logic              cm_valid,
  output logic              cm_ready,     // the oldest memory uop has executed
  output logic              cm_is_store,
  output logic [SEQ_W-1:0]  cm_seq,
  output logic [DATA_W-1:0] cm_ld_data,   // architectural value of a committing load
  output logic              cm_reexec,
  output logic              cm_flush,
  output logic [PC_W-1:0]   cm_flush_pc,
  // data memory
  output logic [ADDR_W-1:0] mem_raddr,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [ADDR_W-1:0] mem_raddr2,
  input  logic [DATA_W-1:0] mem_rdata2,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_waddr,
  output logic [DATA_W-1:0] mem_wdata
);
  typedef struct packed {
    logic              done;    // address (and data) known / executed
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;    // store data or loaded value
    logic [SEQ_W-1:0]  seq;
    logic [SEQ_W-1:0]  seen;    // loads: newest store whose value it saw
    logic [PC_W-1:0]   pc;
    logic              fwd;     // took part in a store-to-load forward
  } ent_t;

  ent_t l1ld [NL1LD];
  ent_t l1st [NL1ST];
  ent_t l2ld [NL2LD];
  ent_t l2st [NL2ST];

  // circular-buffer state: 0 = L1 LDQ, 1 = L1 STQ, 2 = L2 LDQ, 3 = L2 STQ
  logic [IDX_W-1:0] head [4];
  logic [IDX_W-1:0] tail [4];
  logic [IDX_W:0]   cnt  [4];
  localparam int unsigned SIZE [4] = '{NL1LD, NL1ST, NL2LD, NL2ST};

  logic [SEQ_W-1:0] seq_next, commit_seq, last_st_seq;

  function automatic logic [IDX_W-1:0] inc(input logic [IDX_W-1:0] p, input int unsigned sz);
    return (32'(p) == sz - 1) ? '0 : p + 1'b1;
  endfunction

  // ---------------------------------------------------------- predictors
  logic            sfp_pred, lrt_pred;
  logic            sfp_set, lrt_set, sfp_dec, lrt_dec;
  logic [PC_W-1:0] sfp_set_pc, lrt_set_pc, sfp_dec_pc, lrt_dec_pc;

  fwd_pred_table #(.SETS(SFP_SETS), .TAG_W(PTAG_BITS), .CNT_W(RCNT_W)) u_sfp (
    .clk, .rst_n, .lk_pc(alloc_pc), .lk_pred(sfp_pred),
    .set_valid(sfp_set), .set_pc(sfp_set_pc), .dec_valid(sfp_dec), .dec_pc(sfp_dec_pc));
  fwd_pred_table #(.SETS(LRT_SETS), .TAG_W(PTAG_BITS), .CNT_W(RCNT_W)) u_lrt (
    .clk, .rst_n, .lk_pc(alloc_pc), .lk_pred(lrt_pred),
    .set_valid(lrt_set), .set_pc(lrt_set_pc), .dec_valid(lrt_dec), .dec_pc(lrt_dec_pc));

  // ---------------------------------------------------------- allocation
  logic l1_full_ld, l1_full_st, l2_full_ld, l2_full_st, want_l1, to_l1, a_fire;
  assign l1_full_ld = (cnt[0] == (IDX_W+1)'(NL1LD));
  assign l1_full_st = (cnt[1] == (IDX_W+1)'(NL1ST));
  // phantom: without the stacked layer the L2 queues always look full
  assign l2_full_ld = (cnt[2] == (IDX_W+1)'(NL2LD)) || !stack_present;
  assign l2_full_st = (cnt[3] == (IDX_W+1)'(NL2ST)) || !stack_present;

  always_comb begin
    want_l1 = alloc_is_store ? sfp_pred : lrt_pred;
    to_l1   = want_l1 || (alloc_is_store ? l2_full_st : l2_full_ld);
    alloc_part     = to_l1 ? Q_L1 : Q_L2;
    alloc_fallback = !want_l1 && to_l1;
    alloc_ready    = to_l1 ? !(alloc_is_store ? l1_full_st : l1_full_ld) : 1'b1;
    alloc_idx      = tail[{!to_l1, alloc_is_store}];
    alloc_seq      = seq_next;
  end
  assign a_fire = alloc_valid && alloc_ready && !flush && !cm_flush;

  // ---------------------------------------------------------- load execution
  ent_t ld_e;
  logic fwd_hit;
  logic [DATA_W-1:0] fwd_data;
  logic [SEQ_W-1:0]  fwd_seq;
  logic [PC_W-1:0]   fwd_pc;
  logic [$clog2(NL1ST)-1:0] fwd_slot;

  // an L1 STQ entry is live if it lies between head and tail
  function automatic logic st_live(input int i);
    int off;
    off = (i >= int'(head[1])) ? i - int'(head[1]) : i + int'(NL1ST) - int'(head[1]);
    return off < int'(cnt[1]);
  endfunction

  assign ld_e = (ld_part == Q_L1) ? l1ld[ld_idx] : l2ld[ld_idx];

  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = '0;
    fwd_seq  = '0;
    fwd_pc   = '0;
    fwd_slot = '0;
    if (ld_part == Q_L1) begin
      for (int i = 0; i < NL1ST; i++) begin
        if (st_live(i) && l1st[i].done && l1st[i].addr == ld_addr
            && seq_younger(ld_e.seq, l1st[i].seq)
            && (!fwd_hit || seq_younger(l1st[i].seq, fwd_seq))) begin
          fwd_hit  = 1'b1;
          fwd_data = l1st[i].data;
          fwd_seq  = l1st[i].seq;
          fwd_pc   = l1st[i].pc;
          fwd_slot = $clog2(NL1ST)'(i);
        end
      end
    end
  end

  assign mem_raddr = ld_addr;
  assign ld_data   = fwd_hit ? fwd_data : mem_rdata;
  assign ld_fwd    = fwd_hit;

  // ---------------------------------------------------------- commit
  logic      hv [4];
  ent_t      he [4];
  logic [1:0] cq;
  ent_t      ce;
  logic      c_found;

  always_comb begin
    he[0] = l1ld[head[0]];
    he[1] = l1st[head[1]];
    he[2] = l2ld[head[2]];
    he[3] = l2st[head[3]];
    c_found = 1'b0;
    cq = 2'd0;
    for (int q = 0; q < 4; q++) begin
      hv[q] = cnt[q] != '0;
      if (hv[q] && he[q].seq == commit_seq) begin
        c_found = 1'b1;
        cq = 2'(q);
      end
    end
    ce = he[cq];
  end

  assign cm_ready    = c_found && ce.done;
  assign cm_is_store = cq[0];
  assign cm_seq      = ce.seq;

  logic             c_fire, c_load, c_store;
  logic             ss_hit;
  logic [SEQ_W-1:0] ss_seq;
  logic             sp_hit;
  logic [PC_W-1:0]  sp_pc;

  assign c_fire  = cm_valid && cm_ready && !flush;
  assign c_load  = c_fire && !cq[0];
  assign c_store = c_fire && cq[0];

  ssbf #(.SETS(SSBF_SETS), .WAYS(SSBF_WAYS), .TAG_W(PTAG_BITS)) u_ssbf (
    .clk, .rst_n, .wr_valid(c_store), .wr_addr(ce.addr), .wr_seq(ce.seq),
    .lk_addr(ce.addr), .lk_hit(ss_hit), .lk_seq(ss_seq));

  spct #(.SETS(SPCT_SETS), .TAG_W(PTAG_BITS)) u_spct (
    .clk, .rst_n, .wr_valid(a_fire && alloc_is_store), .wr_seq(seq_next), .wr_pc(alloc_pc),
    .lk_seq(ss_seq), .lk_hit(sp_hit), .lk_pc(sp_pc));

  assign mem_raddr2  = ce.addr;
  assign cm_reexec   = c_load && seq_younger(ss_seq, ce.seen);
  assign cm_flush    = cm_reexec && (mem_rdata2 != ce.data);
  assign cm_flush_pc = ce.pc;
  assign cm_ld_data  = cm_reexec ? mem_rdata2 : ce.data;

  assign mem_we    = c_store;
  assign mem_waddr = ce.addr;
  assign mem_wdata = ce.data;

  // predictor training
  logic ex_fwd;
  assign ex_fwd = ld_valid && fwd_hit && !flush && !cm_flush;
  always_comb begin
    sfp_set    = cm_flush ? sp_hit : ex_fwd;
    sfp_set_pc = cm_flush ? sp_pc  : fwd_pc;
    lrt_set    = cm_flush || ex_fwd;
    lrt_set_pc = cm_flush ? ce.pc  : ld_e.pc;
    sfp_dec    = c_store && !ce.fwd;
    sfp_dec_pc = ce.pc;
    lrt_dec    = c_load && !ce.fwd && !cm_flush;
    lrt_dec_pc = ce.pc;
  end

  // ---------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < 4; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
      end
      seq_next    <= SEQ_W'(1);
      commit_seq  <= SEQ_W'(1);
      last_st_seq <= '0;
    end else if (flush || cm_flush) begin
      // everything uncommitted (younger than the flushing load) is discarded
      for (int q = 0; q < 4; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
      end
      seq_next   <= cm_flush ? commit_seq + 1'b1 : commit_seq;
      commit_seq <= cm_flush ? commit_seq + 1'b1 : commit_seq;
    end else begin
      logic [1:0] aq;
      aq = {!to_l1, alloc_is_store};
      for (int q = 0; q < 4; q++) begin
        logic a, c;
        a = a_fire && aq == 2'(q);
        c = c_fire && cq == 2'(q);
        if (a) tail[q] <= inc(tail[q], SIZE[q]);
        if (c) head[q] <= inc(head[q], SIZE[q]);
        cnt[q] <= cnt[q] + (IDX_W+1)'(a) - (IDX_W+1)'(c);
      end
      if (a_fire) seq_next <= seq_next + 1'b1;
      if (c_fire) commit_seq <= commit_seq + 1'b1;
      if (c_store) last_st_seq <= ce.seq;
    end
  end

  always_ff @(posedge clk) begin
    if (!(flush || cm_flush)) begin
      if (a_fire) begin
        ent_t n;
        n = '0;
        n.seq = seq_next;
        n.pc  = alloc_pc;
        case ({!to_l1, alloc_is_store})
          2'b00: l1ld[tail[0]] <= n;
          2'b01: l1st[tail[1]] <= n;
          2'b10: l2ld[tail[2]] <= n;
          default: l2st[tail[3]] <= n;
        endcase
      end
      if (st_valid) begin
        if (st_part == Q_L1) begin
          l1st[st_idx].done <= 1'b1;
          l1st[st_idx].addr <= st_addr;
          l1st[st_idx].data <= st_data;
        end else begin
          l2st[st_idx].done <= 1'b1;
          l2st[st_idx].addr <= st_addr;
          l2st[st_idx].data <= st_data;
        end
      end
      if (ld_valid) begin
        if (ld_part == Q_L1) begin
          l1ld[ld_idx].done <= 1'b1;
          l1ld[ld_idx].addr <= ld_addr;
          l1ld[ld_idx].data <= ld_data;
          l1ld[ld_idx].seen <= fwd_hit ? fwd_seq : last_st_seq;
          l1ld[ld_idx].fwd  <= fwd_hit;
          if (fwd_hit) l1st[fwd_slot].fwd <= 1'b1;
        end else begin
          l2ld[ld_idx].done <= 1'b1;
          l2ld[ld_idx].addr <= ld_addr;
          l2ld[ld_idx].data <= ld_data;
          l2ld[ld_idx].seen <= last_st_seq;
        end
      end
    end
  end

endmodule
