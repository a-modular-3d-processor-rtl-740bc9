// m3d_core: the stackable parts of one out-of-order core, wired together
// behind a single stack_present strap.
//
// The core is designed once. When a second die carrying the upper halves of
// the stackable structures is bonded on top, stack_present is tied high and
// every structure doubles (or, for the branch predictor, switches
// algorithm); when the die is absent it is tied low and each structure
// fakes the missing half (phantom entries, forced-zero decoder roots,
// always-missing tag comparators, always-full queues), so the logic on the
// bottom die behaves as the smaller baseline core.
//
// What is wired here:
//   * micro-op queue (stack_fifo, 24/48 entries) -> reservation station
//     (stacked_rs, 32/64 entries), one uop per cycle;
//   * RS issue -> tag broadcast one cycle later (single-cycle execution is
//     assumed for the wakeup loop), plus one external wakeup port for results
//     of variable latency such as loads;
//   * load/store queues (stacked_lsq) -> DL1 data array (two copies of a
//     stack_sram, 32 KB per layer, giving the two read ports the queues use;
//     both copies are written by committing stores);
//   * a re-execution flush from the load/store queues flushes the RS, as does
//     the external flush input;
//   * branch predictor (tage_bp) and DTLB0 (stack_tag_array, 16/32
//     entries) with their own ports.
// The front end (fetch, x86 decode, rename), the execution units, the ROB and
// commit logic, cache tags/miss handling, L2 and memory interface are not
// part of this RTL; their signals are the ports of this module.
//
// Timing: all state changes on the rising edge of clk; rst_n is an
// asynchronous active-low reset. After reset the branch predictor clears
// its tables for 16384 cycles (bp_init_busy).
module m3d_core
  import m3d_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stack_present,
  input  logic              flush,
  // renamed uops into the micro-op queue
  input  logic              uop_valid,
  input  rs_uop_t           uop,
  output logic              uop_ready,
  // issue to the execution ports
  output logic [EXEC_PORTS-1:0] issue_valid,
  output rs_payload_t       issue_pl   [EXEC_PORTS],
  output logic [5:0]        issue_slot [EXEC_PORTS],
  // wakeup from variable-latency results
  input  logic              ext_wake_valid,
  input  logic [PTAG_W-1:0] ext_wake_tag,
  // scheduler observation
  output logic [5:0]        rs_occ_layer0,
  output logic [5:0]        rs_occ_layer1,
  output logic [5:0]        rs_pair_conflicts,
  output logic [7:0]        rs_seg_active,
  // load/store queues
  input  logic              mem_alloc_valid,
  input  logic              mem_alloc_is_store,
  input  logic [PC_W-1:0]   mem_alloc_pc,
  output logic              mem_alloc_ready,
  output lsq_part_e         mem_alloc_part,
  output logic [6:0]        mem_alloc_idx,
  output logic [SEQ_W-1:0]  mem_alloc_seq,
  output logic              mem_alloc_fallback,
  input  logic              st_valid,
  input  lsq_part_e         st_part,
  input  logic [6:0]        st_idx,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [DATA_W-1:0] st_data,
  input  logic              ld_valid,
  input  lsq_part_e         ld_part,
  input  logic [6:0]        ld_idx,
  input  logic [ADDR_W-1:0] ld_addr,
  output logic [DATA_W-1:0] ld_data,
  output logic              ld_fwd,
  input  logic              cm_valid,
  output logic              cm_ready,
  output logic              cm_is_store,
  output logic [SEQ_W-1:0]  cm_seq,
  output logic [DATA_W-1:0] cm_ld_data,
  output logic              cm_reexec,
  output logic              cm_flush,
  output logic [PC_W-1:0]   cm_flush_pc,
  // branch predictor
  input  logic              br_valid,
  input  logic [PC_W-1:0]   br_pc,
  input  logic              br_taken,
  output logic              br_pred,
  output logic [2:0]        br_provider,
  output logic              bp_init_busy,
  // DTLB0
  input  logic [19:0]       tlb_vpn,
  output logic              tlb_hit,
  output logic [19:0]       tlb_ppn,
  input  logic              tlb_fill_valid,
  input  logic [19:0]       tlb_fill_vpn,
  input  logic [19:0]       tlb_fill_ppn,
  input  logic              tlb_flush
);
  localparam int unsigned NB = EXEC_PORTS + 1;
  localparam int unsigned DL1_WORDS = 16384;   // 64 KB stacked, 32 KB per layer

  // ------------------------------------------------ uop queue -> RS
  logic    q_full, q_empty, q_pop;
  rs_uop_t q_head;
  logic [$clog2(49)-1:0] q_count;

  stack_fifo #(.DEPTH(48), .WIDTH($bits(rs_uop_t))) u_uopq (
    .clk, .rst_n, .stack_present, .push(uop_valid), .din(uop), .full(q_full),
    .pop(q_pop), .dout(q_head), .empty(q_empty), .count(q_count));
  assign uop_ready = !q_full;

  logic [ALLOC_WIDTH-1:0] rs_alloc_valid;
  rs_uop_t                rs_alloc_uop  [ALLOC_WIDTH];
  logic                   rs_alloc_ready;
  logic [5:0]             rs_alloc_slot [ALLOC_WIDTH];
  logic                   rs_flush;

  always_comb begin
    rs_alloc_valid    = '0;
    rs_alloc_valid[0] = !q_empty;
    for (int a = 0; a < ALLOC_WIDTH; a++) rs_alloc_uop[a] = q_head;
  end
  assign q_pop    = !q_empty && rs_alloc_ready && !rs_flush;
  assign rs_flush = flush || cm_flush;

  // ------------------------------------------------ wakeup loop
  logic [NB-1:0]     bcast_valid;
  logic [PTAG_W-1:0] bcast_tag [NB];
  logic [EXEC_PORTS-1:0] done_valid;
  logic [PTAG_W-1:0]     done_tag [EXEC_PORTS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_valid <= '0;
      for (int p = 0; p < EXEC_PORTS; p++) done_tag[p] <= '0;
    end else begin
      done_valid <= rs_flush ? '0 : issue_valid;
      for (int p = 0; p < EXEC_PORTS; p++) done_tag[p] <= issue_pl[p].dst;
    end
  end

  always_comb begin
    for (int p = 0; p < EXEC_PORTS; p++) begin
      bcast_valid[p] = done_valid[p];
      bcast_tag[p]   = done_tag[p];
    end
    bcast_valid[EXEC_PORTS] = ext_wake_valid;
    bcast_tag[EXEC_PORTS]   = ext_wake_tag;
  end

  stacked_rs #(.NBCAST(NB)) u_rs (
    .clk, .rst_n, .stack_present, .flush(rs_flush),
    .alloc_valid(rs_alloc_valid), .alloc_uop(rs_alloc_uop), .alloc_ready(rs_alloc_ready),
    .alloc_slot(rs_alloc_slot),
    .bcast_valid, .bcast_tag,
    .issue_valid, .issue_pl, .issue_slot,
    .seg_active(rs_seg_active), .occ_layer0(rs_occ_layer0), .occ_layer1(rs_occ_layer1),
    .pair_conflicts(rs_pair_conflicts));

  // ------------------------------------------------ load/store queues + DL1
  logic [ADDR_W-1:0] m_raddr, m_raddr2, m_waddr;
  logic [DATA_W-1:0] m_rdata, m_rdata2, m_wdata;
  logic              m_we, rl0, rl1;

  stacked_lsq u_lsq (
    .clk, .rst_n, .stack_present, .flush,
    .alloc_valid(mem_alloc_valid), .alloc_is_store(mem_alloc_is_store), .alloc_pc(mem_alloc_pc),
    .alloc_ready(mem_alloc_ready), .alloc_part(mem_alloc_part), .alloc_idx(mem_alloc_idx),
    .alloc_seq(mem_alloc_seq), .alloc_fallback(mem_alloc_fallback),
    .st_valid, .st_part, .st_idx, .st_addr, .st_data,
    .ld_valid, .ld_part, .ld_idx, .ld_addr, .ld_data, .ld_fwd,
    .cm_valid, .cm_ready, .cm_is_store, .cm_seq, .cm_ld_data, .cm_reexec, .cm_flush, .cm_flush_pc,
    .mem_raddr(m_raddr), .mem_rdata(m_rdata), .mem_raddr2(m_raddr2), .mem_rdata2(m_rdata2),
    .mem_we(m_we), .mem_waddr(m_waddr), .mem_wdata(m_wdata));

  stack_sram #(.SETS(DL1_WORDS), .WIDTH(DATA_W)) u_dl1_a (
    .clk, .stack_present, .we(m_we), .waddr(m_waddr[13:0]), .wdata(m_wdata),
    .raddr(m_raddr[13:0]), .rdata(m_rdata), .rd_layer(rl0));
  stack_sram #(.SETS(DL1_WORDS), .WIDTH(DATA_W)) u_dl1_b (
    .clk, .stack_present, .we(m_we), .waddr(m_waddr[13:0]), .wdata(m_wdata),
    .raddr(m_raddr2[13:0]), .rdata(m_rdata2), .rd_layer(rl1));

  // ------------------------------------------------ branch predictor, DTLB0
  tage_bp u_bp (
    .clk, .rst_n, .stack_present, .br_valid, .br_pc, .br_taken,
    .pred_taken(br_pred), .provider(br_provider), .init_busy(bp_init_busy));

  stack_tag_array #(.SETS(8), .WAYS(4), .KEY_W(20), .DATA_W(20)) u_dtlb (
    .clk, .rst_n, .stack_present, .lk_key(tlb_vpn), .lk_hit(tlb_hit), .lk_data(tlb_ppn),
    .fill_valid(tlb_fill_valid), .fill_key(tlb_fill_vpn), .fill_data(tlb_fill_ppn),
    .flush(tlb_flush));

endmodule
