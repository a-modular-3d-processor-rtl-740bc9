// tb_m3d_core: end-to-end test of the core's stackable parts at their
// default sizes, first with the stacked layer absent and then present.
//
// Per configuration:
//  * scheduler: uops waiting on one tag are pushed until the core refuses
//    more; it must accept exactly RS + uop-queue capacity (32+24 without the
//    layer, 64+48 with it). One external wakeup then releases them all; each
//    must issue once, on its own port. A dependent chain must issue in order.
//  * memory: a looping load/store program runs through the queues and the
//    DL1 array; every committed load must return the architecturally correct
//    value (the testbench's own memory, which without the layer aliases the
//    upper half of the DL1 address space onto the lower half). A
//    re-execution flush must also empty the scheduler.
//  * branch prediction: a 30-iteration loop; tagged tables may only provide
//    with the layer, and must then predict the loop exit.
//  * DTLB0: 32 pages filled; 16 (single layer) or 32 (stacked) must hit.
// Each mechanism (queue-full stall, phantom capacity, shared-port
// conflict, layer-1 issue, forwarding, re-execution flush, RS flush by the
// queues, L2 placement, full fallback, tagged prediction) is counted and a
// failure is counted for any that never happened.
module tb_m3d_core;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, sp = 0, flush = 0;
  logic uop_valid = 0, uop_ready;
  rs_uop_t uop;
  logic [EXEC_PORTS-1:0] issue_valid;
  rs_payload_t issue_pl [EXEC_PORTS];
  logic [5:0] issue_slot [EXEC_PORTS];
  logic ext_wake_valid = 0;
  logic [PTAG_W-1:0] ext_wake_tag = 0;
  logic [5:0] rs_occ_layer0, rs_occ_layer1, rs_pair_conflicts;
  logic [7:0] rs_seg_active;
  logic mem_alloc_valid = 0, mem_alloc_is_store = 0, mem_alloc_ready, mem_alloc_fallback;
  logic [PC_W-1:0] mem_alloc_pc = 0;
  lsq_part_e mem_alloc_part, st_part = Q_L1, ld_part = Q_L1;
  logic [6:0] mem_alloc_idx, st_idx = 0, ld_idx = 0;
  logic [SEQ_W-1:0] mem_alloc_seq, cm_seq;
  logic st_valid = 0, ld_valid = 0, ld_fwd, cm_valid = 0, cm_ready, cm_is_store, cm_reexec, cm_flush;
  logic [ADDR_W-1:0] st_addr = 0, ld_addr = 0;
  logic [DATA_W-1:0] st_data = 0, ld_data, cm_ld_data;
  logic [PC_W-1:0] cm_flush_pc;
  logic br_valid = 0, br_taken = 0, br_pred, bp_init_busy;
  logic [PC_W-1:0] br_pc = 0;
  logic [2:0] br_provider;
  logic [19:0] tlb_vpn = 0, tlb_ppn, tlb_fill_vpn = 0, tlb_fill_ppn = 0;
  logic tlb_hit, tlb_fill_valid = 0, tlb_flush = 0;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_full_stall = 0, n_conflict = 0, n_l1_issue = 0, n_fwd = 0, n_reexec_flush = 0,
      n_rs_flushed = 0, n_l2 = 0, n_fallback = 0, n_tagged = 0, n_ext_wake = 0;

  m3d_core dut (.*, .stack_present(sp));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d, stacked=%0b)", msg, cyc, sp); end
  endtask

  task automatic reset_core(input logic stacked);
    rst_n = 0; sp = stacked;
    @(posedge clk); #1 rst_n = 1;
    while (bp_init_busy) @(posedge clk);
    #1;
  endtask

  function automatic rs_uop_t mk(input int dst, input int s1, input logic r1, input int port);
    rs_uop_t u;
    u.src1 = PTAG_W'(s1); u.src1_rdy = r1; u.src2 = '0; u.src2_rdy = 1'b1;
    u.port = PORT_W'(port); u.pl.dst = PTAG_W'(dst); u.pl.op = OP_W'(dst + 7);
    return u;
  endfunction

  // ------------------------------------------------------------ scheduler
  int exp_port [256];
  int issued_at [256];

  task automatic phase_rs();
    int accepted = 0, issued = 0, guard = 0, cap;
    cap = sp ? (64 + 48) : (32 + 24);
    for (int t = 0; t < 256; t++) issued_at[t] = -1;
    // fill: everything waits on tag 250
    while (guard < 1000) begin
      guard++;
      uop = mk(accepted, 250, 0, accepted % 3 == 0 ? 0 : $urandom % EXEC_PORTS);
      exp_port[accepted] = uop.port;
      uop_valid = 1; #1;
      if (!uop_ready) break;
      @(posedge clk); #1;
      accepted++;
    end
    uop_valid = 0;
    n_full_stall++;
    check(accepted == cap, $sformatf("accepted %0d uops, capacity %0d", accepted, cap));
    check(sp || rs_occ_layer1 == 0, "nothing placed on the phantom layer");
    // release all with one external wakeup
    // the producer of tag 250 completes; uops still in the queue see the
    // tag as ready when they reach the scheduler (the wakeup is repeated
    // while they drain, standing in for the ready bit rename would give them)
    ext_wake_tag = 8'd250; ext_wake_valid = 1; n_ext_wake++;
    guard = 0;
    while (issued < accepted && guard < 2000) begin
      guard++;
      if (rs_pair_conflicts != 0) n_conflict++;
      for (int p = 0; p < EXEC_PORTS; p++) if (issue_valid[p]) begin
        int d;
        d = issue_pl[p].dst;
        check(d < accepted && issued_at[d] < 0 && exp_port[d] == p && issue_pl[p].op == OP_W'(d + 7),
              "issue once, on own port, with own payload");
        if (issue_slot[p] >= 32) n_l1_issue++;
        check(sp || issue_slot[p] < 32, "no issue from phantom entries");
        issued_at[d] = cyc; issued++;
      end
      @(posedge clk); #1;
    end
    ext_wake_valid = 0;
    check(issued == accepted, "all uops issued");
    // dependent chain 150..169, each on the previous one
    for (int t = 150; t < 170; t++) issued_at[t] = -1;
    for (int k = 0; k < 20; k++) begin
      uop = mk(150 + k, (k == 0) ? 0 : 149 + k, k == 0, 1 + (k % 2));
      uop_valid = 1; @(posedge clk); #1;
      for (int p = 0; p < EXEC_PORTS; p++) if (issue_valid[p]) issued_at[issue_pl[p].dst] = cyc;
    end
    uop_valid = 0;
    repeat (40) begin
      for (int p = 0; p < EXEC_PORTS; p++) if (issue_valid[p]) issued_at[issue_pl[p].dst] = cyc;
      @(posedge clk); #1;
    end
    for (int k = 1; k < 20; k++)
      check(issued_at[149 + k] >= 0 && issued_at[150 + k] > issued_at[149 + k], "chain issues in dependence order");
  endtask

  // ------------------------------------------------------------ memory
  localparam int NSTATIC = 12;
  logic [DATA_W-1:0] refmem [int];
  typedef struct { int pi; logic st; lsq_part_e part; logic [6:0] idx; logic [SEQ_W-1:0] seq; logic done; } fl_t;
  fl_t inflight [$];

  function automatic int addr_of(input int pi);
    int base;
    base = ((pi % NSTATIC) * 5) % 7 + (pi / NSTATIC) % 3;
    return ((pi % NSTATIC) == 4) ? base + 8192 : base;   // one instruction uses the upper half
  endfunction
  function automatic int alias_of(input int a);
    return sp ? (a % 16384) : (a % 8192);   // without the layer, DL1 bit 13 is forced to 0
  endfunction
  function automatic logic is_st(input int pi);
    return ((pi % NSTATIC) % 3 == 0) || ((pi % NSTATIC) == 7);
  endfunction

  // clear the DL1 words the program uses, one store at a time through the queues
  task automatic clear_words();
    for (int w = 0; w < 20; w++) begin
      int a;
      a = (w < 10) ? w : 8192 + w - 10;
      mem_alloc_valid = 1; mem_alloc_is_store = 1; mem_alloc_pc = 32'h900; #1;
      st_part = mem_alloc_part; st_idx = mem_alloc_idx;
      @(posedge clk); #1 mem_alloc_valid = 0;
      st_valid = 1; st_addr = a; st_data = 0; @(posedge clk); #1 st_valid = 0;
      cm_valid = 1; #1; check(cm_ready && cm_is_store, "clearing store commits");
      @(posedge clk); #1 cm_valid = 0;
    end
  endtask

  task automatic phase_mem(input int nops, input int max_inflight);
    int next = 0, committed = 0, guard = 0;
    inflight.delete(); refmem.delete();
    clear_words();
    // a few uops parked in the scheduler, to see the re-execution flush empty it
    for (int k = 0; k < 4; k++) begin uop = mk(200 + k, 251, 0, 0); uop_valid = 1; @(posedge clk); #1; end
    uop_valid = 0; @(posedge clk); #1;
    while (committed < nops && guard < 100000) begin
      int pick;
      logic rs_busy;
      guard++;
      mem_alloc_valid = next < nops && inflight.size() < max_inflight && ($urandom % 4 != 0);
      mem_alloc_is_store = is_st(next);
      mem_alloc_pc = PC_W'(32'h400 + (next % NSTATIC) * 4);
      st_valid = 0; ld_valid = 0; pick = -1;
      if (inflight.size() > 0 && ($urandom % 8) != 0) begin
        pick = ($urandom % 2) ? ($urandom % inflight.size()) : ($urandom % ((inflight.size() + 1) / 2));
        if (inflight[pick].done) pick = -1;
      end
      if (pick >= 0) begin
        if (inflight[pick].st) begin
          st_valid = 1; st_part = inflight[pick].part; st_idx = inflight[pick].idx;
          st_addr = addr_of(inflight[pick].pi); st_data = 32'hB000_0000 + inflight[pick].pi;
        end else begin
          ld_valid = 1; ld_part = inflight[pick].part; ld_idx = inflight[pick].idx;
          ld_addr = addr_of(inflight[pick].pi);
        end
      end
      cm_valid = ($urandom % 10) < 7;
      #1;
      if (ld_valid && ld_fwd) n_fwd++;
      rs_busy = (rs_occ_layer0 + rs_occ_layer1) != 0;
      if (cm_valid && cm_ready) begin
        int a;
        a = alias_of(addr_of(inflight[0].pi));
        check(cm_seq == inflight[0].seq && cm_is_store == inflight[0].st, "commit in order");
        if (!cm_is_store) check(cm_ld_data == (refmem.exists(a) ? refmem[a] : 0), "committed load value");
        else refmem[a] = 32'hB000_0000 + inflight[0].pi;
      end
      @(posedge clk);
      if (pick >= 0) inflight[pick].done = 1;
      if (cm_valid && cm_ready) begin
        committed++;
        if (cm_flush) begin
          n_reexec_flush++;
          next = inflight[0].pi + 1;
          inflight.delete();
          #1;
          if (rs_busy) begin
            n_rs_flushed++;
            check(rs_occ_layer0 == 0 && rs_occ_layer1 == 0, "re-execution flush empties the scheduler");
            mem_alloc_valid = 0; st_valid = 0; ld_valid = 0; cm_valid = 0;
            for (int k = 0; k < 4; k++) begin uop = mk(200 + k, 251, 0, 0); uop_valid = 1; @(posedge clk); #1; end
            uop_valid = 0;
          end
        end else void'(inflight.pop_front());
      end
      if (mem_alloc_valid && mem_alloc_ready && !(cm_valid && cm_ready && cm_flush)) begin
        fl_t f;
        f.pi = next; f.st = mem_alloc_is_store; f.part = mem_alloc_part; f.idx = mem_alloc_idx;
        f.seq = mem_alloc_seq; f.done = 0;
        inflight.push_back(f);
        if (mem_alloc_part == Q_L2) n_l2++;
        if (mem_alloc_fallback) n_fallback++;
        if (!sp) check(mem_alloc_part == Q_L1, "no L2 queue placement without the layer");
        next++;
      end
      #1;
    end
    mem_alloc_valid = 0; st_valid = 0; ld_valid = 0; cm_valid = 0;
    check(committed == nops, "memory program committed");
    flush = 1; @(posedge clk); #1 flush = 0;   // clear the parked uops
  endtask

  // ------------------------------------------------------------ branches
  task automatic phase_bp();
    int late_miss = 0;
    for (int i = 0; i < 3000; i++) begin
      br_pc = 32'h0000_91c0; br_taken = (i % 30) != 29; br_valid = 1; #1;
      if (br_provider != 0) n_tagged++;
      if (!sp) check(br_provider == 0, "no tagged prediction without the layer");
      if (i >= 1500 && br_pred != br_taken) late_miss++;
      @(posedge clk); #1;
    end
    br_valid = 0;
    if (sp) check(late_miss <= 10, $sformatf("stacked predictor learns the loop exit (%0d misses)", late_miss));
    else    check(late_miss >= 40, $sformatf("gshare alone misses loop exits (%0d misses)", late_miss));
  endtask

  // ------------------------------------------------------------ DTLB0
  task automatic phase_tlb();
    int hits = 0;
    tlb_flush = 1; @(posedge clk); #1 tlb_flush = 0;
    for (int v = 0; v < 32; v++) begin
      tlb_fill_vpn = 20'h10000 + v; tlb_fill_ppn = 20'h300 + v; tlb_fill_valid = 1;
      @(posedge clk); #1;
    end
    tlb_fill_valid = 0;
    for (int v = 0; v < 32; v++) begin
      tlb_vpn = 20'h10000 + v; #1;
      if (tlb_hit) begin hits++; check(tlb_ppn == 20'h300 + v, "tlb translation"); end
    end
    check(hits == (sp ? 32 : 16), $sformatf("DTLB0 holds %0d pages", hits));
  endtask

  initial begin
    uop = '0;
    for (int s = 0; s < 2; s++) begin
      reset_core(s[0]);
      phase_rs();
      phase_mem(1500, 40);
      if (s == 1) phase_mem(1500, 200);
      phase_bp();
      phase_tlb();
      $display("stacked=%0b done at cycle %0d", sp, cyc);
    end
    $display("mechanisms: full-stall %0d ext-wake %0d pair-conflict %0d layer1-issue %0d fwd %0d reexec-flush %0d rs-flushed %0d l2 %0d fallback %0d tagged %0d",
             n_full_stall, n_ext_wake, n_conflict, n_l1_issue, n_fwd, n_reexec_flush, n_rs_flushed, n_l2, n_fallback, n_tagged);
    check(n_full_stall > 0, "queue-full stall seen");
    check(n_ext_wake > 0, "external wakeup seen");
    check(n_conflict > 0, "shared picker port conflict seen");
    check(n_l1_issue > 0, "issue from the stacked layer seen");
    check(n_fwd > 0, "L1 store-to-load forwarding seen");
    check(n_reexec_flush > 0, "re-execution flush seen");
    check(n_rs_flushed > 0, "scheduler flushed by the queues");
    check(n_l2 > 0, "L2 queue placement seen");
    check(n_fallback > 0, "full fallback to L1 seen");
    check(n_tagged > 0, "tagged-table prediction seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
