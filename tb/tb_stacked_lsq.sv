// tb_stacked_lsq: self-checking test of the partitioned load/store queues.
//
// A looping program of loads and stores over a few addresses (so that
// stores and loads often meet) is allocated in order, executed in random
// order and committed in order. The testbench keeps the architectural
// memory itself: every committed load must return the value the last
// committed store to its address wrote, whatever path the load took
// (memory read, L1 forward, re-execution). After a flush the program is
// restarted behind the flushing load, as a front end would. The run is
// repeated without and with the stacked layer; without it no uop may be
// placed in an L2 queue. Forwarding, re-execution, flushes, L2 placement
// and full fallback must each be seen.
module tb_stacked_lsq;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, sp = 0, flush = 0;
  logic alloc_valid = 0, alloc_is_store = 0, alloc_ready, alloc_fallback;
  logic [PC_W-1:0] alloc_pc = 0;
  lsq_part_e alloc_part, st_part = Q_L1, ld_part = Q_L1;
  logic [6:0] alloc_idx, st_idx = 0, ld_idx = 0;
  logic [SEQ_W-1:0] alloc_seq, cm_seq;
  logic st_valid = 0, ld_valid = 0, ld_fwd, cm_valid = 0, cm_ready, cm_is_store, cm_reexec, cm_flush;
  logic [ADDR_W-1:0] st_addr = 0, ld_addr = 0, mem_raddr, mem_raddr2, mem_waddr;
  logic [DATA_W-1:0] st_data = 0, ld_data, cm_ld_data, mem_rdata, mem_rdata2, mem_wdata;
  logic [PC_W-1:0] cm_flush_pc;
  logic mem_we;
  int checks = 0, failures = 0;
  int n_fwd = 0, n_reexec = 0, n_flush = 0, n_l2 = 0, n_fallback = 0, n_stall = 0;

  stacked_lsq dut (.*, .stack_present(sp));
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // data memory (behavioural, outside the queues)
  logic [DATA_W-1:0] dmem [64];
  assign mem_rdata  = dmem[mem_raddr[5:0]];
  assign mem_rdata2 = dmem[mem_raddr2[5:0]];
  always @(posedge clk) if (mem_we) dmem[mem_waddr[5:0]] <= mem_wdata;

  // program: a loop of 12 static memory instructions
  localparam int NSTATIC = 12;
  typedef struct { logic st; int addr; } sop_t;
  sop_t prog [NSTATIC];
  logic [DATA_W-1:0] refmem [64];

  typedef struct { int pi; logic st; lsq_part_e part; logic [6:0] idx; logic [SEQ_W-1:0] seq; logic done; } fl_t;
  fl_t inflight [$];

  function automatic int addr_of(input int pi);
    return (prog[pi % NSTATIC].addr + (pi / NSTATIC) % 3) % 64;
  endfunction

  task automatic run(input logic stacked, input int nops, input int max_inflight);
    int next = 0, committed = 0, guard = 0;
    rst_n = 0; sp = stacked; inflight.delete();
    for (int a = 0; a < 64; a++) begin dmem[a] = 0; refmem[a] = 0; end
    @(posedge clk); #1 rst_n = 1;
    while (committed < nops && guard < 200000) begin
      int pick;
      guard++;
      // allocate
      alloc_valid = next < nops && inflight.size() < max_inflight && ($urandom % 4 != 0);
      alloc_is_store = prog[next % NSTATIC].st;
      alloc_pc = PC_W'(32'h400 + (next % NSTATIC) * 4);
      // execute one random in-flight uop, older ones more likely
      st_valid = 0; ld_valid = 0; pick = -1;
      if (inflight.size() > 0 && ($urandom % 8) != 0) begin
        pick = ($urandom % 2) ? ($urandom % inflight.size()) : ($urandom % ((inflight.size() + 1) / 2));
        if (inflight[pick].done) pick = -1;
      end
      if (pick >= 0) begin
        if (inflight[pick].st) begin
          st_valid = 1; st_part = inflight[pick].part; st_idx = inflight[pick].idx;
          st_addr = addr_of(inflight[pick].pi); st_data = 32'hA000_0000 + inflight[pick].pi;
        end else begin
          ld_valid = 1; ld_part = inflight[pick].part; ld_idx = inflight[pick].idx;
          ld_addr = addr_of(inflight[pick].pi);
        end
      end
      cm_valid = ($urandom % 10) < 7;
      #1;
      if (ld_valid && ld_fwd) n_fwd++;
      if (alloc_valid && !alloc_ready) n_stall++;
      // commit check
      if (cm_valid && cm_ready) begin
        checks++;
        if (inflight.size() == 0 || cm_seq !== inflight[0].seq || cm_is_store !== inflight[0].st) begin
          failures++; $display("FAIL commit order seq %0d", cm_seq);
        end else if (!cm_is_store) begin
          int a;
          a = addr_of(inflight[0].pi);
          checks++;
          if (cm_ld_data !== refmem[a]) begin
            failures++; $display("FAIL load %0d addr %0d got %h exp %h", inflight[0].pi, a, cm_ld_data, refmem[a]);
          end
        end else begin
          refmem[addr_of(inflight[0].pi)] = 32'hA000_0000 + inflight[0].pi;
        end
        if (cm_reexec) n_reexec++;
      end
      @(posedge clk);
      // update the testbench's view
      if (pick >= 0) inflight[pick].done = 1;
      if (cm_valid && cm_ready) begin
        committed++;
        if (cm_flush) begin
          n_flush++;
          next = inflight[0].pi + 1;
          inflight.delete();
        end else void'(inflight.pop_front());
      end
      if (alloc_valid && alloc_ready && !(cm_valid && cm_ready && cm_flush)) begin
        fl_t f;
        f.pi = next; f.st = alloc_is_store; f.part = alloc_part; f.idx = alloc_idx;
        f.seq = alloc_seq; f.done = 0;
        inflight.push_back(f);
        if (alloc_part == Q_L2) n_l2++;
        if (alloc_fallback) n_fallback++;
        if (!stacked) begin
          checks++;
          if (alloc_part != Q_L1) begin failures++; $display("FAIL L2 placement without the stacked layer"); end
        end
        next++;
      end
      #1;
    end
    alloc_valid = 0; st_valid = 0; ld_valid = 0; cm_valid = 0;
    checks++;
    if (committed != nops) begin failures++; $display("FAIL only %0d of %0d committed", committed, nops); end
    $display("stacked=%0b: %0d ops, %0d cycles, fwd %0d reexec %0d flush %0d l2 %0d fallback %0d stall %0d",
             stacked, nops, guard, n_fwd, n_reexec, n_flush, n_l2, n_fallback, n_stall);
  endtask

  initial begin
    for (int i = 0; i < NSTATIC; i++) begin
      prog[i].st   = (i % 3 == 0) || (i == 7);
      prog[i].addr = (i * 5) % 7;
    end
    run(1'b0, 3000, 40);
    run(1'b1, 3000, 40);
    // many uops in flight: L2 queues fill and uops fall back to L1
    run(1'b1, 3000, 200);
    checks++; if (n_fwd == 0)      begin failures++; $display("FAIL no forwarding seen"); end
    checks++; if (n_reexec == 0)   begin failures++; $display("FAIL no re-execution seen"); end
    checks++; if (n_flush == 0)    begin failures++; $display("FAIL no flush seen"); end
    checks++; if (n_l2 == 0)       begin failures++; $display("FAIL no L2 placement seen"); end
    checks++; if (n_fallback == 0) begin failures++; $display("FAIL no full fallback seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
