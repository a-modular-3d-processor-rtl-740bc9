// tb_stacked_rs: self-checking test of the two-layer reservation station
// (32 pairs, 6 ports, 4-wide allocation).
// Directed parts: capacity 32 without the upper layer and 64 with it,
// bottom-layer-first placement, one-cycle wakeup-to-issue, the shared pair
// port (both entries ready for the same port: the older issues first, the
// other one cycle later, whichever layer holds the older one).
// Random part: a dependent uop stream with unique destination tags; the
// testbench broadcasts each issued uop's tag one cycle after issue and
// checks every uop issues exactly once, on its own port, never before both
// sources were broadcast. Mechanism counters must all be non-zero.
module tb_stacked_rs;
  import m3d_pkg::*;
  localparam int PAIRS = 32, AW = 4, NP = 6, NB = 6;
  logic clk = 0, rst_n = 0, sp = 0, flush = 0;
  logic [AW-1:0] alloc_valid = '0;
  rs_uop_t alloc_uop [AW];
  logic alloc_ready;
  logic [5:0] alloc_slot [AW];
  logic [NB-1:0] bcast_valid = '0;
  logic [PTAG_W-1:0] bcast_tag [NB];
  logic [NP-1:0] issue_valid;
  rs_payload_t issue_pl [NP];
  logic [5:0] issue_slot [NP];
  logic [7:0] seg_active;
  logic [5:0] occ_layer0, occ_layer1, pair_conflicts;
  int checks = 0, failures = 0, cyc = 0;
  int n_conflict_cycles = 0, n_stall = 0, n_layer1_issue = 0;

  stacked_rs dut (.*, .stack_present(sp));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  function automatic rs_uop_t mk(input int dst, input int s1, input logic r1,
                                 input int s2, input logic r2, input int port);
    rs_uop_t u;
    u.src1 = PTAG_W'(s1); u.src1_rdy = r1; u.src2 = PTAG_W'(s2); u.src2_rdy = r2;
    u.port = PORT_W'(port); u.pl.dst = PTAG_W'(dst); u.pl.op = OP_W'(dst * 3);
    return u;
  endfunction

  task automatic reset_rs(input logic stacked);
    rst_n = 0; sp = stacked; alloc_valid = '0; bcast_valid = '0;
    @(posedge clk); #1 rst_n = 1;
  endtask

  // allocate one uop (lane 0), return its slot
  task automatic alloc1(input rs_uop_t u, output int slot);
    alloc_uop[0] = u; alloc_valid = 4'b0001; #1;
    slot = alloc_slot[0];
    check(alloc_ready, "alloc ready");
    @(posedge clk); #1 alloc_valid = '0;
  endtask

  task automatic bcast1(input int tag);
    bcast_tag[0] = PTAG_W'(tag); bcast_valid = 6'b000001;
    @(posedge clk); #1 bcast_valid = '0;
  endtask

  // ---------------------------------------------------------- random test
  typedef struct { rs_uop_t u; int issued; } ref_t;
  ref_t refs [256];
  int bcast_cycle [256];

  task automatic random_stream(input int nuops, input int bcast_every);
    int next = 0, issued = 0, guard = 0;
    int pend_tags [$];
    for (int t = 0; t < 256; t++) bcast_cycle[t] = -1;
    while (issued < nuops && guard < 20000) begin
      guard++;
      // offer up to 4 new uops
      alloc_valid = '0;
      for (int a = 0; a < AW; a++) begin
        if (next + a < nuops && ($urandom % 4) != 0) begin
          int d, s1, s2;
          d = next + a;
          s1 = (d > 0) ? d - 1 - ($urandom % ((d < 6) ? d : 6)) : 0;
          s2 = (d > 0) ? ($urandom % d) : 0;
          // a source already broadcast is ready at rename time
          alloc_uop[a] = mk(d, s1, d == 0 || ($urandom % 3) == 0 || bcast_cycle[s1] >= 0,
                            s2, d == 0 || ($urandom % 2) == 0 || bcast_cycle[s2] >= 0,
                            $urandom % NP);
          alloc_valid[a] = 1'b1;
        end else break;
      end
      // broadcast last cycle's issued tags
      bcast_valid = '0;
      for (int b = 0; b < NB && pend_tags.size() > 0 && (guard % bcast_every) == 0; b++) begin
        bcast_tag[b] = PTAG_W'(pend_tags.pop_front()); bcast_valid[b] = 1'b1;
      end
      #1;
      if (pair_conflicts != 0) n_conflict_cycles++;
      if (alloc_valid != '0 && !alloc_ready) n_stall++;
      // check issues
      for (int p = 0; p < NP; p++) if (issue_valid[p]) begin
        int d;
        d = issue_pl[p].dst;
        check(refs[d].issued == 0, "issued once");
        check(int'(refs[d].u.port) == p, "issued on its port");
        check(refs[d].u.src1_rdy || (bcast_cycle[refs[d].u.src1] >= 0 && bcast_cycle[refs[d].u.src1] < cyc),
              "src1 was broadcast before issue");
        check(refs[d].u.src2_rdy || (bcast_cycle[refs[d].u.src2] >= 0 && bcast_cycle[refs[d].u.src2] < cyc),
              "src2 was broadcast before issue");
        check(issue_pl[p].op == OP_W'(d * 3), "payload");
        if (issue_slot[p] >= 32) n_layer1_issue++;
        if (!sp) check(issue_slot[p] < 32, "no issue from the phantom layer");
        refs[d].issued = 1; issued++;
        pend_tags.push_back(d);
      end
      for (int b = 0; b < NB; b++) if (bcast_valid[b]) bcast_cycle[bcast_tag[b]] = cyc;
      if (alloc_ready) for (int a = 0; a < AW; a++) if (alloc_valid[a]) begin
        refs[next].u = alloc_uop[a]; refs[next].issued = 0; next++;
      end
      @(posedge clk); #1;
    end
    alloc_valid = '0; bcast_valid = '0;
    check(issued == nuops, "all uops issued");
    $display("random stream stacked=%0b: %0d uops in %0d cycles", sp, nuops, guard);
  endtask

  initial begin
    int s, sA, sB;
    for (int a = 0; a < AW; a++) alloc_uop[a] = '0;
    for (int b = 0; b < NB; b++) bcast_tag[b] = '0;

    // ---- single layer: 32 entries, never above
    reset_rs(1'b0);
    for (int k = 0; k < 8; k++) begin
      for (int a = 0; a < AW; a++) alloc_uop[a] = mk(k*4+a, 200, 0, 200, 0, 0);
      alloc_valid = '1; #1;
      check(alloc_ready, "2D alloc ready");
      for (int a = 0; a < AW; a++) check(alloc_slot[a] == 6'(k*4+a), "2D slot order");
      @(posedge clk); #1;
    end
    alloc_valid = 4'b0001; #1;
    check(!alloc_ready, "2D full at 32"); n_stall++;
    alloc_valid = '0;
    check(occ_layer0 == 32 && occ_layer1 == 0, "2D occupancy");
    check(seg_active == 8'h0f, "2D: only layer-0 repeaters on");
    // wake all 32 at once: port 0 issues one per cycle, in order
    bcast1(200);
    for (int k = 0; k < 32; k++) begin
      check(issue_valid == 6'b000001 && issue_pl[0].dst == 8'(k), "2D drain order");
      @(posedge clk); #1;
    end
    check(issue_valid == '0, "2D drained");

    // ---- stacked: 64 entries, bottom first
    reset_rs(1'b1);
    for (int k = 0; k < 16; k++) begin
      for (int a = 0; a < AW; a++) alloc_uop[a] = mk(k*4+a, 201, 0, 201, 1, 1);
      alloc_valid = '1; #1;
      check(alloc_ready, "3D alloc ready");
      for (int a = 0; a < AW; a++) check(alloc_slot[a] == 6'(k*4+a), "3D slot order, layer 0 first");
      @(posedge clk); #1;
    end
    alloc_valid = 4'b0001; #1;
    check(!alloc_ready, "3D full at 64"); n_stall++;
    alloc_valid = '0;
    check(occ_layer0 == 32 && occ_layer1 == 32 && seg_active == 8'hff, "3D occupancy");
    // wake all: pair conflict on port 1, layer 0 (older) first
    bcast1(201);
    check(pair_conflicts == 32, "all pairs conflict");
    for (int k = 0; k < 64; k++) begin
      if (pair_conflicts != 0) n_conflict_cycles++;
      check(issue_valid == 6'b000010, "one issue per cycle on port 1");
      check(issue_pl[1].dst == 8'((k % 2 == 0) ? k / 2 : 32 + k / 2), "pair drains older (layer 0) then upper entry");
      @(posedge clk); #1;
    end

    // ---- older entry on layer 1: pair 5
    reset_rs(1'b1);
    for (int k = 0; k < 8; k++) begin
      for (int a = 0; a < AW; a++) alloc_uop[a] = mk(100+k*4+a, 210, 0, 210, 0, 2);
      alloc_valid = '1; @(posedge clk); #1;
    end
    alloc_valid = '0;
    alloc1(mk(50, 211, 0, 211, 1, 3), sA);           // lands on layer 1, pair 0
    check(sA == 32, "first layer-1 slot");
    bcast1(210);                                     // drain layer 0 (port 2)
    while (issue_valid != '0) begin @(posedge clk); #1; end
    alloc1(mk(51, 211, 0, 211, 1, 3), sB);           // lands on layer 0, pair 0
    check(sB == 0, "bottom slot reused");
    bcast1(211);
    check(issue_valid == 6'b001000 && issue_pl[3].dst == 8'd50 && issue_slot[3] == 6'd32,
          "older layer-1 entry wins the shared port");
    n_conflict_cycles += (pair_conflicts != 0);
    @(posedge clk); #1;
    check(issue_valid == 6'b001000 && issue_pl[3].dst == 8'd51, "younger issues next cycle");
    @(posedge clk); #1;
    // wakeup in the allocation cycle
    alloc_uop[0] = mk(60, 212, 0, 212, 0, 4); alloc_valid = 4'b0001;
    bcast_tag[0] = 8'd212; bcast_valid = 6'b000001;
    @(posedge clk); #1 alloc_valid = '0; bcast_valid = '0;
    check(issue_valid == 6'b010000 && issue_pl[4].dst == 8'd60, "wakeup during allocation");
    @(posedge clk); #1;
    // flush
    alloc1(mk(61, 213, 0, 213, 0, 0), s);
    flush = 1; @(posedge clk); #1 flush = 0;
    check(occ_layer0 == 0 && occ_layer1 == 0, "flush empties");

    // ---- random streams
    reset_rs(1'b0); random_stream(200, 1);
    reset_rs(1'b0); random_stream(200, 4);
    reset_rs(1'b1); random_stream(250, 1);
    reset_rs(1'b1); random_stream(250, 4);
    check(n_conflict_cycles > 0, "pair conflicts seen");
    check(n_stall > 0, "allocation stalls seen");
    check(n_layer1_issue > 0, "layer-1 issues seen");
    $display("conflict cycles %0d, stalls %0d, layer-1 issues %0d", n_conflict_cycles, n_stall, n_layer1_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
