// stacked_rs: reservation station (instruction scheduler) split over two
// silicon layers, usable with or without the upper layer.
//
// Organization. The RS has PAIRS entry pairs: entry (0,i) on layer 0 and
// entry (1,i) directly above it on layer 1. Each layer's entries are cut
// into segments of SEG entries on a segmented tag-broadcast bus; a segment
// repeater only drives its segment when the segment holds a valid entry,
// and the layer-1 repeaters are off when the layer is absent (seg_active
// shows the repeater enables). A pair shares one BID/GRANT port of the
// global picker and one payload-RAM read port: the pair's BID is the OR of
// its two entries' bids (the wired-NOR pull-down), and when the grant for
// an execution port returns, a local one-of-two pick hands it to the entry
// that bid for that port, the older of the two when both did.
//
// Allocation. Up to AW uops per cycle are written into free entries,
// layer 0 first (pair order), then layer 1, so a uop only lands above
// another when the bottom layer is full. A request is accepted as a whole:
// alloc_ready is low when fewer entries are free than uops are offered.
//
// Phantom upper layer. With stack_present low: the layer-1 BID pull-downs
// are disabled (phantom entries never look ready to the picker), the local
// pick always sees the phantom entry as empty, and the allocator's usage
// vector shows every layer-1 entry as occupied, so nothing is ever placed
// there. The allocator thus sees a full upper layer while the picker sees
// an empty one, and the RS behaves as a PAIRS-entry scheduler.
//
// Timing. Wakeup: a tag broadcast in cycle t marks matching sources ready
// at the end of t (also for uops allocated in t); the entry can bid in
// t+1. Select and issue are combinational within a cycle; an issued entry
// is freed at the end of that cycle. flush empties the RS.
//
// Follows the document: the pairing, shared BID/GRANT and payload port,
// older-first local pick, bottom-first allocation, segmented stacked bus
// and the three phantom rules. This design's own choices: the picker's
// priority (see rs_picker), the segment length, the number of broadcast
// tags per cycle, the entry format, and the all-or-nothing allocation.
module stacked_rs
  import m3d_pkg::*;
#(
  parameter int unsigned PAIRS  = RS_ENTRIES / 2,  // 32 pairs = 64 entries
  parameter int unsigned NPORTS = EXEC_PORTS,
  parameter int unsigned AW     = ALLOC_WIDTH,
  parameter int unsigned NBCAST = EXEC_PORTS,
  parameter int unsigned SEG    = 8                // entries per bus segment
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       stack_present,
  input  logic                       flush,
  // allocation
  input  logic [AW-1:0]              alloc_valid,
  input  rs_uop_t                    alloc_uop   [AW],
  output logic                       alloc_ready,
  output logic [$clog2(2*PAIRS)-1:0] alloc_slot  [AW],   // {layer, pair}
  // tag broadcast (wakeup)
  input  logic [NBCAST-1:0]          bcast_valid,
  input  logic [PTAG_W-1:0]          bcast_tag   [NBCAST],
  // issue, one per execution port
  output logic [NPORTS-1:0]          issue_valid,
  output rs_payload_t                issue_pl    [NPORTS],
  output logic [$clog2(2*PAIRS)-1:0] issue_slot  [NPORTS],
  // observation
  output logic [2*(PAIRS/SEG)-1:0]   seg_active,  // repeater enables, layer 1 in upper half
  output logic [$clog2(PAIRS+1)-1:0] occ_layer0,
  output logic [$clog2(PAIRS+1)-1:0] occ_layer1,
  output logic [$clog2(PAIRS+1)-1:0] pair_conflicts // pairs with both entries bidding
);
  localparam int unsigned N    = 2 * PAIRS;
  localparam int unsigned SW   = $clog2(N);
  localparam int unsigned NSEG = PAIRS / SEG;
  localparam int unsigned OW   = $clog2(PAIRS + 1);

  typedef struct packed {
    logic              valid;
    logic [PTAG_W-1:0] src1;
    logic              src1_rdy;
    logic [PTAG_W-1:0] src2;
    logic              src2_rdy;
    logic [PORT_W-1:0] port;
  } entry_t;

  entry_t      ent      [2][PAIRS];
  rs_payload_t payload  [2][PAIRS];   // payload RAM, one read port per pair
  logic        l1_older [PAIRS];      // the layer-1 entry is the older one

  // ------------------------------------------------------------ segments
  always_comb begin
    for (int l = 0; l < 2; l++)
      for (int s = 0; s < NSEG; s++) begin
        logic any;
        any = 1'b0;
        for (int k = 0; k < SEG; k++) any |= ent[l][s*SEG+k].valid;
        seg_active[l*NSEG+s] = any && (l == 0 || stack_present);
      end
  end

  function automatic logic woken(input logic [PTAG_W-1:0] t,
                                 input logic [NBCAST-1:0] bv,
                                 input logic [PTAG_W-1:0] bt [NBCAST]);
    logic w;
    w = 1'b0;
    for (int b = 0; b < NBCAST; b++) w |= bv[b] && bt[b] == t;
    return w;
  endfunction

  // ------------------------------------------------------------ select
  logic [NPORTS-1:0] ebid [2][PAIRS];
  logic [NPORTS-1:0] pbid [PAIRS];
  logic [NPORTS-1:0] pgnt [PAIRS];
  logic              sel1 [PAIRS];    // local pick chose the layer-1 entry
  logic              gnt_any [PAIRS];

  always_comb begin
    for (int i = 0; i < PAIRS; i++) begin
      for (int l = 0; l < 2; l++) begin
        ebid[l][i] = '0;
        if (ent[l][i].valid && ent[l][i].src1_rdy && ent[l][i].src2_rdy)
          ebid[l][i][ent[l][i].port] = 1'b1;
      end
      if (!stack_present) ebid[1][i] = '0;   // phantom: pull-down disabled
      pbid[i] = ebid[0][i] | ebid[1][i];     // wired-NOR BID
    end
  end

  rs_picker #(.NREQ(PAIRS), .NPORTS(NPORTS)) u_picker (.bid(pbid), .grant(pgnt));

  always_comb begin
    for (int i = 0; i < PAIRS; i++) begin
      logic c0, c1;
      c0 = (ebid[0][i] & pgnt[i]) != '0;
      c1 = (ebid[1][i] & pgnt[i]) != '0;    // phantom: ebid[1] is zero
      sel1[i]    = c1 && (!c0 || l1_older[i]);
      gnt_any[i] = pgnt[i] != '0;
    end
  end

  always_comb begin
    issue_valid = '0;
    for (int p = 0; p < NPORTS; p++) begin
      issue_pl[p]   = '0;
      issue_slot[p] = '0;
      for (int i = 0; i < PAIRS; i++) begin
        if (pgnt[i][p]) begin
          issue_valid[p] = 1'b1;
          issue_pl[p]    = payload[sel1[i] ? 1 : 0][i];
          issue_slot[p]  = {sel1[i], (SW-1)'(i)};
        end
      end
    end
  end

  always_comb begin
    pair_conflicts = '0;
    for (int i = 0; i < PAIRS; i++)
      pair_conflicts += OW'(ebid[0][i] != '0 && ebid[1][i] != '0);
  end

  // ------------------------------------------------------------ allocate
  logic [N-1:0] used_view;   // allocator's view of the usage vector
  always_comb begin
    for (int i = 0; i < PAIRS; i++) begin
      used_view[i]         = ent[0][i].valid;
      used_view[PAIRS + i] = ent[1][i].valid || !stack_present;  // phantom: always full
    end
  end

  logic [AW-1:0] slot_ok;
  always_comb begin
    int n;
    n = 0;
    slot_ok = '0;
    for (int a = 0; a < AW; a++) alloc_slot[a] = '0;
    for (int e = 0; e < N; e++) begin
      if (!used_view[e] && n < AW) begin
        alloc_slot[n] = SW'(e);
        slot_ok[n]    = 1'b1;
        n++;
      end
    end
  end

  // requests are packed onto the free slots in order of their position
  logic [$clog2(AW+1)-1:0] nreq;
  logic [$clog2(AW)-1:0]   req_slot [AW];
  always_comb begin
    nreq = '0;
    for (int a = 0; a < AW; a++) begin
      req_slot[a] = nreq[$clog2(AW)-1:0];
      nreq += $bits(nreq)'(alloc_valid[a]);
    end
    alloc_ready = 1'b1;
    for (int a = 0; a < AW; a++)
      if (alloc_valid[a] && !slot_ok[req_slot[a]]) alloc_ready = 1'b0;
  end

  always_comb begin
    occ_layer0 = '0;
    occ_layer1 = '0;
    for (int i = 0; i < PAIRS; i++) begin
      occ_layer0 += OW'(ent[0][i].valid);
      occ_layer1 += OW'(ent[1][i].valid);
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < 2; l++)
        for (int i = 0; i < PAIRS; i++) ent[l][i] <= '0;
      for (int i = 0; i < PAIRS; i++) l1_older[i] <= 1'b0;
    end else if (flush) begin
      for (int l = 0; l < 2; l++)
        for (int i = 0; i < PAIRS; i++) ent[l][i].valid <= 1'b0;
    end else begin
      // wakeup of waiting entries
      for (int l = 0; l < 2; l++)
        for (int i = 0; i < PAIRS; i++) begin
          if (woken(ent[l][i].src1, bcast_valid, bcast_tag)) ent[l][i].src1_rdy <= 1'b1;
          if (woken(ent[l][i].src2, bcast_valid, bcast_tag)) ent[l][i].src2_rdy <= 1'b1;
        end
      // issue frees the picked entry
      for (int i = 0; i < PAIRS; i++)
        if (gnt_any[i]) ent[sel1[i] ? 1 : 0][i].valid <= 1'b0;
      // allocation
      if (alloc_ready) begin
        for (int a = 0; a < AW; a++) begin
          if (alloc_valid[a]) begin
            logic [SW-1:0] s;
            logic          l;
            logic [SW-2:0] i;
            s = alloc_slot[req_slot[a]];
            l = s[SW-1];
            i = s[SW-2:0];
            ent[l][i].valid    <= 1'b1;
            ent[l][i].src1     <= alloc_uop[a].src1;
            ent[l][i].src1_rdy <= alloc_uop[a].src1_rdy || woken(alloc_uop[a].src1, bcast_valid, bcast_tag);
            ent[l][i].src2     <= alloc_uop[a].src2;
            ent[l][i].src2_rdy <= alloc_uop[a].src2_rdy || woken(alloc_uop[a].src2, bcast_valid, bcast_tag);
            ent[l][i].port     <= alloc_uop[a].port;
            // the entry already in the pair (if still there) is the older one
            l1_older[i] <= (l == 1'b0) ? (ent[1][i].valid && !(gnt_any[i] && sel1[i]))
                                       : 1'b0;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc_ready && !flush)
      for (int a = 0; a < AW; a++)
        if (alloc_valid[a]) begin
          logic [SW-1:0] s;
          s = alloc_slot[req_slot[a]];
          payload[s[SW-1]][s[SW-2:0]] <= alloc_uop[a].pl;
        end
  end

endmodule
