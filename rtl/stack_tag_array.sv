// stack_tag_array: set-associative tagged lookup structure (TLB, BTB) whose
// sets are split over two layers.
//
// With the upper layer present the array has SETS sets, indexed by the low
// k = log2(SETS) bits of the key. With it absent, the set-index bit k-1 is
// forced to zero at the decoder root (as in stack_sram) and only SETS/2 sets
// exist. So that the tag width does not change with the stack, the tag always
// keeps key bit k-1 as well: it is redundant when stacked and needed when
// not. Tag width is therefore KEY_W-k+1.
//
// Interface: a combinational lookup port (lk_key -> lk_hit, lk_data); a fill
// port (fill_valid, fill_key, fill_data) written at the clock edge, which
// updates a matching way or else replaces an invalid way, or else the way a
// per-set round-robin pointer names; flush clears all valid bits. Default
// sizes are the stacked DTLB0 (32 entries, 4-way, 20-bit virtual page
// number). The replacement policy is this design's choice.
module stack_tag_array #(
  parameter int unsigned SETS   = 8,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned KEY_W  = 20,
  parameter int unsigned DATA_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stack_present,
  input  logic [KEY_W-1:0]  lk_key,
  output logic              lk_hit,
  output logic [DATA_W-1:0] lk_data,
  input  logic              fill_valid,
  input  logic [KEY_W-1:0]  fill_key,
  input  logic [DATA_W-1:0] fill_data,
  input  logic              flush
);
  localparam int unsigned K     = $clog2(SETS);
  localparam int unsigned TAG_W = KEY_W - K + 1;
  localparam int unsigned WW    = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic              valid [SETS][WAYS];
  logic [TAG_W-1:0]  tags  [SETS][WAYS];
  logic [DATA_W-1:0] datas [SETS][WAYS];
  logic [WW-1:0]     rr    [SETS];

  function automatic logic [K-1:0] set_of(input logic [KEY_W-1:0] key, input logic sp);
    logic [K-1:0] s;
    s = key[K-1:0];
    s[K-1] = key[K-1] & sp;
    return s;
  endfunction

  function automatic logic [TAG_W-1:0] tag_of(input logic [KEY_W-1:0] key);
    return key[KEY_W-1:K-1];
  endfunction

  // lookup
  logic [K-1:0] lk_set;
  assign lk_set = set_of(lk_key, stack_present);
  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[lk_set][w] && tags[lk_set][w] == tag_of(lk_key)) begin
        lk_hit  = 1'b1;
        lk_data = datas[lk_set][w];
      end
    end
  end

  // fill way choice
  logic [K-1:0]  f_set;
  logic [WW-1:0] f_way;
  logic          f_match, f_free;
  assign f_set = set_of(fill_key, stack_present);
  always_comb begin
    f_match = 1'b0;
    f_free  = 1'b0;
    f_way   = rr[f_set];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[f_set][w] && !f_match) begin
        f_free = 1'b1;
        f_way  = WW'(w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (valid[f_set][w] && tags[f_set][w] == tag_of(fill_key)) begin
        f_match = 1'b1;
        f_way   = WW'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (flush) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
    end else if (fill_valid) begin
      valid[f_set][f_way] <= 1'b1;
      tags[f_set][f_way]  <= tag_of(fill_key);
      datas[f_set][f_way] <= fill_data;
      if (!f_match && !f_free)
        rr[f_set] <= (rr[f_set] == WW'(WAYS - 1)) ? '0 : rr[f_set] + 1'b1;
    end
  end

endmodule
