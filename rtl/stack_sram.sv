// stack_sram: an SRAM array whose sets are split evenly over two silicon
// layers, usable with or without the upper layer.
//
// Sets 0 .. SETS/2-1 sit on layer 0 and sets SETS/2 .. SETS-1 on layer 1.
// The root of the row decoder lives on layer 0: it looks at the top address
// bit a[k-1] and selects either the layer-0 decode sub-tree or the one on
// layer 1. Following the document's schematic, a[k-1] is ANDed with the
// stack-present (stacked mode) strap before it reaches the root, so with the
// upper layer absent the layer-1 rows can never be selected and every access
// falls into layer 0, which holds the remaining bits a[k-2:0]. Users of the
// array that need the smaller capacity (queues, ROB) keep their indices
// below SETS/2 in that mode.
//
// Interface: one write port (we/waddr/wdata, written at the rising clock
// edge) and one combinational read port (raddr -> rdata). rd_layer reports
// which layer served the read. The combinational read and the port count
// are this design's choice; the document does not give SRAM timing.
module stack_sram #(
  parameter int unsigned SETS  = 256,  // total sets over both layers
  parameter int unsigned WIDTH = 32
) (
  input  logic                      clk,
  input  logic                      stack_present,
  input  logic                      we,
  input  logic [$clog2(SETS)-1:0]   waddr,
  input  logic [WIDTH-1:0]          wdata,
  input  logic [$clog2(SETS)-1:0]   raddr,
  output logic [WIDTH-1:0]          rdata,
  output logic                      rd_layer
);
  localparam int unsigned K    = $clog2(SETS);
  localparam int unsigned HALF = SETS / 2;

  logic [WIDTH-1:0] layer0 [HALF];
  logic [WIDTH-1:0] layer1 [HALF];

  // Row-decoder root: top address bit gated by stacked mode.
  logic w_sel, r_sel;
  assign w_sel = waddr[K-1] & stack_present;
  assign r_sel = raddr[K-1] & stack_present;

  always_ff @(posedge clk) begin
    if (we) begin
      if (w_sel) layer1[waddr[K-2:0]] <= wdata;
      else       layer0[waddr[K-2:0]] <= wdata;
    end
  end

  assign rdata    = r_sel ? layer1[raddr[K-2:0]] : layer0[raddr[K-2:0]];
  assign rd_layer = r_sel;

endmodule
