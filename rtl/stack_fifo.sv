// stack_fifo: first-in first-out decoupling queue (byte queue, instruction
// fetch queue, micro-op queue) whose capacity doubles when the stacked layer
// is present.
//
// Entries 0 .. DEPTH/2-1 are on layer 0 and DEPTH/2 .. DEPTH-1 on layer 1.
// Read and write pointers wrap at the current capacity, DEPTH with the stack
// and DEPTH/2 without it, so with the layer absent the upper entries are
// never addressed and full is raised at half the depth. The strap is meant to
// be static; the queue should be empty when it changes.
//
// Interface: push/din (accepted when !full), pop/dout (dout shows the head
// combinationally, popped when pop && !empty), count. One push and one pop
// per cycle; the per-cycle width and the entry format are this design's
// choice. Default depth is the stacked micro-op queue (48 entries).
module stack_fifo #(
  parameter int unsigned DEPTH = 48,
  parameter int unsigned WIDTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       stack_present,
  input  logic                       push,
  input  logic [WIDTH-1:0]           din,
  output logic                       full,
  input  logic                       pop,
  output logic [WIDTH-1:0]           dout,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [CW-1:0]    cap;

  assign cap   = stack_present ? CW'(DEPTH) : CW'(DEPTH / 2);
  assign full  = (count == cap);
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p, input logic [CW-1:0] c);
    return (CW'(p) + 1'b1 == c) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr, cap);
      if (do_pop)  rd_ptr <= nxt(rd_ptr, cap);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

endmodule
