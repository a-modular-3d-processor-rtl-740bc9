// tb_stack_sram: self-checking test of the two-layer SRAM array.
// Writes random data in stacked mode and checks every set is distinct (256
// sets), then in single-layer mode checks that the upper half of the address
// space aliases onto layer 0 (only 128 sets exist) and that rd_layer never
// reports layer 1. A reference array kept by the testbench gives the
// expected values.
module tb_stack_sram;
  localparam int SETS = 256, W = 32;
  logic clk = 0, sp, we;
  logic [7:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic rd_layer;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_mem [SETS];

  stack_sram #(.SETS(SETS), .WIDTH(W)) dut (.clk, .stack_present(sp), .we, .waddr,
    .wdata, .raddr, .rdata, .rd_layer);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input logic [W-1:0] d);
    waddr = a[7:0]; wdata = d; we = 1;
    @(posedge clk); #1 we = 0;
  endtask

  task automatic chk(input int a, input logic [W-1:0] exp, input logic exp_layer);
    raddr = a[7:0]; #1;
    checks++;
    if (rdata !== exp || rd_layer !== exp_layer) begin
      failures++;
      $display("FAIL addr %0d got %h/%0b exp %h/%0b", a, rdata, rd_layer, exp, exp_layer);
    end
  endtask

  initial begin
    we = 0; sp = 1; waddr = 0; raddr = 0; wdata = 0;
    @(posedge clk); #1;
    // stacked: 256 distinct sets
    for (int a = 0; a < SETS; a++) begin
      ref_mem[a] = $urandom;
      wr(a, ref_mem[a]);
    end
    for (int a = 0; a < SETS; a++) chk(a, ref_mem[a], a >= SETS/2);
    // single layer: the top address bit is ignored
    sp = 0;
    for (int a = 0; a < SETS; a++) begin
      logic [W-1:0] d;
      d = $urandom;
      ref_mem[a % (SETS/2)] = d;
      wr(a, d);
    end
    for (int a = 0; a < SETS; a++) chk(a, ref_mem[a % (SETS/2)], 1'b0);
    // back to stacked: layer 1 still holds the values written before
    sp = 1;
    for (int a = SETS/2; a < SETS; a++) begin
      raddr = a[7:0]; #1; checks++;
      if (rd_layer !== 1'b1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
