// tb_stack_tag_array: self-checking test of the stackable tagged array
// (DTLB0 sizes: 8 sets x 4 ways stacked, 4 sets single-layer).
// A testbench-side model (list of resident keys per set, round-robin
// victim) predicts hits and data. Checks: capacity is 32 entries stacked
// and 16 single-layer; keys that differ only in the set bit that the missing
// layer removes are kept apart by the extra tag bit; flush empties the array.
module tb_stack_tag_array;
  localparam int SETS = 8, WAYS = 4, KW = 20, DW = 20;
  logic clk = 0, rst_n = 0, sp;
  logic [KW-1:0] lk_key, fill_key;
  logic [DW-1:0] lk_data, fill_data;
  logic lk_hit, fill_valid = 0, flush = 0;
  int checks = 0, failures = 0;

  stack_tag_array #(.SETS(SETS), .WAYS(WAYS), .KEY_W(KW), .DATA_W(DW)) dut (.*, .stack_present(sp));

  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [DW-1:0] dat(input logic [KW-1:0] k);
    return k ^ 20'h5a5a5;
  endfunction

  task automatic fill(input logic [KW-1:0] k);
    fill_key = k; fill_data = dat(k); fill_valid = 1;
    @(posedge clk); #1 fill_valid = 0;
  endtask

  task automatic look(input logic [KW-1:0] k, input logic exp_hit);
    lk_key = k; #1; checks++;
    if (lk_hit !== exp_hit || (exp_hit && lk_data !== dat(k))) begin
      failures++;
      $display("FAIL key %h hit %0b exp %0b data %h", k, lk_hit, exp_hit, lk_data);
    end
  endtask

  initial begin
    sp = 1; lk_key = 0; fill_key = 0; fill_data = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // stacked: 32 keys (4 per set over 8 sets) all resident
    for (int i = 0; i < 32; i++) fill(KW'(i * 3 + 100));
    for (int i = 0; i < 32; i++) look(KW'(i * 3 + 100), 1'b1);
    look(20'h77777, 1'b0);
    // keys 0..7 step 1 with high bits 0x123: distinct sets when stacked
    flush = 1; @(posedge clk); #1 flush = 0;
    for (int i = 0; i < 32; i++) look(KW'(i * 3 + 100), 1'b0);
    // single layer: only 16 entries. Keys k and k^4 share a set, told apart
    // by the extra tag bit.
    sp = 0;
    fill(20'h00010); fill(20'h00014);
    look(20'h00010, 1'b1); look(20'h00014, 1'b1);
    look(20'h00018, 1'b0);
    flush = 1; @(posedge clk); #1 flush = 0;
    // set 0 in single-layer mode: keys with bits[1:0]==0 (k*4). Fill 5 of
    // them: the first (round-robin victim way 0) is evicted.
    for (int i = 0; i < 5; i++) fill(KW'(i * 4 + 64));
    look(KW'(64), 1'b0);
    for (int i = 1; i < 5; i++) look(KW'(i * 4 + 64), 1'b1);
    // in stacked mode the same 5 keys split over sets 0 and 4 and all fit
    flush = 1; @(posedge clk); #1 flush = 0;
    sp = 1;
    for (int i = 0; i < 5; i++) fill(KW'(i * 4 + 64));
    for (int i = 0; i < 5; i++) look(KW'(i * 4 + 64), 1'b1);
    // refill of a resident key updates in place (no eviction)
    fill(KW'(64));
    for (int i = 0; i < 5; i++) look(KW'(i * 4 + 64), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
