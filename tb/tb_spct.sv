// tb_spct: self-checking test of the Store PC Table (2K sets, 8-bit partial
// tags over a 19-bit sequence number). Random stores are written and read
// back; a sequence number 2048 apart (same set, other tag) must miss once
// overwritten, and reset must empty the table.
module tb_spct;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, wr_valid = 0, lk_hit;
  logic [SEQ_W-1:0] wr_seq = 0, lk_seq = 0;
  logic [PC_W-1:0] wr_pc = 0, lk_pc;
  int checks = 0, failures = 0;
  logic [PC_W-1:0] ref_pc [2048];

  spct dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int s, input logic [PC_W-1:0] pc);
    wr_seq = SEQ_W'(s); wr_pc = pc; wr_valid = 1; @(posedge clk); #1 wr_valid = 0;
  endtask
  task automatic lk(input int s, input logic eh, input logic [PC_W-1:0] ep);
    lk_seq = SEQ_W'(s); #1; checks++;
    if (lk_hit !== eh || (eh && lk_pc !== ep)) begin
      failures++; $display("FAIL seq %0d hit %0b pc %h exp %0b %h", s, lk_hit, lk_pc, eh, ep);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    lk(5, 0, 0);
    for (int s = 100; s < 2148; s++) begin ref_pc[s % 2048] = $urandom; wr(s, ref_pc[s % 2048]); end
    for (int s = 100; s < 2148; s++) lk(s, 1, ref_pc[s % 2048]);
    lk(100 + 2048, 0, 0);          // same set, other tag
    wr(100 + 2048, 32'hdead_beef);
    lk(100 + 2048, 1, 32'hdead_beef);
    lk(100, 0, 0);
    rst_n = 0; #1 rst_n = 1;
    lk(101, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
