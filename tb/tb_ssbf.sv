// tb_ssbf: self-checking test of the store filter (256 sets x 2 ways,
// 8-bit partial tags). The testbench keeps the exact last-store sequence per
// address and checks that the filter answers exactly when nothing was
// evicted, answers the floor (an evicted, never older, number) after an
// eviction, and is never older than the truth under random traffic.
module tb_ssbf;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, wr_valid = 0, lk_hit;
  logic [ADDR_W-1:0] wr_addr = 0, lk_addr = 0;
  logic [SEQ_W-1:0] wr_seq = 0, lk_seq;
  int checks = 0, failures = 0;
  int unsigned seq = 1;
  int unsigned last [int unsigned];

  ssbf dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic st(input logic [ADDR_W-1:0] a);
    wr_addr = a; wr_seq = SEQ_W'(seq); wr_valid = 1; last[a] = seq; seq++;
    @(posedge clk); #1 wr_valid = 0;
  endtask
  task automatic exact(input logic [ADDR_W-1:0] a, input logic eh, input int es);
    lk_addr = a; #1; checks++;
    if (lk_hit !== eh || lk_seq !== SEQ_W'(es)) begin
      failures++; $display("FAIL addr %h hit %0b seq %0d exp %0b %0d", a, lk_hit, lk_seq, eh, es);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    exact(32'h1234, 0, 0);
    st(32'h0105); st(32'h0205);            // two ways of set 5
    exact(32'h0105, 1, 1); exact(32'h0205, 1, 2);
    st(32'h0105);                          // update in place
    exact(32'h0105, 1, 3); exact(32'h0205, 1, 2);
    st(32'h0305);                          // evicts 0x0205 (least recently written)
    exact(32'h0305, 1, 4); exact(32'h0105, 1, 3);
    exact(32'h0205, 0, 2);                 // floor holds the evicted number
    exact(32'h0405, 0, 2);                 // any missing address of the set too
    exact(32'h0106, 0, 0);                 // other set untouched
    // random traffic: never older than the truth
    for (int i = 0; i < 3000; i++) begin
      logic [ADDR_W-1:0] a;
      a = {$urandom} % 1024;
      if ($urandom % 2) st(a);
      else begin
        lk_addr = a; #1; checks++;
        if (last.exists(a) && lk_seq < SEQ_W'(last[a])) begin
          failures++; $display("FAIL unsafe addr %h seq %0d truth %0d", a, lk_seq, last[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
