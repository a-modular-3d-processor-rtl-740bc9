// tb_fwd_pred_table: self-checking test of the resetting-counter predictor
// (1K sets, 8-bit tags, 10-bit counters). Checks that an installed PC
// predicts L1 placement for exactly 1023 decrements after the set (counter
// maximum 1023), that a PC with another tag in the same set does not
// predict, that set re-arms the counter and that reset clears the table,
// then runs a random mix of sets, decrements and lookups on aliasing PCs
// against a reference model.
module tb_fwd_pred_table;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, lk_pred, set_valid = 0, dec_valid = 0;
  logic [PC_W-1:0] lk_pc = 0, set_pc = 0, dec_pc = 0;
  int checks = 0, failures = 0;

  fwd_pred_table dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pred(input logic [PC_W-1:0] pc, input logic e);
    lk_pc = pc; #1; checks++;
    if (lk_pred !== e) begin failures++; $display("FAIL pc %h pred %0b exp %0b", pc, lk_pred, e); end
  endtask

  task automatic do_set(input logic [PC_W-1:0] pc);
    set_pc = pc; set_valid = 1; @(posedge clk); #1 set_valid = 0;
  endtask
  task automatic do_dec(input logic [PC_W-1:0] pc);
    dec_pc = pc; dec_valid = 1; @(posedge clk); #1 dec_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    expect_pred(32'h0000_1234, 0);
    do_set(32'h0000_1234);
    expect_pred(32'h0000_1234, 1);
    expect_pred(32'h0000_1234 ^ 32'h0000_0400, 0);  // same set, other tag
    expect_pred(32'h0000_1235, 0);                  // other set
    // 1022 decrements keep it predicting, the 1023rd clears it
    for (int i = 0; i < 1022; i++) do_dec(32'h0000_1234);
    expect_pred(32'h0000_1234, 1);
    do_dec(32'h0000_1234);
    expect_pred(32'h0000_1234, 0);
    do_dec(32'h0000_1234);           // saturates at zero
    expect_pred(32'h0000_1234, 0);
    do_set(32'h0000_1234);
    expect_pred(32'h0000_1234, 1);
    // a decrement of an aliasing PC (other tag) does nothing
    for (int i = 0; i < 1100; i++) do_dec(32'h0000_1234 ^ 32'h0000_0400);
    expect_pred(32'h0000_1234, 1);
    // a new tag in the set replaces the old one
    do_set(32'h0000_1634);
    expect_pred(32'h0000_1634, 1);
    expect_pred(32'h0000_1234, 0);
    // set and dec of the same set in one cycle: set wins
    set_pc = 32'h0000_2000; set_valid = 1; dec_pc = 32'h0000_2000; dec_valid = 1;
    @(posedge clk); #1 set_valid = 0; dec_valid = 0;
    for (int i = 0; i < 1022; i++) do_dec(32'h0000_2000);
    expect_pred(32'h0000_2000, 1);
    rst_n = 0; #1 rst_n = 1;
    expect_pred(32'h0000_1634, 0);
    // random mix against a reference model: 4 sets x 3 tags, so sets are
    // shared by aliasing PCs; counters start near zero to reach saturation
    begin
      logic            mv [int];
      logic [7:0]      mt [int];
      int              mc [int];
      logic [PC_W-1:0] pool [12];
      for (int i = 0; i < 12; i++) pool[i] = {14'd0, 8'(i / 4 + 1), 10'(i % 4)};
      for (int s = 0; s < 4; s++) begin mv[s] = 0; mt[s] = 0; mc[s] = 0; end
      // bring every set to a small count first: set, then 1020 decrements
      for (int s = 0; s < 4; s++) begin
        do_set(pool[s]); mv[s] = 1; mt[s] = 1; mc[s] = 1023;
        for (int i = 0; i < 1020; i++) do_dec(pool[s]);
        mc[s] = 3;
      end
      for (int n = 0; n < 3000; n++) begin
        int a, b, sa, sb;
        logic e;
        a = $urandom_range(11); b = $urandom_range(11);
        sa = a % 4; sb = b % 4;
        set_pc = pool[a]; dec_pc = pool[b];
        set_valid = ($urandom_range(15) == 0);
        dec_valid = ($urandom_range(1) == 0);
        lk_pc = pool[$urandom_range(11)]; #1;
        e = mv[lk_pc[1:0]] && mt[lk_pc[1:0]] == lk_pc[17:10] && mc[lk_pc[1:0]] != 0;
        checks++;
        if (lk_pred !== e) begin failures++; $display("FAIL random pc %h pred %0b exp %0b", lk_pc, lk_pred, e); end
        @(posedge clk); #1;
        if (dec_valid && !(set_valid && sa == sb) && mv[sb] && mt[sb] == pool[b][17:10] && mc[sb] != 0)
          mc[sb]--;
        if (set_valid) begin mv[sa] = 1; mt[sa] = pool[a][17:10]; mc[sa] = 1023; end
        set_valid = 0; dec_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
