// tb_tage_bp: self-checking test of the gshare/TAGE predictor.
// Checks, with expectations derived from the algorithms rather than from
// the RTL: without the stacked layer no tagged table ever provides; an
// always-taken branch is learned in both modes; an alternating branch is
// learned by gshare (history in the index) and by the stacked TAGE; a loop
// with 30 iterations (exit pattern longer than the gshare history can
// disambiguate for table 0 alone when bimodal) is predicted much better with
// the stacked tables than by the bimodal table 0 alone; and the stacked
// configuration uses its tagged tables.
module tb_tage_bp;
  import m3d_pkg::*;
  logic clk = 0, rst_n = 0, sp = 0, br_valid = 0, br_taken = 0, pred_taken, init_busy;
  logic [PC_W-1:0] br_pc = 0;
  logic [2:0] provider;
  int checks = 0, failures = 0;
  int tagged_uses;

  tage_bp dut (.*, .stack_present(sp));
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic reset_bp(input logic stacked);
    rst_n = 0; sp = stacked; br_valid = 0;
    @(posedge clk); #1 rst_n = 1;
    while (init_busy) @(posedge clk);
    #1;
  endtask

  // one branch; returns 1 on a misprediction
  task automatic br(input logic [PC_W-1:0] pc, input logic t, output int miss);
    br_pc = pc; br_taken = t; br_valid = 1; #1;
    miss = (pred_taken != t);
    if (provider != 0) tagged_uses++;
    if (!sp) begin
      checks++;
      if (provider != 0) begin failures++; $display("FAIL tagged provider without the stacked layer"); end
    end
    @(posedge clk); #1 br_valid = 0;
  endtask

  // run a trace: 'kind' 0 = always taken, 1 = alternating, 2 = loop of 30
  task automatic trace(input int kind, input int n, output int misses_last_half);
    int m;
    misses_last_half = 0;
    for (int i = 0; i < n; i++) begin
      logic t;
      case (kind)
        0: t = 1;
        1: t = i[0];
        default: t = (i % 30) != 29;
      endcase
      br(32'h0000_8a40, t, m);
      if (i >= n / 2) misses_last_half += m;
    end
  endtask

  initial begin
    int m;
    // ---- single layer (gshare)
    reset_bp(1'b0);
    trace(0, 200, m); checks++; if (m != 0) begin failures++; $display("FAIL 2D always-taken misses %0d", m); end
    reset_bp(1'b0);
    trace(1, 400, m); checks++; if (m != 0) begin failures++; $display("FAIL 2D alternating misses %0d", m); end
    // ---- stacked (TAGE with bimodal table 0)
    reset_bp(1'b1); tagged_uses = 0;
    trace(0, 200, m); checks++; if (m != 0) begin failures++; $display("FAIL 3D always-taken misses %0d", m); end
    reset_bp(1'b1); tagged_uses = 0;
    trace(1, 400, m); checks++; if (m > 2) begin failures++; $display("FAIL 3D alternating misses %0d", m); end
    checks++; if (tagged_uses == 0) begin failures++; $display("FAIL tagged tables never provided"); end
    // loop: bimodal alone mispredicts every exit (100 exits in 3000
    // branches, 50 in the last half); TAGE learns the exit with 47 bits of history
    reset_bp(1'b1); tagged_uses = 0;
    trace(2, 3000, m);
    $display("loop of 30, stacked: %0d misses in the last 1500 branches", m);
    checks++; if (m > 10) begin failures++; $display("FAIL 3D loop misses %0d", m); end
    // the layer disappears with trained tagged tables: they must all miss
    sp = 0;
    trace(2, 300, m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
