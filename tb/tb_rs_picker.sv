// tb_rs_picker: self-checking test of the global picker (32 picker ports,
// 6 execution ports) with random bid patterns. For every pattern the
// testbench checks the grant rules independently: at most one grant per
// execution port and per picker port, only to a bidder, no execution port
// left idle while an ungranted picker port bids on it, and the grant on
// port 0 goes to the lowest bidder.
module tb_rs_picker;
  localparam int N = 32, P = 6;
  logic [P-1:0] bid [N];
  logic [P-1:0] grant [N];
  int checks = 0, failures = 0;

  rs_picker #(.NREQ(N), .NPORTS(P)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int density;
      density = 1 + (t % 8);
      for (int i = 0; i < N; i++) begin
        bid[i] = '0;
        if (($urandom % 16) < density) bid[i][$urandom % P] = 1'b1;
        if (t % 5 == 0 && ($urandom % 4) == 0) bid[i][$urandom % P] = 1'b1;
      end
      #1;
      for (int p = 0; p < P; p++) begin
        int ng, lowest;
        logic idle_bidder;
        ng = 0; lowest = -1; idle_bidder = 0;
        for (int i = 0; i < N; i++) begin
          if (grant[i][p]) ng++;
          if (bid[i][p] && lowest < 0) lowest = i;
          if (bid[i][p] && grant[i] == '0) idle_bidder = 1;
        end
        checks++;
        if (ng > 1 || (ng == 0 && idle_bidder)) begin
          failures++; $display("FAIL t=%0d port %0d grants %0d", t, p, ng);
        end
        if (p == 0 && lowest >= 0) begin
          checks++;
          if (!grant[lowest][0]) begin failures++; $display("FAIL t=%0d port0 lowest %0d", t, lowest); end
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if ($countones(grant[i]) > 1 || (grant[i] & ~bid[i]) != '0) begin
          failures++; $display("FAIL t=%0d req %0d bid %b grant %b", t, i, bid[i], grant[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
