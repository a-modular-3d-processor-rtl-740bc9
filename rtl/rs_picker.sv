// rs_picker: global select logic of the scheduler.
//
// Every picker port (one per RS entry pair in the stacked scheduler) raises
// a BID bit for each execution port it wants. For each execution port the
// picker grants the lowest-numbered bidding picker port that has not already
// been granted a lower-numbered execution port, so each execution port gets
// at most one grant and each picker port at most one. The document names the
// picker and its BID/GRANT ports but not its priority rule; position
// priority is this design's choice.
//
// Interface: purely combinational, bid[i][p] -> grant[i][p].
module rs_picker #(
  parameter int unsigned NREQ   = 32,
  parameter int unsigned NPORTS = 6
) (
  input  logic [NPORTS-1:0] bid   [NREQ],
  output logic [NPORTS-1:0] grant [NREQ]
);
  always_comb begin
    logic [NREQ-1:0] taken;
    taken = '0;
    for (int i = 0; i < NREQ; i++) grant[i] = '0;
    for (int p = 0; p < NPORTS; p++) begin
      logic done;
      done = 1'b0;
      for (int i = 0; i < NREQ; i++) begin
        if (!done && !taken[i] && bid[i][p]) begin
          grant[i][p] = 1'b1;
          taken[i]    = 1'b1;
          done        = 1'b1;
        end
      end
    end
  end
endmodule
