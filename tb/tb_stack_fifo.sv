// tb_stack_fifo: self-checking test of the stackable queue (48 / 24
// entries). Random push/pop traffic is compared against a queue model kept
// by the testbench; full must appear exactly at 48 entries stacked and 24
// single-layer, and order must be preserved across pointer wrap.
module tb_stack_fifo;
  localparam int D = 48, W = 32;
  logic clk = 0, rst_n = 0, sp, push = 0, pop = 0, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  stack_fifo #(.DEPTH(D), .WIDTH(W)) dut (.*, .stack_present(sp));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int cycles, input int push_pct, input int cap);
    for (int c = 0; c < cycles; c++) begin
      push = ($urandom % 100) < push_pct;
      pop  = ($urandom % 100) < 50;
      din  = $urandom;
      #1;
      checks++;
      if (full !== (q.size() == cap) || empty !== (q.size() == 0) || 32'(count) !== q.size()) begin
        failures++; $display("FAIL status size=%0d full=%0b count=%0d", q.size(), full, count);
      end
      if (pop && q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %h exp %h", dout, q[0]); end
      end
      begin
        bit acc_push, acc_pop;
        acc_push = push && q.size() < cap;
        acc_pop  = pop && q.size() > 0;
        @(posedge clk);
        if (acc_pop) void'(q.pop_front());
        if (acc_push) q.push_back(din);
      end
      #1;
    end
  endtask

  initial begin
    sp = 1; din = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(2000, 70, D);
    // fill to capacity stacked
    pop = 0;
    while (q.size() < D) begin push = 1; din = $urandom; @(posedge clk); q.push_back(din); #1; end
    push = 0; #1; checks++; if (!full || 32'(count) != D) failures++;
    // drain, then single-layer
    while (q.size() > 0) begin pop = 1; #1; checks++; if (dout !== q[0]) failures++; @(posedge clk); void'(q.pop_front()); #1; end
    pop = 0;
    rst_n = 0; #1; sp = 0; rst_n = 1;
    run(2000, 70, D / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
