// tb_cc_stack: self-checking test of the return-address stack.
//
// Pushes until full and one more (overflow must be flagged and the extra
// push dropped), pops everything back checking last-in-first-out order and
// the counter, pops once more on the empty stack (underflow flagged, top
// reads zero), then runs random pushes and pops against a queue model.
// A watchdog ends the run if it hangs.
module tb_cc_stack;
  import cc_pkg::*;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [PC_W-1:0] push_data = 0, top;
  logic [3:0] stcnt;
  logic full, empty, overflow, underflow;
  logic [PC_W-1:0] model [$];
  int checks = 0, failures = 0;

  cc_stack dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    #1;
    checks++;
    if (int'(stcnt) != model.size() || empty != (model.size() == 0) ||
        full != (model.size() == 8) ||
        top != ((model.size() == 0) ? '0 : model[$])) begin
      failures++;
      $display("%s: cnt %0d top %0d, want cnt %0d", what, stcnt, top, model.size());
    end
  endtask

  task automatic op(logic pu, logic po, logic [PC_W-1:0] d);
    @(negedge clk);
    push = pu; pop = po; push_data = d;
    @(posedge clk);
    if (po) begin
      if (model.size() > 0) void'(model.pop_back());
    end else if (pu && model.size() < 8) model.push_back(d);
    @(negedge clk) begin push = 0; pop = 0; end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check("reset");
    for (int i = 0; i < 8; i++) begin
      op(1, 0, PC_W'(100 + i * 3));
      check("push");
    end
    checks++;
    if (overflow) begin failures++; $display("overflow too early"); end
    op(1, 0, PC_W'(2047));
    check("push full");
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    for (int i = 0; i < 8; i++) begin
      op(0, 1, '0);
      check("pop");
    end
    checks++;
    if (underflow) begin failures++; $display("underflow too early"); end
    op(0, 1, '0);
    check("pop empty");
    checks++;
    if (!underflow) begin failures++; $display("underflow not flagged"); end
    for (int i = 0; i < 2000; i++) begin
      op(($urandom % 2) == 0, ($urandom % 3) == 0, PC_W'($urandom));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
