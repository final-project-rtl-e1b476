// tb_cc_pc: self-checking test of the program counter.
//
// Drives random sequences of hold, increment, skip and load requests and
// compares the PC and the first-byte address (twice the PC, cut to eight
// bits) with a model kept in the testbench. Also checks reset to zero and
// the priority load > skip > inc. A watchdog ends the run if it hangs.
module tb_cc_pc;
  import cc_pkg::*;
  logic clk = 0, rst = 1, inc = 0, skip = 0, load = 0;
  logic [PC_W-1:0] load_val = 0, pc;
  logic [7:0] byte_addr;
  int checks = 0, failures = 0;
  int model = 0;

  cc_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (int'(pc) != model || int'(byte_addr) != (model * 2) % 256) begin
      failures++;
      $display("pc %0d byte %0d, want %0d", pc, byte_addr, model);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    model = 0;
    check();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      inc  = ($urandom % 2) == 0;
      skip = ($urandom % 4) == 0;
      load = ($urandom % 8) == 0;
      load_val = PC_W'($urandom);
      @(posedge clk);
      if (load)      model = int'(load_val);
      else if (skip) model = (model + 2) % 2048;
      else if (inc)  model = (model + 1) % 2048;
      #1 check();
    end
    @(negedge clk) rst = 1;
    @(posedge clk) model = 0;
    #1 check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
