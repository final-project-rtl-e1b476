// tb_cc_regfile: self-checking test of the sixteen-register file.
//
// Checks that reset clears all registers, then performs random writes while
// reading all four ports at random addresses every cycle, comparing each
// read with a model array. Writes must appear only after the clock edge.
// A watchdog ends the run if it hangs.
module tb_cc_regfile;
  import cc_pkg::*;
  logic clk = 0, rst = 1, wr_en = 0;
  logic [3:0] rd_addr [4];
  logic [3:0] rd_data [4];
  logic [3:0] wr_addr = 0, wr_data = 0;
  logic [3:0] model [16];
  int checks = 0, failures = 0;

  cc_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (rd_data[p] != model[rd_addr[p]]) begin
        failures++;
        $display("port %0d addr %0d: got %0d want %0d", p, rd_addr[p], rd_data[p], model[rd_addr[p]]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 0;
    foreach (rd_addr[p]) rd_addr[p] = 4'(p);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 16; i += 4) begin
      foreach (rd_addr[p]) rd_addr[p] = 4'(i + p);
      check_reads();
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en   = ($urandom % 2) == 0;
      wr_addr = 4'($urandom);
      wr_data = 4'($urandom);
      foreach (rd_addr[p]) rd_addr[p] = 4'($urandom);
      check_reads();          // before the edge: old contents
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      check_reads();          // after the edge: new contents
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
