// tb_cc_data_mem: self-checking test of the banked data memory.
//
// Fills all four banks with a pattern that depends on bank and offset, then
// reads every word back through both ports, and finally runs random writes
// and reads against a model. The pattern differs between banks, so a bank
// select that is ignored or crossed is caught. A watchdog ends the run.
module tb_cc_data_mem;
  import cc_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [1:0] bank = 0, dbg_bank = 0;
  logic [6:0] offset = 0, dbg_offset = 0;
  logic [3:0] wr_data = 0, rd_data, dbg_data;
  logic [3:0] model [512];
  int checks = 0, failures = 0;

  cc_data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int b, int o);
    #1;
    checks++;
    if (rd_data != model[b * 128 + o] || dbg_data != model[int'(dbg_bank) * 128 + int'(dbg_offset)]) begin
      failures++;
      $display("bank %0d off %0d: got %0d/%0d want %0d", b, o, rd_data, dbg_data, model[b * 128 + o]);
    end
  endtask

  initial begin
    for (int b = 0; b < 4; b++)
      for (int o = 0; o < 128; o++) begin
        @(negedge clk);
        bank = 2'(b); offset = 7'(o); wr_en = 1;
        wr_data = 4'(o + 5 * b + (o >> 4));
        model[b * 128 + o] = wr_data;
      end
    @(negedge clk) wr_en = 0;
    for (int b = 0; b < 4; b++)
      for (int o = 0; o < 128; o++) begin
        bank = 2'(b); offset = 7'(o);
        dbg_bank = 2'(3 - b); dbg_offset = 7'(127 - o);
        check(b, o);
      end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      bank = 2'($urandom); offset = 7'($urandom); wr_en = ($urandom % 2) == 0;
      wr_data = 4'($urandom);
      dbg_bank = 2'($urandom); dbg_offset = 7'($urandom);
      check(int'(bank), int'(offset));
      @(posedge clk);
      if (wr_en) model[int'(bank) * 128 + int'(offset)] = wr_data;
      check(int'(bank), int'(offset));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
