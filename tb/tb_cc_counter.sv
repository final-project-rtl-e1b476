// tb_cc_counter: the computer running a down-counter at its default
// parameters.
//
// The program counts R0 down from 15 to 0 and starts again, using only MOV,
// SUB, JMP and the bit tests TSC and TSS. A zero test has to be built from
// bit tests because no instruction tests the Z flag:
//   0  MOV R1,1           1  MOV R0,15        2  SUB R0,R0,R1
//   3  NOP                4  TSS R0,0         5  JMP 7
//   6  JMP 2              7  TSC R0,1         8  JMP 2
//   9  TSC R0,2          10  JMP 2           11  TSC R0,3
//  12  JMP 2             13  JMP 1
// The testbench watches the ALU result lines after every SUB and expects
// 14, 13, ..., 0, then 14 again, for two full rounds; it checks the carry
// (no borrow) and the zero flag, and that every instruction finishes in the
// expected number of clocks: 4, or 5 for SUB, or 4 + 1000 for NOP. A
// watchdog ends the run if it hangs.
module tb_cc_counter;
  import cc_pkg::*;

  localparam int unsigned NOPD = 1000;

  logic clk = 0, rst = 1;
  logic prog_we = 0;
  logic [7:0] prog_addr = 0, prog_data = 0;
  logic [1:0] bank_sel = 0, dbg_mem_bank = 0;
  logic [3:0] dbg_reg_addr = 0, dbg_reg_data, dbg_mem_data;
  logic [6:0] dbg_mem_offset = 0;
  logic [3:0] alu_a, alu_b, alu_y;
  logic [2:0] alu_mode;
  logic alu_cin, alu_cout, alu_z;
  logic [PC_W-1:0] pc;
  logic [15:0] ir;
  logic flag_z, flag_c, done, in_delay;
  logic [3:0] stcnt;
  logic stack_overflow, stack_underflow;

  int checks = 0, failures = 0;

  cc_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] code [14] = '{
    16'h8101, 16'h800F, 16'h2001, 16'h0000, 16'hB080, 16'hC007, 16'hC002,
    16'hB001, 16'hC002, 16'hB002, 16'hC002, 16'hB003, 16'hC002, 16'hC001 };

  initial begin
    int unsigned got, want, expect_val, subs;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i);
      prog_data = (i < 28) ? ((i % 2 == 0) ? code[i / 2][15:8] : code[i / 2][7:0]) : 8'hFF;
    end
    @(negedge clk) begin prog_we = 0; rst = 0; end
    expect_val = 14;
    subs = 0;
    got = 1;
    while (subs < 30) begin
      do begin @(negedge clk); got++; end while (!done);
      unique case (ir[15:12])
        4'h2:    want = 5;
        4'h0:    want = 4 + NOPD;
        default: want = 4;
      endcase
      checks++;
      if (got != want) begin
        failures++;
        $display("ir %04h took %0d clocks, want %0d", ir, got, want);
      end
      if (ir == 16'h2001) begin
        checks++;
        if (int'(alu_y) != expect_val || alu_cout != 1'b1 || alu_z != (expect_val == 0)) begin
          failures++;
          $display("count %0d: bus y=%0d cout=%0d z=%0d", expect_val, alu_y, alu_cout, alu_z);
        end
        subs++;
        expect_val = (expect_val == 0) ? 14 : expect_val - 1;
      end
      @(posedge clk); #1;
      if (ir == 16'h2001) begin
        checks++;
        if (flag_z != (alu_y == 0) || !flag_c) begin
          failures++;
          $display("flags after SUB: z=%0d c=%0d", flag_z, flag_c);
        end
      end
      got = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
