// tb_cc_computer: end-to-end test of the whole computer at its default
// parameters (256-byte program memory, four data banks, 8-deep stack,
// 1000-clock NOP delay).
//
// Three kinds of program are loaded through the programming port and run:
//   1. the logic-survey program: MOV 1 and 3 into R0 and R1, then ADD, AND,
//      IOR and XOR into R2 with NOP delays between, then JMP 0. R2 must read
//      0100, 0001, 0011, 0010 and the ALU bus must show the operands;
//   2. short directed programs that overflow (JSR to itself) and underflow
//      (RET on an empty stack) the return stack;
//   3. random programs run in random data banks, with the bank switched
//      between instructions now and then.
// After every completed instruction the PC, flags, all sixteen registers
// (through the debug window), the stack depth and flags, and the clock count
// of the instruction are compared with the instruction-level reference
// model; the data memory is compared word by word after each program. The
// test counts each mechanism (every ALU mode, taken and untaken skips,
// indirect addressing, calls, returns, stack overflow and underflow, NOP
// delays, bank switches, the undefined opcode) and fails if one never
// happened. A watchdog ends the run if it hangs.
module tb_cc_computer;
  import cc_pkg::*;
  import cc_iss_pkg::*;

  localparam int unsigned NOPD = 1000;   // the top's default NOP delay

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
  int n_bank_switch = 0, n_delay_cycles = 0;

  cc_computer dut (.*);

  always #50 clk = ~clk;
  always @(negedge clk) if (in_delay && !rst) n_delay_cycles++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic load_program(cc_iss iss, logic [7:0] img [256]);
    rst = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 8'(i); prog_data = img[i];
      iss.prog[i] = int'(img[i]);
    end
    @(negedge clk) prog_we = 0;
    // copy the data memory contents into the model
    for (int b = 0; b < 4; b++)
      for (int o = 0; o < 128; o++) begin
        dbg_mem_bank = 2'(b); dbg_mem_offset = 7'(o);
        #1 iss.mem[b][o] = int'(dbg_mem_data);
      end
    iss.reset();
  endtask

  task automatic check_state(cc_iss iss, int unsigned want, int unsigned got);
    checks++;
    if (int'(pc) != iss.pc || flag_z != iss.z || flag_c != iss.c)
      fail($sformatf("ir %04h: pc %0d/%0d z %0d/%0d c %0d/%0d", ir, pc, iss.pc,
                     flag_z, iss.z, flag_c, iss.c));
    checks++;
    if (int'(stcnt) != iss.stk.size() || stack_overflow != iss.overflow ||
        stack_underflow != iss.underflow)
      fail($sformatf("ir %04h: stack %0d/%0d", ir, stcnt, iss.stk.size()));
    checks++;
    if (got != want) fail($sformatf("ir %04h: %0d clocks, want %0d", ir, got, want));
    for (int i = 0; i < 16; i++) begin
      dbg_reg_addr = 4'(i);
      #1;
      checks++;
      if (int'(dbg_reg_data) != iss.r[i])
        fail($sformatf("ir %04h: R%0d = %0d, want %0d", ir, i, dbg_reg_data, iss.r[i]));
    end
  endtask

  // Run n instructions from reset, checking after each. With switch_bank
  // set, the data bank changes at random between instructions.
  task automatic run(cc_iss iss, int n, bit switch_bank);
    int unsigned want, got;
    @(negedge clk) rst = 0;
    for (int k = 0; k < n; k++) begin
      got = (k == 0) ? 1 : 0;
      do begin
        @(negedge clk);
        got++;
      end while (!done);
      if (switch_bank && ($urandom % 8) == 0) begin
        bank_sel = 2'($urandom);
        n_bank_switch++;
      end
      iss.bank = int'(bank_sel);
      want = iss.step();
      @(posedge clk); #1;
      check_state(iss, want, got);
    end
    @(negedge clk) rst = 1;
  endtask

  task automatic check_memory(cc_iss iss);
    for (int b = 0; b < 4; b++)
      for (int o = 0; o < 128; o++) begin
        dbg_mem_bank = 2'(b); dbg_mem_offset = 7'(o);
        #1;
        checks++;
        if (int'(dbg_mem_data) != iss.mem[b][o])
          fail($sformatf("mem[%0d][%0d] = %0d, want %0d", b, o, dbg_mem_data, iss.mem[b][o]));
      end
  endtask

  // instruction word into a program image
  function automatic void put(ref logic [7:0] img [256], input int idx, input logic [15:0] w);
    img[2 * idx]     = w[15:8];
    img[2 * idx + 1] = w[7:0];
  endfunction

  logic [7:0] img [256];

  // A random instruction. Jumps, calls and returns are made rarer than
  // uniform so that programs run long straight stretches instead of
  // spinning in short loops; opcode 1111 and NOP stay rare as well.
  function automatic logic [15:0] random_instr();
    logic [15:0] w;
    w = 16'($urandom);
    if (w[15:12] inside {4'hC, 4'hD, 4'hE} && ($urandom % 4) != 0)
      w[15:12] = 4'($urandom % 12);
    if (w[15:12] inside {4'h0, 4'hF} && ($urandom % 2) != 0)
      w[15:12] = 4'(1 + $urandom % 11);
    return w;
  endfunction

  initial begin
    cc_iss iss;
    int unsigned want, got;
    int unsigned seen [string];

    iss = new(8, NOPD);
    repeat (2) @(negedge clk);

    // ---- 1. logic-survey program ----
    foreach (img[i]) img[i] = 8'hFF;
    put(img, 0,  16'b1000_0000_0000_0001);  // MOV R0,1
    put(img, 1,  16'b1000_0001_0000_0011);  // MOV R1,3
    put(img, 2,  16'b0001_0010_0000_0001);  // ADD R2,R0,R1
    put(img, 3,  16'h0000);                 // NOP
    put(img, 4,  16'b0011_0010_0000_0001);  // AND R2,R0,R1
    put(img, 5,  16'h0000);
    put(img, 6,  16'b0100_0010_0000_0001);  // IOR R2,R0,R1
    put(img, 7,  16'h0000);
    put(img, 8,  16'b0101_0010_0000_0001);  // XOR R2,R0,R1
    put(img, 9,  16'h0000);
    put(img, 10, 16'h0000);
    put(img, 11, 16'h0000);
    put(img, 12, 16'b1100_0000_0000_0000);  // JMP 0
    load_program(iss, img);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 26; k++) begin
      got = (k == 0) ? 1 : 0;
      do begin @(negedge clk); got++; end while (!done);
      iss.bank = int'(bank_sel);
      want = iss.step();
      @(posedge clk); #1;
      check_state(iss, want, got);
      dbg_reg_addr = 4'd2;
      #1;
      case (k % 13)
        2: begin
          checks++;
          if (dbg_reg_data != 4'b0100 || alu_y != 4'b0100 || alu_cout || alu_a != 4'b0001 ||
              alu_b != 4'b0011 || alu_mode != 3'b111)
            fail("ADD of the survey program");
        end
        4: begin checks++; if (dbg_reg_data != 4'b0001 || alu_mode != 3'b000) fail("AND of the survey program"); end
        6: begin checks++; if (dbg_reg_data != 4'b0011 || alu_mode != 3'b001) fail("IOR of the survey program"); end
        8: begin checks++; if (dbg_reg_data != 4'b0010 || alu_mode != 3'b010) fail("XOR of the survey program"); end
        12: begin checks++; if (pc != 0) fail("JMP 0 of the survey program"); end
        default: ;
      endcase
      // the ALU bus holds its values through the NOP delays
      if (k % 13 == 9) begin
        checks++;
        if (alu_y != 4'b0010 || alu_mode != 3'b010) fail("ALU bus not held through NOP");
      end
    end
    @(negedge clk) rst = 1;

    // ---- 2. stack overflow and underflow ----
    foreach (img[i]) img[i] = 8'hFF;
    put(img, 0, 16'b1101_0000_0000_0000);   // JSR 0 (pushes 1 every time)
    load_program(iss, img);
    run(iss, 12, 0);
    foreach (img[i]) img[i] = 8'hFF;
    put(img, 0, 16'b1110_0000_0000_0000);   // RET on an empty stack
    load_program(iss, img);
    run(iss, 3, 0);

    // ---- 3. random programs in random banks ----
    for (int prg = 0; prg < 8; prg++) begin
      for (int i = 0; i < 128; i++) put(img, i, random_instr());
      bank_sel = 2'($urandom);
      load_program(iss, img);
      run(iss, 1500, 1);
      check_memory(iss);
    end

    // ---- coverage of mechanisms ----
    seen["ADD"] = iss.n_op[1];   seen["SUB"] = iss.n_op[2];  seen["AND"] = iss.n_op[3];
    seen["IOR"] = iss.n_op[4];   seen["XOR"] = iss.n_op[5];  seen["RRL/RRR"] = iss.n_op[6];
    seen["NOT"] = iss.n_op[7];   seen["MOV"] = iss.n_op[8];  seen["LOD"] = iss.n_op[9];
    seen["STO"] = iss.n_op[10];  seen["JMP"] = iss.n_op[12]; seen["JSR"] = iss.n_op[13];
    seen["RET"] = iss.n_op[14];  seen["undefined opcode"] = iss.n_op[15];
    seen["skip taken"] = iss.n_skip_taken;   seen["skip not taken"] = iss.n_skip_not;
    seen["stack overflow"] = iss.n_overflow; seen["stack underflow"] = iss.n_underflow;
    seen["indirect memory"] = iss.n_ind_mem; seen["indirect jump"] = iss.n_ind_jump;
    seen["carry set"] = iss.n_carry_set;     seen["zero set"] = iss.n_zero_set;
    seen["NOP delay"] = iss.n_nop_delay;     seen["bank switch"] = n_bank_switch;
    foreach (seen[name]) begin
      $display("  %-18s %0d", name, seen[name]);
      checks++;
      if (seen[name] == 0) fail($sformatf("mechanism never exercised: %s", name));
    end
    checks++;
    if (n_delay_cycles != int'(iss.n_nop_delay * NOPD))
      fail($sformatf("delay cycles %0d, want %0d", n_delay_cycles, iss.n_nop_delay * NOPD));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
