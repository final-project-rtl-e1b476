// tb_cc_controller: self-checking test of the fetch/decode/execute
// sequencer on its own.
//
// Everything around the sequencer is modelled in this testbench: a byte
// program memory with one clock of read latency, the program counter, the
// register file, one bank of data memory, the return stack and an ALU
// computed with integer arithmetic. Random programs are loaded and run, and
// after every completed instruction the registers, flags, PC, stack depth
// and data memory are compared with the instruction-level reference model.
// The clocks each instruction takes are checked too (4, 5 for ALU
// instructions, 4 + NOP_DELAY for NOP). A short NOP delay keeps the run
// brief. A watchdog ends the run if it hangs.
module tb_cc_controller;
  import cc_pkg::*;
  import cc_iss_pkg::*;

  localparam int unsigned NOPD = 7;

  logic clk = 0, rst = 1;
  logic [7:0] ee_addr, ee_data;
  logic [PC_W-1:0] pc, pc_load_val;
  logic [7:0] pc_byte_addr;
  logic pc_inc, pc_skip, pc_load;
  logic [3:0] rf_raddr [3];
  logic [3:0] rf_rdata [3];
  logic rf_we;
  logic [3:0] rf_waddr, rf_wdata;
  logic [6:0] dm_offset;
  logic dm_we;
  logic [3:0] dm_wdata, dm_rdata;
  logic st_push, st_pop;
  logic [PC_W-1:0] st_push_data, st_top;
  alu_in_t alu_in;
  alu_out_t alu_out;
  logic flag_z, flag_c, done, in_delay;
  logic [15:0] ir;

  // models around the sequencer
  logic [7:0] prog [256];
  logic [3:0] regs [16];
  logic [3:0] dmem [128];
  logic [PC_W-1:0] stk [$];

  int checks = 0, failures = 0;

  cc_controller #(.EE_AW(8), .NOP_DELAY(NOPD)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) ee_data <= prog[ee_addr];
  assign pc_byte_addr = {pc[6:0], 1'b0};
  always_ff @(posedge clk) begin
    if (rst)          pc <= '0;
    else if (pc_load) pc <= pc_load_val;
    else if (pc_skip) pc <= pc + 2;
    else if (pc_inc)  pc <= pc + 1;
  end
  always_comb for (int p = 0; p < 3; p++) rf_rdata[p] = regs[rf_raddr[p]];
  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 16; i++) regs[i] <= 0;
    else if (rf_we) regs[rf_waddr] <= rf_wdata;
  end
  assign dm_rdata = dmem[dm_offset];
  always_ff @(posedge clk) if (dm_we) dmem[dm_offset] <= dm_wdata;
  assign st_top = (stk.size() == 0) ? '0 : stk[$];
  always @(posedge clk) begin
    if (rst) stk.delete();
    else if (st_pop) begin if (stk.size() > 0) void'(stk.pop_back()); end
    else if (st_push && stk.size() < 8) stk.push_back(st_push_data);
  end
  always_comb begin
    int s;
    s = 0;
    alu_out.cout = alu_in.cin;
    case (alu_in.mode)
      ALU_AND: alu_out.y = alu_in.a & alu_in.b;
      ALU_OR:  alu_out.y = alu_in.a | alu_in.b;
      ALU_XOR: alu_out.y = alu_in.a ^ alu_in.b;
      ALU_NOT: alu_out.y = ~alu_in.a;
      ALU_SHCL: begin alu_out.y = {alu_in.a[2:0], alu_in.cin}; alu_out.cout = alu_in.a[3]; end
      ALU_SHCR: begin alu_out.y = {alu_in.cin, alu_in.a[3:1]}; alu_out.cout = alu_in.a[0]; end
      ALU_SUB: begin s = int'(alu_in.a) + 16 - int'(alu_in.b); alu_out.y = 4'(s); alu_out.cout = s >= 16; end
      default: begin s = int'(alu_in.a) + int'(alu_in.b); alu_out.y = 4'(s); alu_out.cout = s >= 16; end
    endcase
    alu_out.z = alu_out.y == 0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(cc_iss iss, int unsigned want_cycles, int unsigned got_cycles);
    bit bad;
    bad = 0;
    foreach (regs[i]) if (int'(regs[i]) != iss.r[i]) bad = 1;
    foreach (dmem[i]) if (int'(dmem[i]) != iss.mem[0][i]) bad = 1;
    if (int'(pc) != iss.pc || flag_z != iss.z || flag_c != iss.c) bad = 1;
    if (stk.size() != iss.stk.size()) bad = 1;
    if (got_cycles != want_cycles) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("after ir %04h: pc %0d/%0d z %0d/%0d c %0d/%0d cycles %0d/%0d",
                 ir, pc, iss.pc, flag_z, iss.z, flag_c, iss.c, got_cycles, want_cycles);
    end
  endtask

  initial begin
    cc_iss iss;
    int unsigned want, got;
    for (int prg = 0; prg < 20; prg++) begin
      iss = new(8, NOPD);
      rst = 1;
      for (int i = 0; i < 256; i++) begin
        // random instructions; operand-heavy opcodes more often than NOP
        prog[i] = 8'($urandom);
        iss.prog[i] = int'(prog[i]);
      end
      for (int i = 0; i < 128; i++) begin
        dmem[i] = 4'($urandom);
        iss.mem[0][i] = int'(dmem[i]);
      end
      repeat (2) @(negedge clk);
      rst = 0;
      for (int n = 0; n < 500; n++) begin
        got = (n == 0) ? 1 : 0;   // reset is released in the first FETCH1 cycle
        do begin
          @(negedge clk);
          got++;
        end while (!done);
        want = iss.step();
        @(posedge clk); #1;
        compare(iss, want, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
