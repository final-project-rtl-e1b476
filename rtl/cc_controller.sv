// cc_controller: fetch, decode and execute sequencer of the custom computer.
//
// It runs the 16-bit instruction set one instruction at a time, following
// the design's instruction table. Each instruction is fetched as two bytes
// from the byte-wide program memory, the upper byte from address 2*PC and
// the lower from 2*PC+1, then decoded and executed. Arithmetic and logic
// instructions are not computed here: their operands, mode and the C flag
// are driven onto the twelve lines of the ALU bus, which hold their value
// until the next ALU instruction (so indicator lamps on the bus stay lit),
// and the result, carry and zero lines are read back one cycle later.
//
// States and cycles per instruction (memory read latency one clock):
//   FETCH1  put 2*PC on the program-memory address
//   FETCH2  latch the upper byte, put 2*PC+1 on the address
//   FETCH3  latch the lower byte
//   EXEC    decode and execute; all but ALU instructions and NOP finish here
//   ALUWB   (ALU instructions) write the result and the flags back
//   DELAY   (NOP) wait NOP_DELAY clocks
// so an instruction takes 4 clocks, an ALU instruction 5 and a NOP
// 4 + NOP_DELAY. done pulses in the cycle an instruction completes.
//
// Flags: Z and C, updated as the instruction table lists (ADD/SUB: Z,C;
// AND/IOR/XOR/NOT: Z; RRL/RRR: C; MOV/LOD/STO: Z of the word moved; the
// rest none). A bit test reads bit b of Ra; bits above the 4-bit register
// width read as zero. Indirect operands concatenate consecutive registers
// with the named one most significant ([Ra Ra+1] for a memory offset,
// [Ra Ra+1 Ra+2] for a jump target); register numbers wrap modulo 16.
// The NOP delay loop follows the design; its length, the wrap rules, the
// bit-test rule for high bits and the treatment of opcode 1111 (undefined;
// run as a NOP without delay, so erased memory is harmless) are this
// design's choices.
module cc_controller
  import cc_pkg::*;
#(
  parameter int unsigned EE_AW     = 8,
  parameter int unsigned NOP_DELAY = 1000
) (
  input  logic                      clk,
  input  logic                      rst,
  // program memory
  output logic [EE_AW-1:0]          ee_addr,
  input  logic [7:0]                ee_data,
  // program counter
  input  logic [PC_W-1:0]           pc,
  input  logic [EE_AW-1:0]          pc_byte_addr,
  output logic                      pc_inc,
  output logic                      pc_skip,
  output logic                      pc_load,
  output logic [PC_W-1:0]           pc_load_val,
  // register file (three read ports, one write port)
  output logic [$clog2(NREGS)-1:0]  rf_raddr [3],
  input  logic [DATA_W-1:0]         rf_rdata [3],
  output logic                      rf_we,
  output logic [$clog2(NREGS)-1:0]  rf_waddr,
  output logic [DATA_W-1:0]         rf_wdata,
  // data memory
  output logic [OFFS_W-1:0]         dm_offset,
  output logic                      dm_we,
  output logic [DATA_W-1:0]         dm_wdata,
  input  logic [DATA_W-1:0]         dm_rdata,
  // return stack
  output logic                      st_push,
  output logic                      st_pop,
  output logic [PC_W-1:0]           st_push_data,
  input  logic [PC_W-1:0]           st_top,
  // ALU bus
  output alu_in_t                   alu_in,
  input  alu_out_t                  alu_out,
  // status
  output logic                      flag_z,
  output logic                      flag_c,
  output logic [15:0]               ir,
  output logic                      done,
  output logic                      in_delay
);

  typedef enum logic [2:0] {
    S_FETCH1, S_FETCH2, S_FETCH3, S_EXEC, S_ALUWB, S_DELAY
  } state_e;

  state_e            state;
  logic [7:0]        bone, btwo;   // upper and lower instruction bytes
  logic [31:0]       delay_cnt;
  opcode_e           op;
  logic [3:0]        fa, fb, fc;   // the three 4-bit operand fields
  logic              mbit;         // bit 7: mode of ROT/MOV/LOD/STO/TST
  logic [PC_W-1:0]   target;
  logic [3*DATA_W-1:0] ind3;
  logic [2*DATA_W-1:0] ind2;
  logic              tbit;
  logic              alu_op;

  assign ir   = {bone, btwo};
  assign op   = opcode_e'(ir[15:12]);
  assign fa   = ir[11:8];
  assign fb   = ir[7:4];
  assign fc   = ir[3:0];
  assign mbit = ir[7];

  assign alu_op = (op inside {OP_ADD, OP_SUB, OP_AND, OP_IOR, OP_XOR,
                              OP_ROT, OP_NOT});
  assign in_delay = (state == S_DELAY);

  // Register read addresses. Port 0 carries the first source, ports 1 and 2
  // the second and third (or the following registers of an indirect pair or
  // triple).
  always_comb begin
    rf_raddr[0] = fc;
    rf_raddr[1] = fc + 4'd1;
    rf_raddr[2] = fc + 4'd2;
    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_IOR, OP_XOR: begin
        rf_raddr[0] = fb;
        rf_raddr[1] = fc;
      end
      OP_STO: begin
        rf_raddr[0] = fa;
        rf_raddr[1] = fa + 4'd1;
        rf_raddr[2] = fc;
      end
      OP_TST: rf_raddr[0] = fa;
      default: ;
    endcase
  end

  assign ind2 = {rf_rdata[0], rf_rdata[1]};
  assign ind3 = {rf_rdata[0], rf_rdata[1], rf_rdata[2]};
  assign target = ir[11] ? ind3[PC_W-1:0] : ir[PC_W-1:0];
  assign tbit   = (32'(ir[2:0]) < DATA_W) ? rf_rdata[0][ir[1:0]] : 1'b0;

  // Program memory address and data-memory access.
  always_comb begin
    ee_addr = pc_byte_addr;
    if (state == S_FETCH2) ee_addr = pc_byte_addr | EE_AW'(1);
  end

  always_comb begin
    dm_offset = mbit ? ind2[OFFS_W-1:0] : ir[OFFS_W-1:0];
    dm_wdata  = mbit ? rf_rdata[2] : rf_rdata[0];
    dm_we     = (state == S_EXEC) && (op == OP_STO);
  end

  // Per-state control of the PC, registers and stack.
  always_comb begin
    pc_inc       = 1'b0;
    pc_skip      = 1'b0;
    pc_load      = 1'b0;
    pc_load_val  = target;
    rf_we        = 1'b0;
    rf_waddr     = fa;
    rf_wdata     = '0;
    st_push      = 1'b0;
    st_pop       = 1'b0;
    st_push_data = pc + PC_W'(1);
    done         = 1'b0;
    if (state == S_EXEC) begin
      unique case (op)
        OP_NOP: begin
          pc_inc = (NOP_DELAY == 0);
          done   = (NOP_DELAY == 0);
        end
        OP_MOV: begin
          rf_we    = 1'b1;
          rf_wdata = mbit ? rf_rdata[0] : fc;
          pc_inc   = 1'b1;
          done     = 1'b1;
        end
        OP_LOD: begin
          rf_we    = 1'b1;
          rf_wdata = dm_rdata;
          pc_inc   = 1'b1;
          done     = 1'b1;
        end
        OP_STO, OP_UND: begin
          pc_inc = 1'b1;
          done   = 1'b1;
        end
        OP_TST: begin
          pc_skip = (tbit == mbit);
          pc_inc  = (tbit != mbit);
          done    = 1'b1;
        end
        OP_JMP: begin
          pc_load = 1'b1;
          done    = 1'b1;
        end
        OP_JSR: begin
          st_push = 1'b1;
          pc_load = 1'b1;
          done    = 1'b1;
        end
        OP_RET: begin
          st_pop      = 1'b1;
          pc_load     = 1'b1;
          pc_load_val = st_top;
          done        = 1'b1;
        end
        default: ;   // ALU instructions finish in S_ALUWB
      endcase
    end else if (state == S_ALUWB) begin
      rf_we    = 1'b1;
      rf_wdata = alu_out.y;
      pc_inc   = 1'b1;
      done     = 1'b1;
    end else if (state == S_DELAY && delay_cnt == 0) begin
      pc_inc = 1'b1;
      done   = 1'b1;
    end
  end

  // At most one PC update per clock, and it coincides with done.
  a_pc_update: assert property (@(posedge clk) disable iff (rst)
    $onehot0({pc_inc, pc_skip, pc_load}) && (done == (pc_inc || pc_skip || pc_load)));
  // The stack is never pushed and popped in the same clock.
  a_stack_op: assert property (@(posedge clk) disable iff (rst) !(st_push && st_pop));

  // ALU bus contents for the instruction in EXEC.
  function automatic alu_in_t alu_request(opcode_e o, logic m,
                                          logic [DATA_W-1:0] r0,
                                          logic [DATA_W-1:0] r1, logic c);
    alu_in_t r;
    r.a   = r0;
    r.b   = r1;
    r.cin = c;
    unique case (o)
      OP_ADD:  r.mode = ALU_ADD;
      OP_SUB:  r.mode = ALU_SUB;
      OP_AND:  r.mode = ALU_AND;
      OP_IOR:  r.mode = ALU_OR;
      OP_XOR:  r.mode = ALU_XOR;
      OP_ROT:  r.mode = m ? ALU_SHCR : ALU_SHCL;
      default: r.mode = ALU_NOT;
    endcase
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_FETCH1;
      bone      <= '0;
      btwo      <= '0;
      delay_cnt <= '0;
      flag_z    <= 1'b0;
      flag_c    <= 1'b0;
      alu_in    <= '0;
    end else begin
      unique case (state)
        S_FETCH1: state <= S_FETCH2;
        S_FETCH2: begin
          bone  <= ee_data;
          state <= S_FETCH3;
        end
        S_FETCH3: begin
          btwo  <= ee_data;
          state <= S_EXEC;
        end
        S_EXEC: begin
          state <= S_FETCH1;
          if (alu_op) begin
            alu_in <= alu_request(op, mbit, rf_rdata[0], rf_rdata[1], flag_c);
            state  <= S_ALUWB;
          end else if (op == OP_NOP && NOP_DELAY != 0) begin
            delay_cnt <= NOP_DELAY - 1;
            state     <= S_DELAY;
          end
          if (op == OP_MOV || op == OP_LOD || op == OP_STO)
            flag_z <= (rf_wdata == '0) && (op != OP_STO) ||
                      (op == OP_STO) && (dm_wdata == '0);
        end
        S_ALUWB: begin
          state <= S_FETCH1;
          if (op inside {OP_ADD, OP_SUB, OP_AND, OP_IOR, OP_XOR, OP_NOT})
            flag_z <= alu_out.z;
          if (op inside {OP_ADD, OP_SUB, OP_ROT})
            flag_c <= alu_out.cout;
        end
        S_DELAY: begin
          if (delay_cnt == 0) state <= S_FETCH1;
          else                delay_cnt <= delay_cnt - 1;
        end
        default: state <= S_FETCH1;
      endcase
    end
  end

endmodule
