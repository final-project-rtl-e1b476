// cc_pkg: types and constants shared by the blocks of the four-bit custom
// computer.
//
// The instruction word is 16 bits: a 4-bit opcode in bits 15:12 followed by
// operand fields whose meaning depends on the opcode (see cc_controller).
// The opcode values and the ALU mode codes are the ones of the instruction
// table and the ALU mode table of the design. The two structs bundle the
// wires between the sequencer and the separate ALU chip: twelve signals go to
// the ALU (two operands, mode, carry in) and six come back (result, carry
// out, zero). Everything else here (widths of the program counter, register
// and memory words) is collected in one place so the modules agree.
package cc_pkg;

  // Data word of the registers, the data memory and the ALU.
  localparam int unsigned DATA_W  = 4;
  // Program counter width: JMP/JSR carry an 11-bit target.
  localparam int unsigned PC_W    = 11;
  // Number of general registers addressed by a 4-bit field.
  localparam int unsigned NREGS   = 16;
  // Offset width inside a data-memory bank (7-bit k of LOD/STO).
  localparam int unsigned OFFS_W  = 7;

  typedef enum logic [3:0] {
    OP_NOP = 4'h0,
    OP_ADD = 4'h1,
    OP_SUB = 4'h2,
    OP_AND = 4'h3,
    OP_IOR = 4'h4,
    OP_XOR = 4'h5,
    OP_ROT = 4'h6,   // RRL (bit 7 = 0) / RRR (bit 7 = 1)
    OP_NOT = 4'h7,
    OP_MOV = 4'h8,   // MOV Ra,k (bit 7 = 0) / MOV Ra,Rb (bit 7 = 1)
    OP_LOD = 4'h9,   // LOD Ra,k / LOD Ra,@Rb
    OP_STO = 4'hA,   // STO k,Ra / STO @Ra,Rb
    OP_TST = 4'hB,   // TSC (bit 7 = 0) / TSS (bit 7 = 1)
    OP_JMP = 4'hC,   // JMP k (bit 11 = 0) / JMP @Ra (bit 11 = 1)
    OP_JSR = 4'hD,   // JSR k / JSR @Ra
    OP_RET = 4'hE,
    OP_UND = 4'hF    // not defined by the instruction set
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_AND  = 3'b000,
    ALU_OR   = 3'b001,
    ALU_XOR  = 3'b010,
    ALU_SHCL = 3'b011,
    ALU_SHCR = 3'b100,
    ALU_NOT  = 3'b101,
    ALU_SUB  = 3'b110,
    ALU_ADD  = 3'b111
  } alu_mode_e;

  // Twelve lines from the sequencer to the ALU.
  typedef struct packed {
    logic [DATA_W-1:0] a;
    logic [DATA_W-1:0] b;
    alu_mode_e         mode;
    logic              cin;
  } alu_in_t;

  // Six lines from the ALU back to the sequencer.
  typedef struct packed {
    logic [DATA_W-1:0] y;
    logic              cout;
    logic              z;
  } alu_out_t;

endpackage
