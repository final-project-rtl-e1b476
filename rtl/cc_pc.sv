// cc_pc: program counter of the custom computer.
//
// Holds the number of the instruction being run, cleared to zero by reset.
// When an instruction completes the sequencer asks for one of three
// updates: inc (PC + 1, the normal case), skip (PC + 2, a bit test whose
// condition holds skips the next instruction) or load (PC = load_val, for
// JMP, JSR and RET). Without a request the PC holds. Because each
// instruction occupies two bytes of program memory, the address of its
// first byte is twice the PC; byte_addr gives that address, cut to the
// width of the program memory, so the fetch can never start half-way into
// an instruction. Updates take effect at the rising clock edge; load has
// priority over skip, skip over inc.
module cc_pc
  import cc_pkg::*;
#(
  parameter int unsigned EE_AW = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inc,
  input  logic             skip,
  input  logic             load,
  input  logic [PC_W-1:0]  load_val,
  output logic [PC_W-1:0]  pc,
  output logic [EE_AW-1:0] byte_addr
);

  logic [PC_W:0] doubled;

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (load) pc <= load_val;
    else if (skip) pc <= pc + PC_W'(2);
    else if (inc)  pc <= pc + PC_W'(1);
  end

  assign doubled   = {pc, 1'b0};
  assign byte_addr = doubled[EE_AW-1:0];

endmodule
