// cc_alu: the four-bit arithmetic logic unit of the custom computer.
//
// Purely combinational, as the separate programmable-logic chip it stands
// for: the sequencer presents two operands A and B, a three-bit mode and a
// carry in, and reads back the result Y, a carry out and a zero flag. The
// eight modes and the carry rule of each follow the design's ALU table:
//   000 AND, 001 OR, 010 XOR, 101 NOT A     Y as named, Cout = Cin
//   011 SHCL  Y = {A[2:0], Cin}, Cout = A[3]   (rotate left through carry)
//   100 SHCR  Y = {Cin, A[3:1]}, Cout = A[0]   (rotate right through carry)
//   110 SUB   Y = A - B, Cout = carry out of A + ~B + 1 (1 = no borrow)
//   111 ADD   Y = A + B, Cout = carry out of A + B (Cin is not added)
// Z is 1 when Y is all zeros, for every mode; the table does not define Z,
// so that rule is this design's choice. Timing: no clock, output valid one
// combinational delay after the inputs.
module cc_alu
  import cc_pkg::*;
(
  input  alu_in_t  in,
  output alu_out_t out
);

  logic [DATA_W:0] sum;   // one extra bit for the carry

  always_comb begin
    sum      = '0;
    out.y    = '0;
    out.cout = in.cin;
    unique case (in.mode)
      ALU_AND:  out.y = in.a & in.b;
      ALU_OR:   out.y = in.a | in.b;
      ALU_XOR:  out.y = in.a ^ in.b;
      ALU_NOT:  out.y = ~in.a;
      ALU_SHCL: begin
        out.y    = {in.a[DATA_W-2:0], in.cin};
        out.cout = in.a[DATA_W-1];
      end
      ALU_SHCR: begin
        out.y    = {in.cin, in.a[DATA_W-1:1]};
        out.cout = in.a[0];
      end
      ALU_SUB: begin
        sum      = {1'b0, in.a} + {1'b0, ~in.b} + {{DATA_W{1'b0}}, 1'b1};
        out.y    = sum[DATA_W-1:0];
        out.cout = sum[DATA_W];
      end
      ALU_ADD: begin
        sum      = {1'b0, in.a} + {1'b0, in.b};
        out.y    = sum[DATA_W-1:0];
        out.cout = sum[DATA_W];
      end
      default: ;
    endcase
    out.z = (out.y == '0);
  end

endmodule
