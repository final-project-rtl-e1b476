// tb_cc_alu: exhaustive self-checking test of the four-bit ALU.
//
// Applies every combination of A, B, mode and carry in (4096 cases) and
// compares Y, Cout and Z with a reference computed with integer arithmetic
// straight from the mode table: shifts as multiply/divide by two, subtract
// as A + 16 - B (carry = no borrow). A watchdog ends the run if it hangs.
module tb_cc_alu;
  import cc_pkg::*;

  alu_in_t  in;
  alu_out_t out;
  int checks = 0, failures = 0;

  cc_alu dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ec;
    for (int m = 0; m < 8; m++)
      for (int a = 0; a < 16; a++)
        for (int b = 0; b < 16; b++)
          for (int c = 0; c < 2; c++) begin
            in.a = 4'(a); in.b = 4'(b); in.mode = alu_mode_e'(m); in.cin = c[0];
            #1;
            ec = c;
            case (m)
              0: ey = a & b;
              1: ey = a | b;
              2: ey = a ^ b;
              3: begin ey = (a * 2 + c) % 16; ec = a / 8; end
              4: begin ey = a / 2 + c * 8;    ec = a % 2; end
              5: ey = 15 - a;
              6: begin ey = (a + 16 - b) % 16; ec = (a >= b) ? 1 : 0; end
              default: begin ey = (a + b) % 16; ec = (a + b) / 16; end
            endcase
            checks++;
            if (int'(out.y) != ey || int'(out.cout) != ec || out.z != (ey == 0)) begin
              failures++;
              if (failures < 10)
                $display("mode %0d a=%0d b=%0d cin=%0d: got y=%0d c=%0d z=%0d want y=%0d c=%0d",
                         m, a, b, c, out.y, out.cout, out.z, ey, ec);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
