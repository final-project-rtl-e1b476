// cc_iss_pkg: instruction-level reference model of the custom computer,
// used by the testbenches.
//
// The class holds the architectural state (PC, Z and C flags, sixteen
// four-bit registers, four banks of 128 data words, the return stack and
// the program bytes) and executes one instruction per call to step(),
// written from the instruction table with plain integer arithmetic and no
// reference to the RTL. step() returns the number of clocks the hardware
// is expected to take for the instruction and counts how often each
// mechanism occurred (taken skips, stack overflow, indirect addressing...)
// so a testbench can report coverage.
package cc_iss_pkg;

  class cc_iss;
    int unsigned pc;
    bit          z, c;
    int unsigned r   [16];
    int unsigned mem [4][128];
    int unsigned prog [256];
    int unsigned stk [$];
    int unsigned depth;
    int unsigned nop_delay;
    bit          overflow, underflow;
    int unsigned bank;
    // mechanism counters
    int unsigned n_op [16];
    int unsigned n_skip_taken, n_skip_not, n_overflow, n_underflow;
    int unsigned n_ind_mem, n_ind_jump, n_carry_set, n_zero_set, n_nop_delay;

    function new(int unsigned depth_i = 8, int unsigned nop_delay_i = 1000);
      depth = depth_i;
      nop_delay = nop_delay_i;
      foreach (prog[i]) prog[i] = 255;
      foreach (mem[b, o]) mem[b][o] = 0;
      bank = 0;
      reset();
      foreach (n_op[i]) n_op[i] = 0;
      n_skip_taken = 0; n_skip_not = 0; n_overflow = 0; n_underflow = 0;
      n_ind_mem = 0; n_ind_jump = 0; n_carry_set = 0; n_zero_set = 0; n_nop_delay = 0;
    endfunction

    function void reset();
      pc = 0; z = 0; c = 0;
      foreach (r[i]) r[i] = 0;
      stk.delete();
      overflow = 0; underflow = 0;
    endfunction

    function int unsigned rg(int unsigned i);
      return r[i % 16];
    endfunction

    function void set_z(int unsigned v);
      z = (v == 0);
      if (z) n_zero_set++;
    endfunction

    function void set_c(int unsigned v);
      c = v[0];
      if (c) n_carry_set++;
    endfunction

    // Execute one instruction; return expected clock count.
    function int unsigned step();
      int unsigned hi, lo, op, a, b, cc, m, v, off, tgt, bitv, cycles, next;
      hi = prog[(2 * pc) % 256];
      lo = prog[(2 * pc + 1) % 256];
      op = hi / 16; a = hi % 16; b = lo / 16; cc = lo % 16; m = lo / 128;
      n_op[op]++;
      next = (pc + 1) % 2048;
      cycles = 4;
      case (op)
        0: if (nop_delay > 0) begin cycles = 4 + nop_delay; n_nop_delay++; end
        1: begin v = r[b] + r[cc]; r[a] = v % 16; set_z(v % 16); set_c(v / 16); cycles = 5; end
        2: begin v = (r[b] + 16 - r[cc]) % 16; set_c(r[b] >= r[cc]); r[a] = v; set_z(v); cycles = 5; end
        3: begin v = r[b] & r[cc]; r[a] = v; set_z(v); cycles = 5; end
        4: begin v = r[b] | r[cc]; r[a] = v; set_z(v); cycles = 5; end
        5: begin v = r[b] ^ r[cc]; r[a] = v; set_z(v); cycles = 5; end
        6: begin
          if (m == 0) begin v = (r[cc] * 2 + c) % 16; set_c(r[cc] / 8); end
          else        begin v = r[cc] / 2 + 8 * c;    set_c(r[cc] % 2); end
          r[a] = v; cycles = 5;
        end
        7: begin v = 15 - r[cc]; r[a] = v; set_z(v); cycles = 5; end
        8: begin v = m ? r[cc] : cc; r[a] = v; set_z(v); end
        9: begin
          if (m) begin off = (rg(cc) * 16 + rg(cc + 1)) % 128; n_ind_mem++; end
          else off = lo % 128;
          v = mem[bank][off]; r[a] = v; set_z(v);
        end
        10: begin
          if (m) begin off = (rg(a) * 16 + rg(a + 1)) % 128; v = r[cc]; n_ind_mem++; end
          else begin off = lo % 128; v = r[a]; end
          mem[bank][off] = v; set_z(v);
        end
        11: begin
          bitv = (lo % 8 < 4) ? (r[a] >> (lo % 8)) % 2 : 0;
          if (bitv == m) begin next = (pc + 2) % 2048; n_skip_taken++; end
          else n_skip_not++;
        end
        12, 13: begin
          if (hi / 8 % 2) begin
            tgt = (rg(cc) * 256 + rg(cc + 1) * 16 + rg(cc + 2)) % 2048; n_ind_jump++;
          end else tgt = (hi % 8) * 256 + lo;
          if (op == 13) begin
            if (stk.size() < depth) stk.push_back(next);
            else begin overflow = 1; n_overflow++; end
          end
          next = tgt;
        end
        14: begin
          if (stk.size() > 0) next = stk.pop_back();
          else begin next = 0; underflow = 1; n_underflow++; end
        end
        default: ;
      endcase
      pc = next;
      return cycles;
    endfunction
  endclass

endpackage
