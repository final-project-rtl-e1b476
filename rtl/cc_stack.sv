// cc_stack: the return-address stack used by JSR and RET.
//
// A counter, STCNT, holds the number of addresses on the stack. It selects
// both the most recent entry (entry STCNT-1, shown on top) and the next free
// one (entry STCNT). A push writes push_data into the next free entry and
// increments STCNT; a pop decrements it, the caller having read top in the
// same cycle. This follows the design's description of its stack. The depth,
// and what happens at the ends, the design leaves open; here:
//   - a push onto a full stack is dropped and sets the sticky overflow flag;
//   - a pop from an empty stack leaves STCNT at zero and sets the sticky
//     underflow flag; top reads as zero while the stack is empty.
// Both flags and STCNT clear on reset. Push and pop in the same cycle are
// not used by the sequencer; pop then wins. Timing: one clock per operation.
module cc_stack
  import cc_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned CNT_W = $clog2(DEPTH + 1),
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             pop,
  input  logic [PC_W-1:0]  push_data,
  output logic [PC_W-1:0]  top,
  output logic [CNT_W-1:0] stcnt,
  output logic             full,
  output logic             empty,
  output logic             overflow,
  output logic             underflow
);

  logic [PC_W-1:0] mem [DEPTH];

  assign full  = (32'(stcnt) == DEPTH);
  assign empty = (stcnt == '0);
  assign top   = empty ? '0 : mem[IDX_W'(stcnt - CNT_W'(1))];

  always_ff @(posedge clk) begin
    if (rst) begin
      stcnt     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (pop) begin
      if (empty) underflow <= 1'b1;
      else       stcnt     <= stcnt - CNT_W'(1);
    end else if (push) begin
      if (full) begin
        overflow <= 1'b1;
      end else begin
        mem[IDX_W'(stcnt)] <= push_data;
        stcnt      <= stcnt + CNT_W'(1);
      end
    end
  end

endmodule
