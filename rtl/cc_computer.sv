// cc_computer: a small four-bit computer with a 16-bit instruction set.
//
// The machine runs 22 instructions (register-to-register arithmetic and
// logic, rotates through carry, moves, banked loads and stores, bit tests
// that skip, jumps, subroutine calls and returns) stored as two bytes each
// in a byte-wide program memory. It is split, like the two-chip original,
// into a sequencer and a separate four-bit ALU joined by a bus of twelve
// lines out (A, B, mode, carry in) and six lines back (Y, carry out, zero).
// Around the sequencer sit the program counter, sixteen four-bit registers,
// a banked data memory and a return-address stack.
//
// Interface:
//   clk, rst          clock and synchronous active-high reset (PC, flags,
//                     registers and stack cleared)
//   prog_*            programming port of the program memory; load the
//                     program while rst is held
//   bank_sel          data-memory bank used by LOD and STO
//   dbg_*             read windows on the registers and the data memory
//   alu_*             the ALU bus, the signals the original showed on lamps
//   pc, ir, flags, stack status, done (one pulse per finished instruction)
// Timing: 4 clocks per instruction, 5 for ALU instructions, 4 + NOP_DELAY
// for NOP (see cc_controller).
//
// The split into blocks, the bus signals and the instruction semantics
// follow the design; the single clock, the synchronous memories, the bank
// select input and the debug windows are this design's choices.
module cc_computer
  import cc_pkg::*;
#(
  parameter int unsigned EE_DEPTH    = 256,
  parameter int unsigned NBANKS      = 4,
  parameter int unsigned STACK_DEPTH = 8,
  parameter int unsigned NOP_DELAY   = 1000,
  localparam int unsigned EE_AW      = $clog2(EE_DEPTH),
  localparam int unsigned BANK_W     = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned ST_CW      = $clog2(STACK_DEPTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  // program memory programming port
  input  logic                     prog_we,
  input  logic [EE_AW-1:0]         prog_addr,
  input  logic [7:0]               prog_data,
  // data-memory bank select
  input  logic [BANK_W-1:0]        bank_sel,
  // debug windows
  input  logic [3:0]               dbg_reg_addr,
  output logic [DATA_W-1:0]        dbg_reg_data,
  input  logic [BANK_W-1:0]        dbg_mem_bank,
  input  logic [OFFS_W-1:0]        dbg_mem_offset,
  output logic [DATA_W-1:0]        dbg_mem_data,
  // ALU bus
  output logic [DATA_W-1:0]        alu_a,
  output logic [DATA_W-1:0]        alu_b,
  output logic [2:0]               alu_mode,
  output logic                     alu_cin,
  output logic [DATA_W-1:0]        alu_y,
  output logic                     alu_cout,
  output logic                     alu_z,
  // machine state
  output logic [PC_W-1:0]          pc,
  output logic [15:0]              ir,
  output logic                     flag_z,
  output logic                     flag_c,
  output logic                     done,
  output logic                     in_delay,
  output logic [ST_CW-1:0]         stcnt,
  output logic                     stack_overflow,
  output logic                     stack_underflow
);

  // program memory
  logic [EE_AW-1:0] ee_addr, pc_byte_addr;
  logic [7:0]       ee_data;

  // program counter
  logic             pc_inc, pc_skip, pc_load;
  logic [PC_W-1:0]  pc_load_val;

  // registers
  logic [3:0]        rf_raddr [4];
  logic [DATA_W-1:0] rf_rdata [4];
  logic [3:0]        ctl_raddr [3];
  logic [DATA_W-1:0] ctl_rdata [3];
  logic              rf_we;
  logic [3:0]        rf_waddr;
  logic [DATA_W-1:0] rf_wdata;

  // data memory
  logic [OFFS_W-1:0] dm_offset;
  logic              dm_we;
  logic [DATA_W-1:0] dm_wdata, dm_rdata;

  // stack
  logic              st_push, st_pop, st_full, st_empty;
  logic [PC_W-1:0]   st_push_data, st_top;

  // ALU bus
  alu_in_t  alu_in;
  alu_out_t alu_out;

  cc_eeprom #(.DEPTH(EE_DEPTH)) u_eeprom (
    .clk     (clk),
    .wr_en   (prog_we),
    .wr_addr (prog_addr),
    .wr_data (prog_data),
    .rd_addr (ee_addr),
    .rd_data (ee_data)
  );

  cc_pc #(.EE_AW(EE_AW)) u_pc (
    .clk       (clk),
    .rst       (rst),
    .inc       (pc_inc),
    .skip      (pc_skip),
    .load      (pc_load),
    .load_val  (pc_load_val),
    .pc        (pc),
    .byte_addr (pc_byte_addr)
  );

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rf_raddr[p]  = ctl_raddr[p];
      ctl_rdata[p] = rf_rdata[p];
    end
    rf_raddr[3] = dbg_reg_addr;
  end
  assign dbg_reg_data = rf_rdata[3];

  cc_regfile #(.NRD(4)) u_regfile (
    .clk     (clk),
    .rst     (rst),
    .rd_addr (rf_raddr),
    .rd_data (rf_rdata),
    .wr_en   (rf_we),
    .wr_addr (rf_waddr),
    .wr_data (rf_wdata)
  );

  cc_data_mem #(.NBANKS(NBANKS)) u_dmem (
    .clk        (clk),
    .bank       (bank_sel),
    .offset     (dm_offset),
    .wr_en      (dm_we),
    .wr_data    (dm_wdata),
    .rd_data    (dm_rdata),
    .dbg_bank   (dbg_mem_bank),
    .dbg_offset (dbg_mem_offset),
    .dbg_data   (dbg_mem_data)
  );

  cc_stack #(.DEPTH(STACK_DEPTH)) u_stack (
    .clk       (clk),
    .rst       (rst),
    .push      (st_push),
    .pop       (st_pop),
    .push_data (st_push_data),
    .top       (st_top),
    .stcnt     (stcnt),
    .full      (st_full),
    .empty     (st_empty),
    .overflow  (stack_overflow),
    .underflow (stack_underflow)
  );

  cc_alu u_alu (
    .in  (alu_in),
    .out (alu_out)
  );

  cc_controller #(.EE_AW(EE_AW), .NOP_DELAY(NOP_DELAY)) u_ctl (
    .clk          (clk),
    .rst          (rst),
    .ee_addr      (ee_addr),
    .ee_data      (ee_data),
    .pc           (pc),
    .pc_byte_addr (pc_byte_addr),
    .pc_inc       (pc_inc),
    .pc_skip      (pc_skip),
    .pc_load      (pc_load),
    .pc_load_val  (pc_load_val),
    .rf_raddr     (ctl_raddr),
    .rf_rdata     (ctl_rdata),
    .rf_we        (rf_we),
    .rf_waddr     (rf_waddr),
    .rf_wdata     (rf_wdata),
    .dm_offset    (dm_offset),
    .dm_we        (dm_we),
    .dm_wdata     (dm_wdata),
    .dm_rdata     (dm_rdata),
    .st_push      (st_push),
    .st_pop       (st_pop),
    .st_push_data (st_push_data),
    .st_top       (st_top),
    .alu_in       (alu_in),
    .alu_out      (alu_out),
    .flag_z       (flag_z),
    .flag_c       (flag_c),
    .ir           (ir),
    .done         (done),
    .in_delay     (in_delay)
  );

  assign alu_a    = alu_in.a;
  assign alu_b    = alu_in.b;
  assign alu_mode = alu_in.mode;
  assign alu_cin  = alu_in.cin;
  assign alu_y    = alu_out.y;
  assign alu_cout = alu_out.cout;
  assign alu_z    = alu_out.z;

endmodule
