// cc_data_mem: the banked data memory reached by LOD and STO.
//
// LOD and STO address memory with a 7-bit offset "in the selected bank"; the
// offset comes either from the instruction or from two registers. The bank
// is chosen by a separate bank-select input, since no instruction of the set
// changes it. The memory is NBANKS banks of 128 words of DATA_W bits,
// addressed as {bank, offset}. Reads are asynchronous (data follows the
// address in the same cycle), writes take effect at the rising clock edge.
// A second asynchronous read port gives a debug window on any word. The
// memory is not reset. Four banks match the microcontroller the computer was
// first built on; the four-bit word matches the registers, so LOD and STO
// move whole words.
module cc_data_mem
  import cc_pkg::*;
#(
  parameter int unsigned NBANKS = 4,
  parameter int unsigned BANK_W = (NBANKS > 1) ? $clog2(NBANKS) : 1
) (
  input  logic              clk,
  input  logic [BANK_W-1:0] bank,
  input  logic [OFFS_W-1:0] offset,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  output logic [DATA_W-1:0] rd_data,
  // debug read port
  input  logic [BANK_W-1:0] dbg_bank,
  input  logic [OFFS_W-1:0] dbg_offset,
  output logic [DATA_W-1:0] dbg_data
);

  localparam int unsigned WORDS = NBANKS << OFFS_W;

  logic [DATA_W-1:0] mem [WORDS];

  logic [BANK_W+OFFS_W-1:0] addr, dbg_addr;
  assign addr     = {bank, offset};
  assign dbg_addr = {dbg_bank, dbg_offset};

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr] <= wr_data;
  end

  assign rd_data  = mem[addr];
  assign dbg_data = mem[dbg_addr];

endmodule
