// cc_eeprom: byte-wide program memory of the custom computer.
//
// Holds the machine code, two bytes per 16-bit instruction: the byte at
// address 2*PC is the instruction's upper half (opcode and first operand),
// the byte at 2*PC+1 its lower half. The memory is read one byte at a time,
// as the design specifies, through a synchronous read port: the byte at
// rd_addr appears on rd_data one clock later. A separate write port stands
// for the device programmer that fills the memory before a run; a write
// takes effect at the clock edge. The array starts in the erased state,
// every byte 0xFF, which is what an unprogrammed location reads as.
// Size: DEPTH bytes (256 by default, addresses 0x00..0xFF). The single-cycle
// read and write are this design's choice; a real EEPROM is much slower to
// write and the sequencer does not write it.
module cc_eeprom #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // programming port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data,
  // read port used by the fetch sequence
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [7:0]        rd_data
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'hFF;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
