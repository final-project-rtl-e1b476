// cc_regfile: the sixteen four-bit general registers R0..R15.
//
// An instruction names a register with a 4-bit field; in the original
// microcontroller build these are sixteen spare file registers placed at a
// fixed offset so programs cannot touch system registers. Here they are a
// register array of their own. The file has NRD asynchronous read ports
// (the sequencer needs up to three at once: for example STO @Ra,Rb reads
// Ra, Ra+1 and Rb; a further port serves as a debug window) and one write
// port that takes effect at the rising clock edge. Reset clears every
// register to zero; the design does not say what the registers hold after
// power-up, so that is this design's choice.
module cc_regfile
  import cc_pkg::*;
#(
  parameter int unsigned NRD = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [$clog2(NREGS)-1:0]   rd_addr [NRD],
  output logic [DATA_W-1:0]          rd_data [NRD],
  input  logic                       wr_en,
  input  logic [$clog2(NREGS)-1:0]   wr_addr,
  input  logic [DATA_W-1:0]          wr_data
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) rd_data[p] = regs[rd_addr[p]];
  end

endmodule
