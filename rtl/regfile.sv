// regfile: register file of 32 registers of 32 bits, two read ports and
// one write port.
//
// RA selects the register driven on busA and RB the one driven on busB;
// reading is combinational. When Write Enable is 1, the register selected
// by RW takes busW at the active clock edge (the falling edge of clk, as the
// symbol's clock bubble shows), so an instruction can read two registers
// and write a third in one cycle. Register 0 always reads as zero and
// ignores writes (the MIPS convention for $zero; this design's choice).
// Registers are not reset.
module regfile
  import mipslite_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                we,
  input  logic [REG_BITS-1:0] rw,
  input  logic [REG_BITS-1:0] ra,
  input  logic [REG_BITS-1:0] rb,
  input  logic [W-1:0]        busw,
  output logic [W-1:0]        busa,
  output logic [W-1:0]        busb
);

  logic [W-1:0] regs [NREGS];

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end

  always_ff @(negedge clk) begin
    if (we && (rw != '0))
      regs[rw] <= busw;
  end

endmodule
