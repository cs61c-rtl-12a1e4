// ideal_mem: idealized word memory with one input bus and one output bus.
//
// Address selects the word driven on Data Out; reading is combinational
// (Data Out follows Address after the access time). With Write Enable = 1
// the word at Address takes Data In at the active clock edge; the clock
// matters only for writes. The clock input carries an inversion bubble in
// the memory symbol, so writes happen on the falling edge of clk.
// Address is a byte address; the memory holds 2**ADDR_BITS 32-bit words
// indexed by address bits [ADDR_BITS+1:2]. Bits 1:0 and the bits above
// the word index are ignored, so the array repeats through the address
// space. Depth and this address decoding are this design's choices.
// Contents are not reset.
module ideal_mem #(
  parameter int unsigned ADDR_BITS = 10,
  parameter int unsigned W         = 32
) (
  input  logic         clk,
  input  logic         we,
  input  logic [31:0]  addr,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned DEPTH = 1 << ADDR_BITS;

  logic [W-1:0]         mem [DEPTH];
  logic [ADDR_BITS-1:0] idx;

  always_comb begin
    idx  = addr[ADDR_BITS+1:2];
    dout = mem[idx];
  end

  always_ff @(negedge clk) begin
    if (we)
      mem[idx] <= din;
  end

endmodule
