// One-bit-wide interleaver buffer RAM.
//
// Holds both halves of one double buffer (DEPTH = 2 x 192 bits). It has one
// write port and one read port, each one bit wide, so one bit can be written
// into the half being filled while one bit is read from the half being
// drained. The read is registered: dout is valid the cycle after re.
// The memory is a plain array so synthesis can place it in distributed
// (LUT) RAM or a block RAM. Contents are not reset; every location is
// written before it is read.
module ilv_bit_ram #(
  parameter int unsigned DEPTH = 384,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] w_addr,
  input  logic          din,
  input  logic          re,
  input  logic [AW-1:0] r_addr,
  output logic          dout
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[w_addr] <= din;
    if (re) dout <= mem[r_addr];
  end
endmodule
