// csa: carry-save adder (3:2 compressor), W bits wide.
//
// Adds three vectors without propagating carries: for every bit position the
// sum bit is the XOR of the three inputs and the carry bit their majority, so
// x + y + z == sum + (carry << 1). The carry vector is returned unshifted; the
// caller places it one position up. Purely combinational, no clock.
// The block is the "CSA" box of the bit-serial Montgomery datapath; the
// bitwise full-adder form is the standard one, not something the design
// description spells out.
module csa #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (x & z) | (y & z);
  end
endmodule
