// rca: ripple-carry adder, W bits, with carry out.
//
// The carry runs bit by bit from the LSB through a chain of full adders, so
// the delay grows with W; it is used only once per multiplication, to turn
// the carry-save pair (S, C) of the bit-serial Montgomery multiplier into the
// binary result D. Combinational: s = x + y + cin, cout is the carry out.
module rca #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = x[i] ^ y[i] ^ c[i];
    assign c[i+1] = (x[i] & y[i]) | (x[i] & c[i]) | (y[i] & c[i]);
  end
  assign cout = c[W];
endmodule
