// mont_top: the two Montgomery modular multipliers of this design side by side.
//
//   bs_*  WIDTH-bit bit-serial multiplier (Montgomery_multiplier_modif):
//         z = x*y*2^-WIDTH mod MODULUS, one bit of y per cycle, carry-save
//         accumulation, WIDTH = 8 and MODULUS = 17 by default.
//   sy_*  word-level systolic multiplier (sys_mont) behind the exponentiation
//         controller mont_exp: with sy_mode = 0, r = a*b*2^-(K*M) mod n; with
//         sy_mode = 1, r = a^e mod n by left-to-right square-and-multiply.
//         1024-bit operands as M = 32 words of K = 32 bits by default, a 1-D
//         array of M+1 processing elements.
// The two share only the clock and the synchronous, active-high reset; each
// has its own start/done handshake (see the two modules for the timing).
// Both multipliers come from the source publication; placing them side by side
// with separate ports, and the port names, are this design's choices.
module mont_top #(
  parameter int unsigned       WIDTH   = 8,
  parameter logic [WIDTH-1:0]  MODULUS = WIDTH'(17),
  parameter int unsigned       K       = 32,
  parameter int unsigned       M       = 32
) (
  input  logic             clk,
  input  logic             reset,
  // bit-serial multiplier
  input  logic             bs_start,
  input  logic [WIDTH-1:0] bs_x,
  input  logic [WIDTH-1:0] bs_y,
  output logic [WIDTH-1:0] bs_z,
  output logic             bs_done,
  // systolic multiplier
  input  logic             sy_start,
  input  logic             sy_mode,   // 0: multiply, 1: exponentiate
  input  logic [M*K-1:0]   sy_a,
  input  logic [M*K-1:0]   sy_b,
  input  logic [M*K-1:0]   sy_e,
  input  logic [M*K-1:0]   sy_n,
  output logic [M*K-1:0]   sy_r,
  output logic             sy_done,
  output logic             sy_busy
);
  Montgomery_multiplier_modif #(.WIDTH(WIDTH), .MODULUS(MODULUS)) u_bitserial (
    .x(bs_x), .y(bs_y), .clk, .reset, .start(bs_start), .z(bs_z), .done(bs_done)
  );

  mont_exp #(.K(K), .M(M), .EW(K*M)) u_systolic (
    .clk, .rst(reset), .start(sy_start), .mode(sy_mode),
    .a(sy_a), .b(sy_b), .e(sy_e), .n(sy_n),
    .r(sy_r), .done(sy_done), .busy(sy_busy)
  );
endmodule
