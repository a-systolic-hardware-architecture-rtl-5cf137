// mont_bitserial: radix-2 Montgomery multiplier with one-bit scanning of B.
//
// Computes D == A * B * 2^-W (mod m) for an odd modulus m, one bit of B per
// clock cycle, without any carry propagation inside the loop:
//   - a shift register holds B and presents b_i, LSB first;
//   - MUX1 selects 0 or A by b_i, MUX2 selects 0 or m by the quotient bit U_i
//     from the control logic;
//   - the first CSA adds the m term to the accumulator pair (S, C), the second
//     CSA adds the A term; the result is even by choice of U_i and is halved
//     by wiring (sum shifted right, carry left in place) into the S_sig and
//     C_sig registers;
//   - after W iterations a ripple-carry adder forms D = S + C.
// D is congruent to A*B*2^-W mod m but only bounded by D < A + m (with A, B
// below 2^W); a final reduction is left to the caller.
//
// Interface: pulse start with A, B, m valid (A is sampled every cycle and must
// stay stable during the run; B is loaded at start). done pulses one cycle
// W+1 cycles after start; d stays valid until the next start.
// Structure (two CSAs, S_sig/C_sig, MUXes, shift register, RCA) follows the
// block diagram; the register width W+2 and the handshake are this design's.
module mont_bitserial #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] m,
  output logic [W:0]   d,
  output logic         done,
  output logic         busy
);
  localparam int unsigned V = W + 2;   // S + C < A + m < 2^(W+1), plus headroom

  logic [W-1:0] b_shift;
  logic [V-1:0] s_sig, c_sig;
  logic [V-1:0] mux1, mux2;
  logic [V-1:0] s1, k1, s2, k2;
  logic         load, step, ui;
  logic [V-1:0] d_full;
  logic         d_cout;

  mont_ctrl #(.W(W)) u_ctrl (
    .clk, .rst, .start,
    .bi(b_shift[0]), .s0(s_sig[0]), .c0(c_sig[0]), .a0(a[0]),
    .load, .step, .ui, .done, .busy
  );

  always_comb begin
    mux1 = b_shift[0] ? V'(a) : '0;
    mux2 = ui         ? V'(m) : '0;
  end

  // upper CSA: accumulator plus U_i*m
  csa #(.W(V)) u_csa_m (.x(s_sig), .y(c_sig), .z(mux2), .sum(s1), .carry(k1));
  // lower CSA: plus b_i*A
  csa #(.W(V)) u_csa_a (.x(s1), .y({k1[V-2:0], 1'b0}), .z(mux1), .sum(s2), .carry(k2));

  always_ff @(posedge clk) begin
    if (rst) begin
      b_shift <= '0;
      s_sig   <= '0;
      c_sig   <= '0;
    end else if (load) begin
      b_shift <= b;
      s_sig   <= '0;
      c_sig   <= '0;
    end else if (step) begin
      b_shift <= b_shift >> 1;
      // (s2 + 2*k2) is even: s2[0] == 0, halve it by shifting the sum only
      s_sig   <= {1'b0, s2[V-1:1]};
      c_sig   <= k2;
    end
  end

  rca #(.W(V)) u_rca (.x(s_sig), .y(c_sig), .cin(1'b0), .s(d_full), .cout(d_cout));

  assign d = d_full[W:0];

  // the final sum never needs more than W+1 bits
  always_ff @(posedge clk) begin
    if (!rst && step) begin
      assert (s2[0] == 1'b0 && k1[V-1] == 1'b0) else $error("mont_bitserial: odd or overflowing sum");
    end
    if (!rst && done) begin
      assert (!d_cout && d_full[V-1] == 1'b0) else $error("mont_bitserial: result overflow");
    end
  end
endmodule
