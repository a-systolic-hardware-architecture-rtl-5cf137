// sys_pe: processing element of the one-dimensional systolic Montgomery array.
//
// PE j owns word j of the multiplicand B (b_j) and of the modulus N (n_j). For
// outer iteration i it computes one k-bit column of S + a_i*B + q_i*N:
//     T = s_j + a_i*b_j + q_i*n_j + c_in        (2k+1 bits)
//     t_out <= T mod 2^k    -> becomes word j-1 of the next S (division by 2^k)
//     c_out <= T div 2^k    -> carry (k+1 bits) into PE j+1
// The first PE (FIRST=1) has no carry in and derives the quotient digit itself:
//     q_i = ((s_0 + a_i*b_0) * N') mod 2^k, so that T mod 2^k == 0.
// a_i and q_i are passed on to the next PE through registers, together with a
// valid bit, so the PE works only in the cycles its valid input is high and
// holds all its registers otherwise.
//
// Timing: one column per valid cycle; all outputs are registered, so each PE
// adds one cycle of delay along the array. clr (synchronous) zeroes t_out,
// c_out and the valid bit at the start of a multiplication (S_0 = 0).
// The column arithmetic is the per-word form of the published algorithm and
// the carries between neighbours follow its description of the array; the
// register placement and the valid bit are this design's.
module sys_pe #(
  parameter int unsigned K     = 32,
  parameter bit          FIRST = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         in_valid,
  input  logic [K-1:0] a_in,
  input  logic [K-1:0] q_in,     // unused when FIRST
  input  logic [K:0]   c_in,     // unused when FIRST
  input  logic [K-1:0] s_in,     // word j of the current S
  input  logic [K-1:0] b_j,
  input  logic [K-1:0] n_j,
  input  logic [K-1:0] nprime,   // used only when FIRST
  output logic         out_valid,
  output logic [K-1:0] a_out,
  output logic [K-1:0] q_out,
  output logic [K:0]   c_out,
  output logic [K-1:0] t_out
);
  logic [K-1:0]   q;
  logic [2*K-1:0] ab, qn;
  logic [2*K:0]   total;

  always_comb begin
    ab = (2*K)'(a_in) * (2*K)'(b_j);
    if (FIRST) begin
      q = K'((ab[K-1:0] + s_in) * nprime);
    end else begin
      q = q_in;
    end
    qn    = (2*K)'(q) * (2*K)'(n_j);
    total = (2*K+1)'(s_in) + (2*K+1)'(ab) + (2*K+1)'(qn)
          + (FIRST ? '0 : (2*K+1)'(c_in));
  end

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      out_valid <= 1'b0;
      a_out     <= '0;
      q_out     <= '0;
      c_out     <= '0;
      t_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        a_out <= a_in;
        q_out <= q;
        c_out <= total[2*K:K];
        t_out <= total[K-1:0];
      end
    end
  end

  // the first column must vanish mod 2^k, that is what q_i is chosen for
  always_ff @(posedge clk) begin
    if (FIRST && !rst && !clr && in_valid) begin
      assert (total[K-1:0] == '0) else $error("sys_pe: first column not divisible by 2^k");
    end
  end
endmodule
