// sys_mont: word-level systolic Montgomery modular multiplier, radix 2^K.
//
// Computes r = A * B * R^-1 mod N with R = 2^(K*M), for an odd modulus N < R,
// A < R and B < 2N (default: 1024-bit operands in M = 32 words of K = 32 bits).
// Each outer iteration i of the algorithm
//     q_i     = ((S_0 + a_i*b_0) * N') mod 2^K,   N' = -N^-1 mod 2^K
//     S_{i+1} = (S_i + q_i*N + a_i*B) / 2^K
// is spread over a one-dimensional array of M+1 processing elements (sys_pe):
// PE j handles word j of B, N and S. The first PE computes q_i; a_i and q_i
// then travel one PE per cycle to the right together with the column carries,
// while each PE hands its low word to its left neighbour as word j-1 of the
// next S (the division by 2^K). The extra PE M holds the top word of S, which
// may exceed R while the loop runs (S < N + B). A new a_i enters every second
// cycle (sys_ctrl), so M iterations overlap in the array. After the last
// iteration leaves PE M, mod_reduce subtracts N until the result is below N
// (at most two subtractions when B < 2N).
//
// Interface: pulse start with a, b, n valid (they are latched); done pulses for
// one cycle when r is valid, and r holds until the next result. busy is high
// from start to done. Latency: 3M + 6 cycles plus one per final subtraction.
// The 1-D array of PEs with carries passed between neighbours, the word size
// and the word count follow the source publication; the extra top PE, N' computed in
// hardware, the schedule and the final reduction are this design's choices.
module sys_mont
  import mont_pkg::*;
#(
  parameter int unsigned K = 32,
  parameter int unsigned M = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [M*K-1:0] a,
  input  logic [M*K-1:0] b,
  input  logic [M*K-1:0] n,
  output logic [M*K-1:0] r,
  output logic           done,
  output logic           busy
);
  localparam int unsigned E = M + 1;    // processing elements

  logic [M*K-1:0] a_r, b_r, n_r;
  logic [K-1:0]   nprime_r;

  logic load, clr, feed_valid, red_start, red_done, red_busy;
  logic [$clog2(M)-1:0] idx;

  logic [E-1:0]       v_o;
  logic [K-1:0]       a_o [E];
  logic [K-1:0]       q_o [E];
  logic [K:0]         c_o [E];
  logic [K-1:0]       t_o [E];
  logic [(M+1)*K-1:0] s_final;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_r      <= '0;
      b_r      <= '0;
      n_r      <= '0;
      nprime_r <= '0;
    end else if (load) begin
      a_r      <= a;
      b_r      <= b;
      n_r      <= n;
      nprime_r <= K'(neg_inv_word(MAX_WORD'(n[K-1:0])));
    end
  end

  sys_ctrl #(.M(M)) u_ctrl (
    .clk, .rst, .start, .last_valid(v_o[E-1]), .red_done,
    .load, .clr, .feed_valid, .idx, .red_start, .done, .busy
  );

  for (genvar j = 0; j < E; j++) begin : g_pe
    logic [K-1:0] bj, nj, sj, aj, qj;
    logic [K:0]   cj;
    logic         vj;
    if (j < M) begin : g_word
      assign bj = b_r[j*K +: K];
      assign nj = n_r[j*K +: K];
    end else begin : g_top
      assign bj = '0;
      assign nj = '0;
    end
    if (j == 0) begin : g_in0
      assign vj = feed_valid;
      assign aj = a_r[idx*K +: K];
      assign qj = '0;
      assign cj = '0;
    end else begin : g_inj
      assign vj = v_o[j-1];
      assign aj = a_o[j-1];
      assign qj = q_o[j-1];
      assign cj = c_o[j-1];
    end
    if (j < E - 1) begin : g_s
      assign sj = t_o[j+1];
    end else begin : g_stop
      assign sj = c_o[j][K-1:0];
    end

    sys_pe #(.K(K), .FIRST(j == 0)) u_pe (
      .clk, .rst, .clr,
      .in_valid(vj), .a_in(aj), .q_in(qj), .c_in(cj), .s_in(sj),
      .b_j(bj), .n_j(nj), .nprime(nprime_r),
      .out_valid(v_o[j]), .a_out(a_o[j]), .q_out(q_o[j]),
      .c_out(c_o[j]), .t_out(t_o[j])
    );

    if (j > 0) begin : g_res
      assign s_final[(j-1)*K +: K] = t_o[j];
    end
  end
  assign s_final[M*K +: K] = c_o[E-1][K-1:0];

  mod_reduce #(.W((M+1)*K), .NW(M*K)) u_red (
    .clk, .rst, .start(red_start), .x(s_final), .n(n_r),
    .r, .done(red_done), .busy(red_busy)
  );

  // the top word of S never carries out (S < N + B < 3R)
  always_ff @(posedge clk) begin
    if (!rst && red_start) begin
      assert (!red_busy) else $error("sys_mont: reduction restarted while busy");
    end
    if (!rst && v_o[E-1]) begin
      assert (c_o[E-1][K] == 1'b0) else $error("sys_mont: S overflow");
    end
  end
endmodule
