// mont_exp: modular exponentiation (left-to-right binary square-and-multiply)
// and single Montgomery multiplication on the systolic multiplier sys_mont.
//
// mode = 0 (MUL): r = a * b * R^-1 mod n, one pass through sys_mont.
// mode = 1 (EXP): r = a^e mod n, computed in the Montgomery domain:
//   1. R^2 mod n by doubling 1 with a conditional subtraction of n, 2*K*M
//      times (one cycle each);
//   2. abar = MonMul(a, R^2) = a*R mod n,  x = MonMul(1, R^2) = R mod n;
//   3. for every exponent bit from the MSB down: x = MonMul(x, x), and if
//      the bit is 1, x = MonMul(x, abar);
//   4. r = MonMul(x, 1) leaves the Montgomery domain.
// All products handed to sys_mont are already below n, which meets its
// operand bounds (A < R, B < 2N).
//
// Interface: pulse start with mode, a, b, e, n valid (latched). done pulses for
// one cycle with r valid; r holds until the next result. busy is high from
// start to done. n must be odd.
// Timing (EXP): 2*K*M + 2 cycles of precomputation plus (3 + EW + number of
// one bits of e) multiplications of about 3M + 7 cycles each.
// The source publication states that modular exponentiation is done by successive
// multiplications with the left-to-right (MSB first) binary square-and-
// multiply method; the Montgomery-domain conversion, the R^2 precomputation
// and the mode input are this design's.
module mont_exp #(
  parameter int unsigned K  = 32,
  parameter int unsigned M  = 32,
  parameter int unsigned EW = K * M    // exponent width
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           mode,   // 0: multiply, 1: exponentiate
  input  logic [K*M-1:0] a,
  input  logic [K*M-1:0] b,
  input  logic [EW-1:0]  e,
  input  logic [K*M-1:0] n,
  output logic [K*M-1:0] r,
  output logic           done,
  output logic           busy
);
  localparam int unsigned L = K * M;

  typedef enum logic [3:0] {IDLE, MULONLY, PRE, TO_M, TO_ONE, SQR, MUL, FROM, FIN} state_t;
  state_t state;

  logic [L-1:0]  a_r, b_r, n_r, r2, abar, xbar;
  logic [EW-1:0] e_r;
  logic [$clog2(2*L+1)-1:0] pre_cnt;
  logic [$clog2(EW)-1:0]    bit_idx;
  logic                     issued;
  logic [L:0]               dbl;

  logic           mul_start, mul_done, mul_busy;
  logic [L-1:0]   op_a, op_b, mul_r;

  sys_mont #(.K(K), .M(M)) u_mul (
    .clk, .rst, .start(mul_start), .a(op_a), .b(op_b), .n(n_r),
    .r(mul_r), .done(mul_done), .busy(mul_busy)
  );

  // operand selection for the current step
  always_comb begin
    op_a = xbar;
    op_b = xbar;
    unique case (state)
      MULONLY: begin op_a = a_r;       op_b = b_r;  end
      TO_M:    begin op_a = a_r;       op_b = r2;   end
      TO_ONE:  begin op_a = L'(1);     op_b = r2;   end
      SQR:     begin op_a = xbar;      op_b = xbar; end
      MUL:     begin op_a = xbar;      op_b = abar; end
      FROM:    begin op_a = xbar;      op_b = L'(1); end
      default: ;
    endcase
  end

  logic mul_step;
  assign mul_step  = (state == MULONLY) || (state == TO_M) || (state == TO_ONE) ||
                     (state == SQR) || (state == MUL) || (state == FROM);
  assign mul_start = mul_step && !issued;
  assign dbl       = {r2, 1'b0};

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      issued  <= 1'b0;
      a_r     <= '0;
      b_r     <= '0;
      e_r     <= '0;
      n_r     <= '0;
      r2      <= '0;
      abar    <= '0;
      xbar    <= '0;
      r       <= '0;
      pre_cnt <= '0;
      bit_idx <= '0;
    end else begin
      if (mul_start) issued <= 1'b1;
      unique case (state)
        IDLE: if (start) begin
          a_r     <= a;
          b_r     <= b;
          e_r     <= e;
          n_r     <= n;
          r2      <= L'(1);
          pre_cnt <= '0;
          bit_idx <= $clog2(EW)'(EW - 1);
          state   <= mode ? PRE : MULONLY;
        end
        MULONLY: if (issued && mul_done) begin
          r      <= mul_r;
          issued <= 1'b0;
          state  <= FIN;
        end
        PRE: begin
          // r2 <- 2*r2 mod n; after 2L steps r2 = 2^(2L) mod n = R^2 mod n
          r2      <= (dbl >= (L+1)'(n_r)) ? L'(dbl - (L+1)'(n_r)) : L'(dbl);
          pre_cnt <= pre_cnt + 1'b1;
          if (pre_cnt == $bits(pre_cnt)'(2 * L - 1)) state <= TO_M;
        end
        TO_M: if (issued && mul_done) begin
          abar   <= mul_r;
          issued <= 1'b0;
          state  <= TO_ONE;
        end
        TO_ONE: if (issued && mul_done) begin
          xbar   <= mul_r;
          issued <= 1'b0;
          state  <= SQR;
        end
        SQR: if (issued && mul_done) begin
          xbar   <= mul_r;
          issued <= 1'b0;
          if (e_r[bit_idx])        state <= MUL;
          else if (bit_idx == '0)  state <= FROM;
          else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= SQR;
          end
        end
        MUL: if (issued && mul_done) begin
          xbar   <= mul_r;
          issued <= 1'b0;
          if (bit_idx == '0) state <= FROM;
          else begin
            bit_idx <= bit_idx - 1'b1;
            state   <= SQR;
          end
        end
        FROM: if (issued && mul_done) begin
          r      <= mul_r;
          issued <= 1'b0;
          state  <= FIN;
        end
        FIN:     state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign done = (state == FIN);
  assign busy = (state != IDLE);

  // a new multiplication is only issued when the multiplier is idle
  always_ff @(posedge clk) begin
    if (!rst && mul_start) begin
      assert (!mul_busy) else $error("mont_exp: multiplier started while busy");
    end
  end
endmodule
