// tb_mont_top: end-to-end test of the whole design at its default sizes:
// the 8-bit bit-serial multiplier (modulus 17) and the 1024-bit systolic
// multiplier (32 words of 32 bits), run concurrently, then one full 1024-bit
// modular exponentiation with a 1024-bit exponent. Products are checked
// against r < N and r * R == A * B (mod N); the exponentiation against
// square-and-multiply with ordinary % reduction. Each mechanism of the design
// is counted and must occur at least once: in the bit-serial core a quotient
// bit that adds the modulus, a zero bit of y that adds nothing, a final
// subtraction; in the systolic array several iterations in flight at once,
// a final subtraction and a result needing none; in the exponentiation both
// modes, the R^2 precomputation, squarings with and without a following
// multiplication.
module tb_mont_top;
  localparam int unsigned WIDTH = 8, MOD = 17, K = 32, M = 32;
  localparam int unsigned L = M * K;
  logic clk = 1'b0, reset;
  logic bs_start, bs_done, sy_start, sy_mode, sy_done, sy_busy;
  logic [WIDTH-1:0] bs_x, bs_y, bs_z;
  logic [L-1:0] sy_a, sy_b, sy_e, sy_n, sy_r;
  int checks = 0, failures = 0;
  int n_ui = 0, n_bzero = 0, n_bs_sub = 0, n_overlap = 0, n_sy_sub = 0, n_sy_nosub = 0;
  int n_mode_mul = 0, n_mode_exp = 0, n_pre = 0, n_sq_mul = 0, n_sq_skip = 0, n_muls = 0;

  mont_top dut (.clk, .reset,
                .bs_start, .bs_x, .bs_y, .bs_z, .bs_done,
                .sy_start, .sy_mode, .sy_a, .sy_b, .sy_e, .sy_n, .sy_r, .sy_done, .sy_busy);

  always #5 clk = ~clk;

  // mechanism counters, read from inside the design
  always @(posedge clk) begin
    if (!reset) begin
      if (dut.u_bitserial.u_core.step && dut.u_bitserial.u_core.ui) n_ui++;
      if (dut.u_bitserial.u_core.step && !dut.u_bitserial.u_core.b_shift[0]) n_bzero++;
      if (dut.u_bitserial.u_red.busy && dut.u_bitserial.u_red.ge) n_bs_sub++;
      if ($countones(dut.u_systolic.u_mul.v_o) > 1) n_overlap++;
      if (dut.u_systolic.u_mul.u_red.busy && dut.u_systolic.u_mul.u_red.ge) n_sy_sub++;
      if (dut.u_systolic.u_mul.red_start &&
          dut.u_systolic.u_mul.s_final < (L+K)'(dut.u_systolic.u_mul.n_r)) n_sy_nosub++;
      if (sy_start && !sy_busy) begin
        if (sy_mode) n_mode_exp++;
        else         n_mode_mul++;
      end
      if (dut.u_systolic.mul_start) n_muls++;
    end
  end

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] v;
    for (int i = 0; i < int'(L) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic int ref_bs(input int xi, yi);
    for (int c = 0; c < int'(MOD); c++) begin
      if (((c << WIDTH) % int'(MOD)) == ((xi * yi) % int'(MOD))) return c;
    end
    return -1;
  endfunction

  task automatic chk(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // bit-serial multiplications, run while the systolic one is busy
  task automatic bs_runs(input int count);
    for (int i = 0; i < count; i++) begin
      logic [WIDTH-1:0] xi, yi;
      xi = WIDTH'($urandom); yi = WIDTH'($urandom);
      @(negedge clk);
      bs_x = xi; bs_y = yi; bs_start = 1'b1;
      @(negedge clk);
      bs_start = 1'b0;
      while (!bs_done) @(negedge clk);
      chk($sformatf("bit-serial %0d * %0d", xi, yi), int'(bs_z) == ref_bs(int'(xi), int'(yi)));
    end
  endtask

  task automatic sy_run(input logic [L-1:0] ai, bi, ni);
    logic [3*L:0] lhs, rhs;
    int cycles;
    @(negedge clk);
    sy_a = ai; sy_b = bi; sy_n = ni; sy_mode = 1'b0; sy_start = 1'b1;
    @(negedge clk);
    sy_start = 1'b0;
    cycles = 1;
    fork
      bs_runs(3);
      while (!sy_done && cycles < 1000) begin
        @(negedge clk);
        cycles++;
      end
    join
    lhs = ((3*L+1)'(sy_r) << L) % (3*L+1)'(ni);
    rhs = ((3*L+1)'(ai) * (3*L+1)'(bi)) % (3*L+1)'(ni);
    chk("systolic result", lhs == rhs && sy_r < ni);
    // 3M + 6 cycles in the multiplier, one per final subtraction (at most
    // two here) and two for the mode controller around it
    chk("systolic latency", cycles >= 3 * int'(M) + 8 && cycles <= 3 * int'(M) + 10);
  endtask

  initial begin
    logic [L-1:0] nn, bb;
    reset = 1'b1; bs_start = 1'b0; sy_start = 1'b0;
    bs_x = '0; bs_y = '0; sy_a = '0; sy_b = '0; sy_e = '0; sy_n = '0; sy_mode = 1'b0;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    // the operands of the published 8-bit simulation: 0x50 * 0x47 mod 17 -> 2
    @(negedge clk);
    bs_x = 8'h50; bs_y = 8'h47; bs_start = 1'b1;
    @(negedge clk);
    bs_start = 1'b0;
    while (!bs_done) @(negedge clk);
    chk("0x50 * 0x47", bs_z == 8'd2);
    for (int i = 0; i < 8; i++) begin
      nn = rand_word();
      nn[0] = 1'b1;
      nn[L-1] = 1'b1;
      bb = rand_word();
      if (bb >= nn) bb = bb - nn;
      if (i % 2 == 1) bb = bb + ((nn - bb) >> 1) + nn / 2;
      sy_run(rand_word(), bb, nn);
    end
    // one full-size exponentiation
    begin
      logic [L-1:0] base, ex, expect_r;
      logic [2*L-1:0] acc, sq;
      int cycles;
      nn = rand_word();
      nn[0] = 1'b1;
      nn[L-1] = 1'b1;
      base = rand_word() % nn;
      ex = rand_word();
      acc = 1;
      sq = (2*L)'(base);
      for (int i = 0; i < int'(L); i++) begin
        if (ex[i]) acc = (acc * sq) % (2*L)'(nn);
        sq = (sq * sq) % (2*L)'(nn);
      end
      expect_r = L'(acc);
      @(negedge clk);
      sy_a = base; sy_b = '0; sy_e = ex; sy_n = nn; sy_mode = 1'b1; sy_start = 1'b1;
      @(negedge clk);
      sy_start = 1'b0;
      n_muls = 0;
      cycles = 1;
      while (!sy_done && cycles < 400000) begin
        @(negedge clk);
        cycles++;
      end
      // precomputation steps, and squarings with / without a multiplication
      n_pre     = int'(dut.u_systolic.pre_cnt);
      n_sq_mul  = n_muls - 3 - int'(L);
      n_sq_skip = int'(L) - n_sq_mul;
      chk("multiplication count", n_sq_mul == $countones(ex));
      chk("1024-bit exponentiation", sy_r == expect_r);
      $display("1024-bit exponentiation took %0d cycles", cycles);
    end
    $display("modulus added %0d, zero multiplier bits %0d, bit-serial subtractions %0d",
             n_ui, n_bzero, n_bs_sub);
    $display("cycles with overlapped iterations %0d, systolic subtractions %0d, results without subtraction %0d",
             n_overlap, n_sy_sub, n_sy_nosub);
    chk("quotient bit adds modulus", n_ui > 0);
    chk("zero multiplier bit", n_bzero > 0);
    chk("bit-serial final subtraction", n_bs_sub > 0);
    chk("systolic overlap", n_overlap > 0);
    chk("systolic final subtraction", n_sy_sub > 0);
    chk("systolic result without subtraction", n_sy_nosub > 0);
    $display("multiply mode %0d, exponentiation mode %0d, precomputation cycles %0d, squarings followed by a multiplication %0d, without %0d",
             n_mode_mul, n_mode_exp, n_pre, n_sq_mul, n_sq_skip);
    chk("multiply mode", n_mode_mul > 0);
    chk("exponentiation mode", n_mode_exp > 0);
    chk("R^2 precomputation", n_pre == 2 * int'(L));
    chk("square then multiply", n_sq_mul > 0);
    chk("square only", n_sq_skip > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
