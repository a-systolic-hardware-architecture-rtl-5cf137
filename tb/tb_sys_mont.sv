// tb_sys_mont: the systolic multiplier at K = 32, M = 4 (128-bit operands).
// Random odd moduli with the top bit set, A < R, B < 2N. The reference is
// independent of the Montgomery loop: r must satisfy r < N and
// r * R == A * B (mod N), which fixes r because R is invertible mod N.
// Also checks the latency 3M + 6 + floor(S/N) cycles from start to done,
// where S is the unreduced array result.
module tb_sys_mont;
  localparam int unsigned K = 32, M = 4;
  localparam int unsigned L = M * K;
  logic clk = 1'b0, rst, start;
  logic [L-1:0] a, b, n, r;
  logic done, busy;
  int checks = 0, failures = 0, subtracted = 0;

  sys_mont #(.K(K), .M(M)) dut (.clk, .rst, .start, .a, .b, .n, .r, .done, .busy);

  always #5 clk = ~clk;

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] v;
    for (int i = 0; i < int'(L) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic run_one(input logic [L-1:0] ai, bi, ni);
    int cycles, q;
    logic [3*L:0] lhs, rhs;
    @(negedge clk);
    a = ai; b = bi; n = ni; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0; n = '0;   // operands are latched at start
    cycles = 1; q = 0;
    while (!done && cycles < 2000) begin
      if (dut.red_start) q = int'(dut.s_final / (3*L+1)'(ni));
      @(negedge clk);
      cycles++;
    end
    if (q > 0) subtracted++;
    lhs = ((3*L+1)'(r) << L) % (3*L+1)'(ni);
    rhs = ((3*L+1)'(ai) * (3*L+1)'(bi)) % (3*L+1)'(ni);
    checks++;
    if (lhs != rhs || r >= ni) begin
      failures++;
      $display("FAIL a=%h b=%h n=%h r=%h", ai, bi, ni, r);
    end
    checks++;
    if (cycles != 3 * int'(M) + 6 + q) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles, 3 * int'(M) + 6 + q);
    end
  endtask

  initial begin
    logic [L-1:0] nn, bb;
    rst = 1'b1; start = 1'b0; a = '0; b = '0; n = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    nn = '1;
    run_one('1, nn - 1, nn);
    run_one('0, '0, nn);
    for (int i = 0; i < 60; i++) begin
      nn = rand_word();
      nn[0] = 1'b1;
      nn[L-1] = 1'b1;
      bb = rand_word();
      if (bb >= nn) bb = bb - nn;
      if (i % 2 == 1) bb = bb + ((nn - bb) >> 1) + nn / 2;   // some B in [N, 2N)
      run_one(rand_word(), bb, nn);
    end
    // small modulus in a wide word
    run_one(rand_word(), 128'd12345, 128'd65537);
    checks++;
    if (subtracted == 0) begin
      failures++;
      $display("FAIL final subtraction never exercised");
    end
    $display("final subtractions in %0d of the multiplications", subtracted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
