// tb_mont_exp: modular exponentiation and single multiplication on a 128-bit
// systolic multiplier (K = 32, M = 4) with a 24-bit exponent. The reference
// exponentiation is computed here by right-to-left square-and-multiply with
// ordinary % reduction; the multiplication result is checked by
// r < N and r * R == A * B (mod N). Also checks that an exponentiation takes
// 3 + EW + popcount(e) multiplications.
module tb_mont_exp;
  localparam int unsigned K = 32, M = 4, EW = 24;
  localparam int unsigned L = K * M;
  logic clk = 1'b0, rst, start, mode, done, busy;
  logic [L-1:0] a, b, n, r;
  logic [EW-1:0] e;
  int checks = 0, failures = 0, muls = 0;

  mont_exp #(.K(K), .M(M), .EW(EW)) dut (.clk, .rst, .start, .mode, .a, .b, .e, .n, .r, .done, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) if (dut.mul_start) muls++;

  function automatic logic [L-1:0] rand_word();
    logic [L-1:0] v;
    for (int i = 0; i < int'(L) / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [L-1:0] ref_pow(input logic [L-1:0] base, input logic [EW-1:0] ex,
                                           input logic [L-1:0] md);
    logic [2*L-1:0] acc, sq;
    acc = (2*L)'(1) % (2*L)'(md);
    sq  = (2*L)'(base) % (2*L)'(md);
    for (int i = 0; i < int'(EW); i++) begin
      if (ex[i]) acc = (acc * sq) % (2*L)'(md);
      sq = (sq * sq) % (2*L)'(md);
    end
    return L'(acc);
  endfunction

  task automatic run(input logic md, input logic [L-1:0] ai, bi, ni, input logic [EW-1:0] ei);
    logic [3*L:0] lhs, rhs;
    int cyc;
    @(negedge clk);
    mode = md; a = ai; b = bi; n = ni; e = ei; start = 1'b1;
    muls = 0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (md) begin
      if (r != ref_pow(ai, ei, ni)) begin
        failures++;
        $display("FAIL pow a=%h e=%h n=%h r=%h expected %h", ai, ei, ni, r, ref_pow(ai, ei, ni));
      end
      checks++;
      if (muls != 3 + int'(EW) + $countones(ei)) begin
        failures++;
        $display("FAIL %0d multiplications, expected %0d", muls, 3 + int'(EW) + $countones(ei));
      end
    end else begin
      lhs = ((3*L+1)'(r) << L) % (3*L+1)'(ni);
      rhs = ((3*L+1)'(ai) * (3*L+1)'(bi)) % (3*L+1)'(ni);
      if (lhs != rhs || r >= ni) begin
        failures++;
        $display("FAIL mul a=%h b=%h n=%h r=%h", ai, bi, ni, r);
      end
    end
  endtask

  initial begin
    logic [L-1:0] nn;
    rst = 1'b1; start = 1'b0; mode = 1'b0; a = '0; b = '0; n = '0; e = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    run(1'b1, 128'd4, 128'd0, 128'd497, 24'd13);      // 4^13 mod 497 = 445
    checks++;
    if (r != 128'd445) begin
      failures++;
      $display("FAIL 4^13 mod 497 = %0d", r);
    end
    run(1'b1, 128'd7, 128'd0, 128'd65537, 24'd0);     // x^0 = 1
    run(1'b1, 128'd5, 128'd0, 128'd3, '1);
    for (int i = 0; i < 6; i++) begin
      nn = rand_word();
      nn[0] = 1'b1;
      nn[L-1] = 1'b1;
      run(1'b1, rand_word() % nn, '0, nn, EW'($urandom));
      run(1'b0, rand_word(), rand_word() % nn, nn, '0);
    end
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
