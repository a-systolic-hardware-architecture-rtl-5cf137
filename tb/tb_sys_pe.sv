// tb_sys_pe: checks both kinds of processing element at K = 32.
// Inner PE: c_out:t_out == s + a*b + q*n + c_in, a and q forwarded, registers
// held while in_valid is low. First PE: q_out == ((s + a*b0) * N') mod 2^K
// with N' = -n0^-1 mod 2^K computed here bit by bit (not by Newton
// iteration), and the low word t_out of the column is zero.
module tb_sys_pe;
  localparam int unsigned K = 32;
  logic clk = 1'b0, rst, clr;
  logic         vin;
  logic [K-1:0] a, q, s, bj, nj, np;
  logic [K:0]   c;
  logic         v0, v1;
  logic [K-1:0] a0, q0, t0, a1, q1, t1;
  logic [K:0]   c0, c1;
  int checks = 0, failures = 0;

  sys_pe #(.K(K), .FIRST(1'b1)) dut_first (
    .clk, .rst, .clr, .in_valid(vin), .a_in(a), .q_in(q), .c_in(c), .s_in(s),
    .b_j(bj), .n_j(nj), .nprime(np),
    .out_valid(v0), .a_out(a0), .q_out(q0), .c_out(c0), .t_out(t0));
  sys_pe #(.K(K), .FIRST(1'b0)) dut_inner (
    .clk, .rst, .clr, .in_valid(vin), .a_in(a), .q_in(q), .c_in(c), .s_in(s),
    .b_j(bj), .n_j(nj), .nprime(np),
    .out_valid(v1), .a_out(a1), .q_out(q1), .c_out(c1), .t_out(t1));

  always #5 clk = ~clk;

  function automatic logic [K-1:0] inv_bitwise(input logic [K-1:0] n);
    logic [K-1:0] y;
    y = 1;
    for (int i = 1; i < int'(K); i++) begin
      logic [K-1:0] p;
      p = n * y;
      if (p[i]) y = y + (K'(1) << i);
    end
    return y;
  endfunction

  task automatic chk(input string what, input logic [127:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [2*K:0] tot;
    logic [K-1:0] qe;
    logic [K-1:0] old_t1;
    rst = 1'b1; clr = 1'b0; vin = 1'b0;
    {a, q, s, bj, nj, np} = '0; c = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = $urandom; q = $urandom; s = $urandom; bj = $urandom;
      nj = $urandom | 1; c = {1'($urandom), K'($urandom)};
      if (i < 4) begin a = '1; q = '1; s = '1; bj = '1; nj = '1; c = '1; end
      np = -inv_bitwise(nj);
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      // inner PE
      tot = (2*K+1)'(s) + (2*K+1)'(a) * (2*K+1)'(bj) + (2*K+1)'(q) * (2*K+1)'(nj) + (2*K+1)'(c);
      chk("inner valid", 128'(v1), 128'(1));
      chk("inner t", 128'(t1), 128'(tot[K-1:0]));
      chk("inner c", 128'(c1), 128'(tot[2*K:K]));
      chk("inner a,q", {64'(a1), 64'(q1)}, {64'(a), 64'(q)});
      // first PE
      qe  = K'((s + a * bj) * np);
      tot = (2*K+1)'(s) + (2*K+1)'(a) * (2*K+1)'(bj) + (2*K+1)'(qe) * (2*K+1)'(nj);
      chk("first q", 128'(q0), 128'(qe));
      chk("first t zero", 128'(t0), 128'(0));
      chk("first c", 128'(c0), 128'(tot[2*K:K]));
      // hold while not valid
      old_t1 = t1;
      s = ~s;
      @(negedge clk);
      chk("hold", 128'({v1, t1}), 128'({1'b0, old_t1}));
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    chk("clear", 128'({c1, t1, c0, t0}), 128'(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
