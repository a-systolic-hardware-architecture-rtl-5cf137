// tb_mont_bitserial: random operands and odd moduli for the bit-serial
// carry-save Montgomery core. Checks D * 2^W == A * B (mod m), the bound
// D < A + m, and the latency: done W+1 cycles after start.
module tb_mont_bitserial;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst, start;
  logic [W-1:0] a, b, m;
  logic [W:0] d;
  logic done, busy;
  int checks = 0, failures = 0;

  mont_bitserial #(.W(W)) dut (.clk, .rst, .start, .a, .b, .m, .d, .done, .busy);

  always #5 clk = ~clk;

  task automatic run_one(input logic [W-1:0] ai, bi, mi);
    int cycles;
    longint lhs, rhs;
    @(negedge clk);
    a = ai; b = bi; m = mi; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    lhs = (longint'(d) << W) % longint'(mi);
    rhs = (longint'(ai) * longint'(bi)) % longint'(mi);
    checks++;
    if (lhs != rhs || longint'(d) >= longint'(ai) + longint'(mi)) begin
      failures++;
      $display("FAIL a=%0d b=%0d m=%0d d=%0d", ai, bi, mi, d);
    end
    checks++;
    if (cycles != W + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, W + 1);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; b = '0; m = 8'd17;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    run_one(8'h50, 8'h47, 8'h11);
    run_one(8'hff, 8'hff, 8'hff);
    run_one(8'hff, 8'hff, 8'h01);
    run_one(8'h00, 8'hff, 8'h11);
    for (int i = 0; i < 300; i++) begin
      run_one(W'($urandom), W'($urandom), W'($urandom) | W'(1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
