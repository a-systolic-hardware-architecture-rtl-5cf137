// tb_mont_mul32: the bit-serial multiplier at 32 bits, the operand width of
// the original 32-bit implementation, with the modulus 0xFFFFFFFB (an odd
// 32-bit modulus, 2^32 - 5). Random operands; z must satisfy z < m and
// z * 2^32 == x * y (mod m). Latency is WIDTH + 4 + floor(D/m), with D the
// unreduced core result, read from inside the design.
module tb_mont_mul32;
  localparam int unsigned WIDTH = 32;
  localparam logic [WIDTH-1:0] MOD = 32'hFFFF_FFFB;
  logic clk = 1'b0, reset, start, done;
  logic [WIDTH-1:0] x, y, z;
  int checks = 0, failures = 0;

  Montgomery_multiplier_modif #(.WIDTH(WIDTH), .MODULUS(MOD)) dut (
    .x, .y, .clk, .reset, .start, .z, .done);

  always #5 clk = ~clk;

  task automatic run_one(input logic [WIDTH-1:0] xi, yi);
    logic [127:0] lhs, rhs;
    int cycles;
    longint q;
    @(negedge clk);
    x = xi; y = yi; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1; q = 0;
    while (!done && cycles < 1000) begin
      if (dut.core_done) q = longint'(dut.d) / longint'(MOD);
      @(negedge clk);
      cycles++;
    end
    lhs = (128'(z) << WIDTH) % 128'(MOD);
    rhs = (128'(xi) * 128'(yi)) % 128'(MOD);
    checks++;
    if (lhs != rhs || z >= MOD) begin
      failures++;
      $display("FAIL %h * %h gave %h", xi, yi, z);
    end
    checks++;
    if (longint'(cycles) != longint'(WIDTH) + 4 + q) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    run_one('1, '1);
    run_one(MOD - 1, MOD - 1);
    run_one(32'd0, 32'd12345);
    for (int i = 0; i < 200; i++) run_one($urandom, $urandom);
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
