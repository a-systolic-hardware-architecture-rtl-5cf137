// tb_Montgomery_multiplier_modif: the 8-bit multiplier with modulus 17.
// Starts with the operands x = 0x50, y = 0x47 (expected z = 2, since
// 2^8 == 1 mod 17 the Montgomery product equals x*y mod 17), then all
// corner values and random operands. The reference is the unique z < 17 with
// z * 2^8 == x * y (mod 17). Also checks the latency WIDTH + 4 + floor(D/17)
// (D read from the core) and that done holds until the next start.
module tb_Montgomery_multiplier_modif;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned MOD = 17;
  logic clk = 1'b0, reset, start;
  logic [WIDTH-1:0] x, y, z;
  logic done;
  int checks = 0, failures = 0;

  Montgomery_multiplier_modif dut (.x, .y, .clk, .reset, .start, .z, .done);

  always #5 clk = ~clk;

  function automatic int ref_mont(input int xi, yi);
    for (int c = 0; c < int'(MOD); c++) begin
      if (((c << WIDTH) % int'(MOD)) == ((xi * yi) % int'(MOD))) return c;
    end
    return -1;
  endfunction

  task automatic run_one(input logic [WIDTH-1:0] xi, yi);
    int cycles, dval;
    @(negedge clk);
    x = xi; y = yi; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done not cleared by start");
    end
    cycles = 1;
    dval = 0;
    while (!done && cycles < 400) begin
      if (dut.core_done) dval = int'(dut.d);
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (int'(z) != ref_mont(int'(xi), int'(yi))) begin
      failures++;
      $display("FAIL x=%0d y=%0d z=%0d expected %0d", xi, yi, z, ref_mont(int'(xi), int'(yi)));
    end
    checks++;
    if (cycles != int'(WIDTH) + 4 + dval / int'(MOD)) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, int'(WIDTH) + 4 + dval / int'(MOD));
    end
    repeat (2) @(negedge clk);
    checks++;
    if (!done || int'(z) != ref_mont(int'(xi), int'(yi))) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    reset = 1'b1; start = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    run_one(8'b01010000, 8'b01000111);
    checks++;
    if (z != 8'd2) begin
      failures++;
      $display("FAIL 0x50 * 0x47 gave %0d", z);
    end
    run_one(8'hff, 8'hff);
    run_one(8'h00, 8'h00);
    run_one(8'h10, 8'h01);
    for (int i = 0; i < 300; i++) run_one(WIDTH'($urandom), WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
