// tb_mod_reduce: checks r == x mod n, r < n, and the latency of
// 2 + floor(x / n) cycles from start to done, for corner and random values.
module tb_mod_reduce;
  localparam int unsigned W = 10, NW = 8;
  logic clk = 1'b0, rst, start;
  logic [W-1:0] x;
  logic [NW-1:0] n, r;
  logic done, busy;
  int checks = 0, failures = 0;

  mod_reduce #(.W(W), .NW(NW)) dut (.clk, .rst, .start, .x, .n, .r, .done, .busy);

  always #5 clk = ~clk;

  task automatic run_one(input logic [W-1:0] xi, input logic [NW-1:0] ni);
    int cycles;
    @(negedge clk);
    x = xi; n = ni; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 3000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (int'(r) != int'(xi) % int'(ni)) begin
      failures++;
      $display("FAIL %0d mod %0d gave %0d", xi, ni, r);
    end
    checks++;
    if (cycles != 2 + int'(xi) / int'(ni)) begin
      failures++;
      $display("FAIL latency %0d for %0d / %0d", cycles, xi, ni);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; x = '0; n = 8'd1;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    run_one(10'd0, 8'd17);
    run_one(10'd16, 8'd17);
    run_one(10'd17, 8'd17);
    run_one(10'd1023, 8'd255);
    run_one(10'd271, 8'd17);
    for (int i = 0; i < 200; i++) run_one(W'($urandom), NW'($urandom_range(255, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
