// tb_mont_ctrl: checks the control logic of the bit-serial multiplier: load on
// start, exactly W step cycles, a one-cycle done right after them, start
// ignored while busy, and U_i = s0 ^ c0 ^ (b_i & a0) for all input patterns.
module tb_mont_ctrl;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst, start, bi, s0, c0, a0;
  logic load, step, ui, done, busy;
  int checks = 0, failures = 0;

  mont_ctrl #(.W(W)) dut (.clk, .rst, .start, .bi, .s0, .c0, .a0,
                          .load, .step, .ui, .done, .busy);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int steps, wait_cycles;
    rst = 1'b1; start = 1'b0; {bi, s0, c0, a0} = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      start = 1'b1;
      #1 expect_eq("load with start in idle", int'(load), 1);
      @(negedge clk);
      expect_eq("busy after start", int'(busy), 1);
      // start again while busy must not restart
      expect_eq("no load while busy", int'(load), 0);
      start = 1'b0;
      steps = 0; wait_cycles = 0;
      while (!done && wait_cycles < 50) begin
        if (step) steps++;
        // quotient bit over all 16 input combinations
        {bi, s0, c0, a0} = 4'($urandom);
        #1 expect_eq("ui", int'(ui), int'(s0 ^ c0 ^ (bi & a0)));
        @(negedge clk);
        wait_cycles++;
      end
      expect_eq("step cycles", steps, W);
      expect_eq("done after W steps", wait_cycles, W);
      @(negedge clk);
      expect_eq("done is one cycle", int'(done), 0);
      expect_eq("idle after done", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
