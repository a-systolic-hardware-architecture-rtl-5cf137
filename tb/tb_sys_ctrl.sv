// tb_sys_ctrl: runs the array controller against a model of the array (a
// delay line of M+1 cycles from feed_valid to last_valid) and of the
// reduction (done a random number of cycles after red_start). Checks clr one
// cycle after load, M feeds two cycles apart with idx = 0..M-1, red_start
// only after the M-th column left the array, one done after red_done.
module tb_sys_ctrl;
  localparam int unsigned M = 6;
  logic clk = 1'b0, rst, start, last_valid, red_done;
  logic load, clr, feed_valid, red_start, done, busy;
  logic [$clog2(M)-1:0] idx;
  logic [M:0] dline;
  int checks = 0, failures = 0;

  sys_ctrl #(.M(M)) dut (.clk, .rst, .start, .last_valid, .red_done,
                         .load, .clr, .feed_valid, .idx, .red_start, .done, .busy);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rst) dline <= '0;
    else     dline <= {dline[M-1:0], feed_valid};
  end
  assign last_valid = dline[M];

  task automatic chk(input string what, input int got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int feeds, last_feed, cyc, outs, red_at, delay, dones;
    rst = 1'b1; start = 1'b0; red_done = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int run = 0; run < 4; run++) begin
      @(negedge clk);
      start = 1'b1;
      #1 chk("load", int'(load), 1);
      @(negedge clk);
      start = 1'b0;
      chk("clr after load", int'(clr), 1);
      feeds = 0; last_feed = -10; outs = 0; red_at = -1; dones = 0;
      delay = $urandom_range(4, 1);
      for (cyc = 0; cyc < 200 && dones == 0; cyc++) begin
        @(negedge clk);
        red_done = (red_at >= 0 && cyc == red_at + delay);
        if (feed_valid) begin
          chk("idx", int'(idx), feeds);
          if (feeds > 0) chk("feed spacing", cyc - last_feed, 2);
          feeds++;
          last_feed = cyc;
        end
        if (last_valid) outs++;
        if (red_start) begin
          chk("red_start after all columns", outs, M);
          red_at = cyc;
        end
        if (done) begin
          dones++;
          chk("done after red_done", cyc, red_at + delay + 1);
        end
      end
      red_done = 1'b0;
      chk("feeds", feeds, M);
      chk("done seen", dones, 1);
      @(negedge clk);
      chk("idle", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
