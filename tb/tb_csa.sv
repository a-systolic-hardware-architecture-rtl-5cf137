// tb_csa: self-checking test of the carry-save adder. Random and corner
// vectors; checks x + y + z == sum + 2*carry and the bitwise sum.
module tb_csa;
  localparam int unsigned W = 10;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x, .y, .z, .sum, .carry);

  task automatic check_one(input logic [W-1:0] xi, yi, zi);
    x = xi; y = yi; z = zi;
    #1;
    checks++;
    if ((W+2)'(xi) + (W+2)'(yi) + (W+2)'(zi) != (W+2)'(sum) + ((W+2)'(carry) << 1)
        || sum != (xi ^ yi ^ zi)) begin
      failures++;
      $display("FAIL csa x=%h y=%h z=%h sum=%h carry=%h", xi, yi, zi, sum, carry);
    end
  endtask

  initial begin
    check_one('0, '0, '0);
    check_one('1, '1, '1);
    check_one('1, '0, '1);
    for (int i = 0; i < 500; i++) check_one(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
