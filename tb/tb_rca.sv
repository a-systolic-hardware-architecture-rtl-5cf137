// tb_rca: self-checking test of the ripple-carry adder against the + operator.
module tb_rca;
  localparam int unsigned W = 10;
  logic [W-1:0] x, y, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(W)) dut (.x, .y, .cin, .s, .cout);

  task automatic check_one(input logic [W-1:0] xi, yi, input logic ci);
    logic [W:0] ref_sum;
    x = xi; y = yi; cin = ci;
    #1;
    ref_sum = (W+1)'(xi) + (W+1)'(yi) + (W+1)'(ci);
    checks++;
    if ({cout, s} != ref_sum) begin
      failures++;
      $display("FAIL rca %h + %h + %b = %h, expected %h", xi, yi, ci, {cout, s}, ref_sum);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b1);
    check_one('0, '0, 1'b0);
    for (int i = 0; i < 500; i++) check_one(W'($urandom), W'($urandom), 1'($urandom));
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
