// mod_reduce: final reduction of a Montgomery result into [0, n).
//
// A Montgomery loop returns a value congruent to A*B*R^-1 mod n that may still
// be n or larger (below 2n, 3n, ... depending on the operand bounds). This
// block loads the value x on start and then, once per clock, subtracts n while
// the remainder is n or larger, using one comparator and one subtractor of W
// bits. When the remainder is below n it raises done and holds r until the
// next start.
//
// Timing: done comes 2 + q cycles after start, where q = floor(x / n) is the
// number of subtractions. The modulus n must be non-zero and stable while busy.
// The repeated conditional subtraction is this design's choice; the algorithm
// only states that the result is taken mod N.
module mod_reduce #(
  parameter int unsigned W  = 10,   // width of the value to reduce
  parameter int unsigned NW = 8     // width of the modulus and of the result
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  x,
  input  logic [NW-1:0] n,
  output logic [NW-1:0] r,
  output logic          done,
  output logic          busy
);
  localparam int unsigned RW = (W > NW) ? W : NW;

  logic [RW-1:0] rem;
  logic          ge;

  assign ge = (rem >= RW'(n));

  always_ff @(posedge clk) begin
    if (rst) begin
      rem  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start && !busy) begin
      rem  <= RW'(x);
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      if (ge) begin
        rem <= rem - RW'(n);
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  assign r = rem[NW-1:0];
endmodule
