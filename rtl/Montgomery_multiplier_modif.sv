// Montgomery_multiplier_modif: WIDTH-bit Montgomery modular multiplier with a
// start/done handshake (8 bits by default).
//
// z = x * y * 2^-WIDTH mod MODULUS, fully reduced (0 <= z < MODULUS), for any
// x, y below 2^WIDTH and an odd MODULUS below 2^WIDTH. The bit-serial
// carry-save core (mont_bitserial) runs WIDTH iterations, then mod_reduce
// subtracts the modulus until the result is below it.
//
// Interface: x, y, clk, reset, start, z, done. Pulse start for one cycle with
// x and y valid; keep x stable until done. done rises when z is valid and stays
// high (with z held) until the next start; reset is synchronous and active
// high. Latency from start to done: WIDTH + 4 + floor(D / MODULUS) cycles,
// where D < x + MODULUS is the unreduced core result.
// The port list, the 8-bit width and the modulus 17 follow the published
// schematic symbol and simulation of this multiplier; the modulus being a
// parameter rather than a port, the held done and the final reduction
// are this design's choices.
module Montgomery_multiplier_modif #(
  parameter int unsigned       WIDTH   = 8,
  parameter logic [WIDTH-1:0]  MODULUS = WIDTH'(17)
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  output logic [WIDTH-1:0] z,
  output logic             done
);
  logic [WIDTH:0]   d;
  logic             core_done, core_busy;
  logic [WIDTH-1:0] r;
  logic             red_done, red_busy;

  mont_bitserial #(.W(WIDTH)) u_core (
    .clk, .rst(reset), .start, .a(x), .b(y), .m(MODULUS),
    .d, .done(core_done), .busy(core_busy)
  );

  mod_reduce #(.W(WIDTH+1), .NW(WIDTH)) u_red (
    .clk, .rst(reset), .start(core_done), .x(d), .n(MODULUS),
    .r, .done(red_done), .busy(red_busy)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      z    <= '0;
      done <= 1'b0;
    end else if (start && !core_busy && !red_busy) begin
      done <= 1'b0;
    end else if (red_done) begin
      z    <= r;
      done <= 1'b1;
    end
  end

  initial begin
    assert (MODULUS[0] == 1'b1) else $error("MODULUS must be odd");
  end
endmodule
