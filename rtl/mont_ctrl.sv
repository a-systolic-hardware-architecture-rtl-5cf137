// mont_ctrl: control logic of the bit-serial Montgomery multiplier.
//
// Sequences the W iterations of radix-2 Montgomery multiplication. On start it
// asks the datapath to load B into its shift register and clear the
// carry-save accumulator (load). Then, for W cycles, it enables one iteration
// per cycle (step) and shifts B by one bit. In each iteration it produces the
// quotient bit U_i that selects 0 or the modulus m in the second multiplexer:
// U_i is the LSB of S + C + b_i*A, which (C's LSB being the carry-save LSB)
// equals S[0] ^ C[0] ^ (b_i & A[0]). After the last iteration it raises done
// for one cycle; the accumulator then holds its value until the next start.
//
// Timing: start seen in IDLE -> W cycles with step=1 -> one cycle with
// done=1. A start while busy is ignored.
// The roles (shift control, U_i to the modulus multiplexer) follow the block
// diagram; the state encoding and the one-cycle done are choices of this design.
module mont_ctrl #(
  parameter int unsigned W = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic bi,    // current bit of B (LSB of the shift register)
  input  logic s0,    // S[0] of the carry-save accumulator
  input  logic c0,    // C[0] of the carry-save accumulator
  input  logic a0,    // A[0]
  output logic load,  // load B, clear S and C
  output logic step,  // perform one iteration, shift B
  output logic ui,    // quotient bit: add m in this iteration
  output logic done,  // one-cycle pulse after the last iteration
  output logic busy
);
  typedef enum logic [1:0] {IDLE, RUN, FIN} state_t;
  state_t state;
  logic [$clog2(W+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= RUN;
          cnt   <= '0;
        end
        RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(W - 1)) state <= FIN;
        end
        FIN: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    load = (state == IDLE) && start;
    step = (state == RUN);
    done = (state == FIN);
    busy = (state != IDLE);
    ui   = s0 ^ c0 ^ (bi & a0);
  end
endmodule
