// sys_ctrl: finite state machine that runs the systolic Montgomery array.
//
// States:
//   IDLE   wait for start; on start the operands are latched (load).
//   SETUP  one cycle: clear the array registers (S_0 = 0), N' is computed.
//   FEED   inject the words a_0 .. a_{M-1} into the first PE, one every second
//          cycle (feed_valid, idx). The gap lets PE j read word j+1 of the
//          previous S from its right-hand neighbour before using it.
//   DRAIN  count the valid columns leaving the last PE; after M of them the
//          last iteration has passed the whole array and S_M is complete.
//   REDUCE start the final reduction and wait for its done.
//   DONE   one cycle with done = 1, then back to IDLE.
// Timing: FEED takes 2M-1 cycles and the last column leaves the array M cycles
// after it was injected, so start to done is 3M + 4 cycles plus the reduction
// (2 + number of subtractions).
// The source publication states that the array is sequenced by finite state machines;
// these states and the every-other-cycle schedule are this design's.
module sys_ctrl #(
  parameter int unsigned M = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   last_valid,  // valid column out of the last PE
  input  logic                   red_done,
  output logic                   load,
  output logic                   clr,
  output logic                   feed_valid,
  output logic [$clog2(M)-1:0]   idx,
  output logic                   red_start,
  output logic                   done,
  output logic                   busy
);
  typedef enum logic [2:0] {IDLE, SETUP, FEED, DRAIN, REDUCE, FIN} state_t;
  state_t state;
  logic                 phase;
  logic [$clog2(M+1)-1:0] seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      phase <= 1'b0;
      idx   <= '0;
      seen  <= '0;
    end else begin
      unique case (state)
        IDLE:  if (start) state <= SETUP;
        SETUP: begin
          state <= FEED;
          phase <= 1'b0;
          idx   <= '0;
          seen  <= '0;
        end
        FEED: begin
          phase <= ~phase;
          if (!phase) begin
            if (idx == $clog2(M)'(M - 1)) state <= DRAIN;
            else idx <= idx + 1'b1;
          end
        end
        DRAIN:  if (seen == ($clog2(M+1))'(M)) state <= REDUCE;
        REDUCE: if (red_done) state <= FIN;
        FIN:    state <= IDLE;
        default: state <= IDLE;
      endcase
      if (state == FEED || state == DRAIN) begin
        if (last_valid) seen <= seen + 1'b1;
      end
    end
  end

  logic in_reduce_q;
  always_ff @(posedge clk) begin
    if (rst) in_reduce_q <= 1'b0;
    else     in_reduce_q <= (state == REDUCE);
  end

  always_comb begin
    load       = (state == IDLE) && start;
    clr        = (state == SETUP);
    feed_valid = (state == FEED) && !phase;
    red_start  = (state == REDUCE) && !in_reduce_q;
    done       = (state == FIN);
    busy       = (state != IDLE);
  end
endmodule
