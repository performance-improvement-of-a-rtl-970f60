// random_walk_filter - the sequential loop filter: a (2N+1)-state up/down
// counter.
//
// Every set of samples moves the counter one state: up when A' = +1 (the
// input's zero crossing came before the nominal sampling point, so the output
// lags), down when A' = -1. The counter starts at the middle state N. When it
// reaches 2N it issues Advance, when it reaches 0 it issues Retard, and in
// either case it returns to N, so a correction needs at least N consistent
// sets. The outputs are registered one-cycle pulses; the same pulse clears the
// adder that accumulates D.
//
// Interface: step with up (= A') once per set. Timing: advance/retard pulse in
// the cycle after the step that reached the end state; the state is already N
// in that cycle.
//
// The 2N+1 states, the end states and the return to N follow the design's
// description; counting up on A' = +1 (so that 2N means advance) is the
// direction this design chose to make the loop converge.
module random_walk_filter #(
  parameter int unsigned N = 6   // filter length is 2N+1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,             // one pulse per set of samples
  input  logic up,               // A' = +1
  output logic advance,          // counter reached 2N
  output logic retard,           // counter reached 0
  output logic [$clog2(2*N+1)-1:0] state
);

  localparam int unsigned W = $clog2(2*N+1);
  localparam logic [W-1:0] MID = W'(N);
  localparam logic [W-1:0] TOP = W'(2*N);

  logic [W-1:0] nxt;

  always_comb nxt = up ? state + 1'b1 : state - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= MID;
      advance <= 1'b0;
      retard  <= 1'b0;
    end else begin
      advance <= 1'b0;
      retard  <= 1'b0;
      if (step) begin
        if (nxt == TOP) begin
          advance <= 1'b1;
          state   <= MID;
        end else if (nxt == '0) begin
          retard  <= 1'b1;
          state   <= MID;
        end else begin
          state   <= nxt;
        end
      end
    end
  end

  initial assert (N >= 1) else $error("random_walk_filter: N must be at least 1");

endmodule
