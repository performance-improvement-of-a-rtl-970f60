// phase_divider - the divide-by-2m counter of the digital clock.
//
// The counter holds the output phase theta_o in units of Delta = pi/m: it
// counts the pulses passed by the phase shifter (0, 1 or 2 per clock) modulo
// 2m. The output signal of the loop, at f0, is high for counts 0..m-1 and low
// for m..2m-1, so its rising edge is at count 0. The block also reports how
// far the count moved in the last clock, so the strobe decoder can tell a
// freshly reached count from a held one and notice a skipped count.
//
// Interface: inc from the phase shifter; phase, out_sig, moved, skipped.
// Timing: phase is registered; moved/skipped describe the step into the
// current value of phase.
//
// The division by 2m follows the design's description; the phase-count form
// and the output duty cycle are this design's choices.
module phase_divider #(
  parameter int unsigned M = 32       // 2m phase states per cycle
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [1:0] inc,
  output logic [$clog2(2*M)-1:0] phase,
  output logic out_sig,
  output logic moved,                 // phase changed in the last clock
  output logic skipped                // phase advanced by 2 in the last clock
);

  localparam int W = $clog2(2*M);
  localparam logic [W:0] MOD = (W+1)'(2*M);

  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, phase} + (W+1)'(inc);
    if (sum >= MOD) sum = sum - MOD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      moved   <= 1'b0;
      skipped <= 1'b0;
    end else begin
      phase   <= sum[W-1:0];
      moved   <= (inc != 2'd0);
      skipped <= (inc == 2'd2);
    end
  end

  assign out_sig = (phase < W'(M));

  initial assert (M >= 2) else $error("phase_divider: M must be at least 2");

endmodule
