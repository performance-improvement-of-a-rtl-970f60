// d_accumulator - the adder with memory that accumulates D = B' - C'.
//
// Between two phase corrections the block sums the comparator difference of
// every set, giving E. A set with D = +2 (zero crossing between the outer
// samples) adds one, a set with D = -2 subtracts one, D = 0 leaves E alone:
// E counts in units of D/2, the unit of the rows of the loop's state model.
// E saturates at +/-EMAX. A correction (the filter's Advance or Retard pulse)
// clears E, so E always describes the sets since the last correction.
//
// Interface: step/d once per set, clear with the filter pulse. Timing: E is
// registered and includes a set from the cycle after its step. If clear and
// step coincide, the set is counted into the new interval.
//
// Accumulating D and resetting on each correction follow the design's
// description; the D/2 unit and the saturation bound are this design's
// choices.
module d_accumulator
  import dpll_pkg::*;
#(
  parameter int unsigned EMAX = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  d_val_t d,
  input  logic clear,
  output logic signed [$clog2(EMAX+1)+1:0] e
);

  localparam int W = $clog2(EMAX+1) + 2;
  localparam logic signed [W-1:0] EHI = W'(EMAX);
  localparam logic signed [W-1:0] ELO = -EHI;

  logic signed [W-1:0] base, delta, sum;

  always_comb begin
    base  = clear ? '0 : e;
    delta = W'(d >>> 1);
    sum   = base + delta;
    if (sum > EHI)      sum = EHI;
    else if (sum < ELO) sum = ELO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    e <= '0;
    else if (step) e <= sum;
    else if (clear) e <= '0;
  end

endmodule
