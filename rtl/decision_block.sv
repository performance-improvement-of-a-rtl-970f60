// decision_block - digital comparator choosing the size of each correction.
//
// When the random-walk filter issues Advance or Retard, the accumulated
// difference E is compared with a fixed reference threshold TH. E >= TH means
// the recent sets mostly found the input zero crossing between the outer
// samples: the loop is tracking and corrects by one step Delta. E < TH means
// acquisition and a large correction of n*Delta. The result is a registered
// step command for the digital phase shifter.
//
// Interface: advance/retard pulses from the filter, e from the adder (same
// cycle). Timing: cmd is valid for one cycle, one cycle after the pulse.
//
// The comparison against a threshold and the two correction sizes follow the
// design's description; the ">=" sense of the comparison is read from the
// threshold line of the loop's state model.
module decision_block
  import dpll_pkg::*;
#(
  parameter int unsigned EMAX = 6,
  parameter int          TH   = 2    // reference threshold, in units of D/2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  input  logic retard,
  input  logic signed [$clog2(EMAX+1)+1:0] e,
  output dpll_pkg::step_cmd_t cmd
);

  localparam int W = $clog2(EMAX+1) + 2;
  localparam logic signed [W-1:0] THR = W'(TH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd <= STEP_NONE;
    end else begin
      cmd.valid   <= advance | retard;
      cmd.advance <= advance;
      cmd.big   <= (e < THR);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(advance && retard))
    else $error("decision_block: advance and retard together");

endmodule
