// digital_phase_shifter - pulse adding/deleting phase shifter of the digital
// clock.
//
// The stable oscillator runs at 2m*f0; every one of its periods normally
// passes one pulse to the divide-by-2m counter (inc = 1). A step command
// moves the output phase by 1 or NRATIO oscillator periods (Delta = pi/m each):
// to advance, one extra pulse is inserted per clock (inc = 2) until the
// correction is done; to retard, one pulse is swallowed per clock (inc = 0).
// A correction of s steps therefore takes s clock cycles.
//
// Interface: cmd from the decision block; inc (0, 1 or 2) to the divider;
// busy while a correction is in progress. Timing: the first added or deleted
// pulse is in the cycle after cmd.valid.
//
// The two correction sizes (Delta and n*Delta) follow the design's
// description; the one-pulse-per-clock add/delete scheme is this design's
// choice. A command arriving while busy replaces the remainder of the
// previous one (the loop never does this: commands are at least N sets apart).
module digital_phase_shifter
  import dpll_pkg::*;
#(
  parameter int unsigned NRATIO = 3   // large/small correction ratio n
) (
  input  logic      clk,
  input  logic      rst_n,
  input  step_cmd_t cmd,
  output logic [1:0] inc,             // pulses passed to the divider this cycle
  output logic      busy
);

  localparam int W = $clog2(NRATIO + 1);

  logic [W-1:0] pending;
  logic         adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      adv     <= 1'b0;
    end else if (cmd.valid) begin
      pending <= cmd.big ? W'(NRATIO) : W'(1);
      adv     <= cmd.advance;
    end else if (pending != '0) begin
      pending <= pending - 1'b1;
    end
  end

  assign busy = (pending != '0);

  always_comb begin
    if (!busy)    inc = 2'd1;
    else if (adv) inc = 2'd2;
    else          inc = 2'd0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(cmd.valid && busy))
    else $error("digital_phase_shifter: new command during a correction");

endmodule
