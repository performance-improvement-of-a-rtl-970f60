// digital_clock - the loop's digitally controlled oscillator.
//
// The clock input is the stable fixed-frequency oscillator at 2m*f0. The
// phase shifter passes its pulses on, adding or deleting 1 or n of them per
// step command; the divide-by-2m counter turns them into the output signal at
// f0 and holds its phase; the strobe decoder derives the sampling instants
// T_C, T_A, T_B of the phase detector from that phase.
//
// Interface: cmd in; out_sig, phase, strobes and busy out. Timing: a command
// changes the phase count over the following 1 or NRATIO clocks.
//
// The split into oscillator, phase shifter and divide-by-2m follows the
// design's description; the strobe decoder stands for the timing outputs
// (T_C, T_A, T_B) of its digital clock, whose circuit is not given.
module digital_clock
  import dpll_pkg::*;
#(
  parameter int unsigned M      = 32,
  parameter int unsigned L      = 2,
  parameter int unsigned K      = 1,
  parameter int unsigned NRATIO = 3
) (
  input  logic      clk,       // 2m*f0 oscillator
  input  logic      rst_n,
  input  step_cmd_t cmd,
  output logic      out_sig,
  output logic [$clog2(2*M)-1:0] phase,
  output logic      t_c,
  output logic      t_a,
  output logic      t_b,
  output logic      busy
);

  logic [1:0] inc;
  logic       moved, skipped;

  digital_phase_shifter #(.NRATIO(NRATIO)) u_shift (
    .clk, .rst_n, .cmd, .inc, .busy
  );

  phase_divider #(.M(M)) u_div (
    .clk, .rst_n, .inc, .phase, .out_sig, .moved, .skipped
  );

  sample_timing #(.M(M), .L(L), .K(K)) u_tim (
    .clk, .rst_n, .phase, .moved, .skipped, .t_c, .t_a, .t_b
  );

endmodule
