// dpll3pd_core - the synthesizable part of the three-phase-comparator DPLL:
// everything after the input hard limiter.
//
// The loop locks the rising edge of its output signal to the positive zero
// crossings of a sinusoidal input of known frequency f0, given here as the
// comparator output u_o. Each set of three samples (at -l, 0 and +l phase
// steps around the output's rising edge, one set every K cycles) gives A',
// which drives a (2N+1)-state random-walk filter, and D = B' - C', which is
// accumulated into E. When the filter reaches an end state it requests a
// phase step and E decides its size: below the threshold TH the loop is taken
// to be acquiring and steps by n*Delta, at or above it the loop is tracking
// and steps by Delta, where Delta = pi/m is one period of the 2m*f0 clock.
//
// Interface: clk is the stable 2m*f0 oscillator, rst_n an asynchronous
// active-low reset, u_o the hard-limited input, sampled synchronously to clk.
// Observation outputs give the output signal, its phase count, the samples,
// the filter state, E and each step command. Timing: a set completes at T_B;
// set_valid follows one clock later, the filter and E one clock after that,
// the step command one clock later again, and the correction is carried out
// over 1 or NRATIO clocks, all well before the next set.
//
// The blocks and their connections follow the design's block diagram;
// defaults are its evaluated configuration N = 6, Th = 2, m = 32, l = 2,
// n = 3 with one set per cycle (k = 1). The observation ports are this
// design's own.
module dpll3pd_core
  import dpll_pkg::*;
#(
  parameter int unsigned M      = 32,  // 2m phase states per cycle
  parameter int unsigned L      = 2,   // sample spacing in steps Delta
  parameter int unsigned N      = 6,   // random-walk filter length 2N+1
  parameter int          TH     = 2,   // decision threshold on E
  parameter int unsigned NRATIO = 3,   // large/small correction ratio n
  parameter int unsigned K      = 1,   // one set every K cycles
  parameter int unsigned EMAX   = N    // saturation of E
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      u_o,       // hard-limited input, 1 = positive
  output logic      out_sig,
  output logic [$clog2(2*M)-1:0] phase,
  output logic      set_valid,
  output logic      a_pos,
  output logic      b_pos,
  output logic      c_pos,
  output d_val_t    d,
  output logic [$clog2(2*N+1)-1:0] walk_state,
  output logic signed [$clog2(EMAX+1)+1:0] e,
  output step_cmd_t cmd,
  output logic      busy       // a phase correction is being carried out
);

  logic t_c, t_a, t_b;
  logic advance, retard;

  phase_detector u_pd (
    .clk, .rst_n, .u_o, .t_c, .t_a, .t_b,
    .set_valid, .a_pos, .b_pos, .c_pos, .d
  );

  random_walk_filter #(.N(N)) u_rwf (
    .clk, .rst_n, .step(set_valid), .up(a_pos),
    .advance, .retard, .state(walk_state)
  );

  d_accumulator #(.EMAX(EMAX)) u_add (
    .clk, .rst_n, .step(set_valid), .d, .clear(advance | retard), .e
  );

  decision_block #(.EMAX(EMAX), .TH(TH)) u_dec (
    .clk, .rst_n, .advance, .retard, .e, .cmd
  );

  digital_clock #(.M(M), .L(L), .K(K), .NRATIO(NRATIO)) u_clk (
    .clk, .rst_n, .cmd, .out_sig, .phase, .t_c, .t_a, .t_b, .busy
  );

  // A correction (done about L + 3 + NRATIO clocks into a cycle) must end
  // before the next T_C at phase 2M - L.
  initial assert (2 * L + NRATIO + 4 < 2 * M)
    else $error("dpll3pd_core: corrections would overlap the sample points");

endmodule
