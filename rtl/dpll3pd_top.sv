// dpll3pd_top - binary quantized all-digital PLL with three phase comparators
// and aided acquisition (3PDPLL).
//
// The loop locks the rising edge of its output signal to the positive zero
// crossings of a noisy sinusoidal input of known frequency f0. Each set of
// three samples of the hard-limited input (at -l, 0 and +l phase steps around
// the output's rising edge, one set every K cycles) gives A', which drives a
// (2N+1)-state random-walk filter, and D = B' - C', which is accumulated into E.
// When the filter reaches an end state it requests a phase step; E decides
// its size: below the threshold TH the loop is taken to be acquiring and
// steps by n*Delta, at or above it the loop is tracking and steps by Delta,
// where Delta = pi/m is one period of the 2m*f0 clock.
//
// The top joins the behavioural hard limiter (real input u_i) to the
// synthesizable loop dpll3pd_core; for an implementation, use the core with
// the comparator's digital output.
//
// Interface: clk is the stable 2m*f0 oscillator; u_i the analogue input. Observation outputs give the
// output signal, its phase count, the filter state, E and each step command.
// Timing: a set completes at T_B, the filter updates one clock later, a step
// command follows one clock after that and is carried out over 1 or NRATIO
// clocks, all well before the next set.
//
// Defaults are the N = 6, Th = 2, m = 32, l = 2, n = 3 configuration of the
// design's evaluation, with one set per cycle (k = 1).
module dpll3pd_top
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
  input  real       u_i,
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

  logic u_o;

  hard_limiter u_lim (.u_i, .u_o);

  dpll3pd_core #(
    .M(M), .L(L), .N(N), .TH(TH), .NRATIO(NRATIO), .K(K), .EMAX(EMAX)
  ) u_core (
    .clk, .rst_n, .u_o, .out_sig, .phase, .set_valid, .a_pos, .b_pos, .c_pos,
    .d, .walk_state, .e, .cmd, .busy
  );

endmodule
