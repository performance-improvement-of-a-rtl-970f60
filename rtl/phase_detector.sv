// phase_detector - the three-sample binary phase detector of the DPLL.
//
// The hard-limited input u_o is sampled three times per set: at T_C (l phase
// steps before the nominal sampling point), at T_A (the nominal point, where
// the loop should find the positive zero crossing) and at T_B (l steps after
// it). Each sample is a sign: 1 means +1, 0 means -1. A' drives the random-walk
// filter; B' and C' give the difference D = B' - C', which is +2 only when the
// zero crossing lies between the outer samples (tracking), 0 or -2 otherwise.
//
// Interface: strobes t_c, t_a, t_b are one-cycle pulses from the digital
// clock, in the order C, A, B within a set. Timing: the cycle after t_b, the
// block pulses set_valid for one cycle with a_pos, b_pos, c_pos and d of the
// completed set; they stay stable until the next t_b. A set is only reported
// when its T_C and T_A were both seen, so the partial set right after reset
// is dropped.
//
// The three sample points and D = B' - C' follow the design's description;
// registering the result one cycle after T_B is this design's choice.
module phase_detector
  import dpll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   u_o,        // hard-limited input, 1 = positive
  input  logic   t_c,
  input  logic   t_a,
  input  logic   t_b,
  output logic   set_valid,  // one-cycle pulse: a complete set is available
  output logic   a_pos,      // A' = +1
  output logic   b_pos,      // B' = +1
  output logic   c_pos,      // C' = +1
  output d_val_t d           // B' - C'
);

  logic a_smp, c_smp;
  logic have_a, have_c;   // T_A and T_C of the current set have been seen

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_smp     <= 1'b0;
      c_smp     <= 1'b0;
      have_a    <= 1'b0;
      have_c    <= 1'b0;
      a_pos     <= 1'b0;
      b_pos     <= 1'b0;
      c_pos     <= 1'b0;
      set_valid <= 1'b0;
    end else begin
      set_valid <= t_b && have_a && have_c;
      if (t_c) begin
        c_smp  <= u_o;
        have_c <= 1'b1;
      end
      if (t_a) begin
        a_smp  <= u_o;
        have_a <= 1'b1;
      end
      if (t_b) begin
        have_a <= 1'b0;
        have_c <= 1'b0;
        a_pos <= a_smp;
        b_pos <= u_o;
        c_pos <= c_smp;
      end
    end
  end

  // D = B' - C' with B', C' in {-1, +1}.
  always_comb begin
    unique case ({b_pos, c_pos})
      2'b10:   d = 3'sd2;
      2'b01:   d = -3'sd2;
      default: d = 3'sd0;
    endcase
  end

endmodule
