// dpll_case_runner - drives one loop configuration through the noise-free
// measurements of the evaluation: mean acquisition time over equally likely
// initial phase errors, RMS phase error in tracking, and holding lock at a
// frequency offset inside and outside the locking range.
//
// For each of 2m initial errors (whole steps plus a varying fraction, so the
// final dither covers all fractional offsets) it resets the loop, counts the
// output cycles until a set finds |err| <= Delta, then accumulates err^2 over
// 100 further cycles. Then it runs the input at f0*(1 + frac_in*dmax) and
// f0*(1 + frac_out*dmax), where dmax = n/(2mNk) is the fastest the loop can
// slew (dmax = n/(2mNK) with one set every K cycles), and records the largest |err| over 600 cycles after 200 cycles of
// settling.
module dpll_case_runner #(
  parameter int unsigned M      = 32,
  parameter int unsigned L      = 2,
  parameter int unsigned N      = 6,
  parameter int          TH     = 2,
  parameter int unsigned NRATIO = 3,
  parameter int unsigned K      = 1
) (
  input  logic clk,
  output logic done,
  output real  mean_acq,      // cycles of f0
  output real  rms_deg,       // degrees
  output real  worst_in,      // |err| in Delta with offset inside the range
  output real  worst_out      // |err| in Delta with offset outside the range
);
  import dpll_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  W  = $clog2(2 * M);

  logic rst_n = 1'b0;
  real  u_i, in_ph = 0.0, freq = 1.0, err;
  logic out_sig, set_valid, a_pos, b_pos, c_pos, busy;
  logic [W-1:0] phase;
  d_val_t d;
  logic [$clog2(2*N+1)-1:0] walk_state;
  logic signed [$clog2(N+1)+1:0] e;
  step_cmd_t cmd;

  dpll3pd_top #(.M(M), .L(L), .N(N), .TH(TH), .NRATIO(NRATIO), .K(K)) dut (.*);

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real wrap(input real x);
    real y;
    y = x - 2.0 * M * $floor(x / (2.0 * M));
    if (y > M) y = y - 2.0 * M;
    return y;
  endfunction

  always_comb begin
    err = wrap(in_ph - real'(phase));
    u_i = $sin(PI * in_ph / M);
  end

  always @(posedge clk) if (rst_n) in_ph <= in_ph + freq;

  task automatic restart(input real ph0);
    rst_n = 1'b0;
    in_ph = ph0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic offset_run(input real frac, output real worst);
    freq = 1.0 + frac * real'(NRATIO) / (2.0 * M * N * K);
    restart(0.4 * M);
    repeat (200 * K * 2 * M) @(posedge clk);   // settle
    worst = 0.0;
    repeat (600 * K * 2 * M) begin
      @(posedge clk);
      if (fabs(err) > worst) worst = fabs(err);
    end
    freq = 1.0;
  endtask

  initial begin
    real acq_sum, sq, cnt;
    done = 1'b0;
    acq_sum = 0.0; sq = 0.0; cnt = 0.0;
    for (int i = 0; i < 2 * M; i++) begin
      int ticks;
      real frac;
      frac = real'((i * 37) % 64) / 64.0 + 1.0 / 128.0;
      restart(real'(i) - real'(M) + frac);
      ticks = 0;
      while (!(set_valid && fabs(err) <= 1.0)) begin
        @(posedge clk); ticks++;
      end
      acq_sum += real'(ticks) / (2.0 * M);
      repeat (100 * 2 * M) begin
        @(posedge clk);
        sq += err * err; cnt += 1.0;
      end
    end
    mean_acq = acq_sum / (2.0 * M);
    rms_deg  = $sqrt(sq / cnt) * 180.0 / M;
    offset_run(0.8, worst_in);
    offset_run(1.3, worst_out);
    done = 1'b1;
  end
endmodule
