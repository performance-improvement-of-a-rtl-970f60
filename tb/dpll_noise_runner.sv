// dpll_noise_runner - measures one loop configuration with a noisy input.
//
// The input is sin(phi) + n_s*sin(phi) + n_c*cos(phi) with n_s, n_c drawn from
// a zero-mean Gaussian of standard deviation sigma (SNR = 1/(2*sigma^2)).
// They are redrawn once per output cycle, at output phase m, half a cycle
// away from the samples, so the noise is the same for the three samples of a
// set and independent from set to set. On each start pulse the runner resets
// the loop from 2m equally spaced initial errors, counts the sets until one
// finds |err| <= Delta (acquisition) and then accumulates err^2 over
// TRACK_CYCLES cycles; it reports the mean acquisition time in sets (k = 1)
// and the RMS phase error in degrees.
module dpll_noise_runner #(
  parameter int unsigned M            = 32,
  parameter int unsigned L            = 2,
  parameter int unsigned N            = 6,
  parameter int          TH           = 2,
  parameter int unsigned NRATIO       = 3,
  parameter int unsigned TRACK_CYCLES = 200
) (
  input  logic clk,
  input  logic start,
  input  real  sigma,
  output logic done,
  output real  mean_acq,
  output real  rms_deg
);
  import dpll_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  W  = $clog2(2 * M);

  logic rst_n = 1'b0;
  real  u_i, in_ph = 0.0, err, ns = 0.0, nc = 0.0;
  logic out_sig, set_valid, a_pos, b_pos, c_pos, busy;
  logic [W-1:0] phase;
  d_val_t d;
  logic [$clog2(2*N+1)-1:0] walk_state;
  logic signed [$clog2(N+1)+1:0] e;
  step_cmd_t cmd;

  dpll3pd_top #(.M(M), .L(L), .N(N), .TH(TH), .NRATIO(NRATIO), .K(1)) dut (.*);

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real wrap(input real x);
    real y;
    y = x - 2.0 * M * $floor(x / (2.0 * M));
    if (y > M) y = y - 2.0 * M;
    return y;
  endfunction

  always_comb begin
    err = wrap(in_ph - real'(phase));
    u_i = (1.0 + ns) * $sin(PI * in_ph / M) + nc * $cos(PI * in_ph / M);
  end

  always @(posedge clk) begin
    if (rst_n) in_ph <= in_ph + 1.0;
    if (int'(phase) == M) begin
      ns <= sigma * gauss();
      nc <= sigma * gauss();
    end
  end

  initial begin
    done = 1'b0;
    forever begin
      real acq_sum, sq, cnt;
      @(posedge clk iff start);
      done = 1'b0;
      acq_sum = 0.0; sq = 0.0; cnt = 0.0;
      for (int i = 0; i < 2 * M; i++) begin
        int sets;
        rst_n = 1'b0;
        in_ph = real'(i) - real'(M) + 0.5;
        repeat (3) @(posedge clk);
        #1 rst_n = 1'b1;
        sets = 0;
        forever begin
          @(posedge clk);
          if (set_valid) begin
            sets++;
            if (err <= 1.0 && err >= -1.0) break;
          end
        end
        acq_sum += real'(sets);
        repeat (TRACK_CYCLES * 2 * M) begin
          @(posedge clk);
          sq += err * err; cnt += 1.0;
        end
      end
      mean_acq = acq_sum / (2.0 * M);
      rms_deg  = $sqrt(sq / cnt) * 180.0 / M;
      done = 1'b1;
    end
  end
endmodule
