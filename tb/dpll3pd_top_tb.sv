// dpll3pd_top_tb - end-to-end test of the three-phase-comparator DPLL at its
// default configuration (m = 32, l = 2, N = 6, Th = 2, n = 3, k = 1).
//
// The clock is the 2m*f0 oscillator. The input is A*sin(phi_in) plus, where
// enabled, narrowband Gaussian noise n_s*sin + n_c*cos whose two components
// are held for one input cycle and redrawn for the next. The testbench knows
// the input phase exactly, in units of Delta = pi/m, and reads the loop's
// phase from the divider, so the phase error is err = phi_in - phase.
//
// Scenarios:
//   1. noise-free acquisition from several initial errors: the loop must use
//      large steps while |err| is outside the tracking window, reach
//      |err| <= 1 within the time bound of one n*Delta step per N sets, switch
//      to small steps and then stay within +/-Delta. Consecutive large steps
//      must be T' = N*k*T apart.
//   2. the same at SNR = 10 dB: lock must be reached and the RMS error after
//      lock must stay small.
//   3. an input frequency offset of 0.5% of f0, inside the locking range
//      n/(m*N*k) = 1.56%: the loop must keep tracking it.
// Every step command is compared with the filter and E values a reference
// model derives from the observed sets. Each mechanism (advance, retard,
// large step, small step, acquisition-to-tracking switch, E saturation,
// filter reset) is counted and must occur.
module dpll3pd_top_tb;
  import dpll_pkg::*;

  localparam int M = 32, L = 2, N = 6, TH = 2, NR = 3, EMAX = N;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  real  u_i;
  logic out_sig, set_valid, a_pos, b_pos, c_pos, busy;
  logic [5:0] phase;
  d_val_t d;
  logic [3:0] walk_state;
  logic signed [4:0] e;
  step_cmd_t cmd;

  dpll3pd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_adv = 0, n_ret = 0, n_big = 0, n_small = 0, n_switch = 0, n_sat = 0, n_wreset = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- input generator ----------------
  real in_ph;        // input phase in units of Delta
  real freq = 1.0;   // input phase increment per clock (1.0 = exactly f0)
  real sigma = 0.0;  // noise standard deviation (A = 1)
  real ns = 0.0, nc = 0.0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic real fabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real wrap(input real x);   // to (-M, M]
    real y;
    y = x - 2.0 * M * $floor(x / (2.0 * M));
    if (y > M) y = y - 2.0 * M;
    return y;
  endfunction

  real err;
  always_comb begin
    err = wrap(in_ph - real'(phase));
    u_i = $sin(PI * in_ph / M) + ns * $sin(PI * in_ph / M)
          + nc * $cos(PI * in_ph / M);
  end

  always @(posedge clk) begin
    real nxt;
    nxt = in_ph + freq;
    if ($floor(nxt / (2.0 * M)) != $floor(in_ph / (2.0 * M)) && sigma > 0.0) begin
      ns = sigma * gauss();
      nc = sigma * gauss();
    end
    if (rst_n) in_ph <= nxt;
  end

  // ---------------- reference model of filter, adder and decision ----------------
  int ref_walk = N, ref_e = 0;
  bit exp_cmd = 0, exp_adv = 0, exp_big = 0;
  bit last_big = 1;
  bit model_on = 0;
  int cmd_cnt = 0;
  longint clk_cnt = 0, last_big_clk = -1;
  int n_tprime = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      ref_walk = N; ref_e = 0; exp_cmd = 0; last_big = 1;
    end else begin
      // command produced from the event of two cycles ago
      if (model_on) begin
        if (cmd.valid) begin
          check(exp_cmd, "unexpected step command");
          check(cmd.advance == exp_adv, "step direction");
          check(cmd.big == exp_big, "step size");
        end else begin
          check(!exp_cmd, "missing step command");
        end
      end
      clk_cnt++;
      // consecutive large steps of a noise-free acquisition are one filter
      // pass apart: N sets of K = 1 cycles, T' = N*k*T, less the n clocks the
      // previous advance (or plus those a retard) took out of the cycle
      if (cmd.valid && cmd.big && model_on && last_big_clk >= 0
          && sigma == 0.0 && freq == 1.0) begin
        longint dt;
        dt = clk_cnt - last_big_clk;
        check(dt >= N * 2 * M - NR && dt <= N * 2 * M + NR,
              $sformatf("interval between large steps %0d clocks, T' = %0d", dt, N * 2 * M));
        n_tprime++;
      end
      if (cmd.valid && model_on) last_big_clk = cmd.big ? clk_cnt : -1;
      if (!model_on) last_big_clk = -1;
      if (cmd.valid) begin
        cmd_cnt++;
        if (cmd.advance) n_adv++; else n_ret++;
        if (cmd.big) n_big++; else n_small++;
        if (last_big && !cmd.big) n_switch++;
        last_big = cmd.big;
      end
      exp_cmd = 0;
      if (dut.u_core.u_rwf.advance || dut.u_core.u_rwf.retard) begin
        exp_cmd = 1;
        exp_adv = dut.u_core.u_rwf.advance;
        exp_big = (ref_e < TH);
        n_wreset++;
        if (model_on) check(walk_state == N, "filter back at N after a step");
        ref_e = 0;
      end
      if (set_valid) begin
        ref_walk += a_pos ? 1 : -1;
        if (ref_walk == 2 * N || ref_walk == 0) ref_walk = N;
        ref_e += (d == 2) ? 1 : (d == -2) ? -1 : 0;
        if (ref_e > EMAX) ref_e = EMAX;
        if (ref_e < -EMAX) ref_e = -EMAX;
        if (ref_e == EMAX || ref_e == -EMAX) n_sat++;
        check(d == ((b_pos ? 1 : -1) - (c_pos ? 1 : -1)), "D = B' - C'");
      end
    end
  end

  // check after the registers settled: walk and E follow the reference
  always @(negedge clk) begin
    if (rst_n && model_on) begin
      if (dut.u_core.u_pd.set_valid === 1'b0 && !dut.u_core.u_rwf.advance && !dut.u_core.u_rwf.retard) begin
        if (int'(walk_state) != ref_walk) begin
          checks++; failures++;
          $display("FAIL: walk state %0d, expected %0d", walk_state, ref_walk);
        end
        if (int'(e) != ref_e) begin
          checks++; failures++;
          $display("FAIL: E %0d, expected %0d", e, ref_e);
        end
      end
    end
  end

  // ---------------- the six outcomes of a clean sine ----------------
  // With no noise, (A', B', C') can only take six values; each has its D:
  //   A' +1 +1 +1 -1 -1 -1
  //   B' -1 +1 +1 +1 -1 -1
  //   C' +1 +1 -1 -1 -1 +1
  //   D  -2  0 +2 +2  0 -2
  localparam bit [2:0] OUTCOME[6] = '{3'b101, 3'b111, 3'b110, 3'b010, 3'b000, 3'b001};
  localparam int       OUT_D[6]   = '{-2, 0, 2, 2, 0, -2};
  int outcome_seen[6];
  always @(posedge clk) begin
    if (rst_n && set_valid && model_on && sigma == 0.0 && freq == 1.0) begin
      int idx;
      idx = -1;
      for (int i = 0; i < 6; i++) if ({a_pos, b_pos, c_pos} == OUTCOME[i]) idx = i;
      check(idx >= 0, $sformatf("clean-input outcome A'B'C' = %b is one of the six", {a_pos, b_pos, c_pos}));
      if (idx >= 0) begin
        check(int'(d) == OUT_D[idx], "D of the outcome");
        outcome_seen[idx]++;
      end
    end
  end

  // ---------------- phase detector sample check ----------------
  // A' must be the sign of the input at the clock where phase reached 0.
  bit exp_a;
  always @(posedge clk) begin
    if (rst_n && dut.u_core.u_clk.t_a) exp_a = (u_i > 0.0);
    if (rst_n && set_valid && model_on) check(a_pos == exp_a, "A' = sign of input at T_A");
  end

  // ---------------- scenario helpers ----------------
  task automatic restart(input real ph0);
    model_on = 0;
    rst_n = 0;
    in_ph = ph0;
    ns = 0.0; nc = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
  endtask

  // runs until |err| <= 1 for a whole set period; returns cycles of f0 taken
  task automatic acquire(input int max_cycles, output int cycles, output bit ok);
    int ticks;
    ticks = 0; ok = 0;
    while (ticks < max_cycles * 2 * M) begin
      @(posedge clk); ticks++;
      if (set_valid && err <= 1.0 && err >= -1.0) begin ok = 1; break; end
    end
    cycles = ticks / (2 * M);
  endtask

  real e0s[5] = '{16.3, -16.3, 31.3, -30.7, 8.3};

  initial begin
    int cyc, big_before, small_before, worst_ticks;
    bit ok;
    real sumsq, cnt, worst;
    in_ph = 0.0;
    // ---- 1. noise-free acquisition ----
    foreach (e0s[i]) begin
      int bound;
      restart(e0s[i]);
      model_on = 1;
      big_before = n_big; small_before = n_small;
      bound = (int'($ceil((fabs(e0s[i]) - 1.0) / NR)) + 2) * N + 4;
      acquire(bound, cyc, ok);
      check(ok, $sformatf("noise-free lock from %0.1f Delta within %0d cycles (took %0d)",
                          e0s[i], bound, cyc));
      check(n_big - big_before >= int'($floor((fabs(e0s[i]) - L) / NR)),
            "acquisition used large steps");
      $display("acquisition from %5.1f Delta: %0d cycles, %0d large steps",
               e0s[i], cyc, n_big - big_before);
      // tracking: stay within the +/-l window with small steps only
      small_before = n_small;
      big_before = n_big;
      worst = 0.0;
      repeat (200 * 2 * M) begin
        @(posedge clk);
        if (fabs(err) > worst) worst = fabs(err);
      end
      check(worst <= 1.0, $sformatf("tracking error %0.2f within Delta", worst));
      check(n_big == big_before, "no large steps while tracking noise-free");
      check(n_small > small_before, "small steps while tracking");
    end

    // ---- 2. noisy acquisition, SNR = 10 dB ----
    sigma = $sqrt(1.0 / (2.0 * 10.0));
    restart(24.4);
    model_on = 1;
    acquire(400, cyc, ok);
    check(ok, $sformatf("lock at 10 dB SNR (took %0d cycles)", cyc));
    sumsq = 0.0; cnt = 0.0;
    repeat (400 * 2 * M) begin
      @(posedge clk);
      sumsq += err * err; cnt += 1.0;
    end
    $display("10 dB SNR: RMS phase error %0.2f deg", $sqrt(sumsq / cnt) * 180.0 / M);
    check($sqrt(sumsq / cnt) < 2.0, "RMS error at 10 dB below 2 Delta");

    // ---- 3. frequency offset inside the locking range ----
    sigma = 0.0;
    freq = 1.005;
    restart(-12.6);
    model_on = 1;
    acquire(200, cyc, ok);
    check(ok, "lock with 0.5% frequency offset");
    worst = 0.0;
    repeat (300 * 2 * M) begin
      @(posedge clk);
      if (fabs(err) > worst) worst = fabs(err);
    end
    check(worst <= real'(L + NR) + 1.0, $sformatf("tracking a frequency offset, worst %0.2f", worst));
    freq = 1.0;

    // ---- mechanisms ----
    $display("advance %0d retard %0d large %0d small %0d switch %0d E-saturation %0d filter-reset %0d",
             n_adv, n_ret, n_big, n_small, n_switch, n_sat, n_wreset);
    check(n_adv > 0, "advance happened");
    check(n_ret > 0, "retard happened");
    check(n_big > 0, "large step happened");
    check(n_small > 0, "small step happened");
    check(n_switch > 0, "acquisition-to-tracking switch happened");
    check(n_sat > 0, "E saturation happened");
    check(n_wreset > 0, "filter reset happened");
    check(n_tprime > 10, "large-step interval measured");
    foreach (outcome_seen[i])
      check(outcome_seen[i] > 0, $sformatf("clean-input outcome %0d occurred", i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
