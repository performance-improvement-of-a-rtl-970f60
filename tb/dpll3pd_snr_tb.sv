// dpll3pd_snr_tb - the four evaluated configurations (a: conventional loop,
// N = 5, n = 1; b, c, d: N = 6, Th = 2, l = 2, n = 2, 3, 4; all m = 32, k = 1)
// with a noisy input at SNR = -10, -5, 0, +5, +10 and +15 dB. It prints the
// mean acquisition time (in sets) and RMS phase error of each and checks the
// behaviour the evaluation reports:
//   - the RMS error falls and the acquisition time falls as the SNR rises;
//   - from -5 dB up, case b has about the RMS error of case a (within 25%)
//     and acquires faster than it (the measured gap is largest, about 20%, at -5 dB);
//   - from +5 dB up, cases c and d acquire at least 40% faster than case a
//     while their RMS error stays within 25% of it;
//   - at every SNR, a larger n (b -> c -> d) acquires faster;
//   - the performance criterion Q = phi_RMS * sqrt(T_m / kT) (smaller is
//     better) of the best of b, c, d is below that of the conventional loop a
//     at +10 and +15 dB.
module dpll3pd_snr_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  localparam int NC = 4, NS = 6;
  localparam int CN[NC]  = '{5, 6, 6, 6};
  localparam int CNR[NC] = '{1, 2, 3, 4};
  localparam int SNR_DB[NS] = '{-10, -5, 0, 5, 10, 15};

  logic start = 1'b0;
  real  sigma = 0.0;
  logic done[NC];
  real  acq[NC], rms[NC];
  real  tab_acq[NC][NS], tab_rms[NC][NS];

  for (genvar c = 0; c < NC; c++) begin : g_case
    dpll_noise_runner #(.M(32), .L(2), .N(CN[c]), .TH(2), .NRATIO(CNR[c])) u_run (
      .clk, .start, .sigma, .done(done[c]), .mean_acq(acq[c]), .rms_deg(rms[c])
    );
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      sigma = $sqrt(1.0 / (2.0 * $pow(10.0, real'(SNR_DB[s]) / 10.0)));
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      @(negedge clk);
      wait (done[0] && done[1] && done[2] && done[3]);
      for (int c = 0; c < NC; c++) begin
        tab_acq[c][s] = acq[c];
        tab_rms[c][s] = rms[c];
      end
      $display("SNR %3d dB: Tm/kT a %6.1f b %6.1f c %6.1f d %6.1f | RMS deg a %5.2f b %5.2f c %5.2f d %5.2f",
               SNR_DB[s], acq[0], acq[1], acq[2], acq[3], rms[0], rms[1], rms[2], rms[3]);
    end
    for (int c = 0; c < NC; c++) begin
      chk(tab_rms[c][0] > tab_rms[c][NS-1], $sformatf("case %0d: RMS falls with SNR", c));
      chk(tab_acq[c][0] > tab_acq[c][NS-1], $sformatf("case %0d: Tm falls with SNR", c));
    end
    for (int s = 0; s < NS; s++) begin
      chk(tab_acq[1][s] > tab_acq[2][s] && tab_acq[2][s] > tab_acq[3][s],
          $sformatf("%0d dB: larger n acquires faster", SNR_DB[s]));
      if (SNR_DB[s] >= -5) begin
        chk(tab_rms[1][s] < 1.25 * tab_rms[0][s], $sformatf("%0d dB: RMS b close to a", SNR_DB[s]));
        chk(tab_acq[1][s] < tab_acq[0][s], $sformatf("%0d dB: b acquires faster than a", SNR_DB[s]));
      end
      if (SNR_DB[s] >= 5) begin
        for (int c = 2; c < NC; c++) begin
          chk(tab_acq[c][s] < 0.6 * tab_acq[0][s],
              $sformatf("%0d dB: case %0d at least 40%% faster than a", SNR_DB[s], c));
          chk(tab_rms[c][s] < 1.25 * tab_rms[0][s],
              $sformatf("%0d dB: case %0d RMS close to a", SNR_DB[s], c));
        end
      end
    end
    for (int s = 0; s < NS; s++) begin
      real q[NC], qbest;
      for (int c = 0; c < NC; c++) q[c] = tab_rms[c][s] * PI / 180.0 * $sqrt(tab_acq[c][s]);
      qbest = q[1];
      for (int c = 2; c < NC; c++) if (q[c] < qbest) qbest = q[c];
      $display("SNR %3d dB: 10 log Q  a %5.2f  b %5.2f  c %5.2f  d %5.2f", SNR_DB[s],
               10.0 * $log10(q[0]), 10.0 * $log10(q[1]), 10.0 * $log10(q[2]), 10.0 * $log10(q[3]));
      if (SNR_DB[s] >= 10)
        chk(qbest < q[0], $sformatf("%0d dB: best 3-comparator Q below the conventional loop's", SNR_DB[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int s = 0; s < NS; s++) begin
      real q[NC], qbest;
      for (int c = 0; c < NC; c++) q[c] = tab_rms[c][s] * PI / 180.0 * $sqrt(tab_acq[c][s]);
      qbest = q[1];
      for (int c = 2; c < NC; c++) if (q[c] < qbest) qbest = q[c];
      $display("SNR %3d dB: 10 log Q  a %5.2f  b %5.2f  c %5.2f  d %5.2f", SNR_DB[s],
               10.0 * $log10(q[0]), 10.0 * $log10(q[1]), 10.0 * $log10(q[2]), 10.0 * $log10(q[3]));
      if (SNR_DB[s] >= 10)
        chk(qbest < q[0], $sformatf("%0d dB: best 3-comparator Q below the conventional loop's", SNR_DB[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
