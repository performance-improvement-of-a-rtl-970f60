// dpll3pd_cases_tb - runs the four loop configurations of the evaluation
// side by side (noise free, k = 1) and compares them with the closed-form
// estimates:
//   case  N  Th  m   l  n   T_m = N*m/(2n) cycles   locking range n/(mNk)*f0
//   a     5  -   32  -  1   80                      0.00625
//   b     6  2   32  2  2   48                      0.0104
//   c     6  2   32  2  3   32                      0.0156
//   d     6  2   32  2  4   24                      0.0208
//   c,k=2 6  2   32  2  3   64 (one set every 2 cycles) 0.0078
// Case a is the conventional single-comparator loop: with n = 1 both step
// sizes are equal, so the threshold does not matter (it is given TH = 2 and
// l = 2 here). Expected noise-free RMS error: Delta/sqrt(3) = 3.25 degrees.
// The locking range is read as the full width +/- n/(2mNk)*f0: the loop must
// hold lock (|err| bounded) at 0.8 of the one-sided limit and must lose it
// at 1.3 of it.
module dpll3pd_cases_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NC = 5;
  localparam int CN[NC]  = '{5, 6, 6, 6, 6};
  localparam int CNR[NC] = '{1, 2, 3, 4, 3};
  localparam int CK[NC]  = '{1, 1, 1, 1, 2};
  localparam real TM[NC] = '{80.0, 48.0, 32.0, 24.0, 64.0};

  logic done[NC];
  real  mean_acq[NC], rms_deg[NC], worst_in[NC], worst_out[NC];

  for (genvar c = 0; c < NC; c++) begin : g_case
    dpll_case_runner #(.M(32), .L(2), .N(CN[c]), .TH(2), .NRATIO(CNR[c]), .K(CK[c])) u_run (
      .clk, .done(done[c]), .mean_acq(mean_acq[c]), .rms_deg(rms_deg[c]),
      .worst_in(worst_in[c]), .worst_out(worst_out[c])
    );
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    string nm;
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int c = 0; c < NC; c++) begin
      nm = (c < 4) ? string'(8'("a" + c)) : "c, k=2";
      $display("case %s: mean acquisition %0.1f T (estimate %0.0f T), RMS %0.2f deg, worst |err| inside range %0.1f, outside %0.1f Delta",
               nm, mean_acq[c], TM[c], rms_deg[c], worst_in[c], worst_out[c]);
      chk(mean_acq[c] > 0.75 * TM[c] && mean_acq[c] < 1.3 * TM[c],
          $sformatf("case %s acquisition time near N*m/(2n)", nm));
      chk(rms_deg[c] > 3.0 && rms_deg[c] < 3.5, $sformatf("case %s RMS near 3.25 deg", nm));
      chk(worst_in[c] < 16.0, $sformatf("case %s holds lock inside the range", nm));
      chk(worst_out[c] >= 16.0, $sformatf("case %s loses lock outside the range", nm));
      if (c > 0 && c < 4)
        chk(mean_acq[c] < mean_acq[c-1], $sformatf("case %s acquires faster than the previous", nm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
