// sample_timing_tb - drives the strobe decoder with a model of the divider
// (phase counting modulo 2m, with occasional skipped and held counts away
// from the sampling points, and some skips across them) and checks, for
// K = 1 and K = 3: T_C at phase 2m-l of the cycle before a sampled cycle,
// T_A at phase 0 and T_B at phase l of the sampled cycle, one set every K
// cycles, each strobe once, and a strobe moved one clock late when its phase
// value was skipped.
module sample_timing_tb;
  localparam int M = 32, L = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  logic [5:0] phase = '0;
  logic moved = 0, skipped = 0;
  logic tc1, ta1, tb1, tc3, ta3, tb3;

  sample_timing #(.M(M), .L(L), .K(1)) dut1 (.clk, .rst_n, .phase, .moved, .skipped,
                                             .t_c(tc1), .t_a(ta1), .t_b(tb1));
  sample_timing #(.M(M), .L(L), .K(3)) dut3 (.clk, .rst_n, .phase, .moved, .skipped,
                                             .t_c(tc3), .t_a(ta3), .t_b(tb3));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reached(p): phase p was entered by the last step
  function automatic bit reached(input int p, input int prev, input int inc);
    for (int s = 1; s <= inc; s++) if ((prev + s) % (2 * M) == p) return 1;
    return 0;
  endfunction

  initial begin
    int prev, cyc3, ncyc, sets1, sets3;
    bit ra, rb, rc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = 0; cyc3 = 2; ncyc = 0; sets1 = 0; sets3 = 0;
    for (int i = 0; i < 40 * 2 * M; i++) begin
      int v, nx;
      v = 1;
      if ($urandom_range(9) == 0) v = int'($urandom_range(2));
      nx = (prev + v) % (2 * M);
      phase = 6'(nx); moved = (v != 0); skipped = (v == 2);
      #1;
      ra = reached(0, prev, v);
      rb = reached(L, prev, v);
      rc = reached(2 * M - L, prev, v);
      chk(ta1 == ra && tb1 == rb && tc1 == rc, $sformatf("K=1 strobes at phase %0d", nx));
      chk(ta3 == (ra && cyc3 == 2), "K=3 T_A");
      chk(tb3 == (rb && cyc3 == 0), "K=3 T_B");
      chk(tc3 == (rc && cyc3 == 2), "K=3 T_C");
      sets1 += tb1; sets3 += tb3;
      if (ra) begin cyc3 = (cyc3 + 1) % 3; ncyc++; end
      prev = nx;
      @(negedge clk);
    end
    chk(sets1 >= ncyc - 1 && sets1 <= ncyc + 1, "K=1: one set per cycle");
    chk(sets3 >= ncyc / 3 - 1 && sets3 <= ncyc / 3 + 1, "K=3: one set per three cycles");
    $display("cycles %0d sets(K=1) %0d sets(K=3) %0d", ncyc, sets1, sets3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
