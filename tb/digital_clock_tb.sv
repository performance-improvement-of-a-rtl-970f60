// digital_clock_tb - the controlled oscillator as a whole. A free-running
// reference count runs alongside; after each random command (advance or
// retard, Delta or n*Delta) the offset between the loop's phase and the
// reference must change by exactly +/-1 or +/-NRATIO steps. Strobes must fall
// at phases 2m-l (T_C), 0 (T_A) and l (T_B), once per output cycle, and the
// output signal must have period 2m clocks while no correction is made.
module digital_clock_tb;
  import dpll_pkg::*;
  localparam int M = 32, L = 2, NR = 3;
  logic clk = 0, rst_n = 0;
  step_cmd_t cmd = STEP_NONE;
  logic out_sig, t_c, t_a, t_b, busy;
  logic [5:0] phase;
  int checks = 0, failures = 0;

  digital_clock #(.M(M), .L(L), .K(1), .NRATIO(NR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ref_ph = 0;
  always @(posedge clk) if (rst_n) ref_ph <= (ref_ph + 1) % (2 * M);

  function automatic int offs();
    return (int'(phase) - ref_ph + 4 * M) % (2 * M);
  endfunction

  int n_a = 0, n_b = 0, n_c = 0;
  always @(negedge clk) if (rst_n) begin
    if (t_a) begin n_a++; checks++; if (phase != 0) begin failures++; $display("FAIL: T_A at %0d", phase); end end
    if (t_b) begin n_b++; checks++; if (phase != L) begin failures++; $display("FAIL: T_B at %0d", phase); end end
    if (t_c) begin n_c++; checks++; if (phase != 2 * M - L) begin failures++; $display("FAIL: T_C at %0d", phase); end end
  end

  initial begin
    int off0, exp;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // phase 0 at reset is not a fresh arrival, so the first T_A is at clock
    // 2m while T_B (phase l) already fires in the first cycle
    repeat (3 * 2 * M + 4) @(negedge clk);
    chk(n_a == 3 && n_b == 4 && n_c == 3, $sformatf("one set per cycle (%0d %0d %0d)", n_a, n_b, n_c));
    for (int i = 0; i < 100; i++) begin
      bit adv, big;
      adv = 1'($urandom); big = 1'($urandom);
      // commands are issued just after T_B, as the loop does
      do @(negedge clk); while (phase != L + 2);
      off0 = offs();
      cmd = '{valid: 1'b1, advance: adv, big: big};
      @(negedge clk);
      cmd = STEP_NONE;
      repeat (NR + 2) @(negedge clk);
      exp = (off0 + (adv ? 1 : -1) * (big ? NR : 1) + 2 * M) % (2 * M);
      chk(offs() == exp, $sformatf("phase offset %0d expected %0d", offs(), exp));
    end
    // period check
    begin
      int i;
      do @(negedge clk); while (!(out_sig && phase == 0));
      i = 0;
      do begin @(negedge clk); i++; end while (phase != 0);
      chk(i == 2 * M, $sformatf("output period %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
