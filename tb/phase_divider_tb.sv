// phase_divider_tb - feeds random increments of 0, 1 or 2 and checks the
// phase count modulo 2m, the output signal (high for counts 0..m-1), the
// moved/skipped flags and, with steady increments of 1, an output period of
// exactly 2m clocks.
module phase_divider_tb;
  localparam int M = 32;
  logic clk = 0, rst_n = 0;
  logic [1:0] inc = 2'd1;
  logic [5:0] phase;
  logic out_sig, moved, skipped;
  int checks = 0, failures = 0;

  phase_divider #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int model, last_rise, period;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = 0;
    for (int i = 0; i < 2000; i++) begin
      int v;
      v = (i % 7 == 3) ? int'($urandom_range(2)) : 1;
      inc = 2'(v);
      model = (model + v) % (2 * M);
      @(negedge clk);
      chk(int'(phase) == model, $sformatf("phase %0d expected %0d", phase, model));
      chk(out_sig == (model < M), "output level");
      chk(moved == (v != 0) && skipped == (v == 2), "moved/skipped");
    end
    // period of the output with no corrections
    inc = 2'd1;
    last_rise = -1; period = 0;
    for (int i = 0; i < 5 * 2 * M; i++) begin
      logic prev;
      prev = out_sig;
      @(negedge clk);
      if (out_sig && !prev) begin
        if (last_rise >= 0) begin
          period = i - last_rise;
          chk(period == 2 * M, $sformatf("output period %0d clocks", period));
        end
        last_rise = i;
      end
    end
    chk(period == 2 * M, "period measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
