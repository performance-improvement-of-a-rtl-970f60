// random_walk_filter_tb - random up/down steps against an integer model of
// the (2N+1)-state counter; checks the state, that Advance fires at 2N and
// Retard at 0 one cycle after the step, and the return to N. Also checks the
// minimum of N consistent steps per output.
module random_walk_filter_tb;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, step = 0, up = 0;
  logic advance, retard;
  logic [3:0] state;
  int checks = 0, failures = 0;
  int model = N, n_adv = 0, n_ret = 0;

  random_walk_filter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit exp_adv, exp_ret;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(state == N, "reset to N");
    // N consecutive up steps: advance on the N-th, not earlier
    for (int i = 1; i <= N; i++) begin
      step = 1; up = 1;
      @(negedge clk);
      step = 0;
      chk(advance == (i == N), $sformatf("advance after %0d up steps", i));
      chk(!retard, "no retard");
    end
    chk(state == N, "back at N");
    for (int i = 0; i < 3000; i++) begin
      step = ($urandom_range(3) != 0);
      up   = ($urandom_range(99) < 55);
      exp_adv = 0; exp_ret = 0;
      if (step) begin
        model += up ? 1 : -1;
        if (model == 2 * N) begin exp_adv = 1; model = N; end
        if (model == 0)     begin exp_ret = 1; model = N; end
      end
      @(negedge clk);
      chk(advance == exp_adv, "advance");
      chk(retard == exp_ret, "retard");
      chk(int'(state) == model, $sformatf("state %0d expected %0d", state, model));
      n_adv += exp_adv; n_ret += exp_ret;
    end
    chk(n_adv > 0 && n_ret > 0, "both outputs exercised");
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
