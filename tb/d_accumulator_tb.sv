// d_accumulator_tb - random D values, steps and clears against an integer
// model: E moves by D/2 per set, saturates at +/-EMAX and is cleared by a
// correction (a set coinciding with the clear counts into the new interval).
module d_accumulator_tb;
  import dpll_pkg::*;
  localparam int EMAX = 6;
  logic clk = 0, rst_n = 0, step = 0, clear = 0;
  d_val_t d = '0;
  logic signed [4:0] e;
  int checks = 0, failures = 0;
  int model = 0, n_sat = 0;

  d_accumulator #(.EMAX(EMAX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int dv;
      dv = 2 * ($urandom_range(2) - 1);
      if (i % 500 < 100) dv = 2;          // runs that reach saturation
      else if (i % 500 < 200) dv = -2;
      d = 3'(dv);
      step  = ($urandom_range(3) != 0);
      clear = ($urandom_range(40) == 0);
      if (clear) model = 0;
      if (step) begin
        model += dv / 2;
        if (model > EMAX) model = EMAX;
        if (model < -EMAX) model = -EMAX;
      end
      if (model == EMAX || model == -EMAX) n_sat++;
      @(negedge clk);
      checks++;
      if (int'(e) != model) begin
        failures++;
        $display("FAIL: E=%0d expected %0d", e, model);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
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
