// hard_limiter_tb - checks that the limiter output is 1 exactly for positive
// inputs, over a sweep of a sine wave and a set of random values.
module hard_limiter_tb;
  real  u_i;
  logic u_o;
  int checks = 0, failures = 0;

  hard_limiter dut (.u_i, .u_o);

  initial begin
    for (int i = 0; i < 256; i++) begin
      u_i = $sin(2.0 * 3.14159265358979 * (real'(i) + 0.37) / 64.0);
      #1;
      checks++;
      if (u_o != (u_i > 0.0)) begin
        failures++;
        $display("FAIL: u_i=%f u_o=%0d", u_i, u_o);
      end
    end
    for (int i = 0; i < 256; i++) begin
      u_i = (real'($urandom_range(2000)) - 1000.0) / 7.0;
      #1;
      checks++;
      if (u_o != (u_i > 0.0)) begin
        failures++;
        $display("FAIL: u_i=%f u_o=%0d", u_i, u_o);
      end
    end
    u_i = 0.0; #1;
    checks++;
    if (u_o != 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
