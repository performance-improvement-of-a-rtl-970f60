// phase_detector_tb - drives random sample values at T_C, T_A, T_B strobes
// and checks A', B', C', D = B' - C' (Table 1 of the loop's description) and
// the one-cycle latency of set_valid. It also checks that a set missing its
// T_C or T_A is not reported.
module phase_detector_tb;
  import dpll_pkg::*;
  logic clk = 0, rst_n = 0, u_o = 0, t_c = 0, t_a = 0, t_b = 0;
  logic set_valid, a_pos, b_pos, c_pos;
  d_val_t d;
  int checks = 0, failures = 0;

  phase_detector dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(ref logic s, input logic v);
    @(negedge clk); s = 1; u_o = v;
    @(negedge clk); s = 0; u_o = ~v;
  endtask

  int hist[3];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // T_B without T_C/T_A: no set
    pulse(t_b, 1);
    chk(!set_valid, "no set without T_C and T_A");
    for (int i = 0; i < 300; i++) begin
      logic vc, va, vb;
      int de;
      vc = 1'($urandom); va = 1'($urandom); vb = 1'($urandom);
      pulse(t_c, vc);
      repeat ($urandom_range(3)) @(negedge clk);
      pulse(t_a, va);
      repeat ($urandom_range(3)) @(negedge clk);
      @(negedge clk); t_b = 1; u_o = vb;
      @(negedge clk); t_b = 0; u_o = ~vb;
      // set_valid is high in this cycle: exactly one cycle after t_b
      chk(set_valid, "set_valid one cycle after T_B");
      chk(a_pos == va && b_pos == vb && c_pos == vc, "sample signs");
      de = (vb ? 1 : -1) - (vc ? 1 : -1);
      chk(int'(d) == de, $sformatf("D=%0d expected %0d", d, de));
      hist[de / 2 + 1]++;
      @(negedge clk);
      chk(!set_valid, "set_valid lasts one cycle");
    end
    chk(hist[0] > 0 && hist[1] > 0 && hist[2] > 0, "all three D values seen");
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
