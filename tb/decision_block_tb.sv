// decision_block_tb - for every E in [-EMAX, EMAX] and both directions,
// checks the step command one cycle after the filter pulse: direction from
// the pulse, large step for E < TH, small step for E >= TH, and no command
// without a pulse.
module decision_block_tb;
  import dpll_pkg::*;
  localparam int EMAX = 6, TH = 2;
  logic clk = 0, rst_n = 0, advance = 0, retard = 0;
  logic signed [4:0] e = '0;
  step_cmd_t cmd;
  int checks = 0, failures = 0;

  decision_block #(.EMAX(EMAX), .TH(TH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ev = -EMAX; ev <= EMAX; ev++) begin
      for (int dir = 0; dir < 2; dir++) begin
        e = 5'(ev); advance = (dir == 1); retard = (dir == 0);
        @(negedge clk);
        advance = 0; retard = 0;
        chk(cmd.valid, "command issued");
        chk(cmd.advance == (dir == 1), "direction");
        chk(cmd.big == (ev < TH), $sformatf("size for E=%0d", ev));
        @(negedge clk);
        chk(!cmd.valid, "one-cycle command");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
