// digital_phase_shifter_tb - issues small and large advance/retard commands
// and counts the pulses passed to the divider over a fixed window: a command
// must change the count by exactly +/-1 or +/-NRATIO, spread over that many
// clocks starting the cycle after the command, with busy high meanwhile.
module digital_phase_shifter_tb;
  import dpll_pkg::*;
  localparam int NR = 3;
  logic clk = 0, rst_n = 0;
  step_cmd_t cmd = STEP_NONE;
  logic [1:0] inc;
  logic busy;
  int checks = 0, failures = 0;

  digital_phase_shifter #(.NRATIO(NR)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      bit adv, big;
      int pulses, busy_cyc, size, win;
      adv = 1'($urandom); big = 1'($urandom);
      size = big ? NR : 1;
      win = 8;
      chk(inc == 2'd1 && !busy, "idle passes one pulse per clock");
      cmd = '{valid: 1'b1, advance: adv, big: big};
      @(negedge clk);
      cmd = STEP_NONE;
      pulses = 0; busy_cyc = 0;
      for (int c = 0; c < win; c++) begin
        pulses += int'(inc);
        if (busy) begin
          busy_cyc++;
          chk(c < size, "busy only for the correction");
          chk(inc == (adv ? 2'd2 : 2'd0), "added or deleted pulse");
        end
        @(negedge clk);
      end
      chk(busy_cyc == size, $sformatf("correction lasts %0d clocks", size));
      chk(pulses == win + (adv ? size : -size),
          $sformatf("pulse count %0d, expected %0d", pulses, win + (adv ? size : -size)));
    end
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
