// tb_phase_generator: self-checking test of the four-phase generator.
// With a 250 ps clk_2r the four outputs must be 500 ps clocks with 50 %
// duty cycle, ph[k] rising exactly k x 125 ps after ph[0].
module tb_phase_generator;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_2r = 1'b0, rst_n = 1'b1;
  logic [3:0] ph;
  int checks = 0, failures = 0;
  time t_rise [4], t_fall [4];
  int  n_rise [4];

  phase_generator dut (.clk_2r(clk_2r), .rst_n(rst_n), .ph(ph));

  always #125 clk_2r = ~clk_2r;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Asynchronous reset is asserted by an edge shortly after start-up, so
  // that every flip-flop sees it even when its clock is not yet running.
  initial #1 rst_n = 1'b0;

  bit live = 1'b0;  // set once reset has been released

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge ph[k]) if (live) begin
      if (n_rise[k] > 0) check($time - t_rise[k] == 500, "period 500 ps");
      if (k > 0 && n_rise[0] > 0)
        check(($time - t_rise[0]) % 500 == k * 125, "phase k x 90 degrees");
      t_rise[k] = $time;
      n_rise[k]++;
    end
    always @(negedge ph[k]) if (live && n_rise[k] > 0) begin
      check($time - t_rise[k] == 250, "50 % duty cycle");
      t_fall[k] = $time;
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) n_rise[k] = 0;
    #1000;
    check(ph == 4'b1100, "reset state");
    @(negedge clk_2r);
    rst_n = 1'b1;
    live = 1'b1;
    #50_000;
    for (int k = 0; k < 4; k++) check(n_rise[k] >= 90, "all phases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
