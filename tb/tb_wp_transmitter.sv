// tb_wp_transmitter: self-checking test of the transmitter flip-flop.
// Drives random bits on a 500 ps clock and checks that each bit appears on
// d_tx exactly one rising edge later, and that reset clears the output.
module tb_wp_transmitter;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_t = 1'b0, rst_n = 1'b1, d_in = 1'b0, d_tx;
  int checks = 0, failures = 0;

  wp_transmitter dut (.clk_t(clk_t), .rst_n(rst_n), .d_in(d_in), .d_tx(d_tx));

  always #250 clk_t = ~clk_t;

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

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev, launched;
    d_in = 1'b1;
    launched = 1'b0;
    repeat (3) @(posedge clk_t);
    #10 check(d_tx == 1'b0, "reset holds output low");
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk_t);
      d_in = 1'($urandom);
      prev = d_in;
      check(d_tx == launched, "output holds between edges");
      @(posedge clk_t);
      #1 check(d_tx == prev, "bit launched on the rising edge");
      launched = prev;
    end
    rst_n = 1'b0;
    #1 check(d_tx == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
