// tb_alexander_pd: self-checking test of the Alexander phase detector.
// clk_s is a 500 ps clock (rising at 0, falling at 250 within each period).
// Random bits are placed so that each transition falls a random 10..200 ps
// before or after the falling edge. Expected: a transition before the
// falling edge gives ADJ_EARLIER, after it ADJ_LATER, none ADJ_HOLD, and
// d_s is the bit present at each rising edge.
module tb_alexander_pd;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_s = 1'b0, rst_n = 1'b1, d_in = 1'b0, d_s;
  adj_e adj;
  int checks = 0, failures = 0;
  int n_early = 0, n_late = 0, n_hold = 0;

  alexander_pd dut (.clk_s(clk_s), .rst_n(rst_n), .d_in(d_in), .d_s(d_s), .adj(adj));

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
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_bit, new_bit;
    int   off;
    bit   early_edge;
    adj_e want;
    #1000;
    rst_n = 1'b1;
    prev_bit = 1'b0;
    fork
      forever begin
        #250 clk_s = 1'b1;
        #250 clk_s = 1'b0;
      end
    join_none
    @(posedge clk_s);
    #1;
    for (int k = 0; k < 500; k++) begin
      new_bit = 1'($urandom);
      early_edge  = 1'($urandom);
      off     = $urandom_range(200, 10);
      // now 1 ps after a rising edge; the falling edge is 249 ps away
      if (early_edge) repeat (249 - off) #1;
      else            repeat (249 + off) #1;
      d_in = new_bit;
      @(posedge clk_s);
      #1;
      want = (new_bit == prev_bit) ? ADJ_HOLD : (early_edge ? ADJ_EARLIER : ADJ_LATER);
      check(d_s == new_bit, "d_s is the bit at the rising edge");
      check(adj == want, "decision matches transition position");
      case (want)
        ADJ_EARLIER: n_early++;
        ADJ_LATER:   n_late++;
        default:     n_hold++;
      endcase
      prev_bit = new_bit;
    end
    check(n_early > 50 && n_late > 50 && n_hold > 50, "all three decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
