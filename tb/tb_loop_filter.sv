// tb_loop_filter: self-checking test of the 4-state loop filter.
// Random decisions (hold / later / earlier) are applied on a 500 ps clock.
// A reference count of non-hold decisions predicts which ones pass: the
// 1st, 5th, 9th, ... Checked after every edge: adj_req toggles exactly for
// those, adj_dir then carries their direction, and exactly one in four
// non-hold decisions gets through.
module tb_loop_filter;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_s = 1'b0, rst_n = 1'b1, adj_req, adj_dir;
  adj_e adj = ADJ_HOLD;
  int checks = 0, failures = 0;
  int n_dec = 0, n_pass = 0;

  loop_filter #(.N_STATE(4)) dut (.clk_s(clk_s), .rst_n(rst_n), .adj(adj),
                                  .adj_req(adj_req), .adj_dir(adj_dir));

  always #250 clk_s = ~clk_s;

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
    logic req_q, dir_q;
    bit   pass;
    #1000;
    check(adj_req == 1'b0 && adj_dir == 1'b0, "reset values");
    @(negedge clk_s);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk_s);
      case ($urandom_range(2, 0))
        0: adj = ADJ_HOLD;
        1: adj = ADJ_LATER;
        default: adj = ADJ_EARLIER;
      endcase
      req_q = adj_req;
      dir_q = adj_dir;
      pass  = (adj != ADJ_HOLD) && (n_dec % 4 == 0);
      if (adj != ADJ_HOLD) n_dec++;
      @(posedge clk_s);
      #1;
      if (pass) begin
        n_pass++;
        check(adj_req != req_q, "passed decision toggles the request");
        check(adj_dir == (adj == ADJ_LATER), "direction of the passed decision");
      end else begin
        check(adj_req == req_q, "dropped decision leaves the request");
        check(adj_dir == dir_q, "dropped decision leaves the direction");
      end
    end
    check(n_pass == (n_dec + 3) / 4, "one in four decisions passed");
    $display("decisions %0d passed %0d", n_dec, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
