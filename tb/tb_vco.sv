// tb_vco: self-checking test of the phase-select counter and clock mux,
// driven by the real phase generator (clk_2r period 250 ps, so T = 500 ps).
// Requests are toggled on rising edges of clk_s, as the loop filter does.
// Checked: clk_s rises at sel x 125 ps after phase 0; its high time is
// always 250 ps; each step later stretches exactly one period to 625 ps and
// each step earlier shortens one to 375 ps; every step is taken within one
// period of its request; sel wraps in both directions.
module tb_vco;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_2r = 1'b0, rst_n = 1'b1;
  logic [3:0] ph;
  logic adj_req = 1'b0, adj_dir = 1'b0, clk_s;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  int n_later_req = 0, n_earlier_req = 0, n_long = 0, n_short = 0;
  time t_ph0 = 0, t_rise = 0, t_req = 0;
  bit  started = 1'b0;

  phase_generator u_pg (.clk_2r(clk_2r), .rst_n(rst_n), .ph(ph));
  vco dut (.clk_2r(clk_2r), .rst_n(rst_n), .ph(ph), .adj_req(adj_req),
           .adj_dir(adj_dir), .clk_s(clk_s), .sel(sel));

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

  always @(posedge ph[0]) t_ph0 = $time;

  always @(posedge clk_s) if (live) begin
    if (started) begin
      case ($time - t_rise)
        500: ;
        625: n_long++;
        375: n_short++;
        default: check(1'b0, "clk_s period is 500, 625 or 375 ps");
      endcase
    end
    check((($time - t_ph0) % 500) == 125 * sel, "clk_s is phase sel");
    t_rise  = $time;
    started = 1'b1;
  end

  always @(negedge clk_s) if (live && started)
    check($time - t_rise == 250, "clk_s high for half a period");

  task automatic step(input bit later);
    logic [1:0] expect_sel;
    expect_sel = later ? sel + 2'd1 : sel - 2'd1;
    @(posedge clk_s);
    adj_dir = later;
    adj_req = ~adj_req;
    t_req   = $time;
    if (later) n_later_req++; else n_earlier_req++;
    wait (sel == expect_sel);
    check($time - t_req <= 500, "step taken within one period");
    repeat (4) @(posedge clk_s);
    check(sel == expect_sel, "sel moved one step");
  endtask

  initial begin
    #1000;
    check(sel == 2'd0, "reset selects phase 0");
    @(negedge clk_2r);
    rst_n = 1'b1;
    live = 1'b1;
    repeat (10) @(posedge clk_s);
    for (int i = 0; i < 6; i++) step(1'b1);   // wraps 3 -> 0
    for (int i = 0; i < 9; i++) step(1'b0);   // wraps 0 -> 3
    for (int i = 0; i < 40; i++) step(1'($urandom));
    repeat (4) @(posedge clk_s);
    check(n_long == n_later_req, "one stretched period per step later");
    check(n_short == n_earlier_req, "one shortened period per step earlier");
    $display("later steps %0d earlier steps %0d", n_long, n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
