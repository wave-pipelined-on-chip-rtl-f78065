// tb_wp_segment: self-checking test of the wire segment model.
// One segment without jitter must invert every edge 150 ps later,
// including pulses shorter than the delay; one with 40 ps jitter must place
// every output edge 150..190 ps after its input edge.
module tb_wp_segment;
  timeunit 1ps;
  timeprecision 1ps;

  logic a = 1'b0, y0, y1;
  int checks = 0, failures = 0;
  time t_in [$];

  wp_segment #(.SEG_DELAY_PS(150), .JITTER_PS(0))  dut0 (.a(a), .y(y0));
  wp_segment #(.SEG_DELAY_PS(150), .JITTER_PS(40)) dut1 (.a(a), .y(y1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every edge of the jittered copy must land in the allowed window.
  bit jitter_phase = 1'b0;

  always @(a) if (jitter_phase) t_in.push_back($time);

  always @(y1) if (jitter_phase) begin
    time t0;
    t0 = t_in.pop_front();
    check($time - t0 >= 150 && $time - t0 <= 190, "jittered edge in window");
  end

  initial begin
    #1000;
    check(y0 == 1'b1 && y1 == 1'b1, "settled output is inverted input");
    jitter_phase = 1'b1;
    for (int i = 0; i < 200; i++) begin
      a = ~a;
      #149 check(y0 == a, "no change before the delay");
      #2   check(y0 == ~a, "inverted once the delay has passed");
      #299;
    end
    #1000;
    jitter_phase = 1'b0;
    check(t_in.size() == 0, "every jittered edge delivered");
    // A train of 100 ps pulses, shorter than the delay, keeps its shape:
    // y0 sampled 150 ps after a sample of a must be its inverse.
    begin
      logic rec [20];
      fork
        for (int i = 0; i < 10; i++) begin
          a = ~a;
          #100;
        end
        for (int i = 0; i < 20; i++) begin
          #25 rec[i] = a;
          #25;
        end
        begin
          #150;
          for (int i = 0; i < 20; i++) begin
            #25 check(y0 == ~rec[i], "short pulse delivered intact");
            #25;
          end
        end
      join
    end
    #200 check(y0 == ~a, "pulse train fully delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
