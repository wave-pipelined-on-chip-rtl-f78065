// tb_wp_channel: self-checking test of the 20-segment wave-pipelined wire.
// A random bit stream at 2 Gb/s (500 ps per bit) is sent into the wire,
// whose delay (20 x 150 ps = 3 ns) spans six bits, so six waves are in
// flight at once. Each bit is checked in the middle of its slot 3 ns later,
// and the delay of a single edge is measured.
module tb_wp_channel;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N_SEG = 20, SEG_DELAY = 150, BIT = 500, N_BITS = 300;
  localparam int DELAY = N_SEG * SEG_DELAY;

  logic d_in = 1'b0, d_out;
  logic bits [N_BITS];
  int checks = 0, failures = 0;
  int waves_in_flight = 0;

  wp_channel #(.N_SEG(N_SEG), .SEG_DELAY_PS(SEG_DELAY), .JITTER_PS(0))
    dut (.d_in(d_in), .d_out(d_out));

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

  // sender
  initial begin
    time t0;
    #10_000;
    check(d_out == 1'b0, "even segment count keeps polarity");
    t0 = $time;
    d_in = 1'b1;
    @(d_out);
    check($time - t0 == time'(DELAY), "single-edge delay is N_SEG x segment delay");
    #10_000;
    for (int k = 0; k < N_BITS; k++) bits[k] = 1'($urandom);
    fork
      for (int k = 0; k < N_BITS; k++) begin
        d_in = bits[k];
        #BIT;
      end
      begin
        #(DELAY + BIT / 2);
        for (int k = 0; k < N_BITS; k++) begin
          check(d_out == bits[k], "bit delivered after the wire delay");
          #BIT;
        end
      end
    join
    waves_in_flight = DELAY / BIT;
    check(waves_in_flight >= 6, "several bits in flight at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
