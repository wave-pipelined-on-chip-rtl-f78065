// tb_wp_distortion: distortion tolerance of the receiver.
//
// A four-phase PLL keeps every data transition within a quarter period of
// the falling edge of CLK_S, so a bit is still sampled correctly while its
// width differs from the bit time by up to 25 % (the distortion rate DR).
// This test sends random 2 Gb/s streams whose every edge is displaced by a
// uniformly random amount in [-DISP, +DISP] ps; with DISP = 60 ps a bit's
// width lies between 380 and 620 ps, a DR of up to 24 %. Four
// receivers see four mean edge positions, from exactly on a CLK_S phase
// (the worst case, where the loop dithers between two phases a quarter
// period apart) to halfway between two phases. After acquisition every bit
// of d_out must equal the sent stream, in order.
module tb_wp_distortion;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, N_BITS = 4000, ACQ = 200, WIN = 64, DISP = 60;
  localparam int N = 4;
  localparam int DATA_OFF [N] = '{0, 31, 62, 93};  // offset from the phase grid

  logic clk_2r = 1'b0, clk_r = 1'b0, rst_n = 1'b1;
  logic d_in [N], d_out [N], clk_s [N], d_s [N];
  logic [1:0] sel [N];
  adj_e adj [N];
  logic bits [N_BITS];
  int checks = 0, failures = 0;

  always #(T / 4) clk_2r = ~clk_2r;
  // Asynchronous reset is asserted by an edge shortly after start-up, so
  // that every flip-flop sees it even when its clock is not yet running.
  initial #1 rst_n = 1'b0;

  bit live = 1'b0;  // set once reset has been released

  initial begin
    #200;
    forever begin
      #(T / 2) clk_r = 1'b1;
      #(T / 2) clk_r = 1'b0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial for (int k = 0; k < N_BITS; k++) bits[k] = 1'($urandom);

  for (genvar i = 0; i < N; i++) begin : g
    logic rec [$];
    int   n_cyc = 0;

    // bit k nominally starts at 2000 + DATA_OFF + k*T; 2000 ps lies on a
    // falling edge of one of the four phases (they rise from 1125 ps on)
    initial begin
      d_in[i] = 1'b0;
      #(2000 + DATA_OFF[i] - DISP);
      for (int k = 0; k < N_BITS; k++) begin
        int unsigned j;
        j = $urandom_range(2 * DISP, 0);
        repeat (j) #1;
        d_in[i] = bits[k];
        repeat (T - j) #1;
      end
    end

    wp_receiver dut (.clk_2r(clk_2r), .clk_r(clk_r), .rst_n(rst_n),
                     .d_in(d_in[i]), .d_out(d_out[i]), .clk_s(clk_s[i]),
                     .d_s(d_s[i]), .sel(sel[i]), .adj(adj[i]));

    always @(posedge clk_r) if (live) begin
      n_cyc++;
      if (n_cyc > ACQ) rec.push_back(d_out[i]);
    end
  end

  task automatic check_stream(input int i, input logic r [$]);
    int pos, n, errs;
    n = r.size();
    pos = -1;
    errs = 0;
    for (int p = 0; p + WIN < N_BITS && pos < 0; p++) begin
      bit ok;
      ok = 1'b1;
      for (int j = 0; j < WIN && ok; j++) ok = (r[j] == bits[p + j]);
      if (ok) pos = p;
    end
    check(pos >= 0, "received stream found in the sent stream");
    if (pos >= 0)
      for (int j = 0; j < n && pos + j < N_BITS; j++) begin
        check(r[j] == bits[pos + j], "bit received despite edge displacement");
        if (r[j] != bits[pos + j]) errs++;
      end
    $display("receiver %0d (mean edge %0d ps off grid, +-%0d ps): %0d bits, %0d errors",
             i, DATA_OFF[i], DISP, n, errs);
  endtask

  initial begin
    #1000;
    @(negedge clk_2r);
    rst_n = 1'b1;
    live = 1'b1;
    #(2000 + (N_BITS - 20) * T);
    check_stream(0, g[0].rec);
    check_stream(1, g[1].rec);
    check_stream(2, g[2].rec);
    check_stream(3, g[3].rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
