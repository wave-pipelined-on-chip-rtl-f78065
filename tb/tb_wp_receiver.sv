// tb_wp_receiver: self-checking test of the receiver (PLL + FIFO retimer).
// clk_2r has a 250 ps period; the receiver clock clk_r has the same
// frequency as the data (500 ps) but is offset by CLK_R_OFF ps from the
// phase generator's phase 0. A random 2 Gb/s stream with 0..JIT ps jitter
// per edge arrives at phase DATA_OFF. After the acquisition time every bit
// of d_out, one per clk_r cycle, must equal the sent stream in order (no
// bit lost or repeated, so the latency in clk_r cycles is constant). Two
// receivers run with different clock and data phases.
module tb_wp_receiver;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, N_BITS = 3000, ACQ = 200, JIT = 30, WIN = 64;
  localparam int DATA_OFF [2]  = '{60, 410};
  localparam int CLK_R_OFF [2] = '{90, 340};

  logic clk_2r = 1'b0, rst_n = 1'b1;
  logic clk_r [2], d_in [2], d_out [2], clk_s [2], d_s [2];
  logic [1:0] sel [2];
  adj_e adj [2];
  logic bits [N_BITS];
  int checks = 0, failures = 0;

  always #(T / 4) clk_2r = ~clk_2r;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Asynchronous reset is asserted by an edge shortly after start-up, so
  // that every flip-flop sees it even when its clock is not yet running.
  initial #1 rst_n = 1'b0;

  bit live = 1'b0;  // set once reset has been released

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial for (int k = 0; k < N_BITS; k++) bits[k] = 1'($urandom);

  for (genvar i = 0; i < 2; i++) begin : g
    logic rec [$];
    int   n_cyc = 0;

    initial begin
      clk_r[i] = 1'b0;
      #(CLK_R_OFF[i]);
      forever begin
        #(T / 2) clk_r[i] = 1'b1;
        #(T / 2) clk_r[i] = 1'b0;
      end
    end

    initial begin
      d_in[i] = 1'b0;
      #(1000 + DATA_OFF[i]);
      for (int k = 0; k < N_BITS; k++) begin
        int unsigned j;
        j = $urandom_range(JIT, 0);
        repeat (j) #1;
        d_in[i] = bits[k];
        repeat (T - j) #1;
      end
    end

    wp_receiver dut (.clk_2r(clk_2r), .clk_r(clk_r[i]), .rst_n(rst_n),
                     .d_in(d_in[i]), .d_out(d_out[i]), .clk_s(clk_s[i]),
                     .d_s(d_s[i]), .sel(sel[i]), .adj(adj[i]));

    always @(posedge clk_r[i]) if (live) begin
      n_cyc++;
      if (n_cyc > ACQ) rec.push_back(d_out[i]);
    end
  end

  task automatic check_stream(input int i);
    int pos, n;
    logic r [$];
    r = (i == 0) ? g[0].rec : g[1].rec;
    n = r.size();
    pos = -1;
    for (int p = 0; p + WIN < N_BITS && pos < 0; p++) begin
      bit ok;
      ok = 1'b1;
      for (int j = 0; j < WIN && ok; j++) ok = (r[j] == bits[p + j]);
      if (ok) pos = p;
    end
    check(pos >= 0, "received stream found in the sent stream");
    if (pos >= 0) begin
      for (int j = 0; j < n && pos + j < N_BITS; j++)
        check(r[j] == bits[pos + j], "retimed bit");
      $display("receiver %0d: %0d bits checked", i, n);
    end
  endtask

  initial begin
    #1000;
    @(negedge clk_2r);
    rst_n = 1'b1;
    live = 1'b1;
    #(1000 + (N_BITS - 20) * T);
    check_stream(0);
    check_stream(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
