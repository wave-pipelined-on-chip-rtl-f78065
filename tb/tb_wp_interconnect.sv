// tb_wp_interconnect: end-to-end test of one wave-pipelined wire at the
// design's default size (20 segments of 150 ps, 2 Gb/s), with no parameter
// overridden.
//
// Clocks: clk_2r 250 ps; clk_r 500 ps offset 77 ps; clk_t 500 ps offset
// 210 ps. Halfway through, the transmitter clock drifts 300 ps later in
// 10 ps steps, which the receiver PLL must follow. A random stream is sent;
// after acquisition every bit of d_out must equal the sent stream in order
// (nothing lost or repeated, constant latency).
//
// Mechanisms counted (each must occur at least once): several bits in
// flight on the wire at once; PLL steps later; PLL steps earlier; decisions
// dropped by the loop filter; net tracking of the transmitter drift (the
// PLL moves its phase later by at least one step over the drift); FIFO
// enqueue and dequeue pointer wrap-around.
module tb_wp_interconnect;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, N_BITS = 4000, ACQ = 200, WIN = 64;
  localparam int DRIFT_START = 1500, DRIFT_STEPS = 30, DRIFT_EVERY = 20;

  logic clk_t = 1'b0, clk_2r = 1'b0, clk_r = 1'b0, rst_n = 1'b1, d_in = 1'b0;
  logic d_out, clk_s, d_s;
  logic [1:0] sel;
  adj_e adj;
  int checks = 0, failures = 0;

  logic sent [$], rec [$];
  int n_tx_edges = 0, n_wire_edges = 0, max_in_flight = 0;
  int n_later = 0, n_earlier = 0, n_dec = 0, n_dropped = 0;
  int n_enq_wrap = 0, n_deq_wrap = 0, n_rcyc = 0;
  int net_steps = 0, net_at_drift = 0;

  wp_interconnect dut (
    .clk_t(clk_t), .clk_2r(clk_2r), .clk_r(clk_r), .rst_n(rst_n),
    .d_in(d_in), .d_out(d_out), .clk_s(clk_s), .d_s(d_s), .sel(sel), .adj(adj));

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
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks
  always #(T / 4) clk_2r = ~clk_2r;
  initial begin
    #77;
    forever begin
      #(T / 2) clk_r = 1'b1;
      #(T / 2) clk_r = 1'b0;
    end
  end
  initial begin
    int cyc;
    cyc = 0;
    #210;
    forever begin
      #(T / 2) clk_t = 1'b1;
      if (cyc >= DRIFT_START && cyc < DRIFT_START + DRIFT_STEPS * DRIFT_EVERY
          && (cyc - DRIFT_START) % DRIFT_EVERY == 0)
        #(T / 2 + 10) clk_t = 1'b0;
      else
        #(T / 2) clk_t = 1'b0;
      cyc++;
    end
  end

  // stimulus: a new random bit after every falling edge of clk_t,
  // recorded when the transmitter launches it
  always @(negedge clk_t) if (live) d_in <= 1'($urandom);
  always @(posedge clk_t) if (live) sent.push_back(d_in);

  // waves on the wire: edges launched after T_COUNT minus edges arrived
  // after T_COUNT plus the nominal wire delay (20 x 150 ps)
  localparam time T_COUNT = 10_000, WIRE_DELAY = 3000;
  always @(dut.d_tx) if ($time > T_COUNT) begin
    n_tx_edges++;
    if (n_tx_edges - n_wire_edges > max_in_flight) max_in_flight = n_tx_edges - n_wire_edges;
  end
  always @(dut.d_wire) if ($time > T_COUNT + WIRE_DELAY) n_wire_edges++;

  // PLL activity
  always @(posedge clk_s) if (live) begin
    if (adj != ADJ_HOLD) begin
      n_dec++;
      if (dut.u_rx.u_pll.u_lf.cnt != 0) n_dropped++;
    end
  end
  logic [1:0] sel_q = 2'd0;
  always @(sel) if (live) begin
    if (sel == sel_q + 2'd1) begin n_later++;   net_steps++; end
    else if (sel == sel_q - 2'd1) begin n_earlier++; net_steps--; end
    else check(1'b0, "VCO moves one phase at a time");
    sel_q = sel;
  end

  // FIFO pointers
  always @(posedge clk_s) if (live && dut.u_rx.u_fifo.enq_ptr == 2'd3) n_enq_wrap++;
  always @(posedge clk_r) if (live) begin
    if (dut.u_rx.u_fifo.deq_ptr == 2'd3) n_deq_wrap++;
    n_rcyc++;
    if (n_rcyc > ACQ) rec.push_back(d_out);
  end

  initial begin
    int pos, n;
    #1000;
    @(negedge clk_2r);
    rst_n = 1'b1;
    live = 1'b1;
    // net phase before the drift starts
    #((DRIFT_START - 50) * T);
    net_at_drift = net_steps;
    #((N_BITS - DRIFT_START + 50) * T);
    // locate the received stream in the sent one, then follow it
    pos = -1;
    n = rec.size();
    for (int p = 0; p + WIN < sent.size() && pos < 0; p++) begin
      bit ok;
      ok = 1'b1;
      for (int j = 0; j < WIN && ok; j++) ok = (rec[j] == sent[p + j]);
      if (ok) pos = p;
    end
    check(pos >= 0, "received stream found in the sent stream");
    if (pos >= 0)
      for (int j = 0; j < n && pos + j < sent.size(); j++)
        check(rec[j] == sent[pos + j], "bit delivered end to end");
    $display("bits checked %0d, latency %0d cycles from launch to d_out sample",
             n, ACQ - pos);
    $display("max bits in flight %0d (tx edges %0d, wire edges %0d)", max_in_flight, n_tx_edges, n_wire_edges);
    $display("steps later %0d earlier %0d, net %0d (before drift %0d)",
             n_later, n_earlier, net_steps, net_at_drift);
    $display("decisions %0d dropped by loop filter %0d", n_dec, n_dropped);
    $display("FIFO wraps enq %0d deq %0d", n_enq_wrap, n_deq_wrap);
    check(max_in_flight >= 4 && n_tx_edges - n_wire_edges inside {[0:7]}, "several bits in flight on the wire");
    check(n_later > 0, "PLL stepped later");
    check(n_earlier > 0, "PLL stepped earlier");
    check(n_dropped > 0, "loop filter dropped decisions");
    check(net_steps - net_at_drift >= 1, "PLL tracked the transmitter drift");
    check(n_enq_wrap > 0 && n_deq_wrap > 0, "FIFO pointers wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
