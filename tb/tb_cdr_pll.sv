// tb_cdr_pll: self-checking test of the clock-and-data-recovery PLL.
// Two PLLs run from the same 250 ps clk_2r (bit period T = 500 ps). Each
// receives its own random 2 Gb/s bit stream whose transitions sit at a
// different phase (OFF ps into the period) plus 0..JIT ps of random jitter
// per edge. Checked for each:
//  - lock: after the acquisition time, sel only dithers between two
//    neighbouring phases;
//  - the recovered bits d_s equal the sent stream, bit for bit, with no bit
//    lost or repeated (the stream is located once, then followed);
//  - every VCO step comes at most one period after the loop filter passed
//    the decision, and the loop filter passes one decision in four;
//  - steps both later and earlier happen.
module tb_cdr_pll;
  import wp_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, N_BITS = 3000, ACQ = 200, JIT = 30, WIN = 64;
  localparam int OFF [2] = '{60, 310};

  logic clk_2r = 1'b0, rst_n = 1'b1;
  logic d_in [2], clk_s [2], d_s [2];
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
    int  n_later = 0, n_earlier = 0, n_dec = 0, n_pass = 0, n_cyc = 0;
    logic rec [$];
    time t_req = 0;
    logic [1:0] sel_lo = 2'd0, sel_hi = 2'd0;
    bit   lock_seen = 1'b0;

    cdr_pll dut (.clk_2r(clk_2r), .rst_n(rst_n), .d_in(d_in[i]),
                 .clk_s(clk_s[i]), .d_s(d_s[i]), .sel(sel[i]), .adj(adj[i]));

    // data source: bit k starts at 1000 + OFF + k*T (+ jitter)
    initial begin
      d_in[i] = 1'b0;
      #(1000 + OFF[i]);
      for (int k = 0; k < N_BITS; k++) begin
        int unsigned j;
        j = $urandom_range(JIT, 0);
        repeat (j) #1;
        d_in[i] = bits[k];
        repeat (T - j) #1;
      end
    end

    always @(dut.adj_req) if (live) t_req = $time;

    always @(sel[i]) if (live)
      check($time - t_req <= time'(T), "VCO step within one period of the request");

    always @(posedge clk_s[i]) if (live) begin
      n_cyc++;
      if (adj[i] != ADJ_HOLD) n_dec++;
      if (n_cyc > ACQ) rec.push_back(d_s[i]);
      if (n_cyc == ACQ) begin
        sel_lo = sel[i];
        sel_hi = sel[i];
      end else if (n_cyc > ACQ) begin
        if (sel[i] != sel_lo && sel[i] != sel_hi) begin
          if (sel_lo == sel_hi && (sel[i] == sel_lo + 2'd1)) sel_hi = sel[i];
          else if (sel_lo == sel_hi && (sel[i] == sel_lo - 2'd1)) sel_lo = sel[i];
          else check(1'b0, "locked: sel stays within two neighbouring phases");
        end
      end
    end

    always @(dut.adj_req) if (live) begin
      n_pass++;
      if (dut.adj_dir) n_later++; else n_earlier++;
    end
  end

  task automatic check_stream(input int i);
    int pos;
    pos = -1;
    for (int p = 0; p + WIN < N_BITS && pos < 0; p++) begin
      bit ok;
      ok = 1'b1;
      for (int j = 0; j < WIN && ok; j++) begin
        if (i == 0) ok = (g[0].rec[j] == bits[p + j]);
        else        ok = (g[1].rec[j] == bits[p + j]);
      end
      if (ok) pos = p;
    end
    check(pos >= 0, "recovered stream found in the sent stream");
    if (pos >= 0) begin
      int n;
      n = (i == 0) ? g[0].rec.size() : g[1].rec.size();
      for (int j = 0; j < n && pos + j < N_BITS; j++) begin
        if (i == 0) check(g[0].rec[j] == bits[pos + j], "recovered bit");
        else        check(g[1].rec[j] == bits[pos + j], "recovered bit");
      end
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
    check(g[0].n_later > 0 && g[0].n_earlier > 0, "PLL 0 stepped both ways");
    check(g[1].n_later > 0 && g[1].n_earlier > 0, "PLL 1 stepped both ways");
    check(g[0].n_pass <= (g[0].n_dec + 3) / 4 && g[0].n_pass * 4 + 4 >= g[0].n_dec,
          "loop filter passes one decision in four");
    $display("PLL0: sel %0d..%0d steps later %0d earlier %0d decisions %0d",
             g[0].sel_lo, g[0].sel_hi, g[0].n_later, g[0].n_earlier, g[0].n_dec);
    $display("PLL1: sel %0d..%0d steps later %0d earlier %0d decisions %0d",
             g[1].sel_lo, g[1].sel_hi, g[1].n_later, g[1].n_earlier, g[1].n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
