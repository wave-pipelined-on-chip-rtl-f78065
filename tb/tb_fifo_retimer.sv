// tb_fifo_retimer: self-checking test of the 4-entry retiming FIFO.
// Seven FIFOs run side by side; each has its own CLK_S at the CLK_R
// frequency (500 ps) but offset from CLK_R by -180..+180 degrees. The write
// side stores a running 8-bit count. On the read side every word must be
// the previous word plus one (nothing lost or repeated) and the distance
// between the last word written and the word read must stay fixed.
// Finally one FIFO sees CLK_S jump 90 degrees earlier and then later,
// as the PLL does when it steps, and must still deliver every word once.
module tb_fifo_retimer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 7;
  localparam int OFFS [N] = '{-250, -180, -100, 0, 100, 180, 250};

  logic clk_r = 1'b0, rst_n = 1'b1;
  logic clk_s [N];
  logic rst_s_n [N], rst_r_n;
  logic [7:0] wdata [N], rdata [N], last [N];
  int checks = 0, failures = 0;
  int   extra [N];   // extra delay (ps) inserted into CLK_S's next low phase

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

  always #250 clk_r = ~clk_r;

  always_ff @(posedge clk_r or negedge rst_n)
    if (!rst_n) rst_r_n <= 1'b0; else rst_r_n <= 1'b1;

  for (genvar i = 0; i < N; i++) begin : g
    initial begin
      clk_s[i] = 1'b0;
      extra[i] = 0;
      #(1000 + OFFS[i]);
      forever begin
        int e;
        #250 clk_s[i] = 1'b1;
        e = extra[i];
        extra[i] = 0;
        #125;
        repeat (125 + e) #1;
        clk_s[i] = 1'b0;
      end
    end

    logic       rst_q;   // write-side reset, released on clk_s
    logic [7:0] cnt_q;   // running count written into the FIFO

    always_ff @(posedge clk_s[i] or negedge rst_n)
      if (!rst_n) rst_q <= 1'b0; else rst_q <= 1'b1;

    always_ff @(posedge clk_s[i] or negedge rst_q)
      if (!rst_q) cnt_q <= 8'd1; else cnt_q <= cnt_q + 8'd1;

    assign rst_s_n[i] = rst_q;
    assign wdata[i]   = cnt_q;

    fifo_retimer #(.DEPTH(4), .WIDTH(8)) dut (
      .clk_s(clk_s[i]), .rst_s_n(rst_s_n[i]), .d_s(wdata[i]),
      .clk_r(clk_r), .rst_r_n(rst_r_n), .d_out(rdata[i]));
  end

  initial begin
    int lag [N];
    #3000;
    rst_n = 1'b1;
    repeat (12) @(posedge clk_r);
    #1;
    for (int i = 0; i < N; i++) begin
      last[i] = rdata[i];
      lag[i]  = int'(wdata[i]) - int'(rdata[i]);
    end
    for (int c = 0; c < 300; c++) begin
      // step FIFO 3's write clock earlier (c = 100) and back later (c = 200)
      if (c == 100) extra[3] = -125;
      if (c == 200) extra[3] = 125;
      @(posedge clk_r);
      #1;
      for (int i = 0; i < N; i++) begin
        check(rdata[i] == last[i] + 8'd1, "every word once, in order");
        if (i != 3 || c < 100)
          check((int'(wdata[i]) - int'(rdata[i]) + 256) % 256 == (lag[i] + 256) % 256,
                "constant distance between write and read");
        last[i] = rdata[i];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
