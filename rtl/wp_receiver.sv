// wp_receiver: receiver of one wave-pipelined wire.
//
// The clock-and-data-recovery PLL locks a sampling clock CLK_S onto the
// transitions of the arriving waveform and samples the bits (D_S). CLK_S
// may be skewed from the receiver clock CLK_R by up to half a period and
// moves in 90 degree steps while tracking, so a 4-entry FIFO retimer hands
// the bits over into the CLK_R domain as D_out.
//
// Interface: clk_2r (twice the receiver rate), clk_r (receiver clock, same
// frequency as the transmitter clock), rst_n (asynchronous, active low),
// d_in (waveform from the wire), d_out (bits on CLK_R); clk_s, d_s, sel and
// adj bring the PLL's state out for observation.
// Timing: a bit leaves d_out a fixed number of CLK_R cycles after the
// transmitter launched it, once the PLL has locked; the number depends on
// the wire delay and the clock phases.
//
// PLL plus FIFO retimer is the document's design. Releasing each FIFO side
// through a two-flip-flop reset synchroniser is this design's choice.
module wp_receiver
  import wp_pkg::*;
(
  input  logic               clk_2r,
  input  logic               clk_r,
  input  logic               rst_n,
  input  logic               d_in,
  output logic               d_out,
  output logic               clk_s,
  output logic               d_s,
  output logic [PHASE_W-1:0] sel,
  output adj_e               adj
);
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_s_n, rst_r_n;

  cdr_pll u_pll (
    .clk_2r(clk_2r),
    .rst_n (rst_n),
    .d_in  (d_in),
    .clk_s (clk_s),
    .d_s   (d_s),
    .sel   (sel),
    .adj   (adj)
  );

  reset_sync u_rst_s (.clk(clk_s), .rst_n_i(rst_n), .rst_n_o(rst_s_n));
  reset_sync u_rst_r (.clk(clk_r), .rst_n_i(rst_n), .rst_n_o(rst_r_n));

  fifo_retimer #(.DEPTH(FIFO_DEPTH), .WIDTH(1)) u_fifo (
    .clk_s  (clk_s),
    .rst_s_n(rst_s_n),
    .d_s    (d_s),
    .clk_r  (clk_r),
    .rst_r_n(rst_r_n),
    .d_out  (d_out)
  );
endmodule
