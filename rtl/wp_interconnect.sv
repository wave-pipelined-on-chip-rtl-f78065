// wp_interconnect: one wave-pipelined global wire, transmitter to receiver.
//
// Instead of cutting a long wire into flip-flop pipeline stages, the wire is
// only repeater-buffered and a new bit is launched every cycle while earlier
// bits are still travelling on it. With one path made of inverters only,
// every bit sees the same delay, so the waves keep their spacing; what the
// wire does add (jitter, distortion, an unknown total delay) is absorbed by
// a clock-and-data-recovery receiver and a small retiming FIFO.
//
// Transmitter flip-flop (clk_t) -> wp_channel (N_SEG inverter segments, a
// behavioural model with delays, so this top is not synthesizable as a
// whole; wp_transmitter and wp_receiver are) -> wp_receiver (clk_2r, clk_r).
//
// Interface: clk_t, clk_2r, clk_r (clk_t and clk_r have the same frequency,
// clk_2r twice that, phases free), rst_n (asynchronous, active low), d_in
// (bit stream, sampled on clk_t), d_out (bit stream on clk_r); clk_s, d_s, sel
// and adj show the receiver PLL's state.
// Timing: after lock d_out repeats d_in with a fixed latency in clk_r
// cycles: one transmitter cycle, the wire delay, the sampling and about two
// FIFO cycles.
//
// The arrangement is the document's design; the segment delay and jitter
// model are this design's choices.
module wp_interconnect
  import wp_pkg::*;
#(
  parameter int N_SEG        = 20,
  parameter int SEG_DELAY_PS = 150,
  parameter int JITTER_PS    = 0
) (
  input  logic               clk_t,
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

  logic d_tx, d_wire;

  wp_transmitter u_tx (
    .clk_t(clk_t),
    .rst_n(rst_n),
    .d_in (d_in),
    .d_tx (d_tx)
  );

  wp_channel #(
    .N_SEG       (N_SEG),
    .SEG_DELAY_PS(SEG_DELAY_PS),
    .JITTER_PS   (JITTER_PS)
  ) u_ch (
    .d_in (d_tx),
    .d_out(d_wire)
  );

  wp_receiver u_rx (
    .clk_2r(clk_2r),
    .clk_r (clk_r),
    .rst_n (rst_n),
    .d_in  (d_wire),
    .d_out (d_out),
    .clk_s (clk_s),
    .d_s   (d_s),
    .sel   (sel),
    .adj   (adj)
  );
endmodule
