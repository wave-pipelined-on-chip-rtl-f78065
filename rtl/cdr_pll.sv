// cdr_pll: all-digital PLL clock and data recovery for one wave-pipelined
// wire.
//
// The phase generator turns clk_2r into four receiver-rate clocks 90 degrees
// apart. The VCO selects one of them as CLK_S. The Alexander phase detector
// samples the incoming waveform with CLK_S, outputs the recovered bits D_S,
// and decides after each data transition whether CLK_S should move later or
// earlier so that its falling edge meets the transitions. The loop filter
// passes one decision in four to the VCO. Once locked, each transition lies
// within a quarter period of the falling edge of CLK_S, so the rising edge,
// which samples the data, stays at least a quarter period away from any
// transition: the receiver tolerates up to 25 % distortion of a bit's width.
//
// Interface: clk_2r, rst_n (asynchronous, active low), d_in (received
// waveform); clk_s, d_s (recovered clock and data, d_s changes on the rising
// edge of clk_s); sel (phase in use) and adj (current detector decision) for
// observation.
// Timing: a decision reaches CLK_S two to three receiver cycles after the
// transition that caused it.
//
// The loop (PG, VCO, PD, LF connected as here) is the document's design.
module cdr_pll
  import wp_pkg::*;
(
  input  logic               clk_2r,
  input  logic               rst_n,
  input  logic               d_in,
  output logic               clk_s,
  output logic               d_s,
  output logic [PHASE_W-1:0] sel,
  output adj_e               adj
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_PHASE-1:0] ph;
  logic               adj_req, adj_dir;

  phase_generator u_pg (
    .clk_2r(clk_2r),
    .rst_n (rst_n),
    .ph    (ph)
  );

  vco u_vco (
    .clk_2r (clk_2r),
    .rst_n  (rst_n),
    .ph     (ph),
    .adj_req(adj_req),
    .adj_dir(adj_dir),
    .clk_s  (clk_s),
    .sel    (sel)
  );

  alexander_pd u_pd (
    .clk_s(clk_s),
    .rst_n(rst_n),
    .d_in (d_in),
    .d_s  (d_s),
    .adj  (adj)
  );

  loop_filter #(.N_STATE(4)) u_lf (
    .clk_s  (clk_s),
    .rst_n  (rst_n),
    .adj    (adj),
    .adj_req(adj_req),
    .adj_dir(adj_dir)
  );
endmodule
