// vco: the digital "VCO" of the receiver PLL, a phase-select counter and a
// 4-to-1 clock multiplexer.
//
// The sampling clock CLK_S is one of the four phase-generator clocks,
// chosen by a 2-bit counter `sel`. Each request from the loop filter moves
// `sel` one step: up (CLK_S 90 degrees later) or down (90 degrees earlier),
// wrapping modulo 4.
//
// Switching a clock multiplexer while the inputs differ would cut a glitch
// into CLK_S. The counter therefore steps only on an edge of clk_2r at which
// the target phase is low just after the edge and the current phase is low
// just before or just after it. On a rising edge of clk_2r ph[0] and ph[2]
// toggle while ph[1] and ph[3] hold; on a falling edge it is the other way
// round; so the values just after an edge follow from those just before it.
// Stepping later from an odd phase, or earlier from an even one, is only
// safe on a rising edge, the other cases only on a falling edge, so the
// counter is a dual-edge register: the XOR of a rising-edge and a
// falling-edge register, each written only on its own edge. A safe edge
// comes within one receiver period for every phase and direction. The
// result: a step later stretches one period of CLK_S to 1.25 periods, a
// step earlier shortens one to 0.75 periods; the high phase is always half
// a period.
//
// Interface: clk_2r, rst_n (asynchronous, active low, selects phase 0);
// ph[3:0] from the phase generator; adj_req toggles once for each step
// wanted and adj_dir gives its direction (1 = later); clk_s is the selected
// clock and sel the current selection.
// Timing: a step is taken at most one receiver period after adj_req
// toggles. adj_req is produced on a CLK_S edge, itself a clk_2r edge, and is
// sampled here no earlier than the next clk_2r edge, so no synchroniser is
// needed.
//
// Counter plus multiplexer is the document's design; the glitch-free step
// rule and the toggle handshake are this design's choices.
module vco
  import wp_pkg::*;
(
  input  logic               clk_2r,
  input  logic               rst_n,
  input  logic [N_PHASE-1:0] ph,
  input  logic               adj_req,
  input  logic               adj_dir,
  output logic               clk_s,
  output logic [PHASE_W-1:0] sel
);
  timeunit 1ps;
  timeprecision 1ps;

  // sel and ack are each the XOR of a register stepped on the rising edge
  // of clk_2r and one stepped on the falling edge, so that either edge can
  // take a step: each edge writes its own register only.
  logic [PHASE_W-1:0] sel_p, sel_n;
  logic               ack_p, ack_n, ack;
  logic [PHASE_W-1:0] target;     // phase the pending request asks for
  logic [N_PHASE-1:0] ph_rise;    // phase clocks just after a clk_2r rise
  logic [N_PHASE-1:0] ph_fall;    // phase clocks just after a clk_2r fall
  logic               safe_rise, safe_fall, pending;

  // A step is safe at an edge when the target clock is low just after it
  // and the current clock is low just before or just after it: CLK_S then
  // either falls normally or stays low, and never loses part of a high pulse.
  always_comb begin
    sel       = sel_p ^ sel_n;
    ack       = ack_p ^ ack_n;
    pending   = adj_req != ack;
    target    = adj_dir ? sel + 1'b1 : sel - 1'b1;
    ph_rise   = {ph[3], ~ph[2], ph[1], ~ph[0]};
    ph_fall   = {~ph[3], ph[2], ~ph[1], ph[0]};
    safe_rise = !ph_rise[target] && (!ph[sel] || !ph_rise[sel]);
    safe_fall = !ph_fall[target] && (!ph[sel] || !ph_fall[sel]);
  end

  always_ff @(posedge clk_2r or negedge rst_n) begin
    if (!rst_n) begin
      sel_p <= '0;
      ack_p <= 1'b0;
    end else if (pending && safe_rise) begin
      sel_p <= target ^ sel_n;
      ack_p <= adj_req ^ ack_n;
    end
  end

  always_ff @(negedge clk_2r or negedge rst_n) begin
    if (!rst_n) begin
      sel_n <= '0;
      ack_n <= 1'b0;
    end else if (pending && safe_fall) begin
      sel_n <= target ^ sel_p;
      ack_n <= adj_req ^ ack_p;
    end
  end

  assign clk_s = ph[sel];
endmodule
