// loop_filter (LF): a 4-state counter that lets one phase-detector decision
// in four through to the VCO.
//
// A phase step needs about three receiver cycles to show in the detector's
// decisions, so the decisions made meanwhile still describe the old phase.
// Acting on them would overshoot and make the loop unstable. The counter
// advances on every decision (later or earlier); the decision that finds it
// in state 0 is passed on, the next N_STATE-1 decisions are dropped.
//
// Interface: clk_s, rst_n (asynchronous, active low), adj (decision from the
// detector); adj_req toggles once per decision passed on and adj_dir holds
// its direction (1 = later), both stable until the next one.
// Timing: a decision present on adj at a rising edge of clk_s appears on
// adj_req/adj_dir after that edge.
//
// The 4-state counter and its one-in-four filtering are the document's
// design; the toggle handshake to the VCO is this design's choice.
module loop_filter
  import wp_pkg::*;
#(
  parameter int N_STATE = 4
) (
  input  logic clk_s,
  input  logic rst_n,
  input  adj_e adj,
  output logic adj_req,
  output logic adj_dir
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int CW = (N_STATE > 1) ? $clog2(N_STATE) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      adj_req <= 1'b0;
      adj_dir <= 1'b0;
    end else if (adj != ADJ_HOLD) begin
      if (cnt == '0) begin
        adj_req <= ~adj_req;
        adj_dir <= (adj == ADJ_LATER);
      end
      cnt <= (cnt == CW'(N_STATE - 1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
