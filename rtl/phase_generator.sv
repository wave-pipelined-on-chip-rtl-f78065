// phase_generator (PG): four receiver-rate clocks, 90 degrees apart, made
// from a clock at twice the receiver rate.
//
// A quarter of the receiver period is half a period of clk_2r, so the four
// phases are the states of a 2-bit Johnson counter that advances on both
// edges of clk_2r: q0 toggles on every rising edge (a divide-by-two, phase 0)
// and q1 copies q0 on every falling edge (phase 90). Phases 180 and 270 are
// their complements.
//
// Interface: clk_2r, rst_n (asynchronous, active low), ph[3:0] where ph[k]
// is the receiver-rate clock delayed by k * 90 degrees. ph[0] and ph[2]
// change only on rising edges of clk_2r, ph[1] and ph[3] only on falling
// edges; the VCO relies on this.
// Timing: the first rising edge of clk_2r after reset raises ph[0].
//
// That the four phases come from a counter clocked by a double-rate clock is
// the document's design; the Johnson structure is this design's choice.
module phase_generator (
  input  logic       clk_2r,
  input  logic       rst_n,
  output logic [3:0] ph
);
  timeunit 1ps;
  timeprecision 1ps;

  logic q0, q1;

  always_ff @(posedge clk_2r or negedge rst_n) begin
    if (!rst_n) q0 <= 1'b0;
    else        q0 <= ~q0;
  end

  always_ff @(negedge clk_2r or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= q0;
  end

  assign ph = {~q1, ~q0, q1, q0};
endmodule
