// alexander_pd: Alexander (bang-bang) phase detector and data sampler.
//
// The recovered clock CLK_S samples the incoming waveform twice per bit:
// on its rising edge (the data sample, which is the recovered bit D_S) and
// on its falling edge (the edge sample). The loop aims to put each data
// transition on the falling edge, half a bit away from the data sample.
// At every rising edge the detector compares the previous data sample, the
// edge sample taken in between and the new data sample:
//   previous == new            no transition, no decision (ADJ_HOLD)
//   edge sample == new bit     the transition came before the falling edge:
//                              CLK_S is late, move it earlier (ADJ_EARLIER)
//   edge sample == old bit     the transition came after the falling edge:
//                              CLK_S is early, move it later (ADJ_LATER)
//
// Interface: clk_s, rst_n (asynchronous, active low), d_in (received
// waveform), d_s (data sample), adj (decision, wp_pkg::adj_e).
// Timing: d_s and adj change on the rising edge of clk_s; adj describes the
// transition between the bit now in d_s and the one before it.
//
// Use of an Alexander detector aligning transitions with the falling edge of
// CLK_S is the document's design; the three-sample structure is the
// standard one for this detector.
module alexander_pd
  import wp_pkg::*;
(
  input  logic clk_s,
  input  logic rst_n,
  input  logic d_in,
  output logic d_s,
  output adj_e adj
);
  timeunit 1ps;
  timeprecision 1ps;

  logic e_smp;  // edge sample, falling edge of CLK_S

  always_ff @(negedge clk_s or negedge rst_n) begin
    if (!rst_n) e_smp <= 1'b0;
    else        e_smp <= d_in;
  end

  always_ff @(posedge clk_s or negedge rst_n) begin
    if (!rst_n) begin
      d_s <= 1'b0;
      adj <= ADJ_HOLD;
    end else begin
      d_s <= d_in;
      if (d_in == d_s)       adj <= ADJ_HOLD;
      else if (e_smp == d_in) adj <= ADJ_EARLIER;
      else                    adj <= ADJ_LATER;
    end
  end
endmodule
