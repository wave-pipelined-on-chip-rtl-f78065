// wp_segment: behavioural model of one wave-pipelining wire segment.
// This is a behavioural model (not synthesizable): the real part is an
// analog driver inverter and an RC wire.
//
// A segment is a driver inverter of size s (31.3 um in the reference
// 0.18 um process) driving a wire of length l (1400 um). A global wire is a
// chain of identical segments with no storage anywhere, so several bits are
// in flight on it at once ("waves"). Because there is a single path through
// single-input gates, every edge sees the same delay and the waves cannot
// overtake each other.
//
// The model inverts its input and delays every edge by SEG_DELAY_PS plus a
// uniformly distributed extra 0..JITTER_PS (transport delay, so pulses
// shorter than the delay still propagate). The jitter term stands in for
// process, supply, temperature and crosstalk variation.
//
// Interface: a (driver input), y (far end of the wire).
// Timing: y = ~a, SEG_DELAY_PS..SEG_DELAY_PS+JITTER_PS later.
//
// The structure (inverter plus wire) follows the document. The delay value
// and the jitter model are this design's choices; the document gives none.
module wp_segment #(
  parameter int SEG_DELAY_PS = 150,
  parameter int JITTER_PS    = 0
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned edge_jitter;

  // Schedule the inverted input once at start-up and again on every input
  // edge. Each edge gets its own process that waits out its delay, so an
  // edge is never cancelled by a later one (transport delay). The jitter
  // is waited out in 1 ps steps so that every delay is a constant.
  always begin
    edge_jitter = (JITTER_PS > 0) ? $urandom_range(JITTER_PS, 0) : 0;
    fork
      automatic logic        level = ~a;
      automatic int unsigned extra = edge_jitter;
      begin
        #(SEG_DELAY_PS);
        repeat (extra) #1;
        y = level;
      end
    join_none
    @(a);
  end
endmodule
