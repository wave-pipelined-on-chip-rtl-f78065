// wp_transmitter: the transmitter of a wave-pipelined wire.
//
// The transmitter is nothing more than one D flip-flop: on every rising edge
// of clk_t it launches the next bit onto the wire, so the bit rate equals the
// clock rate. Its output drives the first inverter of the wire channel
// directly; no further flip-flop follows until the receiver.
//
// Interface: clk_t (transmitter clock, same frequency as the receiver clock,
// any phase), rst_n (asynchronous, active low, clears the output to 0),
// d_in (bit to send, sampled on the rising edge), d_tx (launched bit).
// Timing: d_tx follows d_in one clk_t edge later.
//
// The single flip-flop is the document's design; the reset value is a
// choice of this design.
module wp_transmitter (
  input  logic clk_t,
  input  logic rst_n,
  input  logic d_in,
  output logic d_tx
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk_t or negedge rst_n) begin
    if (!rst_n) d_tx <= 1'b0;
    else        d_tx <= d_in;
  end
endmodule
