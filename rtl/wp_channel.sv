// wp_channel: behavioural model of a wave-pipelined global wire.
// This is a behavioural model (not synthesizable): it chains analog
// segment models.
//
// The channel is a uniformly repeater-inserted wire: N_SEG identical
// segments (driver inverter plus 1400 um of wire) in series. The default of
// 20 segments is a 2.8 cm wire, the longest one the document evaluates.
// No flip-flop sits on the wire; a new bit is launched every clock cycle
// although the wire delay is several cycles long.
//
// Interface: d_in (from the transmitter flip-flop), d_out (waveform arriving
// at the receiver, D_in of the receiver).
// Timing: about N_SEG * SEG_DELAY_PS (plus jitter) from d_in to d_out.
// Every segment inverts, so an odd N_SEG delivers inverted data; all the
// lengths the document evaluates are even.
module wp_channel #(
  parameter int N_SEG        = 20,
  parameter int SEG_DELAY_PS = 150,
  parameter int JITTER_PS    = 0
) (
  input  logic d_in,
  output logic d_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_SEG:0] node;

  assign node[0] = d_in;

  for (genvar i = 0; i < N_SEG; i++) begin : g_seg
    wp_segment #(
      .SEG_DELAY_PS(SEG_DELAY_PS),
      .JITTER_PS   (JITTER_PS)
    ) u_seg (
      .a(node[i]),
      .y(node[i+1])
    );
  end

  assign d_out = node[N_SEG];
endmodule
