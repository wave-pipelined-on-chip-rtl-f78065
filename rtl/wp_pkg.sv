// wp_pkg: constants and types shared by the wave-pipelined interconnect
// receiver.
//
// The receiver recovers a sampling clock with an all-digital PLL that
// chooses one of N_PHASE evenly spaced clock phases; four phases (90 degree
// steps) are the document's choice and give the 25 % distortion tolerance
// worked out in the README. FIFO_DEPTH = 4 is the minimum retimer size for
// a phase difference of up to 180 degrees between the recovered clock and
// the receiver clock. The three-valued phase-adjust command passed from the
// phase detector to the loop filter is an encoding chosen for this design.
package wp_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N_PHASE    = 4;  // phases of the digital PLL (90 degree steps)
  localparam int PHASE_W    = $clog2(N_PHASE);
  localparam int FIFO_DEPTH = 4;  // entries in the retiming FIFO

  // Phase-adjust decision of the phase detector.
  //   ADJ_LATER   : the data edge came after the CLK_S falling edge,
  //                 so CLK_S must be delayed by one phase step
  //   ADJ_EARLIER : the data edge came before the falling edge,
  //                 so CLK_S must be advanced by one phase step
  typedef enum logic [1:0] {
    ADJ_HOLD    = 2'b00,
    ADJ_LATER   = 2'b01,
    ADJ_EARLIER = 2'b10
  } adj_e;
endpackage
