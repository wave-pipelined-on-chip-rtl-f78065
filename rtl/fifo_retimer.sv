// fifo_retimer: moves the recovered bits from the CLK_S domain into the
// receiver clock domain CLK_R.
//
// CLK_S and CLK_R have the same frequency but an unknown phase relation,
// at most 180 degrees apart. The retimer is a cyclic array of DEPTH entries:
// every rising edge of CLK_S writes one entry at the enqueue pointer, every
// rising edge of CLK_R reads one at the dequeue pointer, and both pointers
// step by one each cycle. Because both pointers move at the same rate there
// are no full or empty flags: after reset the dequeue pointer sits DEPTH/2
// entries from the enqueue pointer, leaving one buffering entry on each
// side of the pair, which absorbs the phase difference whichever clock
// leads. Four entries is the smallest size that does this.
//
// Interface: clk_s, rst_s_n, d_s (write side); clk_r, rst_r_n, d_out (read
// side). Each reset is asynchronous, active low, and must be released
// synchronously to its own clock.
// Timing: a bit written on a CLK_S edge reaches d_out about DEPTH/2 CLK_R
// cycles later; d_out is registered on CLK_R.
//
// The cyclic array, the two pointers, their spacing and the size of four
// are the document's design; the registered output and reset values are
// this design's choices.
module fifo_retimer #(
  parameter int DEPTH = wp_pkg::FIFO_DEPTH,
  parameter int WIDTH = 1
) (
  input  logic             clk_s,
  input  logic             rst_s_n,
  input  logic [WIDTH-1:0] d_s,
  input  logic             clk_r,
  input  logic             rst_r_n,
  output logic [WIDTH-1:0] d_out
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    enq_ptr, deq_ptr;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_s or negedge rst_s_n) begin
    if (!rst_s_n) begin
      enq_ptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      mem[enq_ptr] <= d_s;
      enq_ptr      <= next_ptr(enq_ptr);
    end
  end

  always_ff @(posedge clk_r or negedge rst_r_n) begin
    if (!rst_r_n) begin
      deq_ptr <= AW'(DEPTH / 2);
      d_out   <= '0;
    end else begin
      d_out   <= mem[deq_ptr];
      deq_ptr <= next_ptr(deq_ptr);
    end
  end
endmodule
