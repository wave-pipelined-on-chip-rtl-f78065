// reset_sync: asynchronous-assert, synchronous-release reset for one clock
// domain.
//
// Two flip-flops clocked by clk: rst_n_i low clears both at once; after it
// rises a 1 walks through them, so rst_n_o rises on the second rising edge
// of clk. Used to release the two sides of the retiming FIFO cleanly.
// This helper is this design's choice; the document does not discuss reset.
module reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);
  timeunit 1ps;
  timeprecision 1ps;

  logic meta;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) begin
      meta    <= 1'b0;
      rst_n_o <= 1'b0;
    end else begin
      meta    <= 1'b1;
      rst_n_o <= meta;
    end
  end
endmodule
