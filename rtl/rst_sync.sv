// Reset synchronizer: asserts its active-high output at once when the
// active-low asynchronous input falls, and releases it on the second rising
// edge of clk after the input rises, so every flop of the clock domain leaves
// reset on the same edge. Used wherever the processor's bus reset enters a
// sample-clock domain. The document does not describe reset distribution;
// this is this design's choice. The same bus reset is also used as a plain
// synchronous reset inside the bus clock domain; lint tools note that mix,
// and it is intended.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst
);
  logic meta;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta <= 1'b1;
      rst  <= 1'b1;
    end else begin
      meta <= 1'b0;
      rst  <= meta;
    end
  end
endmodule
