// Two-flip-flop synchronizer for a single control level that crosses from
// the processor (AXI) clock into another clock domain. Output lags the input
// by two to three destination clocks. No reset: the chain settles within two
// clocks of any input level.
module sync_2ff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
