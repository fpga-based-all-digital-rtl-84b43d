// Reference wave generator for the PWM receiver.
//
// The comparator needs a reference r(t) with an amplitude at least as large
// as the RF input. The reader makes it from a digital square wave that an
// external low-pass filter turns into a sine, as the document describes. This
// block makes that square wave: the output toggles every HALF_PERIOD clocks
// while en is 1 and rests low while en is 0. Its frequency (clk / 2 /
// HALF_PERIOD, 25 MHz from a 200 MHz clock by default) is this design's
// choice: the document does not give it. rst is synchronous, active high.
module ref_wave_gen #(
  parameter int HALF_PERIOD = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic wave
);
  localparam int CW = $clog2(HALF_PERIOD + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst || !en) begin
      cnt  <= '0;
      wave <= 1'b0;
    end else if (cnt == CW'(HALF_PERIOD - 1)) begin
      cnt  <= '0;
      wave <= !wave;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
