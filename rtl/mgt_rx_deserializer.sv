// Behavioural model of the multi-gigabit transceiver's receiver sampler and
// deserializer (a hard macro of the FPGA), not the real part.
//
// The comparator that turns the RF input and the reference r(t) into a
// two-level PWM signal is the transceiver's differential input buffer; its
// output is din here. The model samples din on every ser_clk (the sampling
// rate F_sRX) and packs N2 consecutive samples into rx_word, the oldest in
// bit 0. word_clk = ser_clk / N2. rx_word is updated half a word period
// before the rising edge of word_clk, so logic clocked by word_clk sees a
// stable word. There is no clock recovery: the sampler is a fixed-rate
// oversampler, so the "CDR hold" control has nothing to hold.
// rst (active high, synchronous to ser_clk) is the "Reset Rx MGT" control.
module mgt_rx_deserializer #(
  parameter int N2 = 32
) (
  input  logic          ser_clk,
  input  logic          rst,
  input  logic          din,
  output logic          word_clk,
  output logic [N2-1:0] rx_word
);
  localparam int CW = $clog2(N2);
  logic [CW-1:0] bitcnt;
  logic [N2-2:0] sh;

  always_ff @(posedge ser_clk) begin
    if (rst) begin
      bitcnt   <= '0;
      sh       <= '0;
      rx_word  <= '0;
      word_clk <= 1'b0;
    end else begin
      bitcnt   <= (bitcnt == CW'(N2-1)) ? '0 : bitcnt + 1'b1;
      sh       <= {din, sh[N2-2:1]};
      if (bitcnt == CW'(N2-1)) rx_word <= {din, sh};
      word_clk <= (bitcnt >= CW'(N2/2 - 1)) && (bitcnt != CW'(N2-1));
    end
  end
endmodule
