// Digital down-converter of the PWM receiver.
//
// Each word clock brings N2 one-bit samples of the comparator output, taken
// at F_sRX (bit 0 oldest). A polyphase DDS gives every sample its own phase:
// sample k of the word uses phase acc + k*phase_inc, where acc advances by
// N2*phase_inc per word, so the N2 paths together form one oscillator at
// phase_inc/2^32 * F_sRX. Each path multiplies its sample (+1 for a one, -1
// for a zero) by the cosine of its phase taken from a LUT_AW-bit cosine
// table. The N2 products are summed (the polyphase filter: a boxcar over the
// N2 phases) and the sums of DEC words are integrated and dumped, giving one
// N3-bit sample per DEC words at F_sRX/(N2*DEC). With phase_inc set to the
// carrier minus the wanted IF (2 MHz in the reader), the output is the
// received signal moved to that IF. The DDS and N2-path structure follow the
// document; the boxcar filter, the decimation factor and the table sizes are
// this design's choices. The output keeps the top N3 bits of the full sum.
//
// Interface: clk is the receiver word clock; dds_en=0 clears the phase and
// silences the output (zero samples). dout changes once every DEC clocks and
// dout_valid marks that clock. clk_ddc is a clock at the output rate whose
// rising edge falls half an output period after dout changes, for the logic
// that runs at the sample rate (clkDataDDC). rst is synchronous, active high.
module ddc #(
  parameter int N2     = 32,
  parameter int N3     = 16,
  parameter int DEC    = 10,
  parameter int LUT_AW = 8,
  parameter int LUT_W  = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 dds_en,
  input  logic [31:0]          phase_inc,
  input  logic [N2-1:0]        rx_word,
  output logic signed [N3-1:0] dout,
  output logic                 dout_valid,
  output logic                 clk_ddc
);
  localparam int SUM_W = LUT_W + $clog2(N2) + 1;
  localparam int ACC_W = LUT_W + $clog2(N2 * DEC) + 1;
  localparam int DCW   = $clog2(DEC);

  typedef logic signed [LUT_W-1:0] lut_t [2**LUT_AW];

  function automatic lut_t make_cos_lut();
    lut_t t;
    real amp, v;
    amp = real'(2**(LUT_W-1) - 1);
    for (int i = 0; i < 2**LUT_AW; i++) begin
      v    = amp * $cos(2.0 * 3.14159265358979 * real'(i) / real'(2**LUT_AW));
      t[i] = LUT_W'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));   // round to nearest
    end
    return t;
  endfunction

  localparam lut_t COS_LUT = make_cos_lut();

  logic [31:0]             acc;
  logic signed [SUM_W-1:0] path_sum;
  logic signed [ACC_W-1:0] integ;
  logic [DCW-1:0]          cnt;

  // N2 parallel mixer paths and their sum
  always_comb begin
    logic [LUT_AW-1:0]       idx;
    logic signed [LUT_W-1:0] c;
    path_sum = '0;
    for (int k = 0; k < N2; k++) begin
      idx = LUT_AW'((acc + phase_inc * 32'(k)) >> (32 - LUT_AW));
      c   = COS_LUT[idx];
      path_sum = rx_word[k] ? path_sum + SUM_W'(c) : path_sum - SUM_W'(c);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc        <= '0;
      integ      <= '0;
      cnt        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      clk_ddc    <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      acc        <= dds_en ? acc + phase_inc * 32'(N2) : '0;
      if (cnt == DCW'(DEC - 1)) begin
        cnt        <= '0;
        integ      <= '0;
        dout       <= dds_en ? N3'((integ + ACC_W'(path_sum)) >>> (ACC_W - N3)) : '0;
        dout_valid <= 1'b1;
      end else begin
        cnt   <= cnt + 1'b1;
        integ <= integ + ACC_W'(path_sum);
      end
      // next count in the upper half of the period -> clock high
      clk_ddc <= (cnt != DCW'(DEC - 1)) && (32'(cnt) + 1 >= 32'(DEC / 2));
    end
  end
endmodule
