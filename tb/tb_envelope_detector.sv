// Testbench of the envelope detector: an IF tone whose amplitude is keyed
// between two levels goes in; with a DC-free band-pass set (short boxcar
// minus long boxcar) the output must be bit-exact against a model written
// here (square, then convolve, shift, saturate) and its sign must follow the
// keying, i.e. positive just after the amplitude goes up.
module tb_envelope_detector;
  localparam int NT = 32, SH = 16;
  logic clk = 0, rst_n = 0;
  always #50 clk = !clk;                 // 10 MS/s
  logic signed [15:0] din = 0;
  logic din_valid = 0, dout_valid;
  logic signed [31:0] dout;
  logic rl_v = 0, rl_l = 0, rl_r, cf_v = 0, cf_r;
  logic [15:0] rl_d = 0;
  int checks = 0, failures = 0;
  int h [NT];
  longint sq [$];
  int nexp = 0, bad = 0, pos_hi = 0, neg_lo = 0;

  envelope_detector #(.NTAPS(NT), .SHIFT(SH)) dut (.clk, .rst_n, .din, .din_valid,
    .reload_tvalid(rl_v), .reload_tlast(rl_l), .reload_tdata(rl_d), .reload_tready(rl_r),
    .config_tvalid(cf_v), .config_tlast(1'b1), .config_tdata(8'd0), .config_tready(cf_r),
    .dout, .dout_valid);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // model: output for the sample stream so far, two clocks after input
  longint expq [$];
  int keyq [$];
  always @(posedge clk) if (rst_n && din_valid) begin
    longint acc, y;
    acc = 0;
    sq.push_back(longint'(din) * longint'(din));
    for (int k = 0; k < NT && k < sq.size(); k++) acc += longint'(h[k]) * sq[sq.size() - 1 - k];
    y = acc >>> SH;
    if (y > 64'sd2147483647) y = 64'sd2147483647;
    if (y < -64'sd2147483648) y = -64'sd2147483648;
    expq.push_back(y);
  end
  int phase_key = 0;
  always @(posedge clk) if (rst_n && dout_valid) begin
    if (expq.size() == 0 || longint'(dout) != expq[0]) bad++;
    if (expq.size() != 0) void'(expq.pop_front());
    nexp++;
    // 8 samples after a rising amplitude step the output must be positive,
    // 8 samples after a falling step negative
    if (phase_key == 8)  pos_hi += (dout > 0);
    if (phase_key == 28) neg_lo += (dout < 0);
  end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < NT; k++) h[k] = (k < 8) ? 3 * 64 : -64;       // 8*192 - 24*64 = 0
    for (int k = 0; k < NT; k++) begin
      @(posedge clk); rl_v <= 1; rl_d <= 16'(h[k]); rl_l <= (k == NT - 1);
    end
    @(posedge clk); rl_v <= 0; cf_v <= 1; @(posedge clk); cf_v <= 0;
    // 2 MHz IF at 10 MS/s, amplitude 3000 / 9000 keyed every 20 samples
    for (int n = 0; n < 400; n++) begin
      real a;
      a = ((n / 20) % 2) ? 3000.0 : 9000.0;
      @(posedge clk);
      din <= 16'($rtoi(a * $cos(2.0 * 3.14159265358979 * 0.2 * n)));
      din_valid <= 1;
      // the key phase seen at the output, 2 clocks later
      phase_key <= (n - 2 + 400) % 40;
    end
    @(posedge clk); din_valid <= 0;
    repeat (4) @(posedge clk);
    check(bad == 0 && nexp >= 398, $sformatf("bit-exact square + FIR (%0d mismatches of %0d)", bad, nexp));
    check(pos_hi >= 8, $sformatf("positive after amplitude rises (%0d)", pos_hi));
    check(neg_lo >= 8, $sformatf("negative after amplitude falls (%0d)", neg_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
