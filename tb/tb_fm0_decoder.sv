// Testbench of the FM0 decoder. A tag reply is built as a list of half-bit
// levels: idle, the preamble 1 1 0 1 0 0 1 0 0 0 1 1 (1 0 1 0 violation 1),
// random data bits (the level inverts at every symbol boundary, and also in
// mid-symbol for a 0), a dummy 1, then idle. Samples are taken from that list
// at a real-valued rate, so a symbol can span a non-integer number of
// samples (15.625 at 640 kHz and 10 MS/s). The decoded bits must equal the
// data, with at most a trailing '1' (the dummy), and frame_end must pulse once.
module tb_fm0_decoder;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = !clk;
  logic signed [31:0] sample = 0;
  logic sample_valid = 0;
  logic [7:0]  samples_per_symbol;
  logic [15:0] samples_violation;
  logic [15:0] hysteresis = 16'd0;
  logic bit_valid, bit_value, frame_end;
  int checks = 0, failures = 0;

  fm0_decoder dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [11:0] PREAMBLE = 12'b1101_0010_0011;   // first half-bit at the left

  logic got[$];
  int   ends = 0;
  always @(posedge clk) if (!rst) begin
    if (bit_valid) got.push_back(bit_value);
    if (frame_end) ends++;
  end

  task automatic run_reply(input int nbits, input real spp, input logic idle_lvl,
                           output logic sent[$]);
    logic halves[$];
    logic lv;
    int   nsamp;
    sent.delete(); got.delete(); ends = 0;
    for (int i = 0; i < 8; i++) halves.push_back(idle_lvl);
    for (int i = 11; i >= 0; i--) halves.push_back(PREAMBLE[i]);
    lv = 1'b1;
    for (int i = 0; i <= nbits; i++) begin
      logic b = (i == nbits) ? 1'b1 : 1'($urandom);
      if (i < nbits) sent.push_back(b);
      lv = !lv;
      halves.push_back(lv);
      if (!b) lv = !lv;
      halves.push_back(lv);
    end
    for (int i = 0; i < 12; i++) halves.push_back(idle_lvl);
    en <= 0; @(posedge clk); en <= 1;
    nsamp = int'($floor(real'(halves.size()) * spp / 2.0));
    for (int k = 0; k < nsamp; k++) begin
      int h = int'($floor(real'(k) * 2.0 / spp));
      sample <= halves[h] ? 32'sd5000 + $signed(32'($urandom % 500))
                          : -32'sd5000 - $signed(32'($urandom % 500));
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      repeat (2) @(posedge clk);
    end
  endtask

  task automatic judge(input logic sent[$], input string tag);
    int mism = 0;
    for (int i = 0; i < sent.size() && i < got.size(); i++) if (got[i] != sent[i]) mism++;
    check(got.size() == sent.size() || (got.size() == sent.size() + 1 && got[$] == 1'b1),
          $sformatf("%s: %0d bits for %0d sent", tag, got.size(), sent.size()));
    check(mism == 0, $sformatf("%s: decoded bits equal sent bits (%0d wrong)", tag, mism));
    check(ends == 1, $sformatf("%s: one frame_end (%0d)", tag, ends));
  endtask

  initial begin
    logic sent[$];
    repeat (4) @(posedge clk); rst <= 0;

    samples_per_symbol = 8'd16; samples_violation = 16'd24;
    run_reply(64, 16.0, 1'b0, sent);   judge(sent, "16 samples/symbol, idle low");
    run_reply(64, 16.0, 1'b1, sent);   judge(sent, "16 samples/symbol, idle high");

    // 640 kHz link frequency at 10 MS/s: 15.625 samples per symbol
    samples_per_symbol = 8'd16; samples_violation = 16'd23;
    run_reply(128, 15.625, 1'b0, sent); judge(sent, "15.625 samples/symbol");

    // 40 kHz link frequency at 10 MS/s: 250 samples per symbol
    samples_per_symbol = 8'd250; samples_violation = 16'd375;
    run_reply(16, 250.0, 1'b0, sent);  judge(sent, "250 samples/symbol");

    // hysteresis: a reply with noise of +-2000 on an idle line; with a
    // hysteresis of 3000 the noise makes no edges and the reply decodes
    hysteresis = 16'd3000;
    samples_per_symbol = 8'd16; samples_violation = 16'd24;
    run_reply(48, 16.0, 1'b0, sent);   judge(sent, "with hysteresis");
    begin
      got.delete(); ends = 0;
      en <= 0; @(posedge clk); en <= 1;
      for (int k = 0; k < 400; k++) begin
        sample <= $signed(32'($urandom % 4001)) - 32'sd2000;
        sample_valid <= 1; @(posedge clk); sample_valid <= 0; @(posedge clk);
      end
      check(got.size() == 0, "noise inside the hysteresis band gives no bits");
      hysteresis = 16'd0;
      got.delete();
      for (int k = 0; k < 400; k++) begin
        sample <= $signed(32'($urandom % 4001)) - 32'sd2000;
        sample_valid <= 1; @(posedge clk); sample_valid <= 0; @(posedge clk);
      end
    end

    // a reply without a violation run is ignored
    samples_per_symbol = 8'd16; samples_violation = 16'd24;
    begin
      got.delete(); ends = 0;
      en <= 0; @(posedge clk); en <= 1;
      for (int k = 0; k < 600; k++) begin
        sample <= ((k / 8) % 2 == 1) ? 32'sd5000 : -32'sd5000;
        sample_valid <= 1; @(posedge clk); sample_valid <= 0; @(posedge clk);
      end
      check(got.size() == 0 && ends == 0, "no output without the preamble violation");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
