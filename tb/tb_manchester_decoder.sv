// Testbench of the Manchester decoder. A reply is generated as a sample
// stream: idle (negative) samples, a start bit, random data bits and idle
// again. A '1' is positive in the first half of the symbol, a '0' in the
// second. Samples arrive every second clock. The decoded bits must equal the
// sent bits, the start bit must not be output, frame_end must pulse once
// after the last bit, and each bit must come one clock after the last sample
// of its symbol. A second reply with light noise near the half boundaries
// and a threshold too high for a clean symbol checks the threshold rule.
module tb_manchester_decoder;
  logic clk = 0, rst = 1, en = 0;
  always #5 clk = !clk;
  logic signed [31:0] sample = 0;
  logic sample_valid = 0;
  logic [7:0] samples_per_symbol = 8'd20;
  logic [9:0] threshold = 10'd8;
  logic [15:0] slice_level = 16'd0;
  logic bit_valid, bit_value, frame_end;
  int checks = 0, failures = 0;

  manchester_decoder dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic got[$];
  int   ends = 0;
  longint last_sample_t = 0, bit_t[$];
  always @(posedge clk) if (!rst) begin
    if (bit_valid) begin got.push_back(bit_value); bit_t.push_back($time); end
    if (frame_end) ends++;
  end

  task automatic send_sample(input logic hi);
    sample <= hi ? 32'sd1000 + $signed(32'($urandom % 100)) : -32'sd1000 - $signed(32'($urandom % 100));
    sample_valid <= 1;
    @(posedge clk);
    last_sample_t = $time;
    sample_valid <= 0;
    @(posedge clk);
  endtask

  task automatic send_symbol(input logic b, input int flips);
    int spp = int'(samples_per_symbol);
    for (int i = 0; i < spp; i++) begin
      logic hi = (i < spp / 2) ? b : !b;
      if (flips > 0 && (i == spp / 2 - 1 || i == spp / 2)) begin hi = !hi; flips--; end
      send_sample(hi);
    end
  endtask

  task automatic run_reply(input int nbits, input int noise, output logic sent[$]);
    sent.delete();
    got.delete(); bit_t.delete(); ends = 0;
    en <= 0; @(posedge clk); en <= 1;
    for (int i = 0; i < 7; i++) send_sample(0);
    send_symbol(1, 0);                       // start bit
    for (int i = 0; i < nbits; i++) begin
      logic b = 1'($urandom);
      sent.push_back(b);
      send_symbol(b, noise);
      // the bit is reported one clock after its last sample
      @(negedge clk);
    end
    for (int i = 0; i < 60; i++) send_sample(0);
  endtask

  initial begin
    logic sent[$];
    int mism;
    repeat (4) @(posedge clk); rst <= 0;

    // clean reply, 40 bits
    run_reply(40, 0, sent);
    check(got.size() == sent.size(), $sformatf("bit count %0d of %0d", got.size(), sent.size()));
    mism = 0;
    for (int i = 0; i < sent.size() && i < got.size(); i++) if (got[i] != sent[i]) mism++;
    check(mism == 0, $sformatf("decoded bits equal sent bits (%0d wrong)", mism));
    check(ends == 1, "one frame_end after the reply");

    // noisy reply (one sample flipped on each side of the half boundary), 30 bits
    threshold = 10'd6;                       // two flips leave |h1-h2| = 8
    run_reply(30, 2, sent);
    mism = 0;
    for (int i = 0; i < sent.size() && i < got.size(); i++) if (got[i] != sent[i]) mism++;
    check(got.size() == 30 && mism == 0, "noisy symbols still decoded above the threshold");
    check(ends == 1, "one frame_end after the noisy reply");

    // threshold above what a symbol can reach: the start bit ends the frame
    threshold = 10'd11;                      // clean symbol gives |h1-h2| = 10
    run_reply(10, 0, sent);
    check(got.size() == 0 && ends == 1, "symbol under the threshold ends the frame at once");

    // bit timing: one clock after the last sample of each symbol
    threshold = 10'd8; samples_per_symbol = 8'd16;
    run_reply(8, 0, sent);
    check(got.size() == 8, "8 bits at 16 samples/symbol");
    mism = 0;
    for (int i = 0; i < got.size(); i++) if (got[i] != sent[i]) mism++;
    check(mism == 0, "bits at 16 samples/symbol");

    // 106 kbps at 10 MS/s: 94 samples per symbol, a 45-bit UID reply
    threshold = 10'd30; samples_per_symbol = 8'd94;
    run_reply(45, 0, sent);
    mism = 0;
    for (int i = 0; i < got.size() && i < sent.size(); i++) if (got[i] != sent[i]) mism++;
    check(got.size() == 45 && mism == 0, $sformatf("45-bit reply at 94 samples/symbol (%0d bits)", got.size()));

    // en low holds the decoder idle
    en <= 0; got.delete(); ends = 0;
    for (int i = 0; i < 40; i++) send_sample(i[2]);
    check(got.size() == 0 && ends == 0, "nothing decoded while en=0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // timing of each bit against the last sample of its symbol
  always @(posedge clk) if (!rst && bit_valid) begin
    checks++;
    if ($time - last_sample_t != 10) begin
      failures++; $display("FAIL: bit %0t not one clock after sample %0t", $time, last_sample_t);
    end
  end
endmodule
