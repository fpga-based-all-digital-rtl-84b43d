// Testbench of the receiver model: a random serial stream must come back as
// N2-bit words, oldest sample in bit 0, stable at each word clock rising edge.
module tb_mgt_rx_deserializer;
  localparam int N2 = 32;
  logic ser_clk = 0, rst = 1, din = 0, word_clk;
  always #1 ser_clk = !ser_clk;
  logic [N2-1:0] rx_word;
  logic sent [$];
  int checks = 0, failures = 0;

  mgt_rx_deserializer #(.N2(N2)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // drive a new bit after each serial edge once out of reset, remember it
  always @(negedge ser_clk) if (!rst) begin
    din = 1'($urandom);
    sent.push_back(din);
  end

  initial begin
    int base;
    repeat (3) @(posedge ser_clk);
    @(negedge ser_clk); rst = 0;
    // first full word: samples 0..N2-1, delivered at the second word edge
    @(posedge word_clk); @(posedge word_clk);
    for (int w = 0; w < 30; w++) begin
      base = (w) * N2;
      for (int b = 0; b < N2; b++)
        check(rx_word[b] == sent[base + b], $sformatf("word %0d sample %0d", w, b));
      @(posedge word_clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
