// Testbench of the transmitter model: words given on the word clock must come
// out LSB first, one bit per serial clock, with word_clk = ser_clk / N1; the
// swing code follows txdiffctrl and TXINHIBIT silences the output.
module tb_mgt_tx_serializer;
  localparam int N1 = 32;
  logic ser_clk = 0, rst = 1;
  always #1 ser_clk = !ser_clk;
  logic word_clk, txp, txn, txinhibit = 0;
  logic [3:0] txdiffctrl = 4'd9, swing_code;
  logic [N1-1:0] tx_word;
  logic [N1-1:0] words [$];
  int checks = 0, failures = 0;
  int wclk_edges = 0, ser_edges = 0;
  realtime t_prev = 0, t_per = 0;

  mgt_tx_serializer #(.N1(N1)) dut (.ser_clk, .rst, .word_clk, .tx_word, .txdiffctrl,
    .txprecursor(5'd0), .txpostcursor(5'd0), .txinhibit, .txp, .txn, .swing_code);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // a new random word after each word clock edge
  initial tx_word = '0;
  always @(posedge word_clk) begin
    logic [N1-1:0] w;
    w = {$urandom, $urandom};
    tx_word <= w;
    words.push_back(w);
    wclk_edges++;
    t_per = $realtime - t_prev; t_prev = $realtime;
  end
  always @(posedge ser_clk) if (!rst) ser_edges++;

  initial begin
    logic [N1-1:0] exp;
    repeat (4) @(posedge ser_clk); rst <= 0;
    // word loaded at the serial edge where word_clk rises carries the
    // previous word; wait for two word clocks
    @(posedge word_clk); @(posedge word_clk);
    for (int w = 0; w < 20; w++) begin
      exp = words[w];
      for (int b = 0; b < N1; b++) begin
        @(negedge ser_clk);
        check(txp == exp[b] && txn == !exp[b], $sformatf("word %0d bit %0d", w, b));
      end
    end
    check(t_per == 2.0 * N1, "word clock = serial clock / N1");
    check(swing_code == 4'd9, "swing follows TXDIFFCTRL");
    txinhibit = 1; #1;
    check(txp == 0 && txn == 0 && swing_code == 0, "TXINHIBIT blocks transmission");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
