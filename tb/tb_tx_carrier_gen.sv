// Testbench of the Tx carrier generator: with a memory model holding a
// pattern, the output must loop over words 0..limit while tx_en is 1, starting
// with word 0 two clocks after tx_en, and be all zero while tx_en is 0.
module tb_tx_carrier_gen;
  logic clk = 0, rst = 1, tx_en = 0;
  always #5 clk = !clk;
  logic [9:0] limit, mem_addr;
  logic mem_en;
  logic [31:0] mem_rdata, tx_word;
  logic [31:0] mem [1024];
  int checks = 0, failures = 0;

  tx_carrier_gen dut (.*);

  // memory with one clock of read latency
  always_ff @(posedge clk) if (mem_en) mem_rdata <= mem[mem_addr];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) mem[i] = 32'h1000_0000 + i;
    mem_rdata = 0;
    limit = 10'd4;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (3) @(posedge clk);
    for (int rep = 0; rep < 3; rep++) begin
      limit = (rep == 0) ? 10'd4 : (rep == 1) ? 10'd0 : 10'd6;
      @(posedge clk); tx_en <= 1;
      // first word appears on tx_word after the second clock edge
      @(posedge clk); @(posedge clk); #1;
      for (int k = 0; k < 30; k++) begin
        check(tx_word == mem[k % (int'(limit) + 1)], $sformatf("loop word %0d limit %0d", k, limit));
        @(posedge clk); #1;
      end
      tx_en <= 0;
      @(posedge clk); @(posedge clk); #1;
      for (int k = 0; k < 5; k++) begin
        check(tx_word == 0, "carrier off -> zero word");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
