// Testbench of the dual-port memory: words written on one port are read on
// the other (and the same) port with one clock of latency; read-first
// behaviour on a write; the two ports run on different clocks.
module tb_tdp_bram;
  logic clka = 0, clkb = 0;
  always #5 clka = !clka;
  always #7 clkb = !clkb;
  logic ena = 0, wea = 0, enb = 0, web = 0;
  logic [9:0] addra = 0, addrb = 0;
  logic [31:0] dina = 0, dinb = 0, douta, doutb;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  tdp_bram dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 0;
    // port B writes 64 random words
    for (int i = 0; i < 64; i++) begin
      logic [31:0] w;
      w = $urandom;
      @(posedge clkb); enb <= 1; web <= 1; addrb <= 10'(i * 13); dinb <= w;
      model[i * 13 % 1024] = w;
    end
    @(posedge clkb); enb <= 0; web <= 0;
    // port A reads them
    for (int i = 0; i < 64; i++) begin
      @(posedge clka); ena <= 1; addra <= 10'(i * 13);
      @(posedge clka); ena <= 0;
      @(negedge clka); check(douta == model[i * 13 % 1024], "A reads what B wrote");
    end
    // port A writes, read-first: douta shows the old word on the write clock
    @(posedge clka); ena <= 1; wea <= 1; addra <= 10'd13; dina <= 32'hCAFE0001;
    @(posedge clka); wea <= 0; ena <= 1; addra <= 10'd13;
    @(negedge clka); check(douta == model[13], "read-first on write");
    @(posedge clka); ena <= 0;
    @(negedge clka); check(douta == 32'hCAFE0001, "A reads its own write");
    // port B sees it, one clock latency
    @(posedge clkb); enb <= 1; addrb <= 10'd13;
    @(posedge clkb); enb <= 0;
    @(negedge clkb); check(doutb == 32'hCAFE0001, "B reads A's write");
    // output holds when disabled
    @(posedge clka); addra <= 10'd0;
    @(negedge clka); check(douta == 32'hCAFE0001, "output holds while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
