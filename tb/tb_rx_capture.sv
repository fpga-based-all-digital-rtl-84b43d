// Testbench of the Rx capture: after en rises, MGT words (every clock) or
// DDC samples (only on ddc_valid, sign-extended) are written to addresses
// 0..limit, then writing stops and done is set; en low clears done.
module tb_rx_capture;
  logic clk = 0, rst = 1, en = 0, sel_mgt = 0, ddc_valid = 0;
  always #5 clk = !clk;
  logic [9:0] limit, addr;
  logic [31:0] mgt_word = 0, wdata;
  logic [15:0] ddc_sample = 0;
  logic we, busy, done;
  logic [31:0] mem [1024];
  int writes = 0;
  int checks = 0, failures = 0;

  rx_capture dut (.*);

  always @(posedge clk) if (we && !rst) begin mem[addr] <= wdata; writes++; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sources: counting MGT words, DDC samples valid every 3rd clock
  int tick = 0;
  always @(posedge clk) begin
    tick <= tick + 1;
    mgt_word   <= 32'hA000_0000 + 32'(tick + 1);
    ddc_valid  <= ((tick + 1) % 3 == 0);
    ddc_sample <= 16'(-(tick + 1));
  end

  initial begin
    int first;
    for (int i = 0; i < 1024; i++) mem[i] = 32'hDEAD_BEEF;
    limit = 10'd19;
    repeat (3) @(posedge clk); rst <= 0;
    // MGT source
    sel_mgt <= 1; en <= 1;
    repeat (40) @(posedge clk);
    check(writes == 20, $sformatf("MGT capture writes limit+1 words (%0d)", writes));
    check(done && !busy, "done after limit");
    first = int'(mem[0] - 32'hA000_0000);
    for (int i = 1; i < 20; i++) check(mem[i] == mem[0] + i, "consecutive MGT words");
    check(mem[20] == 32'hDEAD_BEEF, "nothing beyond limit");
    en <= 0; @(posedge clk); @(posedge clk);
    check(!done, "done cleared by en=0");
    // DDC source
    writes = 0; limit = 10'd9; sel_mgt <= 0; en <= 1;
    repeat (60) @(posedge clk);
    check(writes == 10, $sformatf("DDC capture writes limit+1 samples (%0d)", writes));
    for (int i = 0; i < 10; i++) begin
      check(mem[i][31:16] == {16{mem[i][15]}}, "DDC sample sign-extended");
      check(-int'($signed(mem[i][15:0])) % 3 == 0, "only samples marked valid");
    end
    for (int i = 1; i < 10; i++) check($signed(mem[i]) == $signed(mem[i-1]) - 3, "consecutive valid samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
