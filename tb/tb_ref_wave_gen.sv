// Testbench of the reference wave generator: period 2*HALF_PERIOD clocks,
// 50 % duty, low while disabled.
module tb_ref_wave_gen;
  localparam int HP = 4;
  logic clk = 0, rst = 1, en = 0, wave;
  always #2.5 clk = !clk;
  int checks = 0, failures = 0;

  ref_wave_gen #(.HALF_PERIOD(HP)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int hi, lo, t_last, t_rise;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) begin @(posedge clk); #0.1 check(wave == 0, "low while disabled"); end
    en <= 1;
    @(posedge wave); t_last = $time;
    for (int p = 0; p < 20; p++) begin
      hi = 0; lo = 0;
      @(negedge wave); hi = $time - t_last;
      @(posedge wave); t_rise = $time; lo = t_rise - t_last - hi; t_last = t_rise;
      check(hi == HP * 5 && lo == HP * 5, $sformatf("half periods %0d/%0d ns", hi, lo));
    end
    en <= 0;
    repeat (3) @(posedge clk); #0.1 check(wave == 0, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
