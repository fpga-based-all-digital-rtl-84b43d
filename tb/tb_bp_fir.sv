// Testbench of the reloadable FIR: coefficients are streamed in, committed by
// a config word, and the output must equal the convolution computed here
// (with the SHIFT and saturation); a second coefficient set only takes effect
// after its config word; Filter_Resetn clears the history.
module tb_bp_fir;
  localparam int NT = 8, SH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  logic signed [31:0] din = 0, dout;
  logic din_valid = 0, dout_valid;
  logic rl_v = 0, rl_l = 0, rl_r, cf_v = 0, cf_l = 0, cf_r;
  logic [15:0] rl_d = 0;
  int checks = 0, failures = 0;
  int h [NT];
  longint xs [$];

  bp_fir #(.NTAPS(NT), .SHIFT(SH)) dut (.clk, .rst_n, .din, .din_valid,
    .reload_tvalid(rl_v), .reload_tlast(rl_l), .reload_tdata(rl_d), .reload_tready(rl_r),
    .config_tvalid(cf_v), .config_tlast(cf_l), .config_tdata(8'd0), .config_tready(cf_r),
    .dout, .dout_valid);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(input int c [NT], input bit commit);
    for (int k = 0; k < NT; k++) begin
      @(posedge clk); rl_v <= 1; rl_d <= 16'(c[k]); rl_l <= (k == NT - 1);
    end
    @(posedge clk); rl_v <= 0; rl_l <= 0;
    if (commit) begin @(posedge clk); cf_v <= 1; cf_l <= 1; @(posedge clk); cf_v <= 0; end
  endtask

  function automatic longint expect_y();
    longint acc = 0, y;
    for (int k = 0; k < NT && k < xs.size(); k++) acc += longint'(h[k]) * xs[xs.size() - 1 - k];
    y = acc >>> SH;
    if (y > 64'sd2147483647) y = 64'sd2147483647;
    if (y < -64'sd2147483648) y = -64'sd2147483648;
    return y;
  endfunction

  task automatic run(input int n, input int amp);
    longint e;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); din <= 32'($urandom_range(0, 2 * amp) - amp); din_valid <= 1;
      @(posedge clk); din_valid <= 0;  // half-rate input: dout valid in between
      xs.push_back(longint'(din));
      e = expect_y();
      @(negedge clk);
      check(dout_valid && longint'(dout) == e, $sformatf("y[%0d]=%0d expected %0d", i, dout, e));
    end
  endtask

  initial begin
    int c1 [NT], c2 [NT];
    repeat (3) @(posedge clk); rst_n <= 1;
    check(rl_r && cf_r, "always ready");
    for (int k = 0; k < NT; k++) begin c1[k] = (k < 2) ? 3 * (NT - 2) : -6; c2[k] = k - 3; end
    load(c1, 1); h = c1;
    run(40, 1000);
    load(c2, 0);                // shadow only
    run(10, 1000);              // still c1
    @(posedge clk); cf_v <= 1; @(posedge clk); cf_v <= 0; h = c2;
    run(20, 1000);
    run(10, 1 << 30);           // saturation with large inputs
    rst_n <= 0; @(posedge clk); rst_n <= 1; xs.delete();
    for (int k = 0; k < NT; k++) h[k] = 0;   // reset also clears coefficients
    run(5, 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
