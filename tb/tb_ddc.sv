// Testbench of the DDC.
// 1) Bit-exact: random PWM words against a model of the N2-path
//    mixer/accumulator written here from the equations (own cosine table,
//    rounded to nearest, 10-bit amplitude 511).
// 2) Function: the comparator output for a carrier at 866.3 MHz sampled at
//    3.2 GS/s, with the DDS set 2 MHz below it, must give a 2 MHz IF at the
//    10 MS/s output (zero crossings counted).
// 3) Rate: one output every DEC word clocks; clk_ddc has period DEC clocks.
module tb_ddc;
  localparam int N2 = 32, N3 = 16, DEC = 10;
  localparam real FS = 3.2e9;
  logic clk = 0, rst = 1, dds_en = 0;
  always #5 clk = !clk;            // 100 MHz word clock = 3.2 GS/s / 32
  logic [31:0] phase_inc;
  logic [N2-1:0] rx_word = '0;
  logic signed [N3-1:0] dout;
  logic dout_valid, clk_ddc;
  int checks = 0, failures = 0;
  int mode = 0;                    // 0 random, 1 carrier
  longint nsamp = 0;

  ddc #(.N2(N2), .N3(N3), .DEC(DEC)) dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model
  int lut [256];
  initial for (int i = 0; i < 256; i++) begin
    real v; v = 511.0 * $cos(2.0 * 3.14159265358979 * i / 256.0);
    lut[i] = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  end
  logic [31:0] acc_m = 0;
  longint integ_m = 0;
  int cnt_m = 0;
  longint expq [$];
  always @(posedge clk) if (!rst && dds_en) begin
    longint sum; logic [31:0] ph;
    sum = 0;
    for (int k = 0; k < N2; k++) begin
      ph = acc_m + phase_inc * k;
      sum += rx_word[k] ? lut[ph[31:24]] : -lut[ph[31:24]];
    end
    acc_m <= acc_m + phase_inc * N2;
    if (cnt_m == DEC - 1) begin
      expq.push_back((integ_m + sum) >>> 4);
      integ_m = 0; cnt_m = 0;
    end else begin
      integ_m += sum; cnt_m++;
    end
  end

  // stimulus: new word after each rising edge
  always @(negedge clk) begin
    if (mode == 0) rx_word <= {$urandom, $urandom};
    else begin
      logic [N2-1:0] w;
      for (int k = 0; k < N2; k++) begin
        real t, rf, rr;
        t  = real'(nsamp * N2 + k) / FS;
        rf = 0.6 * $cos(2.0 * 3.14159265358979 * 866.3e6 * t);
        rr = $sin(2.0 * 3.14159265358979 * 25.0e6 * t);
        w[k] = rf > rr;
      end
      rx_word <= w;
      nsamp++;
    end
  end

  int nvalid = 0, last_valid_t = 0, gap_bad = 0, cmp_bad = 0;
  int zc = 0, nout = 0; logic signed [N3-1:0] prev = 0;
  always @(posedge clk) if (dout_valid && !rst) begin
    nvalid++;
    if (last_valid_t != 0 && $time - last_valid_t != DEC * 10) gap_bad++;
    last_valid_t = $time;
    if (mode == 0) begin
      if (expq.size() == 0 || longint'(dout) != expq[0]) begin cmp_bad++; $display("mismatch t=%0t dout=%0d exp=%0d n=%0d", $time, dout, expq.size() ? expq[0] : 0, nvalid); end
      if (expq.size() != 0) void'(expq.pop_front());
    end else begin
      nout++;
      if (nout > 20 && ((prev < 0) != (dout < 0))) zc++;
      prev = dout;
    end
  end

  initial begin
    phase_inc = 32'h1234_5679;
    repeat (3) @(posedge clk);
    rst <= 0; dds_en <= 1;
    repeat (DEC * 200) @(posedge clk);
    check(cmp_bad == 0 && nvalid >= 199, $sformatf("bit-exact output (%0d mismatches, %0d outputs)", cmp_bad, nvalid));
    check(gap_bad == 0, "one output every DEC clocks");
    begin
      realtime t1, t2;
      @(posedge clk_ddc); t1 = $realtime; @(posedge clk_ddc); t2 = $realtime;
      check(t2 - t1 == DEC * 10.0, "clk_ddc period = DEC word clocks");
    end
    // carrier test
    @(negedge clk); rst <= 1; mode = 1; dds_en <= 1;
    phase_inc = 32'(longint'((866.3e6 - 2.0e6) / FS * 4294967296.0));
    repeat (3) @(posedge clk); rst <= 0;
    repeat (DEC * 220) @(posedge clk);
    // 200 samples at 10 MS/s = 20 us of a 2 MHz IF: 80 zero crossings
    check(zc >= 76 && zc <= 84, $sformatf("2 MHz IF: %0d zero crossings in 20 us", zc));
    dds_en <= 0;
    repeat (DEC * 3) @(posedge clk);
    check(dout == 0, "DDS disabled -> zero output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
