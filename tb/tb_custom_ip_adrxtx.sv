// Testbench of the ADRxTx core with its Tx and Rx memories modelled here.
// The serial clocks run at 1 GHz (the ratios, not the absolute rates, are
// what the core depends on). Checks:
//  - carrier: with "enable Tx memory" set, the serial output repeats the
//    stored pattern (4 words, LSB first) with a period of 4*N1 bits, and is
//    0 while the bit is clear; txinhibit silences both pins; tx_swing
//    follows txdiffctrl;
//  - MGT capture: limit+1 words are written to the Rx memory and their bits
//    form one unbroken window of the comparator bit stream;
//  - DDC capture: with the DDS on, limit+1 samples are written, each equal
//    to a DDC output and sign-extended; clkDataDDC has period DEC word clocks;
//  - the reference wave runs at sys_clk / (2*REF_HALF_PERIOD) with the DDS
//    bit set and stops without it; register readback; the Tx MGT reset
//    stops the word clock's output; the push buttons reset both halves.
module tb_custom_ip_adrxtx;
  import rfid_pkg::*;
  localparam int N1 = 32, N2 = 32, DEC = 10;
  logic aclk = 0, aresetn = 0, sys_clk = 0, tx_ser_clk = 0, rx_ser_clk = 0;
  always #5    aclk = !aclk;
  always #2.5  sys_clk = !sys_clk;
  always #0.5  tx_ser_clk = !tx_ser_clk;
  always #0.5  rx_ser_clk = !rx_ser_clk;
  axil_req_t req;
  axil_rsp_t rsp;
  logic rx_comp_in = 0;
  logic [1:0] pushb_in = 0;
  logic [4:0] txpostcursor = 0, txprecursor = 0;
  logic [3:0] txdiffctrl = 4'd9;
  logic txinhibit = 0;
  logic bram_tx_en, bram_adrx_we;
  logic [9:0] bram_tx_addr, bram_adrx_addr;
  logic [31:0] bram_tx_rdata = 0, bram_adrx_wdata;
  logic sma_txp_out, sma_txn_out, ref_wave_out, mgt_rx_clk_out, mgt_tx_clk_out, clkDataDDC;
  logic [3:0] tx_swing;
  logic [7:0] led_out;
  logic signed [15:0] dataOut_DDC;
  int checks = 0, failures = 0;

  custom_ip_adrxtx dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn), .s_axi_req(req), .s_axi_rsp(rsp), .*
  );
  axil_bfm bfm (.clk(aclk), .req(req), .rsp(rsp));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #400000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Tx memory (read, one clock latency) and Rx memory (write)
  logic [31:0] txmem [4];
  always @(posedge mgt_tx_clk_out) if (bram_tx_en) bram_tx_rdata <= txmem[bram_tx_addr[1:0]];
  logic [31:0] rxmem [1024];
  int rx_writes = 0;
  logic mon = 0;
  always @(posedge mgt_rx_clk_out) if (mon && bram_adrx_we) begin
    rxmem[bram_adrx_addr] <= bram_adrx_wdata; rx_writes++;
  end

  // comparator bit stream: an LFSR, remembered bit by bit
  logic [15:0] lfsr = 16'hACE1;
  logic sent[$];
  always @(posedge rx_ser_clk) begin
    lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    rx_comp_in <= lfsr[15];
    if (mon) sent.push_back(lfsr[15]);
  end

  // serial Tx output
  logic txbits[$];
  logic rec_tx = 0;
  always @(posedge tx_ser_clk) if (rec_tx) txbits.push_back(sma_txp_out);

  // DDC outputs seen on clkDataDDC
  logic signed [15:0] ddc_seen[$];
  always @(posedge clkDataDDC) if (mon) ddc_seen.push_back(dataOut_DDC);

  initial begin
    logic [31:0] d;
    int off, bad, hits, start, ones;
    for (int i = 0; i < 4; i++) txmem[i] = $urandom;
    for (int i = 0; i < 1024; i++) rxmem[i] = '0;
    repeat (5) @(posedge aclk); aresetn <= 1;
    repeat (20) @(posedge aclk);
    mon = 1;

    // ---------------- registers
    bfm.write(4'h0, 32'd7);
    bfm.write(4'h8, 32'h0A3D_70A4);
    bfm.write(4'hC, 32'd3);
    bfm.read(4'h0, d); check(d == 32'd7, "Rx limit readback");
    bfm.read(4'h8, d); check(d == 32'h0A3D_70A4, "phase increment readback");
    bfm.read(4'hC, d); check(d == 32'd3, "Tx limit readback");

    // ---------------- carrier off, then on
    rec_tx = 1;
    repeat (300) @(posedge tx_ser_clk);
    ones = 0; foreach (txbits[i]) ones += txbits[i];
    check(ones == 0, "no carrier while the Tx memory is disabled");
    txbits.delete();
    bfm.write(4'h4, 32'h2);
    repeat (40) @(posedge aclk);
    txbits.delete();
    repeat (1024) @(posedge tx_ser_clk);
    rec_tx = 0;
    off = -1;
    for (int s = 0; s < 4 * N1 && off < 0; s++) begin
      bad = 0;
      for (int k = 0; k < 4 * N1; k++) if (txbits[s + k] != txmem[k / 32][k % 32]) bad++;
      if (bad == 0) off = s;
    end
    check(off >= 0, "serial output holds the stored pattern, LSB first");
    bad = 0;
    for (int k = 4 * N1; k < txbits.size(); k++) if (txbits[k] != txbits[k - 4 * N1]) bad++;
    check(bad == 0, "pattern repeats every 4*N1 bits");
    check(tx_swing == 4'd9, "tx_swing follows txdiffctrl");
    check(led_out[5], "LED: carrier on");
    txinhibit = 1;
    repeat (40) @(posedge tx_ser_clk);
    ones = 0;
    repeat (64) begin @(posedge tx_ser_clk); ones += sma_txp_out + sma_txn_out; end
    check(ones == 0 && tx_swing == 0, "txinhibit silences the output");
    txinhibit = 0;

    // ---------------- MGT capture of 8 words
    bfm.write(4'h4, 32'h2 | 32'h80 | 32'h1);
    repeat (80) @(posedge mgt_rx_clk_out);
    check(rx_writes == 8, $sformatf("MGT capture writes limit+1 words (%0d)", rx_writes));
    check(led_out[7], "LED: capture done");
    hits = 0;
    for (int s = 0; s + 8 * N2 <= sent.size() && hits == 0; s++) begin
      bad = 0;
      for (int k = 0; k < 8 * N2 && bad == 0; k++) if (sent[s + k] != rxmem[k / 32][k % 32]) bad++;
      if (bad == 0) hits = 1;
    end
    check(hits == 1, "captured words are one unbroken window of the comparator stream");

    // ---------------- DDC capture of 16 samples
    bfm.write(4'h0, 32'd15);
    bfm.write(4'h4, 32'h2 | 32'h20);
    repeat (20) @(posedge mgt_rx_clk_out);
    rx_writes = 0; ddc_seen.delete();
    for (int i = 0; i < 1024; i++) rxmem[i] = '0;
    bfm.write(4'h4, 32'h2 | 32'h20 | 32'h1);
    repeat (30 * DEC) @(posedge mgt_rx_clk_out);
    check(rx_writes == 16, $sformatf("DDC capture writes limit+1 samples (%0d)", rx_writes));
    start = -1;
    for (int s = 0; s + 16 <= ddc_seen.size() && start < 0; s++) begin
      bad = 0;
      for (int k = 0; k < 16; k++) if (rxmem[k] != 32'(ddc_seen[s + k])) bad++;
      if (bad == 0) start = s;
    end
    check(start >= 0, "captured samples are consecutive DDC outputs, sign-extended");
    ones = 0;
    foreach (ddc_seen[i]) if (ddc_seen[i] != 0) ones++;
    check(ones > 10, "DDC produces non-zero samples with the DDS on");

    // clkDataDDC period
    begin
      longint t0, t1;
      @(posedge clkDataDDC); t0 = $time;
      repeat (4) @(posedge clkDataDDC); t1 = $time;
      check(t1 - t0 == 4 * DEC * N2 * 1000 / 1000, $sformatf("clkDataDDC period of DEC word clocks (%0d)", t1 - t0));
    end

    // ---------------- reference wave
    begin
      longint t0, t1;
      @(posedge ref_wave_out); t0 = $time;
      repeat (10) @(posedge ref_wave_out); t1 = $time;
      check(t1 - t0 == 10 * 2 * 4 * 5, "reference wave period 2*REF_HALF_PERIOD sys clocks");
    end
    bfm.write(4'h4, 32'h2);
    repeat (20) @(posedge sys_clk);
    ones = 0;
    repeat (40) begin @(posedge sys_clk); ones += ref_wave_out; end
    check(ones == 0, "reference wave stops with the DDS off");

    // ---------------- resets
    bfm.write(4'h4, 32'h2 | 32'h8 | 32'h10);
    repeat (20) @(posedge aclk);
    check(led_out[2] && led_out[0], "LED: Tx MGT reset and CDR hold");
    ones = 0;
    repeat (100) begin @(posedge tx_ser_clk); ones += sma_txp_out; end
    check(ones == 0, "Tx MGT reset stops the output");
    bfm.write(4'h4, 32'h2);
    repeat (20) @(posedge aclk);
    pushb_in = 2'b01;
    repeat (10) @(posedge aclk);
    check(led_out[3] && led_out[2], "push button resets both halves");
    pushb_in = 2'b00;
    repeat (10) @(posedge aclk);
    check(!led_out[3] && !led_out[2], "reset released with the button");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
