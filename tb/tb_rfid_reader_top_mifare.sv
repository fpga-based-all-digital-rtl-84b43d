// End-to-end MIFARE (ISO 14443A) receive test of the reader at its default
// sizes. The comparator input is modelled at the 3.2 GS/s receive clock as
//   (A(t) * cos(2*pi*13.56MHz*t) > sin(2*pi*25MHz*t))
// where the tag's load modulation raises A(t) with an 847.5 kHz square
// subcarrier (fc/16) during the modulated half of each Manchester symbol
// at 106 kbps (94.4 samples per symbol at 10 MS/s). The DDS is tuned 2 MHz
// above the carrier. The envelope detector squares the 2 MHz IF and a
// 32-tap band-pass filter centred on the subcarrier (Hann-windowed cosine)
// keeps the subcarrier bursts; the Manchester decoder counts, per half
// symbol, the samples above its slice level. The test sends a start bit and
// a 45-bit reply, the length of an
// anticollision UID (5 bytes with parity), and checks the MIFARE memory and the status.
// The register sequence (DDS, filter, decoder start) is the reader's; the
// tag model, the subcarrier filter design and the slice level of 6000
// (above the idle noise of the 25 MHz reference mixing products, about 3700)
// are this test's choices.
module tb_rfid_reader_top_mifare;
  import rfid_pkg::*;
  localparam real FS   = 3.2e9;
  localparam real FC   = 13.56e6;
  localparam real FREF = 25.0e6;
  localparam real FIF  = 2.0e6;
  localparam real FSUB = 13.56e6 / 16.0;
  localparam real BITRATE = 13.56e6 / 128.0;
  localparam real PI   = 3.14159265358979;
  localparam int  NBITS = 45;          // UID CL1: 5 bytes + 5 parity bits

  logic aclk = 0, aresetn = 1, sys_clk = 0, tx_ser_clk = 0, rx_ser_clk = 0, clk_in = 0;
  always #5       aclk = !aclk;
  always #2.5     sys_clk = !sys_clk;
  always #0.156   tx_ser_clk = !tx_ser_clk;
  always #0.156   rx_ser_clk = !rx_ser_clk;
  always #3.2     clk_in = !clk_in;

  axil_req_t adrxtx_req, amp_req, bpcfg_req, dec_req, iic_req;
  axil_rsp_t adrxtx_rsp, amp_rsp, bpcfg_rsp, dec_rsp, iic_rsp;
  bram_req_t bram_tx_host = '0, bram_adrx_host = '0, bram_cfg_host = '0,
             bram_mifare_host = '0, bram_epc_host = '0;
  logic [31:0] bram_tx_host_rdata, bram_adrx_host_rdata, bram_cfg_host_rdata,
               bram_mifare_host_rdata, bram_epc_host_rdata;
  logic rx_comp_in = 0;
  logic [1:0] pushb_in = 0;
  logic sma_txp_out, sma_txn_out, ref_wave_out, mgt_rx_clk_out, mgt_tx_clk_out, clkDataDDC;
  logic [3:0] tx_swing;
  logic [7:0] led_out;
  logic [15:0] dataOut_DDC;
  logic [31:0] rfid_baseband;
  logic rfid_baseband_valid;
  logic clk_out_p, clk_out_n, iic_sda_drive_low, iic_scl_drive_low, si5326_rst_n, iic_mux_rst_n;
  logic iic_sda_i = 1, iic_scl_i = 1;
  int checks = 0, failures = 0;

  rfid_reader_top dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn),
    .adrxtx_axi_req(adrxtx_req), .adrxtx_axi_rsp(adrxtx_rsp),
    .amp_axi_req(amp_req), .amp_axi_rsp(amp_rsp),
    .bpcfg_axi_req(bpcfg_req), .bpcfg_axi_rsp(bpcfg_rsp),
    .dec_axi_req(dec_req), .dec_axi_rsp(dec_rsp),
    .iic_axi_req(iic_req), .iic_axi_rsp(iic_rsp),
    .*
  );
  axil_bfm bfm_adrxtx (.clk(aclk), .req(adrxtx_req), .rsp(adrxtx_rsp));
  axil_bfm bfm_amp    (.clk(aclk), .req(amp_req),    .rsp(amp_rsp));
  axil_bfm bfm_bpcfg  (.clk(aclk), .req(bpcfg_req),  .rsp(bpcfg_rsp));
  axil_bfm bfm_dec    (.clk(aclk), .req(dec_req),    .rsp(dec_rsp));
  axil_bfm bfm_iic    (.clk(aclk), .req(iic_req),    .rsp(iic_rsp));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic mem_write(ref bram_req_t p, input int a, input logic [31:0] d);
    @(posedge aclk);
    p.en <= 1; p.we <= 1; p.addr <= 10'(a); p.wdata <= d;
    @(posedge aclk);
    p.en <= 0; p.we <= 0;
  endtask

  // tag reply as half-symbol flags: 1 = subcarrier on in that half
  localparam real A0 = 0.30, AM = 0.12;
  logic halves[$];
  logic reply_bits[$];
  logic playing = 0;
  longint n = 0, play_start = 0;
  always @(posedge rx_ser_clk) begin
    real t, a, rf, rf_ref;
    t = real'(n) / FS;
    a = A0;
    if (playing) begin
      real tr;
      longint h;
      tr = real'(n - play_start) / FS;
      h = longint'($floor(tr * 2.0 * BITRATE));
      if (h >= halves.size()) playing = 0;
      else if (halves[h] && $sin(2.0 * PI * FSUB * tr) > 0.0) a = A0 + AM;
    end
    rf = a * $cos(2.0 * PI * FC * t);
    rf_ref = $sin(2.0 * PI * FREF * t);
    rx_comp_in <= rf > rf_ref;
    n <= n + 1;
  end

  int m_mif_bits = 0, m_mif_end = 0, m_mif_words = 0;
  always @(posedge clkDataDDC) begin
    if (dut.u_dec.mif_bv) m_mif_bits++;
    if (dut.u_dec.mif_end) m_mif_end++;
    if (dut.mif_we) m_mif_words++;
  end

  initial begin
    logic [31:0] d;
    int bad, nb;
    #1 aresetn = 0;
    repeat (10) @(posedge aclk); aresetn <= 1;
    repeat (10) @(posedge aclk);

    // DDS 2 MHz above the 13.56 MHz carrier, DDS and reference wave on
    bfm_adrxtx.write(4'h8, 32'(longint'((FC + FIF) / FS * 4294967296.0)));
    bfm_adrxtx.write(4'h4, 32'h20);

    // band-pass filter at the subcarrier: Hann-windowed cosine, no DC
    begin
      real hk[32], mean;
      mean = 0.0;
      for (int k = 0; k < 32; k++) begin
        hk[k] = (0.5 - 0.5 * $cos(2.0 * PI * real'(k) / 31.0)) * $cos(2.0 * PI * FSUB / 10.0e6 * real'(k - 15.5));
        mean += hk[k] / 32.0;
      end
      for (int k = 0; k < 32; k++)
        mem_write(bram_cfg_host, k, 32'(int'($rtoi((hk[k] - mean) * 512.0))));
    end
    bfm_bpcfg.write(4'h4, 32'd1);
    bfm_bpcfg.write(4'h0, 32'd1);
    do begin repeat (200) @(posedge aclk); bfm_bpcfg.read(4'h8, d); end while (!d[0]);

    // let the filter settle, then arm the MIFARE decoder: 94 samples per
    // symbol, threshold 4, slice level above the idle noise (about 3700)
    repeat (5000) @(posedge aclk);
    bfm_dec.write(4'hC, 32'd6000);
    bfm_dec.write(4'h0, 32'h8000_0000 | (32'd4 << 16) | 32'd94);
    repeat (500) @(posedge aclk);

    // start bit, NBITS data bits ('1' = subcarrier in the first half), idle
    halves.push_back(1'b1); halves.push_back(1'b0);
    for (int i = 0; i < NBITS; i++) begin
      logic b;
      b = 1'($urandom);
      reply_bits.push_back(b);
      halves.push_back(b); halves.push_back(!b);
    end
    for (int i = 0; i < 6; i++) halves.push_back(1'b0);
    @(posedge rx_ser_clk);
    play_start = n; playing = 1;
    wait (!playing);
    repeat (2000) @(posedge aclk);

    bfm_dec.read(4'h8, d);
    nb = int'(d[25:16]);
    $display("MIFARE status %h, bits %0d, words %0d", d, nb, m_mif_words);
    check(d[31], "MIFARE reply ended");
    // 94 samples per symbol against the true 94.4 drifts by up to 18 samples
    // over the reply, so the window after the last symbol can still hold its
    // second half and yield one extra bit: software uses the known length
    check(nb == NBITS || nb == NBITS + 1, $sformatf("MIFARE bits received (%0d)", nb));
    bad = 0;
    for (int w = 0; w * 32 < NBITS; w++) begin
      @(posedge aclk);
      bram_mifare_host.en <= 1; bram_mifare_host.addr <= 10'(w);
      @(posedge aclk); bram_mifare_host.en <= 0;
      @(posedge aclk); #1;
      for (int i = 0; i < 32 && w * 32 + i < NBITS; i++)
        if (bram_mifare_host_rdata[31 - i] != reply_bits[w * 32 + i]) bad++;
    end
    check(bad == 0, $sformatf("MIFARE memory holds the reply (%0d bits wrong)", bad));
    check(m_mif_bits > 0 && m_mif_end > 0 && m_mif_words > 0, "mechanism: Manchester decode and store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
