// End-to-end testbench of the reader at its default sizes (N1 = N2 = 32,
// DEC = 10, 32-tap filter, 1024-word memories). A processor model drives the
// five AXI4-Lite ports and the memory ports; the RF front end is modelled
// sample by sample at the receive serial clock:
//   comparator = (A(t) * cos(2*pi*fc*t) > R * sin(2*pi*fref*t))
// with fc = 866.3 MHz, a 25 MHz reference wave of amplitude R = 1 and a tag
// that switches its backscatter amplitude A between two levels following an
// FM0 reply at a 640 kHz link frequency (15.625 samples per symbol at the
// 10 MS/s DDC rate). The DDS is tuned 2 MHz below the carrier, so the reply
// appears as a 2 MHz IF whose envelope is squared and band-pass filtered
// (a 5-tap average minus a 30-tap average: nulls at 2 and 4 MHz, no DC).
// The test then programs the Si5326 over I2C, sets the Tx swing, loads and
// keys the carrier (ASK), loads and starts the filter configuration, arms
// the EPC Gen2 decoder, plays the reply, and reads the EPC memory back.
// It also captures comparator words and DDC samples in the Rx memory.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_rfid_reader_top;
  import rfid_pkg::*;
  localparam real FS   = 3.2e9;       // receive sampling rate
  localparam real FC   = 866.3e6;     // carrier
  localparam real FREF = 25.0e6;      // reference wave
  localparam real FIF  = 2.0e6;       // DDC output IF
  localparam real BLF  = 640.0e3;     // tag link frequency
  localparam real PI   = 3.14159265358979;

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
  logic slave_sda_low = 0;
  logic iic_sda_i, iic_scl_i;
  assign iic_sda_i = !(iic_sda_drive_low || slave_sda_low);
  assign iic_scl_i = !iic_scl_drive_low;

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

  // ---------------- processor access to the memories (one clock latency)
  task automatic mem_write(ref bram_req_t p, input int a, input logic [31:0] d);
    @(posedge aclk);
    p.en <= 1; p.we <= 1; p.addr <= 10'(a); p.wdata <= d;
    @(posedge aclk);
    p.en <= 0; p.we <= 0;
  endtask

  // ---------------- RF front end: comparator model at the Rx serial clock
  longint n = 0;
  real    amp_now = 0.0;
  always @(posedge rx_ser_clk) begin
    real t, rf, rf_ref;
    t = real'(n) / FS;
    rf = amp_now * $cos(2.0 * PI * FC * t);
    rf_ref = $sin(2.0 * PI * FREF * t);
    rx_comp_in <= rf > rf_ref;
    n <= n + 1;
  end

  // ---------------- tag: FM0 reply as half-bit levels
  localparam logic [11:0] PREAMBLE = 12'b1101_0010_0011;
  localparam real A_HI = 0.40, A_LO = 0.15;
  logic reply_halves[$];
  logic reply_bits[$];
  logic playing = 0;
  longint play_start = 0;
  always @(posedge rx_ser_clk) begin
    if (playing) begin
      longint h;
      h = longint'($floor((real'(n - play_start) / FS) * 2.0 * BLF));
      if (h < reply_halves.size()) amp_now = reply_halves[h] ? A_LO : A_HI;
      else begin amp_now = A_HI; playing = 0; end
    end
  end

  // ---------------- I2C slave that acknowledges every byte
  logic [7:0] i2c_bytes[$];
  logic sda_q = 1, scl_q = 1, in_frame = 0;
  int nbit = 0;
  logic [7:0] sh = 0;
  logic mon = 0;
  always @(posedge aclk) if (mon) begin
    sda_q <= iic_sda_i; scl_q <= iic_scl_i;
    if (iic_scl_i && scl_q && sda_q && !iic_sda_i) begin in_frame <= 1; nbit <= 0; end
    else if (iic_scl_i && scl_q && !sda_q && iic_sda_i) in_frame <= 0;
    else if (in_frame && iic_scl_i && !scl_q) begin
      if (nbit < 8) sh <= {sh[6:0], iic_sda_i};
      nbit <= nbit + 1;
    end else if (in_frame && !iic_scl_i && scl_q) begin
      if (nbit == 8) begin i2c_bytes.push_back(sh); slave_sda_low <= 1; end
      else if (nbit == 9) begin slave_sda_low <= 0; nbit <= 0; end
    end
  end

  // ---------------- mechanism counters
  int m_i2c = 0, m_swing = 0, m_inhibit = 0, m_carrier_on = 0, m_carrier_keyed_off = 0;
  int m_reload = 0, m_config = 0, m_ddc = 0, m_ref_wave = 0, m_epc_bits = 0;
  int m_epc_end = 0, m_epc_words = 0, m_mgt_capture = 0, m_ddc_capture = 0, m_mif_armed = 0;
  int tx_toggles = 0;
  logic txp_q = 0;
  always @(posedge tx_ser_clk) begin
    txp_q <= sma_txp_out;
    if (mon && sma_txp_out != txp_q) tx_toggles++;
  end
  always @(posedge clkDataDDC) if (mon) begin
    if (dut.rl_tvalid && dut.rl_tready) m_reload++;
    if (dut.cf_tvalid && dut.cf_tready) m_config++;
    if (dut.u_dec.epc_bv) m_epc_bits++;
    if (dut.u_dec.epc_end) m_epc_end++;
    if (dut.epc_we) m_epc_words++;
    m_ddc++;
  end
  always @(posedge ref_wave_out) if (mon) m_ref_wave++;

  // ---------------- main sequence
  initial begin
    logic [31:0] d;
    int bad, toggles0, nb, extra;
    #1 aresetn = 0;                         // power-on reset
    repeat (10) @(posedge aclk); aresetn <= 1;
    repeat (10) @(posedge aclk);
    mon = 1;

    // 1. Si5326: release its reset and write one register over I2C
    bfm_iic.write(4'hC, 32'h3);
    bfm_iic.write(4'h4, 32'h0000_2D88);
    bfm_iic.write(4'h0, 32'h8000_0000 | (32'd2 << 24) | (32'h68 << 16));
    do begin repeat (500) @(posedge aclk); bfm_iic.read(4'h8, d); end while (d[0]);
    check(d[1] == 0, "Si5326 acknowledged");
    check(i2c_bytes.size() == 3 && i2c_bytes[0] == 8'hD0 && i2c_bytes[1] == 8'h88 &&
          i2c_bytes[2] == 8'h2D, "I2C bytes on the bus");
    if (i2c_bytes.size() == 3) m_i2c++;
    check(clk_out_p == clk_in && clk_out_n != clk_out_p, "clk_in forwarded to the Si5326");

    // 2. Tx amplitude
    bfm_amp.write(4'h4, 32'd11);
    repeat (5) @(posedge aclk);
    check(tx_swing == 4'd11, "TXDIFFCTRL reaches the transceiver");
    if (tx_swing == 4'd11) m_swing++;

    // 3. carrier: 4-word pattern of 35 cycles per 128 bits (F_sTX*35/128)
    for (int w = 0; w < 4; w++) begin
      logic [31:0] pw;
      for (int b = 0; b < 32; b++) pw[b] = $sin(2.0 * PI * 35.0 * real'(w * 32 + b) / 128.0) > 0.0;
      mem_write(bram_tx_host, w, pw);
    end
    bfm_adrxtx.write(4'hC, 32'd3);
    bfm_adrxtx.write(4'h8, 32'(longint'((FC - FIF) / FS * 4294967296.0)));
    bfm_adrxtx.write(4'h0, 32'd15);
    toggles0 = tx_toggles;
    repeat (50) @(posedge aclk);
    check(tx_toggles == toggles0, "no carrier before it is keyed on");
    bfm_adrxtx.write(4'h4, 32'h22);                 // Tx memory on, DDS on
    repeat (100) @(posedge aclk);
    toggles0 = tx_toggles;
    repeat (100) @(posedge aclk);
    // 35 cycles per 128 serial bits: 70 toggles per 40 ns
    check(tx_toggles - toggles0 > 1500, $sformatf("carrier toggles (%0d)", tx_toggles - toggles0));
    if (tx_toggles - toggles0 > 1500) m_carrier_on++;
    // ASK: key the carrier off and on again
    bfm_adrxtx.write(4'h4, 32'h20);
    repeat (30) @(posedge aclk);
    toggles0 = tx_toggles;
    repeat (50) @(posedge aclk);
    check(tx_toggles == toggles0, "carrier keyed off");
    if (tx_toggles == toggles0) m_carrier_keyed_off++;
    bfm_adrxtx.write(4'h4, 32'h22);
    // Tx inhibit
    bfm_amp.write(4'h0, 32'h400);
    repeat (30) @(posedge aclk);
    toggles0 = tx_toggles;
    repeat (30) @(posedge aclk);
    check(tx_toggles == toggles0 && tx_swing == 0, "Tx inhibit silences the output");
    if (tx_toggles == toggles0) m_inhibit++;
    bfm_amp.write(4'h0, 32'h0);

    // 4. band-pass filter: 5-tap average minus 30-tap average
    for (int k = 0; k < 32; k++)
      mem_write(bram_cfg_host, k, (k >= 12 && k <= 16) ? 32'(5 * 64) : (k < 30 ? 32'(16'(-64)) : 32'd0));
    bfm_bpcfg.write(4'h4, 32'd1);
    bfm_bpcfg.write(4'h0, 32'd1);
    do begin repeat (200) @(posedge aclk); bfm_bpcfg.read(4'h8, d); end while (!d[0]);
    check(d[0], "filter configured");

    // 5. MIFARE decoder armed while the EPC reply plays: it must not write
    bfm_dec.write(4'h0, 32'h8000_0000 | (32'd20 << 16) | 32'd94);
    m_mif_armed++;

    // 6. EPC Gen2 reply (slicer hysteresis above the idle noise)
    bfm_dec.write(4'hC, 32'd5000);
    bfm_dec.write(4'h4, 32'h8000_0000 | (32'd23 << 8) | 32'd16);
    amp_now = A_HI;
    repeat (400) @(posedge aclk);           // let the filter settle on the carrier
    for (int i = 0; i < 8; i++) reply_halves.push_back(1'b0);
    for (int i = 11; i >= 0; i--) reply_halves.push_back(PREAMBLE[i]);
    begin
      logic lv, b;
      lv = 1'b1;
      for (int i = 0; i <= 32; i++) begin
        b = (i == 32) ? 1'b1 : 1'($urandom);
        if (i < 32) reply_bits.push_back(b);
        lv = !lv; reply_halves.push_back(lv);
        if (!b) lv = !lv;
        reply_halves.push_back(lv);
      end
    end
    for (int i = 0; i < 16; i++) reply_halves.push_back(1'b0);
    @(posedge rx_ser_clk);
    play_start = n; playing = 1;
    wait (!playing);
    repeat (1000) @(posedge aclk);
    bfm_dec.read(4'h8, d);
    nb = int'(d[9:0]);
    check(d[30], "EPC reply ended");
    check(nb == 32 || nb == 33, $sformatf("EPC bits received (%0d)", nb));
    bad = 0;
    for (int w = 0; w < 2; w++) begin
      @(posedge aclk);
      bram_epc_host.en <= 1; bram_epc_host.addr <= 10'(w);
      @(posedge aclk); bram_epc_host.en <= 0;
      @(posedge aclk); #1;
      for (int b = 0; b < 32; b++)
        if (w * 32 + b < 32 && bram_epc_host_rdata[31 - b] != reply_bits[w * 32 + b]) bad++;
      if (w == 1) extra = int'(bram_epc_host_rdata != 0 && nb == 32);
    end
    check(bad == 0, $sformatf("EPC memory holds the 32-bit reply (%0d bits wrong)", bad));
    check(extra == 0, "nothing beyond the reply");
    bfm_dec.read(4'h8, d);
    check(d[25:16] == 0, "MIFARE decoder saw no Manchester reply");

    // 7. Rx memory: comparator words, then DDC samples
    bfm_adrxtx.write(4'h4, 32'h22 | 32'h80 | 32'h1);
    repeat (50) @(posedge aclk);
    check(led_out[7], "MGT capture done");
    if (led_out[7]) m_mgt_capture++;
    bad = 0;
    for (int a = 0; a < 16; a++) begin
      @(posedge aclk); bram_adrx_host.en <= 1; bram_adrx_host.addr <= 10'(a);
      @(posedge aclk); bram_adrx_host.en <= 0;
      @(posedge aclk); #1;
      if (bram_adrx_host_rdata != 0 && bram_adrx_host_rdata != '1) bad++;
    end
    // where the reference wave is near its peaks the carrier cannot cross
    // it, so only some words mix ones and zeros
    check(bad >= 4, $sformatf("comparator words carry the PWM signal (%0d mixed)", bad));
    bfm_adrxtx.write(4'h4, 32'h22);
    repeat (20) @(posedge aclk);
    bfm_adrxtx.write(4'h4, 32'h22 | 32'h1);
    repeat (300) @(posedge aclk);
    check(led_out[7], "DDC capture done");
    if (led_out[7]) m_ddc_capture++;
    bad = 0;
    for (int a = 0; a < 16; a++) begin
      @(posedge aclk); bram_adrx_host.en <= 1; bram_adrx_host.addr <= 10'(a);
      @(posedge aclk); bram_adrx_host.en <= 0;
      @(posedge aclk); #1;
      if (bram_adrx_host_rdata[31:16] != {16{bram_adrx_host_rdata[15]}}) bad++;
    end
    check(bad == 0, "DDC samples stored sign-extended");

    // mechanism summary
    $display("mechanisms: i2c=%0d swing=%0d carrier_on=%0d keyed_off=%0d inhibit=%0d reload=%0d config=%0d",
             m_i2c, m_swing, m_carrier_on, m_carrier_keyed_off, m_inhibit, m_reload, m_config);
    $display("            ddc_samples=%0d ref_wave=%0d epc_bits=%0d epc_end=%0d epc_words=%0d mgt_cap=%0d ddc_cap=%0d mif_armed=%0d",
             m_ddc, m_ref_wave, m_epc_bits, m_epc_end, m_epc_words, m_mgt_capture, m_ddc_capture, m_mif_armed);
    check(m_i2c > 0, "mechanism: I2C transfer");
    check(m_swing > 0, "mechanism: Tx swing");
    check(m_carrier_on > 0, "mechanism: carrier on");
    check(m_carrier_keyed_off > 0, "mechanism: ASK keying");
    check(m_inhibit > 0, "mechanism: Tx inhibit");
    check(m_reload == 32, "mechanism: 32 coefficient reload beats");
    check(m_config == 1, "mechanism: filter config beat");
    check(m_ddc > 0, "mechanism: DDC samples");
    check(m_ref_wave > 0, "mechanism: reference wave");
    check(m_epc_bits > 0 && m_epc_end > 0 && m_epc_words > 0, "mechanism: FM0 decode and store");
    check(m_mgt_capture > 0, "mechanism: MGT capture");
    check(m_ddc_capture > 0, "mechanism: DDC capture");
    check(m_mif_armed > 0, "mechanism: MIFARE decoder armed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
