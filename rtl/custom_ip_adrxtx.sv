// All-digital receiver/transmitter core (ADRxTx).
//
// Transmit side: tx_carrier_gen loops the Tx memory (Bram_Tx) into the
// serializer model while "Enable Tx BRAM" is set, and sends zeros otherwise,
// so the carrier appears at F_sTX / F2 where F2 is the period of the stored
// bit pattern; the amplitude comes from the Tx amplitude core (txdiffctrl).
// Receive side: the deserializer model samples the comparator output at
// F_sRX into N2-bit words; the DDC moves the carrier to the IF and decimates
// to N3-bit samples (dataOut_DDC, clocked by clkDataDDC); rx_capture can store
// either stream in the Rx memory (Bram_ADRx). ref_wave_gen makes the square
// wave from which the external filter forms the comparator reference.
//
// Registers (AXI4-Lite, byte offsets), as in the document's register table:
//   0x00 [31:0] Rx memory limit address
//   0x04 [0] enable Rx memory capture   [1] enable Tx memory (carrier on)
//        [2] reset Rx MGT   [3] reset Tx MGT   [4] CDR hold
//        [5] enable DDS (this design also gates the reference wave with it)
//        [7] Rx capture source: 1 = MGT words, 0 = DDC samples
//   0x08 [31:0] DDS phase increment per F_sRX sample
//   0x0C [31:0] Tx memory limit address
// Clock domains: AXI (s_axi_aclk), Tx word clock, Rx word clock, DDC sample
// clock and sys_clk. Single control bits cross through two-flop
// synchronizers; the multi-bit limits and the phase increment are static
// settings that the processor changes only while the path they steer is
// disabled. The memories themselves sit outside this core; it drives their
// IP-side ports, clocked by mgt_tx_clk_out and mgt_rx_clk_out.
// LED_OUT (own choice): {capture done, capture busy, carrier on, DDS on,
// Rx MGT reset, Tx MGT reset, reference wave, CDR hold}.
module custom_ip_adrxtx
  import rfid_pkg::*;
#(
  parameter int N1     = 32,
  parameter int N2     = 32,
  parameter int N3     = 16,
  parameter int DEC    = 10,
  parameter int TX_AW  = 10,
  parameter int RX_AW  = 10,
  parameter int REF_HALF_PERIOD = 4
) (
  input  logic                 s_axi_aclk,
  input  logic                 s_axi_aresetn,
  input  axil_req_t            s_axi_req,
  output axil_rsp_t            s_axi_rsp,
  input  logic                 sys_clk,
  input  logic                 tx_ser_clk,
  input  logic                 rx_ser_clk,
  input  logic                 rx_comp_in,
  input  logic [1:0]           pushb_in,
  input  logic [4:0]           txpostcursor,
  input  logic [4:0]           txprecursor,
  input  logic [3:0]           txdiffctrl,
  input  logic                 txinhibit,
  // Bram_Tx, IP side (read)
  output logic                 bram_tx_en,
  output logic [TX_AW-1:0]     bram_tx_addr,
  input  logic [N1-1:0]        bram_tx_rdata,
  // Bram_ADRx, IP side (write)
  output logic                 bram_adrx_we,
  output logic [RX_AW-1:0]     bram_adrx_addr,
  output logic [31:0]          bram_adrx_wdata,
  output logic                 sma_txp_out,
  output logic                 sma_txn_out,
  output logic [3:0]           tx_swing,
  output logic                 ref_wave_out,
  output logic [7:0]           led_out,
  output logic                 mgt_rx_clk_out,
  output logic                 mgt_tx_clk_out,
  output logic signed [N3-1:0] dataOut_DDC,
  output logic                 clkDataDDC
);
  logic [3:0][31:0] regs;
  logic [3:0]       wr_pulse;

  axil_regs u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .req(s_axi_req), .rsp(s_axi_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_val(regs)
  );

  logic [31:0] ctrl;
  assign ctrl = regs[REG_4];

  // ---- resets of the two transceiver halves (serial clock domains)
  logic rst_tx_req, rst_rx_req, rst_tx, rst_rx;
  assign rst_tx_req = !s_axi_aresetn || ctrl[ADR_RST_TX_MGT] || (|pushb_in);
  assign rst_rx_req = !s_axi_aresetn || ctrl[ADR_RST_RX_MGT] || (|pushb_in);
  sync_2ff u_srst_tx (.clk(tx_ser_clk), .d(rst_tx_req), .q(rst_tx));
  sync_2ff u_srst_rx (.clk(rx_ser_clk), .d(rst_rx_req), .q(rst_rx));

  // ---- transmit path
  logic          tx_wclk, tx_en_s, rst_txw;
  logic [N1-1:0] tx_word;
  sync_2ff u_stxen (.clk(tx_wclk), .d(ctrl[ADR_EN_TX_BRAM]), .q(tx_en_s));
  rst_sync u_srtxw (.clk(tx_wclk), .arst_n(!rst_tx), .rst(rst_txw));

  tx_carrier_gen #(.N1(N1), .AW(TX_AW)) u_txgen (
    .clk(tx_wclk), .rst(rst_txw), .tx_en(tx_en_s), .limit(regs[REG_C][TX_AW-1:0]),
    .mem_en(bram_tx_en), .mem_addr(bram_tx_addr), .mem_rdata(bram_tx_rdata), .tx_word(tx_word)
  );

  mgt_tx_serializer #(.N1(N1)) u_ser (
    .ser_clk(tx_ser_clk), .rst(rst_tx), .word_clk(tx_wclk), .tx_word(tx_word),
    .txdiffctrl(txdiffctrl), .txprecursor(txprecursor), .txpostcursor(txpostcursor),
    .txinhibit(txinhibit), .txp(sma_txp_out), .txn(sma_txn_out), .swing_code(tx_swing)
  );

  // ---- receive path
  logic          rx_wclk, rst_rxw, dds_en_s, cap_en_s, sel_mgt_s;
  logic [N2-1:0] rx_word;
  logic          ddc_valid, cap_busy, cap_done;
  mgt_rx_deserializer #(.N2(N2)) u_des (
    .ser_clk(rx_ser_clk), .rst(rst_rx), .din(rx_comp_in), .word_clk(rx_wclk), .rx_word(rx_word)
  );
  rst_sync u_srrxw (.clk(rx_wclk), .arst_n(!rst_rx), .rst(rst_rxw));
  sync_2ff u_sdds  (.clk(rx_wclk), .d(ctrl[ADR_EN_DDS]), .q(dds_en_s));
  sync_2ff u_scap  (.clk(rx_wclk), .d(ctrl[ADR_EN_RX_BRAM]), .q(cap_en_s));
  sync_2ff u_ssel  (.clk(rx_wclk), .d(ctrl[ADR_RX_SEL_MGT]), .q(sel_mgt_s));

  ddc #(.N2(N2), .N3(N3), .DEC(DEC)) u_ddc (
    .clk(rx_wclk), .rst(rst_rxw), .dds_en(dds_en_s), .phase_inc(regs[REG_8]),
    .rx_word(rx_word), .dout(dataOut_DDC), .dout_valid(ddc_valid), .clk_ddc(clkDataDDC)
  );

  logic [31:0] mgt_word32;
  assign mgt_word32 = 32'(rx_word);

  rx_capture #(.AW(RX_AW)) u_cap (
    .clk(rx_wclk), .rst(rst_rxw), .en(cap_en_s), .sel_mgt(sel_mgt_s),
    .limit(regs[REG_0][RX_AW-1:0]), .mgt_word(mgt_word32), .ddc_sample(16'(dataOut_DDC)),
    .ddc_valid(ddc_valid), .we(bram_adrx_we), .addr(bram_adrx_addr), .wdata(bram_adrx_wdata),
    .busy(cap_busy), .done(cap_done)
  );

  // ---- reference wave for the comparator
  logic ref_en_s, sys_rst;
  sync_2ff u_sref (.clk(sys_clk), .d(ctrl[ADR_EN_DDS]), .q(ref_en_s));
  sync_2ff u_ssys (.clk(sys_clk), .d(!s_axi_aresetn), .q(sys_rst));
  ref_wave_gen #(.HALF_PERIOD(REF_HALF_PERIOD)) u_ref (
    .clk(sys_clk), .rst(sys_rst), .en(ref_en_s), .wave(ref_wave_out)
  );

  assign mgt_rx_clk_out = rx_wclk;
  assign mgt_tx_clk_out = tx_wclk;
  assign led_out = {cap_done, cap_busy, tx_en_s, dds_en_s, rst_rx, rst_tx, ref_wave_out,
                    ctrl[ADR_CDR_HOLD]};
endmodule
