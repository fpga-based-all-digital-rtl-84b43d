// FPGA part of the all-digital multi-protocol (HF 13.56 MHz MIFARE and UHF
// 860-960 MHz EPC Gen2) RFID reader.
//
// Transmit: the carrier is a repeating bit pattern read from the Tx memory
// and serialized at F_sTX, so the carrier sits at F_sTX/F2 with F2 the
// pattern period; the processor keys it on and off (ASK) through the
// ADRxTx control register and sets its swing through the amplitude core.
// F_sTX itself comes from an external Si5326 that the I2C core programs.
// Receive: the comparator output (RF against the filtered reference wave)
// is sampled at F_sRX and deserialized; the DDC moves the carrier to a 2 MHz
// IF and decimates it; the envelope detector squares and band-pass filters it
// (coefficients streamed by the filter configuration core from its memory);
// the decoder core turns the baseband into bits (Manchester for MIFARE, FM0
// for EPC Gen2) and stores them in its two memories.
//
// The processor, its AXI interconnect, Ethernet and UART are outside: every
// core's AXI4-Lite slave port and every memory's second port is a top-level
// port (processor side, clocked by s_axi_aclk). Memories: Bram_Tx,
// Bram_ADRx, the configuration memory and the MIFARE and EPC Gen2 memories,
// 1024 x 32 bits each, one clock of read latency on both ports.
// Clocks: s_axi_aclk (processor), sys_clk (reference wave), tx_ser_clk
// (F_sTX), rx_ser_clk (F_sRX), clk_in (156.25 MHz, forwarded to the Si5326).
// The word clocks (F/N1, F/N2) and the DDC sample clock are derived inside.
module rfid_reader_top
  import rfid_pkg::*;
#(
  parameter int N1              = 32,
  parameter int N2              = 32,
  parameter int N3              = 16,
  parameter int DEC             = 10,
  parameter int NTAPS           = 32,
  parameter int FIR_SHIFT       = 16,
  parameter int REF_HALF_PERIOD = 4,
  parameter int IIC_CLK_DIV     = 250
) (
  input  logic        s_axi_aclk,
  input  logic        s_axi_aresetn,
  input  axil_req_t   adrxtx_axi_req,
  output axil_rsp_t   adrxtx_axi_rsp,
  input  axil_req_t   amp_axi_req,
  output axil_rsp_t   amp_axi_rsp,
  input  axil_req_t   bpcfg_axi_req,
  output axil_rsp_t   bpcfg_axi_rsp,
  input  axil_req_t   dec_axi_req,
  output axil_rsp_t   dec_axi_rsp,
  input  axil_req_t   iic_axi_req,
  output axil_rsp_t   iic_axi_rsp,
  // processor side of the memories
  input  bram_req_t   bram_tx_host,
  output logic [31:0] bram_tx_host_rdata,
  input  bram_req_t   bram_adrx_host,
  output logic [31:0] bram_adrx_host_rdata,
  input  bram_req_t   bram_cfg_host,
  output logic [31:0] bram_cfg_host_rdata,
  input  bram_req_t   bram_mifare_host,
  output logic [31:0] bram_mifare_host_rdata,
  input  bram_req_t   bram_epc_host,
  output logic [31:0] bram_epc_host_rdata,
  // transceiver
  input  logic        sys_clk,
  input  logic        tx_ser_clk,
  input  logic        rx_ser_clk,
  input  logic        rx_comp_in,
  input  logic [1:0]  pushb_in,
  output logic        sma_txp_out,
  output logic        sma_txn_out,
  output logic [3:0]  tx_swing,
  output logic        ref_wave_out,
  output logic [7:0]  led_out,
  output logic        mgt_rx_clk_out,
  output logic        mgt_tx_clk_out,
  output logic [N3-1:0] dataOut_DDC,
  output logic        clkDataDDC,
  output logic [31:0] rfid_baseband,
  output logic        rfid_baseband_valid,
  // Si5326 programming
  input  logic        clk_in,
  output logic        clk_out_p,
  output logic        clk_out_n,
  input  logic        iic_sda_i,
  input  logic        iic_scl_i,
  output logic        iic_sda_drive_low,
  output logic        iic_scl_drive_low,
  output logic        si5326_rst_n,
  output logic        iic_mux_rst_n
);
  localparam int AW = BRAM_AW;

  // ---- Tx amplitude
  logic [4:0] txpost, txpre;
  logic [3:0] txdiff;
  logic       txinh;
  custom_ip_mgt_tx_amplitude u_amp (
    .s_axi_aclk, .s_axi_aresetn, .s_axi_req(amp_axi_req), .s_axi_rsp(amp_axi_rsp),
    .txpostcursor(txpost), .txprecursor(txpre), .txdiffctrl(txdiff), .txinhibit(txinh)
  );

  // ---- ADRxTx and its two memories
  logic              tx_mem_en;
  logic [AW-1:0]     tx_mem_addr;
  logic [N1-1:0]     tx_mem_rdata;
  logic [31:0]       tx_mem_dout;
  logic              adrx_we;
  logic [AW-1:0]     adrx_addr;
  logic [31:0]       adrx_wdata, adrx_unused_rd;
  logic signed [N3-1:0] ddc_out;

  custom_ip_adrxtx #(.N1(N1), .N2(N2), .N3(N3), .DEC(DEC), .TX_AW(AW), .RX_AW(AW),
                     .REF_HALF_PERIOD(REF_HALF_PERIOD)) u_adrxtx (
    .s_axi_aclk, .s_axi_aresetn, .s_axi_req(adrxtx_axi_req), .s_axi_rsp(adrxtx_axi_rsp),
    .sys_clk, .tx_ser_clk, .rx_ser_clk, .rx_comp_in, .pushb_in,
    .txpostcursor(txpost), .txprecursor(txpre), .txdiffctrl(txdiff), .txinhibit(txinh),
    .bram_tx_en(tx_mem_en), .bram_tx_addr(tx_mem_addr), .bram_tx_rdata(tx_mem_rdata),
    .bram_adrx_we(adrx_we), .bram_adrx_addr(adrx_addr), .bram_adrx_wdata(adrx_wdata),
    .sma_txp_out, .sma_txn_out, .tx_swing, .ref_wave_out, .led_out,
    .mgt_rx_clk_out, .mgt_tx_clk_out, .dataOut_DDC(ddc_out), .clkDataDDC
  );
  assign dataOut_DDC  = ddc_out;
  assign tx_mem_rdata = N1'(tx_mem_dout);

  tdp_bram #(.AW(AW), .DW(32)) u_bram_tx (
    .clka(mgt_tx_clk_out), .ena(tx_mem_en), .wea(1'b0), .addra(tx_mem_addr), .dina('0),
    .douta(tx_mem_dout),
    .clkb(s_axi_aclk), .enb(bram_tx_host.en), .web(bram_tx_host.we), .addrb(bram_tx_host.addr),
    .dinb(bram_tx_host.wdata), .doutb(bram_tx_host_rdata)
  );
  tdp_bram #(.AW(AW), .DW(32)) u_bram_adrx (
    .clka(mgt_rx_clk_out), .ena(adrx_we), .wea(adrx_we), .addra(adrx_addr), .dina(adrx_wdata),
    .douta(adrx_unused_rd),
    .clkb(s_axi_aclk), .enb(bram_adrx_host.en), .web(bram_adrx_host.we), .addrb(bram_adrx_host.addr),
    .dinb(bram_adrx_host.wdata), .doutb(bram_adrx_host_rdata)
  );

  // ---- filter configuration, envelope detector
  logic              rl_tvalid, rl_tlast, rl_tready, cf_tvalid, cf_tlast, cf_tready;
  logic [15:0]       rl_tdata;
  logic [7:0]        cf_tdata;
  logic              cfg_en, data_valid, filt_rstn;
  logic [AW-1:0]     cfg_addr;
  logic [31:0]       cfg_rdata;
  logic signed [31:0] env;
  logic              env_valid;

  custom_ip_bp_configuration #(.NTAPS(NTAPS), .AW(AW)) u_bpcfg (
    .s_axi_aclk, .s_axi_aresetn, .s_axi_req(bpcfg_axi_req), .s_axi_rsp(bpcfg_axi_rsp),
    .ddc_clk(clkDataDDC), .filter_reload_tready(rl_tready), .filter_config_tready(cf_tready),
    .cfg_en(cfg_en), .cfg_addr(cfg_addr), .cfg_rdata(cfg_rdata),
    .out_reload_tvalid(rl_tvalid), .out_reload_tlast(rl_tlast), .out_reload_tdata(rl_tdata),
    .out_config_tvalid(cf_tvalid), .out_config_tlast(cf_tlast), .out_config_tdata(cf_tdata),
    .rfid_data_valid(data_valid), .filter_resetn(filt_rstn)
  );
  tdp_bram #(.AW(AW), .DW(32)) u_bram_cfg (
    .clka(clkDataDDC), .ena(cfg_en), .wea(1'b0), .addra(cfg_addr), .dina('0), .douta(cfg_rdata),
    .clkb(s_axi_aclk), .enb(bram_cfg_host.en), .web(bram_cfg_host.we), .addrb(bram_cfg_host.addr),
    .dinb(bram_cfg_host.wdata), .doutb(bram_cfg_host_rdata)
  );

  envelope_detector #(.N3(N3), .NTAPS(NTAPS), .SHIFT(FIR_SHIFT)) u_env (
    .clk(clkDataDDC), .rst_n(filt_rstn), .din(ddc_out), .din_valid(data_valid),
    .reload_tvalid(rl_tvalid), .reload_tlast(rl_tlast), .reload_tdata(rl_tdata),
    .reload_tready(rl_tready), .config_tvalid(cf_tvalid), .config_tlast(cf_tlast),
    .config_tdata(cf_tdata), .config_tready(cf_tready), .dout(env), .dout_valid(env_valid)
  );
  assign rfid_baseband       = env;
  assign rfid_baseband_valid = env_valid;

  // ---- decoder and its memories
  logic          mif_we, epc_we;
  logic [AW-1:0] mif_addr, epc_addr;
  logic [31:0]   mif_wdata, epc_wdata, mif_unused_rd, epc_unused_rd;

  custom_ip_rfid_decoder #(.AW(AW)) u_dec (
    .s_axi_aclk, .s_axi_aresetn, .s_axi_req(dec_axi_req), .s_axi_rsp(dec_axi_rsp),
    .ddc_clk(clkDataDDC), .rfid_data(env), .rfid_data_valid(env_valid),
    .mifare_we(mif_we), .mifare_addr(mif_addr), .mifare_wdata(mif_wdata),
    .epc_we(epc_we), .epc_addr(epc_addr), .epc_wdata(epc_wdata)
  );
  tdp_bram #(.AW(AW), .DW(32)) u_bram_mifare (
    .clka(clkDataDDC), .ena(mif_we), .wea(mif_we), .addra(mif_addr), .dina(mif_wdata),
    .douta(mif_unused_rd),
    .clkb(s_axi_aclk), .enb(bram_mifare_host.en), .web(bram_mifare_host.we),
    .addrb(bram_mifare_host.addr), .dinb(bram_mifare_host.wdata), .doutb(bram_mifare_host_rdata)
  );
  tdp_bram #(.AW(AW), .DW(32)) u_bram_epc (
    .clka(clkDataDDC), .ena(epc_we), .wea(epc_we), .addra(epc_addr), .dina(epc_wdata),
    .douta(epc_unused_rd),
    .clkb(s_axi_aclk), .enb(bram_epc_host.en), .web(bram_epc_host.we),
    .addrb(bram_epc_host.addr), .dinb(bram_epc_host.wdata), .doutb(bram_epc_host_rdata)
  );

  // ---- Si5326 programming
  custom_ip_iic #(.CLK_DIV(IIC_CLK_DIV)) u_iic (
    .s_axi_aclk, .s_axi_aresetn, .s_axi_req(iic_axi_req), .s_axi_rsp(iic_axi_rsp),
    .clk_in, .clk_out_p, .clk_out_n, .sda_i(iic_sda_i), .scl_i(iic_scl_i),
    .sda_drive_low(iic_sda_drive_low), .scl_drive_low(iic_scl_drive_low),
    .si5326_rst_n, .iic_mux_rst_n
  );
endmodule
