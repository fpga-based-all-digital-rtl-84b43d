// RFID decoder core: MIFARE Manchester decoder and EPC Gen2 FM0 decoder.
//
// Both decoders watch the filtered baseband stream (RFID_data_IN with its
// valid). Each has a start/stop bit: setting it arms the decoder for one
// reply and resets the write address of its memory; the decoded bits are
// packed MSB first into 32-bit words of the MIFARE or EPC Gen2 memory from
// address 0 (bit 0 of a reply is bit 31 of word 0). The processor reads the
// IDs from the memories and clears them by writing zeros. Registers
// (AXI4-Lite), following the document's register table:
//   0x00 [31] MIFARE start/stop  [25:16] decision threshold
//        [7:0] samples per Manchester symbol
//   0x04 [31] EPC Gen2 start/stop [23:8] samples of a violation run
//        [7:0] samples per FM0 symbol
//   0x08 read only (this design's status word): [31] MIFARE reply ended,
//        [30] EPC reply ended, [25:16] MIFARE bits, [9:0] EPC bits received
//   0x0C [15:0] slicer level (this design's; 0 = sign slicers): the FM0
//        decoder's hysteresis and the Manchester decoder's decision level
// The decoders run on the DDC sample clock; start bits are synchronized
// into it and the length/threshold fields are static while a decoder runs.
module custom_ip_rfid_decoder
  import rfid_pkg::*;
#(
  parameter int AW = 10
) (
  input  logic               s_axi_aclk,
  input  logic               s_axi_aresetn,
  input  axil_req_t          s_axi_req,
  output axil_rsp_t          s_axi_rsp,
  input  logic               ddc_clk,
  input  logic signed [31:0] rfid_data,
  input  logic               rfid_data_valid,
  output logic               mifare_we,
  output logic [AW-1:0]      mifare_addr,
  output logic [31:0]        mifare_wdata,
  output logic               epc_we,
  output logic [AW-1:0]      epc_addr,
  output logic [31:0]        epc_wdata
);
  logic [3:0][31:0] regs, rd_val;
  logic [3:0]       wr_pulse;
  logic [AW+4:0]    mif_bits, epc_bits;
  logic             mif_end_q, epc_end_q;
  logic [31:0]      status_d, status_a;

  axil_regs u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .req(s_axi_req), .rsp(s_axi_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_val(rd_val)
  );
  assign rd_val[0] = regs[0];
  assign rd_val[1] = regs[1];
  assign rd_val[2] = status_a;
  assign rd_val[3] = {16'd0, regs[3][15:0]};

  logic rst_s, mif_en, epc_en, mif_en_d, epc_en_d;
  rst_sync u_srst (.clk(ddc_clk), .arst_n(s_axi_aresetn), .rst(rst_s));
  sync_2ff u_smif (.clk(ddc_clk), .d(regs[0][31]), .q(mif_en));
  sync_2ff u_sepc (.clk(ddc_clk), .d(regs[1][31]), .q(epc_en));

  logic mif_bv, mif_b, mif_end, epc_bv, epc_b, epc_end;

  manchester_decoder u_mif (
    .clk(ddc_clk), .rst(rst_s), .en(mif_en), .sample(rfid_data), .sample_valid(rfid_data_valid),
    .samples_per_symbol(regs[0][7:0]), .threshold(regs[0][25:16]),
    .slice_level(regs[3][15:0]),
    .bit_valid(mif_bv), .bit_value(mif_b), .frame_end(mif_end)
  );

  fm0_decoder u_fm0 (
    .clk(ddc_clk), .rst(rst_s), .en(epc_en), .sample(rfid_data), .sample_valid(rfid_data_valid),
    .samples_per_symbol(regs[1][7:0]), .samples_violation(regs[1][23:8]),
    .hysteresis(regs[3][15:0]),
    .bit_valid(epc_bv), .bit_value(epc_b), .frame_end(epc_end)
  );

  always_ff @(posedge ddc_clk) begin
    if (rst_s) begin
      mif_en_d  <= 1'b0;
      epc_en_d  <= 1'b0;
      mif_end_q <= 1'b0;
      epc_end_q <= 1'b0;
    end else begin
      mif_en_d <= mif_en;
      epc_en_d <= epc_en;
      if (mif_en && !mif_en_d) mif_end_q <= 1'b0;
      else if (mif_end)        mif_end_q <= 1'b1;
      if (epc_en && !epc_en_d) epc_end_q <= 1'b0;
      else if (epc_end)        epc_end_q <= 1'b1;
    end
  end

  bit_packer #(.AW(AW)) u_pk_mif (
    .clk(ddc_clk), .rst(rst_s), .restart(mif_en && !mif_en_d), .bit_valid(mif_bv),
    .bit_value(mif_b), .frame_end(mif_end), .we(mifare_we), .addr(mifare_addr),
    .wdata(mifare_wdata), .bit_count(mif_bits)
  );

  bit_packer #(.AW(AW)) u_pk_epc (
    .clk(ddc_clk), .rst(rst_s), .restart(epc_en && !epc_en_d), .bit_valid(epc_bv),
    .bit_value(epc_b), .frame_end(epc_end), .we(epc_we), .addr(epc_addr),
    .wdata(epc_wdata), .bit_count(epc_bits)
  );

  // status into the AXI domain; read it only after the reply has ended, when
  // the counts no longer change
  assign status_d = {mif_end_q, epc_end_q, 4'd0, 10'(mif_bits), 6'd0, 10'(epc_bits)};
  always_ff @(posedge s_axi_aclk) status_a <= status_d;
endmodule
