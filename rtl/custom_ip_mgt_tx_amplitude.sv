// Transmitter amplitude control core.
//
// Two AXI4-Lite registers drive the transceiver's output driver directly:
//   0x00 [4:0] TXPOSTCURSOR, [9:5] TXPRECURSOR, [10] TXINHIBIT
//   0x04 [3:0] TXDIFFCTRL, the output swing code (0..15)
// The reader modulates amplitude by rewriting TXDIFFCTRL between symbols,
// which changes the peak-to-peak voltage of the serialized carrier. The field
// layout is the document's; both registers reset to zero. Outputs are in the
// AXI clock domain and are quasi-static for the transceiver.
module custom_ip_mgt_tx_amplitude
  import rfid_pkg::*;
(
  input  logic      s_axi_aclk,
  input  logic      s_axi_aresetn,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  output logic [4:0] txpostcursor,
  output logic [4:0] txprecursor,
  output logic [3:0] txdiffctrl,
  output logic       txinhibit
);
  logic [3:0][31:0] regs, rd_val;
  logic [3:0]       wr_pulse;

  axil_regs u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .req(s_axi_req), .rsp(s_axi_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_val(rd_val)
  );

  // only the implemented fields read back
  assign rd_val[0] = {21'd0, regs[0][10:0]};
  assign rd_val[1] = {28'd0, regs[1][3:0]};
  assign rd_val[2] = '0;
  assign rd_val[3] = '0;

  assign txpostcursor = regs[0][4:0];
  assign txprecursor  = regs[0][9:5];
  assign txinhibit    = regs[0][10];
  assign txdiffctrl   = regs[1][3:0];
endmodule
