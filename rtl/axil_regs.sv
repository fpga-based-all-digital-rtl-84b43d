// AXI4-Lite slave with four 32-bit registers, shared by all IP cores.
//
// Write address and write data are accepted independently and the register
// is written one cycle after both have arrived; the write response then stays
// valid until the master takes it. A read returns rd_val[index] one cycle
// after the address is accepted, so a core may return either the stored value
// or live status. wstrb selects bytes. Register index = address[3:2].
// wr_pulse[i] is high for one clock when register i is written.
// Reset is the synchronous, active-low AXI reset; registers reset to RESET_VAL.
module axil_regs
  import rfid_pkg::*;
#(
  parameter logic [3:0][31:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        req,
  output axil_rsp_t        rsp,
  output logic [3:0][31:0] regs,
  output logic [3:0]       wr_pulse,
  input  logic [3:0][31:0] rd_val
);

  logic        aw_have, w_have;
  logic [1:0]  aw_idx;
  logic [31:0] w_data;
  logic [3:0]  w_strb;
  logic        bvalid_q, rvalid_q;
  logic [31:0] rdata_q;

  assign rsp.bvalid  = bvalid_q;
  assign rsp.rvalid  = rvalid_q;
  assign rsp.rdata   = rdata_q;

  assign rsp.awready = !aw_have && !bvalid_q;
  assign rsp.wready  = !w_have && !bvalid_q;
  assign rsp.bresp   = 2'b00;
  assign rsp.arready = !rvalid_q;
  assign rsp.rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_have    <= 1'b0;
      w_have     <= 1'b0;
      aw_idx     <= '0;
      w_data     <= '0;
      w_strb     <= '0;
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q <= '0;
      regs       <= RESET_VAL;
      wr_pulse   <= '0;
    end else begin
      wr_pulse <= '0;
      if (req.awvalid && !aw_have && !bvalid_q) begin
        aw_have <= 1'b1;
        aw_idx  <= req.awaddr[3:2];
      end
      if (req.wvalid && !w_have && !bvalid_q) begin
        w_have <= 1'b1;
        w_data <= req.wdata;
        w_strb <= req.wstrb;
      end
      if (aw_have && w_have) begin
        for (int b = 0; b < 4; b++)
          if (w_strb[b]) regs[aw_idx][8*b +: 8] <= w_data[8*b +: 8];
        wr_pulse[aw_idx] <= 1'b1;
        aw_have    <= 1'b0;
        w_have     <= 1'b0;
        bvalid_q <= 1'b1;
      end else if (bvalid_q && req.bready) begin
        bvalid_q <= 1'b0;
      end
      if (req.arvalid && !rvalid_q) begin
        rvalid_q <= 1'b1;
        rdata_q <= rd_val[req.araddr[3:2]];
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  // AXI rule: a response, once valid, is held until it is accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  bvalid_q && !req.bready |=> bvalid_q);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
