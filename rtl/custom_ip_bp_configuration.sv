// Band-pass filter configuration core.
//
// The processor stores the coefficients of the wanted filter (MIFARE or EPC
// Gen2 band) in the configuration memory, releases the filter reset and
// starts the configuration. On each rising edge of the start bit this core
// reads words 0..NTAPS-1 of the memory and sends their low 16 bits on the
// FIR's reload stream (TLAST on the last), then one word on the config
// stream, which makes the new coefficients active. It then raises
// rfid_data_valid (the FIR's input-valid: one sample per DDC clock) until the
// filter is reset or a new configuration starts. Registers (AXI4-Lite):
//   0x00 [0] start(1)/stop(0) of the configuration
//   0x04 [0] Filter_Resetn (1 = filter running), reset value 0
//   0x08 [0] read only: configuration done
// The registers and stream ports are the document's; the memory layout, the
// start-edge behaviour, the meaning given to RFID_Data_Valid and the status
// register are this design's choices. The streaming runs on the DDC clock;
// control bits are synchronized into it. The config word sent is 0.
// The synchronized Filter_Resetn is both the filter's asynchronous reset and
// a synchronous input of this core's state machine (it clears the
// configured flag); both uses are intended.
module custom_ip_bp_configuration
  import rfid_pkg::*;
#(
  parameter int NTAPS = 32,
  parameter int AW    = 10
) (
  input  logic        s_axi_aclk,
  input  logic        s_axi_aresetn,
  input  axil_req_t   s_axi_req,
  output axil_rsp_t   s_axi_rsp,
  input  logic        ddc_clk,
  input  logic        filter_reload_tready,
  input  logic        filter_config_tready,
  output logic        cfg_en,
  output logic [AW-1:0] cfg_addr,
  input  logic [31:0] cfg_rdata,
  output logic        out_reload_tvalid,
  output logic        out_reload_tlast,
  output logic [15:0] out_reload_tdata,
  output logic        out_config_tvalid,
  output logic        out_config_tlast,
  output logic [7:0]  out_config_tdata,
  output logic        rfid_data_valid,
  output logic        filter_resetn
);
  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_WAIT, S_SEND, S_CONFIG, S_DONE} state_t;

  logic [3:0][31:0] regs, rd_val;
  logic [3:0]       wr_pulse;
  logic             done_a;

  axil_regs u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .req(s_axi_req), .rsp(s_axi_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_val(rd_val)
  );
  assign rd_val[0] = {31'd0, regs[0][0]};
  assign rd_val[1] = {31'd0, regs[1][0]};
  assign rd_val[2] = {31'd0, done_a};
  assign rd_val[3] = '0;

  logic start_s, start_d, fres_s, rst_s;
  sync_2ff u_sstart (.clk(ddc_clk), .d(regs[0][0]), .q(start_s));
  sync_2ff u_sfres  (.clk(ddc_clk), .d(regs[1][0]), .q(fres_s));
  rst_sync u_srst   (.clk(ddc_clk), .arst_n(s_axi_aresetn), .rst(rst_s));

  state_t        state;
  logic [AW-1:0] idx;
  logic          configured;

  assign cfg_en        = 1'b1;
  assign filter_resetn = fres_s;
  assign rfid_data_valid = configured && fres_s;
  assign out_config_tdata = 8'd0;
  assign out_config_tlast = 1'b1;

  always_ff @(posedge ddc_clk) begin
    if (rst_s) begin
      state             <= S_IDLE;
      start_d           <= 1'b0;
      idx               <= '0;
      cfg_addr          <= '0;
      configured        <= 1'b0;
      out_reload_tvalid <= 1'b0;
      out_reload_tlast  <= 1'b0;
      out_reload_tdata  <= '0;
      out_config_tvalid <= 1'b0;
    end else begin
      start_d <= start_s;
      case (state)
        S_IDLE:
          if (start_s && !start_d) begin
            configured <= 1'b0;
            idx        <= '0;
            state      <= S_FETCH;
          end
        S_FETCH: begin
          cfg_addr <= idx;
          state    <= S_WAIT;
        end
        S_WAIT:   // one clock of memory latency
          state <= S_SEND;
        S_SEND: begin
          if (!out_reload_tvalid) begin
            out_reload_tvalid <= 1'b1;
            out_reload_tdata  <= cfg_rdata[15:0];
            out_reload_tlast  <= (idx == AW'(NTAPS - 1));
          end else if (filter_reload_tready) begin
            out_reload_tvalid <= 1'b0;
            out_reload_tlast  <= 1'b0;
            if (idx == AW'(NTAPS - 1)) begin
              out_config_tvalid <= 1'b1;
              state             <= S_CONFIG;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_FETCH;
            end
          end
        end
        S_CONFIG:
          if (filter_config_tready) begin
            out_config_tvalid <= 1'b0;
            configured        <= 1'b1;
            state             <= S_DONE;
          end
        S_DONE:
          if (!start_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (!fres_s) configured <= 1'b0;
    end
  end

  // configuration done, back in the AXI domain
  sync_2ff u_sdone (.clk(s_axi_aclk), .d(configured), .q(done_a));

  a_reload_hold: assert property (@(posedge ddc_clk) disable iff (rst_s)
      out_reload_tvalid && !filter_reload_tready |=> out_reload_tvalid && $stable(out_reload_tdata));
endmodule
