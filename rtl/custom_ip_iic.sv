// I2C core that programs the Si5326 jitter-attenuating clock generator.
//
// The Si5326 makes the transmitter's reference clock, so writing new
// settings into it moves F_sTX and with it the carrier. This core is an I2C
// master for register writes: the processor sets the device address and up
// to three bytes (for the Si5326: register number, then data) and starts the
// transfer; the core sends START, address+W, the bytes, each followed by an
// acknowledge slot, and STOP. A missing acknowledge sets ack_error. SCL runs
// at clk / (4*CLK_DIV), about 100 kHz from a 100 MHz AXI clock; a slave
// holding SCL low stretches the clock. The core also forwards clk_in (the
// 156.25 MHz board oscillator) to the Si5326 as a complementary pair and
// drives the Si5326 reset and the I2C multiplexer reset.
// The document gives this core's function and ports but no register map;
// the map below and the write-only transfer are this design's choices:
//   0x00 [31] start (write 1), [25:24] number of data bytes (1..3),
//        [22:16] 7-bit device address
//   0x04 [7:0] first data byte, [15:8] second, [23:16] third
//   0x08 read only: [1] ack_error, [0] busy
//   0x0C [0] si5326_rst_n, [1] iic_mux_rst_n (reset value 1, 1)
// The bidirectional pins are split into level inputs (sda_i, scl_i) and
// drive-low outputs; the open-drain pad is outside. Clock: s_axi_aclk.
module custom_ip_iic
  import rfid_pkg::*;
#(
  parameter int CLK_DIV = 250
) (
  input  logic      s_axi_aclk,
  input  logic      s_axi_aresetn,
  input  axil_req_t s_axi_req,
  output axil_rsp_t s_axi_rsp,
  input  logic      clk_in,
  output logic      clk_out_p,
  output logic      clk_out_n,
  input  logic      sda_i,
  input  logic      scl_i,
  output logic      sda_drive_low,
  output logic      scl_drive_low,
  output logic      si5326_rst_n,
  output logic      iic_mux_rst_n
);
  typedef enum logic [2:0] {I_IDLE, I_START, I_BIT, I_ACK, I_STOP} state_t;

  localparam logic [3:0][31:0] RESETS = {32'h3, 32'h0, 32'h0, 32'h0};
  localparam int DVW = $clog2(CLK_DIV + 1);

  logic [3:0][31:0] regs, rd_val;
  logic [3:0]       wr_pulse;
  logic             busy, ack_error;

  axil_regs #(.RESET_VAL(RESETS)) u_regs (
    .clk(s_axi_aclk), .rst_n(s_axi_aresetn), .req(s_axi_req), .rsp(s_axi_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_val(rd_val)
  );
  assign rd_val[0] = {1'b0, regs[0][30:0]};
  assign rd_val[1] = regs[1];
  assign rd_val[2] = {30'd0, ack_error, busy};
  assign rd_val[3] = regs[3];

  assign si5326_rst_n  = regs[3][0];
  assign iic_mux_rst_n = regs[3][1];
  assign clk_out_p     = clk_in;
  assign clk_out_n     = !clk_in;

  state_t          state;
  logic [DVW-1:0]  div;
  logic [1:0]      q;          // quarter of the bit cell entered at the next tick
  logic [2:0]      bitn;       // bit within the byte, 7 = MSB first
  logic [1:0]      byten;      // bytes left after the current one
  logic [31:0]     tx;         // bytes to send, current byte in [31:24]
  logic            sda_o, scl_o;
  logic            tick;

  assign tick = (div == DVW'(CLK_DIV - 1));
  assign busy = (state != I_IDLE);
  assign sda_drive_low = !sda_o;
  assign scl_drive_low = !scl_o;

  always_ff @(posedge s_axi_aclk) begin
    if (!s_axi_aresetn) begin
      state     <= I_IDLE;
      div       <= '0;
      q         <= '0;
      bitn      <= '0;
      byten     <= '0;
      tx        <= '0;
      sda_o     <= 1'b1;
      scl_o     <= 1'b1;
      ack_error <= 1'b0;
    end else if (state == I_IDLE) begin
      sda_o <= 1'b1;
      scl_o <= 1'b1;
      div   <= '0;
      q     <= '0;
      if (wr_pulse[0] && regs[0][31]) begin
        state     <= I_START;
        tx        <= {regs[0][22:16], 1'b0, regs[1][7:0], regs[1][15:8], regs[1][23:16]};
        byten     <= (regs[0][25:24] == 2'd0) ? 2'd1 : regs[0][25:24];
        bitn      <= 3'd7;
        ack_error <= 1'b0;
      end
    end else if (q == 2'd2 && scl_o && !scl_i) begin
      div <= '0;                                   // clock stretching
    end else if (!tick) begin
      div <= div + 1'b1;
    end else begin
      div <= '0;
      q   <= q + 1'b1;
      case (state)
        I_START: begin                             // SDA falls while SCL high
          sda_o <= (q == 2'd0);
          scl_o <= (q != 2'd3);
          if (q == 2'd3) state <= I_BIT;
        end
        I_BIT: begin
          sda_o <= tx[31];
          scl_o <= (q == 2'd1) || (q == 2'd2);
          if (q == 2'd3) begin
            tx <= {tx[30:0], 1'b0};
            if (bitn == 3'd0) state <= I_ACK;
            bitn <= bitn - 1'b1;
          end
        end
        I_ACK: begin
          sda_o <= 1'b1;                           // release for the slave
          scl_o <= (q == 2'd1) || (q == 2'd2);
          if (q == 2'd2 && sda_i) ack_error <= 1'b1;
          if (q == 2'd3) begin
            if (byten == 2'd0) state <= I_STOP;
            else begin
              state <= I_BIT;
              byten <= byten - 1'b1;
            end
          end
        end
        I_STOP: begin                              // SDA rises while SCL high
          sda_o <= (q == 2'd2) || (q == 2'd3);
          scl_o <= (q != 2'd0);
          if (q == 2'd3) state <= I_IDLE;
        end
        default: state <= I_IDLE;
      endcase
    end
  end
endmodule
