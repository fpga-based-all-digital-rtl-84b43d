// Reloadable FIR filter: the band-pass filter of the envelope detector.
//
// y[n] = sat_OW( (sum_{k=0}^{NTAPS-1} h[k] * x[n-k]) >>> SHIFT ), computed for
// every valid input sample with all NTAPS products in parallel; dout_valid
// follows din_valid by one clock. New coefficients arrive on an AXI-Stream
// reload channel (h[0] first, TLAST on h[NTAPS-1]) into a shadow set, and are
// copied to the active set when a word is accepted on the config channel, so
// the filter switches between protocols in one clock. Both channels are
// always ready; config TDATA is not interpreted. The reload/config handshake
// follows the document's port list; tap count, coefficient order and output
// scaling are this design's choices. The asynchronous active-low reset rst_n
// (Filter_Resetn) clears the input history and both coefficient sets, so the
// coefficients are loaded after the reset is released.
module bp_fir #(
  parameter int NTAPS = 32,
  parameter int DW    = 32,
  parameter int CW    = 16,
  parameter int OW    = 32,
  parameter int SHIFT = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] din,
  input  logic                 din_valid,
  input  logic                 reload_tvalid,
  input  logic                 reload_tlast,
  input  logic [CW-1:0]        reload_tdata,
  output logic                 reload_tready,
  input  logic                 config_tvalid,
  input  logic                 config_tlast,
  input  logic [7:0]           config_tdata,
  output logic                 config_tready,
  output logic signed [OW-1:0] dout,
  output logic                 dout_valid
);
  localparam int PW  = DW + CW;
  localparam int AW  = PW + $clog2(NTAPS);
  localparam int IW  = $clog2(NTAPS);

  logic signed [CW-1:0] shadow [NTAPS];
  logic signed [CW-1:0] coef   [NTAPS];
  logic signed [DW-1:0] hist   [NTAPS-1];   // x[n-1] .. x[n-NTAPS+1]
  logic [IW-1:0]        ridx;
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] scaled;
  logic [8:0]           cfg_unused;

  assign reload_tready = 1'b1;
  assign config_tready = 1'b1;
  assign cfg_unused    = {config_tlast, config_tdata};

  // coefficient reload and commit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) begin
        shadow[k] <= '0;
        coef[k]   <= '0;
      end
      ridx <= '0;
    end else begin
      if (reload_tvalid) begin
        shadow[ridx] <= reload_tdata;
        ridx         <= (reload_tlast || ridx == IW'(NTAPS - 1)) ? '0 : ridx + 1'b1;
      end
      if (config_tvalid) coef <= shadow;
    end
  end

  always_comb begin
    acc = AW'(coef[0]) * AW'(din);
    for (int k = 1; k < NTAPS; k++) acc += AW'(coef[k]) * AW'(hist[k-1]);
    scaled = acc >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) hist[k] <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= din_valid;
      if (din_valid) begin
        hist[0] <= din;
        for (int k = 1; k < NTAPS - 1; k++) hist[k] <= hist[k-1];
        if (scaled > AW'(2**(OW-1) - 1))   dout <= {1'b0, {(OW-1){1'b1}}};
        else if (scaled < -AW'(2**(OW-1))) dout <= {1'b1, {(OW-1){1'b0}}};
        else                               dout <= OW'(scaled);
      end
    end
  end
endmodule
