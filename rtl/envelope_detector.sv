// Envelope detector: squarer followed by the reloadable band-pass FIR.
//
// The DDC output is a real signal at the IF. Multiplying each sample by
// itself gives a component at twice the IF plus the slowly varying squared
// envelope, which carries the tag's backscatter or load modulation; the
// band-pass filter keeps the tag data band and removes both the DC level and
// the 2*IF term, so the decoder can slice the result at zero. The document
// draws the multiplier fed from the DDC output on both inputs followed by the
// band-pass filter; the one-clock squarer register is this design's.
// Latency: dout_valid two clocks after din_valid. Clock: the DDC sample
// clock. rst_n (Filter_Resetn) is asynchronous, active low.
module envelope_detector #(
  parameter int N3    = 16,
  parameter int NTAPS = 32,
  parameter int CW    = 16,
  parameter int OW    = 32,
  parameter int SHIFT = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [N3-1:0] din,
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
  logic signed [2*N3-1:0] sq;
  logic                   sq_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq       <= '0;
      sq_valid <= 1'b0;
    end else begin
      sq_valid <= din_valid;
      if (din_valid) sq <= din * din;
    end
  end

  bp_fir #(.NTAPS(NTAPS), .DW(2*N3), .CW(CW), .OW(OW), .SHIFT(SHIFT)) u_fir (
    .clk(clk), .rst_n(rst_n), .din(sq), .din_valid(sq_valid),
    .reload_tvalid(reload_tvalid), .reload_tlast(reload_tlast), .reload_tdata(reload_tdata),
    .reload_tready(reload_tready), .config_tvalid(config_tvalid), .config_tlast(config_tlast),
    .config_tdata(config_tdata), .config_tready(config_tready), .dout(dout), .dout_valid(dout_valid)
  );
endmodule
