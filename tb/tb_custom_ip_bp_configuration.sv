// Testbench of the band-pass configuration core. A configuration memory
// (one clock of read latency) is filled with random coefficients; the FIR's
// ready signals stall at random. After Filter_Resetn and start are written
// over AXI4-Lite, the reload stream must carry the NTAPS coefficients in
// address order with TLAST on the last only, one config beat must follow,
// and then rfid_data_valid and the done bit must rise. Clearing
// Filter_Resetn must drop rfid_data_valid; a second start with other
// coefficients must send those.
module tb_custom_ip_bp_configuration;
  import rfid_pkg::*;
  localparam int NT = 32;
  logic aclk = 0, aresetn = 0, ddc_clk = 0;
  always #5  aclk = !aclk;
  always #50 ddc_clk = !ddc_clk;
  axil_req_t req;
  axil_rsp_t rsp;
  logic filter_reload_tready = 0, filter_config_tready = 0;
  logic cfg_en;
  logic [9:0] cfg_addr;
  logic [31:0] cfg_rdata = 0;
  logic out_reload_tvalid, out_reload_tlast, out_config_tvalid, out_config_tlast;
  logic [15:0] out_reload_tdata;
  logic [7:0] out_config_tdata;
  logic rfid_data_valid, filter_resetn;
  int checks = 0, failures = 0;

  custom_ip_bp_configuration #(.NTAPS(NT)) dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn), .s_axi_req(req), .s_axi_rsp(rsp), .*
  );
  axil_bfm bfm (.clk(aclk), .req(req), .rsp(rsp));

  logic [31:0] mem [1024];
  always @(posedge ddc_clk) if (cfg_en) cfg_rdata <= mem[cfg_addr];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // random back-pressure and stream recording
  logic [15:0] beats[$];
  int lasts_at[$];
  int configs = 0, config_before_last = 0, stalls = 0;
  logic mon = 0;
  always @(posedge ddc_clk) begin
    filter_reload_tready <= ($urandom % 3) != 0;
    filter_config_tready <= ($urandom % 2) != 0;
    if (mon) begin
      if (out_reload_tvalid && !filter_reload_tready) stalls++;
      if (out_reload_tvalid && filter_reload_tready) begin
        beats.push_back(out_reload_tdata);
        if (out_reload_tlast) lasts_at.push_back(beats.size() - 1);
      end
      if (out_config_tvalid && filter_config_tready) begin
        configs++;
        if (lasts_at.size() == 0) config_before_last++;
      end
    end
  end

  task automatic configure_and_check(input string tag);
    logic [31:0] d;
    int bad = 0;
    beats.delete(); lasts_at.delete(); configs = 0; config_before_last = 0;
    for (int i = 0; i < NT; i++) mem[i] = $urandom;
    bfm.write(4'h0, 32'd0);
    repeat (4) @(posedge ddc_clk);
    // a finished configuration stays in force until the next start edge
    check(rfid_data_valid == (tag != "first"), $sformatf("%s: data valid before the start", tag));
    bfm.write(4'h0, 32'd1);
    repeat (NT * 8 + 20) @(posedge ddc_clk);
    check(beats.size() == NT, $sformatf("%s: %0d reload beats", tag, beats.size()));
    for (int i = 0; i < NT && i < beats.size(); i++) if (beats[i] != mem[i][15:0]) bad++;
    check(bad == 0, $sformatf("%s: coefficients sent in address order (%0d wrong)", tag, bad));
    check(lasts_at.size() == 1 && lasts_at[0] == NT - 1, $sformatf("%s: TLAST on the last beat only", tag));
    check(configs == 1 && config_before_last == 0, $sformatf("%s: one config beat after the reload", tag));
    check(out_config_tlast && out_config_tdata == 8'd0, $sformatf("%s: config word", tag));
    check(rfid_data_valid, $sformatf("%s: data valid after configuration", tag));
    bfm.read(4'h8, d);
    check(d == 32'd1, $sformatf("%s: done bit", tag));
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (3) @(posedge aclk); aresetn <= 1;
    repeat (4) @(posedge ddc_clk);
    mon = 1;
    check(!filter_resetn, "filter held in reset after power-up");
    bfm.read(4'h4, d);
    check(d == 32'd0, "Filter_Resetn resets to 0");
    bfm.write(4'h4, 32'd1);
    repeat (4) @(posedge ddc_clk);
    check(filter_resetn, "Filter_Resetn released");

    configure_and_check("first");
    configure_and_check("second");
    check(stalls > 0, "the reload stream was stalled at least once");

    bfm.write(4'h4, 32'd0);
    repeat (4) @(posedge ddc_clk);
    check(!filter_resetn && !rfid_data_valid, "filter reset drops data valid");
    bfm.read(4'h8, d);
    check(d == 32'd0, "done cleared by filter reset");
    bfm.read(4'h0, d);
    check(d == 32'd1, "start register readback");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
