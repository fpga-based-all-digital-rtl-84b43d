// Testbench of the I2C core. An open-drain bus joins the core's drive-low
// outputs with a slave model at 7-bit address 0x68 (the Si5326's). The
// slave decodes START, the address byte, the data bytes and STOP from the
// bus levels, acknowledges its own address and every data byte, and can
// hold SCL low after an acknowledge (clock stretching). Checks: the bytes
// received equal those written, START/STOP count, no ack_error for the
// slave's address and ack_error for another address, the SCL period
// (4*CLK_DIV clocks), stretching lengthens the low phase, the reset
// register drives the two reset pins, and the clock pair follows clk_in.
module tb_custom_ip_iic;
  import rfid_pkg::*;
  localparam int DIV = 10;
  logic aclk = 0, aresetn = 0, clk_in = 0;
  always #5 aclk = !aclk;
  always #3.2 clk_in = !clk_in;
  axil_req_t req;
  axil_rsp_t rsp;
  logic clk_out_p, clk_out_n, sda_drive_low, scl_drive_low, si5326_rst_n, iic_mux_rst_n;
  logic slave_sda_low = 0, slave_scl_low = 0;
  logic sda_i, scl_i;
  assign sda_i = !(sda_drive_low || slave_sda_low);
  assign scl_i = !(scl_drive_low || slave_scl_low);
  int checks = 0, failures = 0;

  custom_ip_iic #(.CLK_DIV(DIV)) dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn), .s_axi_req(req), .s_axi_rsp(rsp), .*
  );
  axil_bfm bfm (.clk(aclk), .req(req), .rsp(rsp));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #4000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- slave model, sampled on the AXI clock
  logic [7:0] rx_bytes[$];
  int starts = 0, stops = 0, stretches = 0;
  logic stretch_en = 0;
  logic sda_q = 1, scl_q = 1;
  int   nbit = 0;
  logic [7:0] sh = 0;
  logic addressed = 0, in_frame = 0;
  always @(posedge aclk) begin
    sda_q <= sda_i; scl_q <= scl_i;
    if (scl_i && scl_q && sda_q && !sda_i) begin starts++; in_frame <= 1; nbit <= 0; addressed <= 0; end
    else if (scl_i && scl_q && !sda_q && sda_i) begin stops++; in_frame <= 0; end
    else if (in_frame && scl_i && !scl_q) begin           // SCL rising: sample
      if (nbit < 8) sh <= {sh[6:0], sda_i};
      nbit <= nbit + 1;
    end else if (in_frame && !scl_i && scl_q) begin       // SCL falling
      if (nbit == 8) begin
        // byte complete: acknowledge own address and all data bytes
        rx_bytes.push_back(sh);
        if (rx_bytes.size() == 1) addressed <= (sh[7:1] == 7'h68);
        slave_sda_low <= (rx_bytes.size() == 1) ? (sh[7:1] == 7'h68) : addressed;
      end else if (nbit == 9) begin
        slave_sda_low <= 0;
        nbit <= 0;
        if (stretch_en) begin
          slave_scl_low <= 1; stretches++;
          repeat (5 * DIV) @(posedge aclk);
          slave_scl_low <= 0;
        end
      end
    end
  end

  // SCL period while the core is not stretched
  longint last_rise = 0, periods[$];
  always @(posedge scl_i) begin
    if (last_rise != 0) periods.push_back($time - last_rise);
    last_rise = $time;
  end

  task automatic wait_idle();
    logic [31:0] st;
    do begin repeat (20) @(posedge aclk); bfm.read(4'h8, st); end while (st[0]);
  endtask

  initial begin
    logic [31:0] st;
    int nominal, ok;
    repeat (3) @(posedge aclk); aresetn <= 1;
    repeat (3) @(posedge aclk);
    starts = 0; stops = 0;     // bus activity before the reset does not count
    check(si5326_rst_n && iic_mux_rst_n, "reset pins released after reset");
    check(sda_i && scl_i, "bus idle high");

    // write register 136 (0x88) = 0x40 to the device at 0x68
    rx_bytes.delete();
    bfm.write(4'h4, 32'h0000_4088);
    bfm.write(4'h0, 32'h8000_0000 | (32'd2 << 24) | (32'h68 << 16));
    wait_idle();
    bfm.read(4'h8, st);
    check(st[1] == 1'b0, "no ack_error for the slave's address");
    check(rx_bytes.size() == 3, $sformatf("3 bytes on the bus (%0d)", rx_bytes.size()));
    if (rx_bytes.size() == 3) begin
      check(rx_bytes[0] == 8'hD0, $sformatf("address byte %h", rx_bytes[0]));
      check(rx_bytes[1] == 8'h88 && rx_bytes[2] == 8'h40, "data bytes in order");
    end
    check(starts == 1 && stops == 1, $sformatf("one START and one STOP (%0d %0d)", starts, stops));
    nominal = 4 * DIV * 10;
    ok = 0;
    foreach (periods[i]) if (periods[i] == nominal) ok++;
    check(ok >= 20, $sformatf("SCL period of 4*CLK_DIV clocks (%0d of %0d)", ok, periods.size()));

    // three bytes with clock stretching
    rx_bytes.delete(); stretch_en = 1; periods.delete();
    bfm.write(4'h4, 32'h00A5_3C0F);
    bfm.write(4'h0, 32'h8000_0000 | (32'd3 << 24) | (32'h68 << 16));
    wait_idle();
    check(rx_bytes.size() == 4 && rx_bytes[1] == 8'h0F && rx_bytes[2] == 8'h3C && rx_bytes[3] == 8'hA5,
          "three data bytes with stretching");
    check(stretches == 4, $sformatf("stretched after each acknowledge (%0d)", stretches));
    ok = 0;
    foreach (periods[i]) if (periods[i] > nominal + 3 * DIV * 10) ok++;
    check(ok >= 3, "stretching lengthens the SCL period");
    bfm.read(4'h8, st);
    check(st[1] == 1'b0, "no ack_error with stretching");
    stretch_en = 0;

    // another address: no acknowledge
    rx_bytes.delete();
    bfm.write(4'h0, 32'h8000_0000 | (32'd1 << 24) | (32'h21 << 16));
    wait_idle();
    bfm.read(4'h8, st);
    check(st[1] == 1'b1, "ack_error for an absent device");
    check(stops == 3, "STOP after each transfer");

    // reset register
    bfm.write(4'hC, 32'd2);
    @(posedge aclk);
    check(!si5326_rst_n && iic_mux_rst_n, "Si5326 reset asserted alone");
    bfm.write(4'hC, 32'd1);
    @(posedge aclk);
    check(si5326_rst_n && !iic_mux_rst_n, "multiplexer reset asserted alone");
    bfm.read(4'hC, st);
    check(st == 32'd1, "reset register readback");

    // clock forwarding
    repeat (5) begin
      @(negedge clk_in); #0.1;
      check(clk_out_p == clk_in && clk_out_n == !clk_in, "clk_in forwarded as a pair");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
