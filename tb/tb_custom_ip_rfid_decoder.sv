// Testbench of the RFID decoder core. The processor side is an AXI4-Lite
// bus model; the baseband stream is generated here, one sample per DDC
// clock. It sends a MIFARE (Manchester) reply of 45 bits and an EPC Gen2
// (FM0) reply of 70 bits, each after setting the decoder's register and its
// start bit, and checks the words written to the MIFARE and EPC memories
// (bits packed MSB first from address 0, the last word left-aligned), the
// status register (bit counts and reply-ended flags) and that a decoder
// whose start bit is clear writes nothing.
module tb_custom_ip_rfid_decoder;
  import rfid_pkg::*;
  logic aclk = 0, aresetn = 0, ddc_clk = 0;
  always #5  aclk = !aclk;          // 100 MHz processor bus
  always #50 ddc_clk = !ddc_clk;    // 10 MS/s sample clock
  axil_req_t req;
  axil_rsp_t rsp;
  logic signed [31:0] rfid_data = 0;
  logic rfid_data_valid = 0;
  logic mifare_we, epc_we;
  logic [9:0] mifare_addr, epc_addr;
  logic [31:0] mifare_wdata, epc_wdata;
  int checks = 0, failures = 0;

  custom_ip_rfid_decoder dut (
    .s_axi_aclk(aclk), .s_axi_aresetn(aresetn), .s_axi_req(req), .s_axi_rsp(rsp),
    .ddc_clk, .rfid_data, .rfid_data_valid,
    .mifare_we, .mifare_addr, .mifare_wdata, .epc_we, .epc_addr, .epc_wdata
  );
  axil_bfm bfm (.clk(aclk), .req(req), .rsp(rsp));

  logic [31:0] mif_mem [1024], epc_mem [1024];
  int mif_writes = 0, epc_writes = 0;
  logic mon = 0;   // memory writes are counted once the reset has been applied
  always @(posedge ddc_clk) if (mon) begin
    if (mifare_we) begin mif_mem[mifare_addr] <= mifare_wdata; mif_writes++; end
    if (epc_we)    begin epc_mem[epc_addr] <= epc_wdata; epc_writes++; end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [11:0] PREAMBLE = 12'b1101_0010_0011;

  // play a list of half-symbol levels, hs samples per half symbol
  task automatic play(input logic halves[$], input int hs);
    foreach (halves[i])
      for (int k = 0; k < hs; k++) begin
        @(posedge ddc_clk);
        rfid_data <= halves[i] ? 32'sd40000 : -32'sd40000;
        rfid_data_valid <= 1'b1;
      end
  endtask

  // expected memory words for a bit list
  function automatic logic [31:0] word_of(input logic bits[$], input int w);
    logic [31:0] x = '0;
    for (int i = 0; i < 32; i++)
      if (w * 32 + i < bits.size()) x[31 - i] = bits[w * 32 + i];
    return x;
  endfunction

  initial begin
    logic bits[$], halves[$];
    logic [31:0] st;
    logic lv;
    int nw, bad;
    for (int i = 0; i < 1024; i++) begin mif_mem[i] = '0; epc_mem[i] = '0; end
    repeat (5) @(posedge aclk); aresetn <= 1;
    repeat (5) @(posedge ddc_clk);
    mon = 1;

    // ---------------- MIFARE: 20 samples per symbol, threshold 8
    bfm.write(4'h0, 32'h8000_0000 | (32'd8 << 16) | 32'd20);
    repeat (4) @(posedge ddc_clk);
    for (int i = 0; i < 6; i++) halves.push_back(1'b0);
    halves.push_back(1'b1); halves.push_back(1'b0);           // start bit
    for (int i = 0; i < 45; i++) begin
      logic b;
      b = 1'($urandom);
      bits.push_back(b);
      halves.push_back(b); halves.push_back(!b);
    end
    for (int i = 0; i < 8; i++) halves.push_back(1'b0);
    play(halves, 10);
    repeat (10) @(posedge ddc_clk);
    nw = (45 + 31) / 32;
    check(mif_writes == nw, $sformatf("MIFARE words written %0d", mif_writes));
    bad = 0;
    for (int w = 0; w < nw; w++) if (mif_mem[w] != word_of(bits, w)) bad++;
    check(bad == 0, "MIFARE memory holds the reply MSB first");
    check(epc_writes == 0, "EPC decoder idle while its start bit is clear");
    bfm.read(4'h8, st);
    check(st[31] == 1'b1, "MIFARE reply-ended flag");
    check(st[25:16] == 10'd45, $sformatf("MIFARE bit count %0d", st[25:16]));
    bfm.write(4'h0, (32'd8 << 16) | 32'd20);                  // stop

    // ---------------- EPC Gen2: 16 samples per symbol, violation 24
    bits.delete(); halves.delete();
    bfm.write(4'h4, 32'h8000_0000 | (32'd24 << 8) | 32'd16);
    repeat (4) @(posedge ddc_clk);
    for (int i = 0; i < 6; i++) halves.push_back(1'b0);
    for (int i = 11; i >= 0; i--) halves.push_back(PREAMBLE[i]);
    lv = 1'b1;
    for (int i = 0; i <= 70; i++) begin
      logic b;
      b = (i == 70) ? 1'b1 : 1'($urandom);
      if (i < 70) bits.push_back(b);
      lv = !lv; halves.push_back(lv);
      if (!b) lv = !lv;
      halves.push_back(lv);
    end
    // idle level equal to the dummy's level, so the dummy is not output
    for (int i = 0; i < 8; i++) halves.push_back(lv);
    play(halves, 8);
    repeat (10) @(posedge ddc_clk);
    nw = (70 + 31) / 32;
    check(epc_writes == nw, $sformatf("EPC words written %0d", epc_writes));
    bad = 0;
    for (int w = 0; w < nw; w++) if (epc_mem[w] != word_of(bits, w)) bad++;
    check(bad == 0, "EPC memory holds the reply MSB first");
    bfm.read(4'h8, st);
    check(st[30] == 1'b1, "EPC reply-ended flag");
    check(st[9:0] == 10'd70, $sformatf("EPC bit count %0d", st[9:0]));
    check(mif_writes == 2, "MIFARE decoder wrote nothing after its stop");

    // register readback
    bfm.read(4'h4, st);
    check(st == (32'h8000_0000 | (32'd24 << 8) | 32'd16), "EPC register readback");

    // restart clears the flags and counts
    bfm.write(4'h4, 32'd0);
    repeat (4) @(posedge ddc_clk);
    bfm.write(4'h4, 32'h8000_0000 | (32'd24 << 8) | 32'd16);
    repeat (6) @(posedge ddc_clk);
    bfm.read(4'h8, st);
    check(st[30] == 1'b0 && st[9:0] == 10'd0, "restart clears EPC flag and count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
