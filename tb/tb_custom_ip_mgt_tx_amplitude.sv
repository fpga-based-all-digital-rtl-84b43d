// Testbench of the Tx amplitude core: register writes must appear on the
// driver control outputs in the documented bit fields, and read back.
module tb_custom_ip_mgt_tx_amplitude;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  axil_req_t req; axil_rsp_t rsp;
  logic [4:0] post, pre; logic [3:0] diff; logic inh;
  int checks = 0, failures = 0;

  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));
  custom_ip_mgt_tx_amplitude dut (.s_axi_aclk(clk), .s_axi_aresetn(rst_n), .s_axi_req(req),
    .s_axi_rsp(rsp), .txpostcursor(post), .txprecursor(pre), .txdiffctrl(diff), .txinhibit(inh));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk); rst_n = 1;
    check(post == 0 && pre == 0 && diff == 0 && inh == 0, "reset values");
    for (int i = 0; i < 20; i++) begin
      logic [10:0] v0; logic [3:0] v1;
      v0 = 11'($urandom); v1 = 4'($urandom);
      bfm.write(4'h0, {$urandom} & 32'hFFFFF800 | 32'(v0));
      bfm.write(4'h4, 32'(v1));
      repeat (2) @(posedge clk);
      check(post == v0[4:0], "TXPOSTCURSOR = 0x00[4:0]");
      check(pre == v0[9:5], "TXPRECURSOR = 0x00[9:5]");
      check(inh == v0[10], "TXINHIBIT = 0x00[10]");
      check(diff == v1, "TXDIFFCTRL = 0x04[3:0]");
      bfm.read(4'h0, r); check(r == 32'(v0), "readback 0x00");
      bfm.read(4'h4, r); check(r == 32'(v1), "readback 0x04");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
