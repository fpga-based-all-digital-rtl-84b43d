// True dual-port block memory, used for the five memories of the reader
// (Tx pattern, Rx capture, filter coefficients, MIFARE and EPC Gen2 IDs).
// Port A belongs to the IP core, port B to the processor; each port has its
// own clock. Both ports are read-first with one clock of read latency:
// douta/doutb show the word at the address presented on the previous enabled
// clock. The memory array is written from two clocks, so both ports use
// plain always blocks (always_ff forbids a second writer). A simultaneous write to the same word from both ports is undefined,
// as in the FPGA block RAM it maps to. The contents start at zero.
module tdp_bram #(
  parameter int AW = 10,
  parameter int DW = 32
) (
  input  logic          clka,
  input  logic          ena,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  output logic [DW-1:0] douta,
  input  logic          clkb,
  input  logic          enb,
  input  logic          web,
  input  logic [AW-1:0] addrb,
  input  logic [DW-1:0] dinb,
  output logic [DW-1:0] doutb
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    douta = '0;
    doutb = '0;
  end

  always @(posedge clka) begin
    if (ena) begin
      douta <= mem[addra];
      if (wea) mem[addra] <= dina;
    end
  end

  always @(posedge clkb) begin
    if (enb) begin
      doutb <= mem[addrb];
      if (web) mem[addrb] <= dinb;
    end
  end
endmodule
