// Transmit carrier generator: the Tx memory replay and the carrier on/off MUX.
//
// The Tx memory holds one period (or a whole number of periods) of the
// carrier as N1-bit serializer words, e.g. "0011..0011" for a carrier at
// F_sTX/4. While tx_en is 1 the words at addresses 0..limit are read in a
// loop and passed to the serializer; while tx_en is 0 the all-zero word is
// sent, which switches the carrier off. The processor keys tx_en to form the
// ASK symbols of the reader commands, so the MUX follows the document's
// transmit path; the looped memory read is this design's way of producing the
// "0101..01" word with a programmable period.
//
// Timing: the memory has one clock of read latency. The first word after
// tx_en rises is word 0, on tx_word two clocks after tx_en is sampled high;
// tx_word returns to zero two clocks after tx_en is sampled low.
// Reset (rst, synchronous, active high) clears the address and the output.
module tx_carrier_gen #(
  parameter int N1 = 32,
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tx_en,
  input  logic [AW-1:0] limit,
  output logic          mem_en,
  output logic [AW-1:0] mem_addr,
  input  logic [N1-1:0] mem_rdata,
  output logic [N1-1:0] tx_word
);
  logic en_d;

  assign mem_en = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      mem_addr <= '0;
      en_d     <= 1'b0;
      tx_word  <= '0;
    end else begin
      en_d    <= tx_en;
      tx_word <= en_d ? mem_rdata : '0;
      if (!tx_en || mem_addr == limit) mem_addr <= '0;
      else                             mem_addr <= mem_addr + 1'b1;
    end
  end
endmodule
