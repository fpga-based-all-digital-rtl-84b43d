// Packs decoded bits into 32-bit memory words for the decoder core.
//
// Bits enter MSB first: the first bit of a reply lands in bit 31 of word 0.
// A word is written when it holds 32 bits; at frame_end a partly filled word
// is written left-aligned (unused low bits zero). restart sets the write
// address back to 0 for the next reply. The write strobe follows the bit
// that completes a word by one clock. rst is synchronous, active high.
module bit_packer #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          restart,
  input  logic          bit_valid,
  input  logic          bit_value,
  input  logic          frame_end,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [31:0]   wdata,
  output logic [AW+4:0] bit_count
);
  logic [31:0] sh;
  logic [4:0]  fill;
  logic [AW-1:0] next_addr;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      sh        <= '0;
      fill      <= '0;
      next_addr <= '0;
      we        <= 1'b0;
      addr      <= '0;
      wdata     <= '0;
      bit_count <= '0;
    end else begin
      we <= 1'b0;
      if (bit_valid) begin
        bit_count <= bit_count + 1'b1;
        if (fill == 5'd31) begin
          we        <= 1'b1;
          addr      <= next_addr;
          wdata     <= {sh[30:0], bit_value};
          next_addr <= next_addr + 1'b1;
          fill      <= '0;
          sh        <= '0;
        end else begin
          sh   <= {sh[30:0], bit_value};
          fill <= fill + 1'b1;
        end
      end else if (frame_end && fill != '0) begin
        we        <= 1'b1;
        addr      <= next_addr;
        wdata     <= sh << (6'd32 - {1'b0, fill});
        next_addr <= next_addr + 1'b1;
        fill      <= '0;
        sh        <= '0;
      end
    end
  end
endmodule
