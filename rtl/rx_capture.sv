// Receive capture into the Rx memory (Bram_ADRx).
//
// When en rises the block writes, from address 0 up to and including
// limit, either the raw deserializer words (sel_mgt = 1, one per clock) or
// the DDC output samples sign-extended to 32 bits (sel_mgt = 0, one per
// dout_valid), then stops and raises done until en falls. The processor
// reads the memory through its own port. The source selection and the limit
// address are the document's register fields; the one-shot capture per
// rising edge of en is this design's choice. clk is the receiver word clock;
// rst is synchronous, active high.
module rx_capture #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          sel_mgt,
  input  logic [AW-1:0] limit,
  input  logic [31:0]   mgt_word,
  input  logic [15:0]   ddc_sample,
  input  logic          ddc_valid,
  output logic          we,
  output logic [AW-1:0] addr,
  output logic [31:0]   wdata,
  output logic          busy,
  output logic          done
);
  logic          en_d;
  logic          take;
  logic [AW-1:0] idx;    // address of the next sample

  assign take = busy && (sel_mgt || ddc_valid);

  always_ff @(posedge clk) begin
    if (rst) begin
      en_d  <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      we    <= 1'b0;
      addr  <= '0;
      idx   <= '0;
      wdata <= '0;
    end else begin
      en_d <= en;
      we   <= take;
      if (take) begin
        wdata <= sel_mgt ? mgt_word : {{16{ddc_sample[15]}}, ddc_sample};
        addr  <= idx;
        idx   <= idx + 1'b1;
      end
      if (en && !en_d) begin
        busy <= 1'b1;
        done <= 1'b0;
        idx  <= '0;
      end else if (take && idx == limit) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (!en) done <= 1'b0;
    end
  end
endmodule
