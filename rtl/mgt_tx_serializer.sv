// Behavioural model of the multi-gigabit transceiver's transmitter (a hard
// macro of the FPGA), not the real part: only its data function is modelled.
//
// ser_clk is the serial bit clock F_sTX. The model divides it by N1 to make
// the parallel word clock word_clk (high during bits 0..N1/2-1 of each word),
// loads tx_word at the serial clock edge where word_clk rises (the word that
// was stable through the previous word period) and shifts it out LSB first on txp (txn is its complement), one bit per
// ser_clk. txinhibit forces both outputs low, as the real driver stops
// switching. The analog output swing cannot be carried by a logic level, so
// the swing code applied to the current bit (txdiffctrl, or 0 when
// inhibited) is given on swing_code. Pre- and post-cursor emphasis are
// accepted and not modelled. rst (active high, synchronous to ser_clk) is the
// "Reset Tx MGT" control: it clears the shift register and the word phase.
module mgt_tx_serializer #(
  parameter int N1 = 32
) (
  input  logic          ser_clk,
  input  logic          rst,
  output logic          word_clk,
  input  logic [N1-1:0] tx_word,
  input  logic [3:0]    txdiffctrl,
  input  logic [4:0]    txprecursor,
  input  logic [4:0]    txpostcursor,
  input  logic          txinhibit,
  output logic          txp,
  output logic          txn,
  output logic [3:0]    swing_code
);
  localparam int CW = $clog2(N1);
  logic [CW-1:0] bitcnt;
  logic [N1-1:0] sh;
  logic [9:0]    emphasis_unused;

  assign emphasis_unused = {txprecursor, txpostcursor};

  always_ff @(posedge ser_clk) begin
    if (rst) begin
      bitcnt   <= '0;
      sh       <= '0;
      word_clk <= 1'b0;
    end else begin
      bitcnt   <= (bitcnt == CW'(N1-1)) ? '0 : bitcnt + 1'b1;
      word_clk <= (bitcnt == CW'(N1-1)) || (bitcnt < CW'(N1/2 - 1));
      if (bitcnt == CW'(N1-1)) sh <= tx_word;
      else                     sh <= {1'b0, sh[N1-1:1]};
    end
  end

  assign txp        = !txinhibit && sh[0];
  assign txn        = !txinhibit && !sh[0];
  assign swing_code = txinhibit ? 4'd0 : txdiffctrl;
endmodule
