// Manchester decoder for MIFARE (ISO 14443A) tag replies.
//
// Each valid input sample is sliced: 1 when sample > slice_level. With level
// 0 this is a sign slicer for a baseband without DC; with a level above the
// noise it detects the bursts of a subcarrier (ISO 14443A tags modulate with
// an 847.5 kHz subcarrier during one half of each symbol), whose samples
// exceed the level in the modulated half only. While en is 1 the decoder waits for the first
// rising edge of the sliced signal, the start of the start bit, and from then
// on cuts the stream into symbols of samples_per_symbol samples. For each
// symbol it counts the high samples in the first half (h1) and in the second
// half (h2). If |h1 - h2| >= threshold the symbol is valid and its bit is
// h1 > h2 (a tag sends '1' as modulation in the first half); the start bit
// itself is not output. The first symbol that fails the threshold marks the
// end of the reply: frame_end pulses and the decoder idles until en is
// cleared and set again. The two register fields (symbol length and decision
// threshold) are the document's; the half-symbol counting rule and the slice level are this
// design's. bit_valid/frame_end are one-clock pulses, one clock after the
// last sample of the symbol. rst is synchronous, active high.
module manchester_decoder #(
  parameter int DW = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [DW-1:0] sample,
  input  logic                 sample_valid,
  input  logic [7:0]           samples_per_symbol,
  input  logic [9:0]           threshold,
  input  logic [15:0]          slice_level,
  output logic                 bit_valid,
  output logic                 bit_value,
  output logic                 frame_end
);
  typedef enum logic [1:0] {M_IDLE, M_HUNT, M_SYM, M_DONE} state_t;

  state_t     state;
  logic       lvl, lvl_d, first;
  logic [7:0] cnt;
  logic [7:0] h1, h2;
  logic [7:0] half;
  logic [8:0] diff;
  logic [7:0] h1n, h2n;
  logic signed [DW-1:0] level;

  assign level = DW'(slice_level);
  assign lvl  = sample > level;
  assign half = samples_per_symbol >> 1;
  // counts including the current sample
  assign h1n  = h1 + 8'((cnt < half) && lvl);
  assign h2n  = h2 + 8'((cnt >= half) && lvl);
  assign diff = (h1n >= h2n) ? 9'(h1n - h2n) : 9'(h2n - h1n);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_IDLE;
      lvl_d     <= 1'b0;
      first     <= 1'b0;
      cnt       <= '0;
      h1        <= '0;
      h2        <= '0;
      bit_valid <= 1'b0;
      bit_value <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      frame_end <= 1'b0;
      if (!en) begin
        state <= M_IDLE;
      end else if (sample_valid) begin
        lvl_d <= lvl;
        case (state)
          M_IDLE: begin
            state <= M_HUNT;
          end
          M_HUNT:
            if (lvl && !lvl_d) begin      // this sample opens the start bit
              state <= M_SYM;
              first <= 1'b1;
              cnt   <= 8'd1;
              h1    <= 8'd1;
              h2    <= '0;
            end
          M_SYM: begin
            if (cnt == samples_per_symbol - 1'b1) begin
              cnt <= '0;
              h1  <= '0;
              h2  <= '0;
              if (10'(diff) >= threshold) begin
                first     <= 1'b0;
                bit_valid <= !first;
                bit_value <= h1n > h2n;
              end else begin
                frame_end <= 1'b1;
                state     <= M_DONE;
              end
            end else begin
              cnt <= cnt + 1'b1;
              h1  <= h1n;
              h2  <= h2n;
            end
          end
          default: ;                      // M_DONE: wait for en to drop
        endcase
      end
    end
  end
endmodule
