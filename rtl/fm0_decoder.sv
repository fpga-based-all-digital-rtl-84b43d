// FM0 decoder for EPC Gen2 (ISO 18000-6C) tag replies.
//
// FM0 inverts the level at every symbol boundary and, for a data-0, also in
// the middle of the symbol. The decoder slices each valid sample with
// hysteresis (the level becomes 1 above +hysteresis, 0 below -hysteresis,
// and holds in between, so noise on an idle line makes no edges; with 0 it
// is a plain sign slicer) and measures the run length L between level changes, with
// N = samples_per_symbol and V = samples_violation (length of the preamble's
// violation run, 1.5 symbols):
//   half run   L < 3N/4          full run   3N/4 <= L < (N+V)/2
//   violation  (N+V)/2 <= L < 2V  idle       otherwise, or no change for 2V
// The preamble 1 0 1 0 v 1 is found by its violation run followed by a full
// run; after it a full run is a data-1 and two half runs are a data-0. An
// idle run or a broken pair ends the reply (frame_end) and the decoder waits
// until en is cleared and set again. The trailing dummy 1 is not output when
// it ends at the idle level; when it ends at the other level it is output as
// one last '1', which the reader drops by the known reply length. The two length fields are the document's register
// fields; the run-length classes and the hysteresis are this design's. bit_valid/frame_end are
// one-clock pulses on the sample that ends the run. rst: synchronous, high.
module fm0_decoder #(
  parameter int DW = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [DW-1:0] sample,
  input  logic                 sample_valid,
  input  logic [7:0]           samples_per_symbol,
  input  logic [15:0]          samples_violation,
  input  logic [15:0]          hysteresis,
  output logic                 bit_valid,
  output logic                 bit_value,
  output logic                 frame_end
);
  typedef enum logic [2:0] {F_IDLE, F_SYNC, F_POST, F_DATA, F_HALF, F_DONE} state_t;
  typedef enum logic [1:0] {R_HALF, R_FULL, R_VIOL, R_IDLE} run_t;

  state_t      state;
  logic        lvl, lvl_d;
  logic [17:0] run;          // samples of the current level so far
  logic [19:0] n, v;
  run_t        rc;
  logic        edge_now, too_long;
  logic signed [DW-1:0] hyst;

  assign hyst     = DW'(hysteresis);
  assign lvl      = (sample > hyst)  ? 1'b1 :
                    (sample < -hyst) ? 1'b0 : lvl_d;
  assign n        = 20'(samples_per_symbol);
  assign v        = 20'(samples_violation);
  assign edge_now = lvl != lvl_d;
  assign too_long = 20'(run) >= 2 * v;

  always_comb begin
    if (4 * 20'(run) < 3 * n)       rc = R_HALF;
    else if (2 * 20'(run) < n + v)  rc = R_FULL;
    else if (20'(run) < 2 * v)      rc = R_VIOL;
    else                            rc = R_IDLE;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= F_IDLE;
      lvl_d     <= 1'b0;
      run       <= '0;
      bit_valid <= 1'b0;
      bit_value <= 1'b0;
      frame_end <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      frame_end <= 1'b0;
      if (!en) begin
        state <= F_IDLE;
      end else if (sample_valid) begin
        lvl_d <= lvl;
        if (edge_now) run <= 18'd1;
        else if (run != '1) run <= run + 1'b1;
        case (state)
          F_IDLE: state <= F_SYNC;
          F_SYNC: if (edge_now && rc == R_VIOL) state <= F_POST;
          F_POST: if (edge_now) state <= (rc == R_FULL) ? F_DATA : F_SYNC;
          F_DATA:
            if (edge_now) begin
              case (rc)
                R_FULL: begin bit_valid <= 1'b1; bit_value <= 1'b1; end
                R_HALF: state <= F_HALF;
                default: begin frame_end <= 1'b1; state <= F_DONE; end
              endcase
            end else if (too_long) begin
              frame_end <= 1'b1;
              state     <= F_DONE;
            end
          F_HALF:
            if (edge_now) begin
              if (rc == R_HALF) begin
                bit_valid <= 1'b1;
                bit_value <= 1'b0;
                state     <= F_DATA;
              end else begin
                frame_end <= 1'b1;
                state     <= F_DONE;
              end
            end else if (too_long) begin
              frame_end <= 1'b1;
              state     <= F_DONE;
            end
          default: ;                      // F_DONE: wait for en to drop
        endcase
      end
    end
  end
endmodule
