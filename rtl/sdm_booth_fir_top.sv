// sdm_booth_fir_top: short-word-length FIR filter. Multi-bit input samples
// and multi-bit filter weights are both turned into ternary digits (-1, 0,
// +1) by sigma-delta modulators, and an 8-tap FIR filter built from 2-bit
// Booth multipliers and one adder filters the ternary stream. Because each
// product is of two 2-bit words, every multiplier is tiny and fast, which is
// the point of the short word length.
//
// Structure:
//   x_in --> ternary_sdm (data) --> booth_fir --> y_out
//   w_in --> ternary_sdm (weights) --> coefficient line (tap_delay_line)
//                                          --> booth_fir coefficients
//
// Data path and timing: a sample is taken on a clock with x_valid and x_ready
// high. The data modulator registers its ternary digit one clock later, and
// the filter takes it on that clock; y_valid pulses with the new output
// W+3 = 5 clocks after the sample edge, and x_ready stays low until then,
// giving one sample every 6 clocks.
//
// Weight loading: pulse w_clear once to empty the weight modulator, then
// present the L weights in order f[0], f[1], ..., f[L-1] on w_in with w_valid
// (one per clock or with gaps). Each ternary weight reaches the coefficient
// line one clock after its w_in edge; after L weights, tap k uses the
// modulated f[k]. Weights can be reloaded at any time; a filter pass already
// started keeps the coefficients it sampled at its start. After reset all
// coefficients are zero.
//
// Modulating data and weights to a ternary word, the 8 taps, the 2-bit Booth
// multipliers and the adder follow the filter as described. The modulator
// type, the 8-bit input width, the serial weight load and the handshakes are
// this design's own choices.
module sdm_booth_fir_top
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned IN_W = SDM_IN_W,
  parameter int unsigned OW   = fir_out_w(SWL_W, TAPS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // multi-bit input samples
  input  logic                   x_valid,
  output logic                   x_ready,
  input  logic signed [IN_W-1:0] x_in,
  // multi-bit filter weights, loaded serially
  input  logic                   w_clear,
  input  logic                   w_valid,
  input  logic signed [IN_W-1:0] w_in,
  // filter output
  output logic                   y_valid,
  output logic signed [OW-1:0]   y_out
);

  logic     xs_valid;
  ternary_t xs;
  logic     ws_valid;
  ternary_t ws;
  logic     fir_ready;
  ternary_t coef_line [TAPS];
  ternary_t coef      [TAPS];

  // A sample may enter only when the filter is idle and no digit is pending.
  assign x_ready = fir_ready && !xs_valid;

  ternary_sdm #(.IN_W(IN_W)) u_sdm_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (1'b0),
    .in_valid (x_valid && x_ready),
    .x        (x_in),
    .out_valid(xs_valid),
    .y        (xs)
  );

  ternary_sdm #(.IN_W(IN_W)) u_sdm_weight (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (w_clear),
    .in_valid (w_valid),
    .x        (w_in),
    .out_valid(ws_valid),
    .y        (ws)
  );

  tap_delay_line #(.L(TAPS), .W(SWL_W)) u_coef_line (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ws_valid),
    .din  (ws),
    .taps (coef_line)
  );

  // The first weight loaded has travelled to the far end of the line.
  always_comb begin
    for (int k = 0; k < TAPS; k++) coef[k] = coef_line[TAPS-1-k];
  end

  booth_fir #(.TAPS(TAPS), .W(SWL_W), .OW(OW)) u_fir (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(xs_valid),
    .in_ready(fir_ready),
    .x_in    (xs),
    .coef    (coef),
    .y_valid (y_valid),
    .y_out   (y_out)
  );

  // A modulated sample is never offered to a busy filter.
  no_drop : assert property (@(posedge clk) disable iff (!rst_n) xs_valid |-> fir_ready);

endmodule
