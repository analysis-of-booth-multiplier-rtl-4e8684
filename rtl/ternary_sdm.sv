// ternary_sdm: first-order sigma-delta modulator with a three-level
// quantizer. It turns a stream of IN_W-bit signed samples into a stream of
// ternary digits (-1, 0, +1), each held in 2-bit two's complement, whose
// running average follows the input scaled by full scale FS = 2^(IN_W-1).
//
// How it works: an integrator s keeps the accumulated quantization error.
// For each input sample x the modulator forms v = s + x and quantizes it:
// +1 when v > FS/2, -1 when v < -FS/2, otherwise 0. The integrator then takes
// v - y*FS, which always lies in [-FS/2, FS/2], so the loop is stable for any
// input in [-FS, FS-1].
//
// Interface and timing: one sample is taken on each clock with in_valid high;
// y and out_valid are registered and appear one cycle later (out_valid is a
// one-cycle pulse per sample). clear empties the integrator synchronously, so
// a new sequence starts from a known state; clear wins over in_valid.
//
// Turning multi-bit data and filter weights into a short (single-digit
// ternary) word is what the design calls for. The modulator order, the
// quantizer thresholds and the input width are this design's own choices.
module ternary_sdm
  import fir_pkg::*;
#(
  parameter int unsigned IN_W = SDM_IN_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] x,
  output logic                   out_valid,
  output ternary_t               y
);

  localparam int unsigned SW = IN_W + 2;
  localparam logic signed [SW-1:0] FS      = SW'(1) <<< (IN_W - 1);
  localparam logic signed [SW-1:0] HALF_FS = SW'(1) <<< (IN_W - 2);

  logic signed [SW-1:0] s_q;
  logic signed [SW-1:0] v;
  logic signed [SW-1:0] s_next;
  ternary_t             yq;

  always_comb begin
    v = s_q + SW'(x);
    if (v > HALF_FS) begin
      yq     = TERN_POS;
      s_next = v - FS;
    end else if (v < -HALF_FS) begin
      yq     = TERN_NEG;
      s_next = v + FS;
    end else begin
      yq     = TERN_ZERO;
      s_next = v;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= '0;
      y         <= TERN_ZERO;
      out_valid <= 1'b0;
    end else if (clear) begin
      s_q       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s_q <= s_next;
        y   <= yq;
      end
    end
  end

  // The integrator never leaves [-FS/2, FS/2].
  s_bounded : assert property (@(posedge clk) disable iff (!rst_n)
                               (s_q <= HALF_FS) && (s_q >= -HALF_FS));

endmodule
