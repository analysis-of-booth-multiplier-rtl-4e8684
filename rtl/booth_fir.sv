// booth_fir: L-tap direct-form FIR filter whose tap multiplications are done
// by sequential Booth multipliers, one per tap,
//   y[n] = sum_{k=0}^{L-1} f[k] * x[n-k].
//
// How it works: a sample accepted on in_valid/in_ready enters the tap delay
// line. On the next clock all L Booth multipliers start together, each with
// coefficient f[k] as multiplicand M and delayed sample x[n-k] as multiplier
// Q. They all finish after W steps; the product adder then sums the L products
// and the sum is registered as y_out. With W = 2 (a ternary sigma-delta digit
// per sample and per coefficient) this is the short-word-length filter; with
// W = 6, 8 or 10 the same structure is a conventional multi-bit filter.
//
// Interface and timing: in_ready is high only while the filter is idle; a
// sample is taken on a clock where in_valid and in_ready are both high. y_out
// is updated and y_valid pulses for one cycle W+2 clocks after that edge, and
// in_ready rises again in the same cycle, so the filter takes one sample
// every W+3 clocks. The coefficients are sampled when the multipliers start
// (one clock after the sample is taken) and may change freely otherwise.
//
// The tap structure, one Booth multiplier per data/weight product and the
// single adder that forms Y[n] follow the filter as described; the handshake,
// the one-sample-at-a-time schedule and the registered output are this
// design's own choices.
module booth_fir
  import fir_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS,
  parameter int unsigned W    = SWL_W,
  parameter int unsigned OW   = fir_out_w(W, TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  coef [TAPS],
  output logic                 y_valid,
  output logic signed [OW-1:0] y_out
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_MULT} state_e;
  state_e state_q;

  logic signed [W-1:0]   taps [TAPS];
  logic signed [2*W-1:0] prod [TAPS];
  logic [TAPS-1:0]       mul_done;
  logic [TAPS-1:0]       mul_busy;
  logic signed [OW-1:0]  sum;
  logic                  accept;
  logic                  start;

  assign in_ready = (state_q == S_IDLE);
  assign accept   = in_valid && in_ready;
  assign start    = (state_q == S_START);

  tap_delay_line #(.L(TAPS), .W(W)) u_delay (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (accept),
    .din  (x_in),
    .taps (taps)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    booth_multiplier #(.N(W)) u_mul (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (start),
      .multiplicand(coef[k]),
      .multiplier  (taps[k]),
      .busy        (mul_busy[k]),
      .done        (mul_done[k]),
      .product     (prod[k])
    );
  end

  product_adder #(.L(TAPS), .PW(2*W), .OW(OW)) u_adder (
    .prod(prod),
    .sum (sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= 1'b0;
      unique case (state_q)
        S_IDLE:  if (accept) state_q <= S_START;
        S_START: state_q <= S_MULT;
        S_MULT:  if (mul_done[0]) begin
                   y_out   <= sum;
                   y_valid <= 1'b1;
                   state_q <= S_IDLE;
                 end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // All multipliers run in lock step.
  lock_step : assert property (@(posedge clk) disable iff (!rst_n)
                               ((mul_done == '0) || (mul_done == '1)) &&
                               ((mul_busy == '0) || (mul_busy == '1)));
  busy_in_mult : assert property (@(posedge clk) disable iff (!rst_n)
                                  (state_q == S_MULT && !mul_done[0]) |-> mul_busy[0]);

endmodule
