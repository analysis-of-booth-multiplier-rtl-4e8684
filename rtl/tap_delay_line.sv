// tap_delay_line: the Z^-1 chain of a direct-form FIR filter, L words of W
// bits. taps[0] holds the newest sample x[n] and taps[k] holds x[n-k].
//
// On each clock with en high every word moves one place down the line
// (taps[k] <= taps[k-1]) and din enters at taps[0]; with en low the line
// holds. Reset clears all words to zero. The outputs are the register
// contents, so a word written on one edge is visible from the next cycle.
//
// The chain of unit delays tapped after every stage is the filter structure
// itself; keeping x[n] in a register too (L registers rather than L-1) and
// the synchronous enable are this design's choices. The filter also uses
// this line to hold its coefficient set.
module tap_delay_line #(
  parameter int unsigned L = 8,  // number of taps
  parameter int unsigned W = 2   // word width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [L]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int k = 1; k < L; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
