// product_adder: multi-operand adder that sums the L tap products of the
// FIR filter into one output sample.
//
// It is purely combinational: the L signed PW-bit products are sign-extended
// to OW = PW + clog2(L) bits, wide enough that no sum of L products can
// overflow, and added. For the ternary filter the products are -1, 0 or +1,
// so the sum of 8 taps lies in [-8, 8].
//
// A single adder that collects all products into Y[n] is the filter
// structure; the width rule and the plain chained sum (left to the synthesis
// tool to balance) are this design's choices.
module product_adder #(
  parameter int unsigned L  = 8,                 // number of products
  parameter int unsigned PW = 4,                 // product width
  parameter int unsigned OW = PW + $clog2(L)     // sum width
) (
  input  logic signed [PW-1:0] prod [L],
  output logic signed [OW-1:0] sum
);

  always_comb begin
    sum = '0;
    for (int k = 0; k < L; k++) sum += OW'(prod[k]);
  end

endmodule
