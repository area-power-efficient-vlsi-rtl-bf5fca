// scale_corr: CORDIC scale correction by shift and add, no multiplier.
//
// A CORDIC of 13 micro-cells stretches every vector by K = 1.6468; the design
// undoes this by multiplying with 1/K, taken as the 8-bit fraction
// 10011011b = 155/256 = 0.6055. Because 155 = 2^7 + 2^4 + 2^3 + 2^1 + 2^0,
// the product is the sum of the input and four left-shifted copies of it
// (<<1, <<3, <<4, <<7) in one adder; dropping the 8 fraction bits of the
// constant (arithmetic shift right by 8, i.e. truncation towards -inf)
// returns the result to the input's format.
//
// Combinational; W is the width of the two's-complement input and output.
// The shift set and the constant follow the design; the truncation is this
// implementation's choice.
module scale_corr #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W+7:0] ext, sum;

  always_comb begin
    ext  = (W+8)'(din);
    sum  = ext + (ext <<< 1) + (ext <<< 3) + (ext <<< 4) + (ext <<< 7);
    dout = W'(sum >>> 8);
  end

endmodule
