// oca: one's complement adder (OCA) of W bits.
//
// Adds two W-bit values modulo 2^W-1 by feeding the carry out of the top bit
// back into the bottom bit (end-around carry). Both all-zeros and all-ones
// represent zero, so the result is only defined modulo 2^W-1; the caller
// folds all-ones to zero where a canonical value is needed. Summing inputs
// never overflows the second time: a+b-2^W+1 is at most 2^W-1.
// This is the adder element of the remainder tree; its end-around carry
// construction is the one the source design prescribes. Purely combinational.
module oca #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    s   = sum[W-1:0] + W'(sum[W]);
  end
endmodule
