// mod_add: adder modulo an arbitrary constant M for operands already in
// 0..M-1. Adds in binary and subtracts M once when the sum reaches M.
// Used by the 2^W+1 remainder tree and by residue address addition when M is
// not of the form 2^W-1. Purely combinational; this general adder is an
// implementation choice (for M = 2^W-1 the one's complement adder is used).
module mod_add #(
  parameter int unsigned M  = 17,
  parameter int unsigned BW = 5          // width holding 0..M-1
) (
  input  logic [BW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [BW-1:0] s
);
  logic [BW:0] sum;

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
    if (sum >= (BW+1)'(M)) sum = sum - (BW+1)'(M);
    s = sum[BW-1:0];
  end
endmodule
