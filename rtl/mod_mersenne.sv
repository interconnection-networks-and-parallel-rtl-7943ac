// mod_mersenne: remainder of an ADDR_W-bit binary number modulo M = 2^W-1.
//
// Because 2^W = M+1 is 1 modulo M, A mod M equals the sum of the radix-2^W
// digits of A taken modulo M. The digits are added in a balanced binary tree
// of one's complement adders (oca); with the default 40-bit address and 5-bit
// digits that is 8 digits, 7 OCAs and 3 levels. The tree result may be the
// all-ones pattern, which stands for zero and is folded to 0 at the output.
// A digit count that is not a power of two is padded with zero digits,
// which do not change the sum. Purely combinational; the tree shape and the
// end-around-carry adders follow the source design, the final fold of M to 0 is
// required by it, the zero padding is this implementation's choice.
module mod_mersenne #(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned W      = 5
) (
  input  logic [ADDR_W-1:0] a,
  output logic [W-1:0]      r     // a mod (2^W-1), in 0 .. 2^W-2
);
  localparam int unsigned NDIG   = (ADDR_W + W - 1) / W;
  localparam int unsigned LEVELS = (NDIG <= 1) ? 0 : $clog2(NDIG);
  localparam int unsigned NLEAF  = 1 << LEVELS;

  logic [NLEAF*W-1:0] padded;
  logic [W-1:0] lvl0 [NLEAF];   // tree level 0: the digits
  logic [W-1:0] root;

  assign padded = (NLEAF*W)'(a);

  for (genvar k = 0; k < NLEAF; k++) begin : g_leaf
    assign lvl0[k] = padded[k*W +: W];
  end

  // Level l+1 of the tree holds NLEAF >> (l+1) partial sums.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NOUT = NLEAF >> (l + 1);
    logic [W-1:0] sum [NOUT];
    for (genvar k = 0; k < NOUT; k++) begin : g_add
      if (l == 0) begin : g_first
        oca #(.W(W)) u_oca (.a(lvl0[2*k]), .b(lvl0[2*k+1]), .s(sum[k]));
      end else begin : g_next
        oca #(.W(W)) u_oca (
          .a(g_level[l-1].sum[2*k]), .b(g_level[l-1].sum[2*k+1]), .s(sum[k]));
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign root = lvl0[0];
  end else begin : g_root
    assign root = g_level[LEVELS-1].sum[0];
  end

  assign r = (root == {W{1'b1}}) ? '0 : root;
endmodule
