// mod_fermat: remainder of an ADDR_W-bit binary number modulo M = 2^W+1.
//
// 2^W is -1 modulo M, so A mod M is the alternating sum of the radix-2^W
// digits: digits at even positions are added and digits at odd positions are
// subtracted. Each odd digit d is replaced by its modular negative M-d (0 stays
// 0), and all digit residues are then summed in a balanced binary tree of
// modulo-M adders (mod_add), mirroring the one's complement tree used for
// 2^W-1. With W = 4 this gives remainders modulo 17, with W = 8 modulo 257.
// Residues need W+1 bits. Purely combinational. The alternating sign follows
// the source design; negating digits before a modular adder tree is this
// implementation's choice of circuit.
module mod_fermat #(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned W      = 4
) (
  input  logic [ADDR_W-1:0] a,
  output logic [W:0]        r     // a mod (2^W+1), in 0 .. 2^W
);
  localparam int unsigned M      = (1 << W) + 1;
  localparam int unsigned NDIG   = (ADDR_W + W - 1) / W;
  localparam int unsigned LEVELS = (NDIG <= 1) ? 0 : $clog2(NDIG);
  localparam int unsigned NLEAF  = 1 << LEVELS;

  logic [NLEAF*W-1:0] padded;
  logic [W:0] lvl0 [NLEAF];   // tree level 0: the digits
  logic [W:0] root;

  assign padded = (NLEAF*W)'(a);

  for (genvar k = 0; k < NLEAF; k++) begin : g_leaf
    logic [W:0] d;
    assign d = {1'b0, padded[k*W +: W]};
    if (k % 2 == 0) begin : g_even
      assign lvl0[k] = d;
    end else begin : g_odd
      assign lvl0[k] = (d == '0) ? '0 : (W+1)'(M) - d;
    end
  end

  // Level l+1 of the tree holds NLEAF >> (l+1) partial sums.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NOUT = NLEAF >> (l + 1);
    logic [W:0] sum [NOUT];
    for (genvar k = 0; k < NOUT; k++) begin : g_add
      if (l == 0) begin : g_first
        mod_add #(.M(M), .BW(W+1)) u_add (.a(lvl0[2*k]), .b(lvl0[2*k+1]), .s(sum[k]));
      end else begin : g_next
        mod_add #(.M(M), .BW(W+1)) u_add (
          .a(g_level[l-1].sum[2*k]), .b(g_level[l-1].sum[2*k+1]), .s(sum[k]));
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign root = lvl0[0];
  end else begin : g_root
    assign root = g_level[LEVELS-1].sum[0];
  end

  assign r = root;
endmodule
