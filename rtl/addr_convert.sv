// addr_convert: binary address to residue-number-system address.
//
// An address A is represented by its residues with respect to M and
// 2^(ADDR_W-W). The first residue, A mod M, selects the memory bank; the
// second, simply the low ADDR_W-W bits of A, is the word address inside the
// bank. Every (bank, offset) pair is a distinct address below M*2^(ADDR_W-W),
// so no bank word is left unused. M is 2^W-1 (PLUS_ONE = 0, remainder from
// the one's complement adder tree) or 2^W+1 (PLUS_ONE = 1, alternating digit
// sum). Purely combinational. Defaults: 40-bit address, 31 banks, as in the
// source design's worked example; the mapping itself follows the source design.
module addr_convert
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BANK_W  = idx_w(M),
  localparam int unsigned OFF_W   = ADDR_W - W
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [BANK_W-1:0] bank,    // addr mod M
  output logic [OFF_W-1:0]  offset   // addr mod 2^OFF_W
);
  if (PLUS_ONE) begin : g_fermat
    mod_fermat #(.ADDR_W(ADDR_W), .W(W)) u_mod (.a(addr), .r(bank));
  end else begin : g_mersenne
    mod_mersenne #(.ADDR_W(ADDR_W), .W(W)) u_mod (.a(addr), .r(bank));
  end

  assign offset = addr[OFF_W-1:0];
endmodule
