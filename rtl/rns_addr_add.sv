// rns_addr_add: addition and subtraction of two addresses held in residue
// form, with a test for zero.
//
// Residue arithmetic works digit by digit with no carries between the
// residues: the bank residues are combined modulo M and the offset residues
// modulo 2^OFF_W (plain binary arithmetic that drops the carry). With
// sub = 0 the result is a + b, with sub = 1 it is a - b. For M = 2^W-1 the
// bank part is a one's complement adder (subtraction adds the bitwise
// complement, which is the one's complement negative) with the all-ones
// result folded to zero; for M = 2^W+1 a general modulo-M adder is used,
// subtracting by adding M - b. `is_zero` is high when the result is the
// address 0, i.e. both residues are zero. Purely combinational.
// That addition, subtraction and comparison with zero are the operations an
// address type needs, and that they are easy in residue form, follows the
// source design; the circuits are this implementation's choice.
module rns_addr_add
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BANK_W  = idx_w(M),
  localparam int unsigned OFF_W   = ADDR_W - W
) (
  input  logic              sub,       // 0: a + b, 1: a - b
  input  logic [BANK_W-1:0] a_bank,
  input  logic [OFF_W-1:0]  a_off,
  input  logic [BANK_W-1:0] b_bank,
  input  logic [OFF_W-1:0]  b_off,
  output logic [BANK_W-1:0] s_bank,
  output logic [OFF_W-1:0]  s_off,
  output logic              is_zero
);
  if (PLUS_ONE) begin : g_fermat
    logic [BANK_W-1:0] b_neg;
    assign b_neg = (b_bank == '0) ? '0 : BANK_W'(M) - b_bank;
    mod_add #(.M(M), .BW(BANK_W)) u_add (
      .a(a_bank), .b(sub ? b_neg : b_bank), .s(s_bank));
  end else begin : g_mersenne
    logic [BANK_W-1:0] raw;
    oca #(.W(BANK_W)) u_oca (.a(a_bank), .b(sub ? ~b_bank : b_bank), .s(raw));
    assign s_bank = (raw == {BANK_W{1'b1}}) ? '0 : raw;
  end

  assign s_off   = sub ? a_off - b_off : a_off + b_off;
  assign is_zero = (s_bank == '0) && (s_off == '0);
endmodule
