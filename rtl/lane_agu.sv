// lane_agu: address generator of one processor lane, in residue form.
//
// A processor working on a linear section needs only two conversions from
// binary: its first address and its separation. On `load` both are converted
// (two addr_convert units) and registered; afterwards every `step` adds the
// converted separation to the current address with a residue adder, so the
// lane walks its section with no division. The current address is
// available as (cur_bank, cur_off) in the cycle after `load` and after each
// `step`; `load` wins over `step`. Reset clears the address to zero.
// The conversion-then-add scheme follows the source design; the load/step
// interface and reset value are this implementation's choices.
module lane_agu
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BANK_W  = idx_w(M),
  localparam int unsigned OFF_W   = ADDR_W - W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] start,      // binary first address
  input  logic [ADDR_W-1:0] stride,     // binary separation
  input  logic              step,
  output logic [BANK_W-1:0] cur_bank,
  output logic [OFF_W-1:0]  cur_off
);
  logic [BANK_W-1:0] st_bank, sd_bank, inc_bank, nx_bank;
  logic [OFF_W-1:0]  st_off,  sd_off,  inc_off,  nx_off;

  addr_convert #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE))
    u_cvt_start  (.addr(start),  .bank(st_bank), .offset(st_off));
  addr_convert #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE))
    u_cvt_stride (.addr(stride), .bank(sd_bank), .offset(sd_off));

  logic nx_zero_unused;
  rns_addr_add #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE)) u_add (
    .sub(1'b0),
    .a_bank(cur_bank), .a_off(cur_off),
    .b_bank(inc_bank), .b_off(inc_off),
    .s_bank(nx_bank),  .s_off(nx_off),
    .is_zero(nx_zero_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_bank <= '0;
      cur_off  <= '0;
      inc_bank <= '0;
      inc_off  <= '0;
    end else if (load) begin
      cur_bank <= st_bank;
      cur_off  <= st_off;
      inc_bank <= sd_bank;
      inc_off  <= sd_off;
    end else if (step) begin
      cur_bank <= nx_bank;
      cur_off  <= nx_off;
    end
  end
endmodule
