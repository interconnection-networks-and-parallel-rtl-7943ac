// lane_tag_unit: per-processor routing-tag generator for distributed control
// of the Linear Permutation Network.
//
// Processor LANE sits on network input LANE. For a linear section with
// separation a, the element it holds must reach bank a*LANE + b mod M. The
// unit works out its own pair of tags instead of taking them from a central
// controller:
//   * j = log_mod(a mod M), from its own remainder unit (addr_convert) and
//     its own copy of the log table (logmod_rom); this is the first shift;
//   * pos = a*LANE mod M, the line the first subnetwork delivers this input
//     to. It is read from a table of powers of G at (j + log_mod(LANE)) mod
//     (M-1), so no multiplier is needed; pos = 0 for LANE = 0;
//   * b = bank - pos mod M, with `bank` the bank of the element currently
//     held; this is the third shift, so the element lands in `bank`.
// If a mod M = 0 (the whole section in one bank) the unit uses a = 1: j = 0,
// pos = LANE, so input LANE still reaches `bank`; `seq` reports this case.
//
// Interface and timing: `load` (one cycle, with `stride`) registers j, pos
// and seq for the section; b follows `bank` combinationally after that.
// Reset clears the registers. Per-processor remainder hardware and log table
// follow the source design's description of distributed tag computation;
// the power table for pos, the a = 1 rule for single-bank sections and the
// register timing are this implementation's choices.
module lane_tag_unit
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  parameter int unsigned G        = 3,
  parameter int unsigned LANE     = 1,
  localparam int unsigned M  = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BW = idx_w(M),
  localparam int unsigned JW = idx_w(M-1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] stride,
  input  logic [BW-1:0]     bank,
  output logic [JW-1:0]     j,
  output logic [BW-1:0]     b,
  output logic              seq
);
  localparam int unsigned LOG_LANE = (LANE == 0) ? 0 : log_mod(G, LANE, M);

  logic [BW-1:0]       a_mod;
  logic [ADDR_W-W-1:0] a_off_unused;
  logic [JW-1:0]       a_log;
  logic                a_zero;

  addr_convert #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE)) u_rem (
    .addr(stride), .bank(a_mod), .offset(a_off_unused)
  );

  logmod_rom #(.M(M), .G(G)) u_log (.x(a_mod), .j(a_log), .zero(a_zero));

  // Powers of G: pw[k] = G^k mod M.
  logic [BW-1:0] pw [M-1];
  for (genvar k = 0; k < M - 1; k++) begin : g_pow
    assign pw[k] = BW'(pow_mod(G, k, M));
  end

  logic [JW:0]   e_sum;
  logic [JW-1:0] e_idx;
  logic [BW-1:0] nx_pos, pos;

  always_comb begin
    e_sum = {1'b0, a_log} + (JW+1)'(LOG_LANE);
    e_idx = (int'(e_sum) >= int'(M) - 1) ? JW'(int'(e_sum) - (int'(M) - 1)) : e_sum[JW-1:0];
    if (LANE == 0)   nx_pos = '0;
    else if (a_zero) nx_pos = BW'(LANE);
    else             nx_pos = pw[e_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j   <= '0;
      pos <= '0;
      seq <= 1'b0;
    end else if (load) begin
      j   <= a_log;
      pos <= nx_pos;
      seq <= a_zero;
    end
  end

  always_comb begin
    b = (bank >= pos) ? BW'(bank - pos) : BW'(int'(bank) + int'(M) - int'(pos));
  end

  if (LANE >= M) begin : g_bad_lane
    $error("lane_tag_unit: LANE must be below M");
  end
endmodule
