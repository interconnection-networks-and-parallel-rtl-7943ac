// lpn: Linear Permutation Network, processor side to memory side.
//
// M ports (M prime) on each side. A message entering input i with tags (j, b)
// leaves at output a*i + b mod M, where a = G^j mod M and G is the network's
// distinguished generator; for one (j, b) on all inputs this is a
// permutation, so the network never blocks. Three subnetworks:
//   1. Input 0 bypasses. Input G^k (k = 0..M-2) enters position k of an
//      (M-1)-element circular barrel shifter that rotates by j: multiplying
//      by a = G^j adds j to the exponent.
//   2. Pure wiring: position k of shifter 1 goes to line G^k mod M, so the
//      lines come out in natural order 0..M-1.
//   3. An M-element circular barrel shifter rotating by b: adds b mod M.
// Tags travel with each message (distributed control); giving every input
// the same tags is the centrally controlled case. Input 0 is delayed by the
// depth of shifter 1 so that all lines stay aligned. Latency with PIPE = 1 is
// ceil(log2(M-1)) + ceil(log2 M) cycles (10 for M = 31), one new set of
// messages per cycle; PIPE = 0 is combinational. The output tags are those
// the message entered with. Structure follows the source design (its worked example is
// M = 7, G = 3); port format, tag outputs and the conflict flag are
// this implementation's choices.
module lpn
  import pms_pkg::*;
#(
  parameter int unsigned M    = 7,
  parameter int unsigned G    = 3,
  parameter int unsigned W    = 8,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned BW  = idx_w(M),     // tag b: 0..M-1
  localparam int unsigned JW  = idx_w(M-1),   // tag j: 0..M-2
  localparam int unsigned D1  = PIPE ? idx_w(M-1) : 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [M],   // indexed by input (processor) number
  input  logic [JW-1:0] in_j     [M],
  input  logic [BW-1:0] in_b     [M],
  input  logic [W-1:0]  in_data  [M],
  output logic          out_valid[M],   // indexed by output (memory bank) number
  output logic [JW-1:0] out_j    [M],
  output logic [BW-1:0] out_b    [M],
  output logic [W-1:0]  out_data [M],
  output logic          conflict        // two messages claimed one switch output
);
  localparam int unsigned P1W = BW + W;        // payload through shifter 1
  localparam int unsigned P3W = JW + W;        // payload through shifter 3

  // Subnetwork 1 -----------------------------------------------------------
  logic           s1_iv [M-1];
  logic [JW-1:0]  s1_it [M-1];
  logic [P1W-1:0] s1_id [M-1];
  logic           s1_ov [M-1];
  logic [JW-1:0]  s1_ot [M-1];
  logic [P1W-1:0] s1_od [M-1];
  logic           c1, c3;

  for (genvar k = 0; k < M - 1; k++) begin : g_sub1_in
    localparam int unsigned SRC = pow_mod(G, k, M);
    assign s1_iv[k] = in_valid[SRC];
    assign s1_it[k] = in_j[SRC];
    assign s1_id[k] = {in_b[SRC], in_data[SRC]};
  end

  barrel_shifter #(.N(M-1), .W(P1W), .TAG_W(JW), .DOWN(1'b0), .PIPE(PIPE)) u_bs1 (
    .clk, .rst_n,
    .in_valid(s1_iv), .in_tag(s1_it), .in_data(s1_id),
    .out_valid(s1_ov), .out_tag(s1_ot), .out_data(s1_od),
    .conflict(c1)
  );

  // Input 0 bypass, delayed to match shifter 1.
  logic          z_v [D1+1];
  logic [JW-1:0] z_j [D1+1];
  logic [BW-1:0] z_b [D1+1];
  logic [W-1:0]  z_d [D1+1];
  assign z_v[0] = in_valid[0];
  assign z_j[0] = in_j[0];
  assign z_b[0] = in_b[0];
  assign z_d[0] = in_data[0];
  for (genvar s = 0; s < D1; s++) begin : g_delay0
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) z_v[s+1] <= 1'b0;
      else        z_v[s+1] <= z_v[s];
    end
    always_ff @(posedge clk) begin
      z_j[s+1] <= z_j[s];
      z_b[s+1] <= z_b[s];
      z_d[s+1] <= z_d[s];
    end
  end

  // Subnetwork 2: static wiring, geometric order to natural order ---------
  logic           s3_iv [M];
  logic [BW-1:0]  s3_it [M];
  logic [P3W-1:0] s3_id [M];
  assign s3_iv[0] = z_v[D1];
  assign s3_it[0] = z_b[D1];
  assign s3_id[0] = {z_j[D1], z_d[D1]};
  for (genvar k = 0; k < M - 1; k++) begin : g_sub2
    localparam int unsigned DST = pow_mod(G, k, M);
    assign s3_iv[DST] = s1_ov[k];
    assign s3_it[DST] = s1_od[k][W +: BW];
    assign s3_id[DST] = {s1_ot[k], s1_od[k][W-1:0]};
  end

  // Subnetwork 3 -----------------------------------------------------------
  logic           s3_ov [M];
  logic [BW-1:0]  s3_ot [M];
  logic [P3W-1:0] s3_od [M];
  barrel_shifter #(.N(M), .W(P3W), .TAG_W(BW), .DOWN(1'b0), .PIPE(PIPE)) u_bs3 (
    .clk, .rst_n,
    .in_valid(s3_iv), .in_tag(s3_it), .in_data(s3_id),
    .out_valid(s3_ov), .out_tag(s3_ot), .out_data(s3_od),
    .conflict(c3)
  );

  for (genvar p = 0; p < M; p++) begin : g_out
    assign out_valid[p] = s3_ov[p];
    assign out_b[p]     = s3_ot[p];
    assign out_j[p]     = s3_od[p][W +: JW];
    assign out_data[p]  = s3_od[p][W-1:0];
  end

  assign conflict = c1 || c3;

  if (!is_prime(M)) begin : g_bad_m
    $error("lpn: M must be prime");
  end
  if (!is_generator(G, M)) begin : g_bad_g
    $error("lpn: G must generate the multiplicative group modulo M");
  end
endmodule
