// lpn_rev: Linear Permutation Network, memory side back to processor side.
//
// The mirror image of `lpn`, used for the return path (read data). A message
// entering memory-side port v with tags (j, b) leaves at processor-side port
// i with a*i + b = v (mod M), a = G^j mod M; with the same tags it undoes
// exactly the permutation `lpn` performed. The message passes the
// subnetworks in reverse order and each rotation runs the other way:
//   3'. M-element barrel shifter rotating down by b (subtracts b),
//   2'. wiring from natural order back to geometric order (line G^k to
//       position k, line 0 bypasses),
//   1'. (M-1)-element barrel shifter rotating down by j (divides by a);
//       position k then leaves at processor port G^k.
// Line 0 is delayed by the depth of shifter 1' to stay aligned. Latency with
// PIPE = 1 is ceil(log2 M) + ceil(log2(M-1)) cycles. The source design asks for a
// second network with data flowing the opposite way; this mirrored
// construction and its interface are this implementation's.
module lpn_rev
  import pms_pkg::*;
#(
  parameter int unsigned M    = 7,
  parameter int unsigned G    = 3,
  parameter int unsigned W    = 8,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned BW  = idx_w(M),
  localparam int unsigned JW  = idx_w(M-1),
  localparam int unsigned D1  = PIPE ? idx_w(M-1) : 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid [M],   // indexed by memory bank number
  input  logic [JW-1:0] in_j     [M],
  input  logic [BW-1:0] in_b     [M],
  input  logic [W-1:0]  in_data  [M],
  output logic          out_valid[M],   // indexed by processor number
  output logic [W-1:0]  out_data [M],
  output logic          conflict
);
  localparam int unsigned P3W = JW + W;
  localparam int unsigned P1W = W;

  // Subnetwork 3' ----------------------------------------------------------
  logic           s3_ov [M];
  logic [BW-1:0]  s3_ot [M];
  logic [P3W-1:0] s3_od [M];
  logic [P3W-1:0] s3_id [M];
  logic           c1, c3;

  for (genvar v = 0; v < M; v++) begin : g_in
    assign s3_id[v] = {in_j[v], in_data[v]};
  end

  barrel_shifter #(.N(M), .W(P3W), .TAG_W(BW), .DOWN(1'b1), .PIPE(PIPE)) u_bs3 (
    .clk, .rst_n,
    .in_valid(in_valid), .in_tag(in_b), .in_data(s3_id),
    .out_valid(s3_ov), .out_tag(s3_ot), .out_data(s3_od),
    .conflict(c3)
  );

  // Subnetwork 2': natural order to geometric order ------------------------
  logic           s1_iv [M-1];
  logic [JW-1:0]  s1_it [M-1];
  logic [P1W-1:0] s1_id [M-1];
  for (genvar k = 0; k < M - 1; k++) begin : g_sub2
    localparam int unsigned SRC = pow_mod(G, k, M);
    assign s1_iv[k] = s3_ov[SRC];
    assign s1_it[k] = s3_od[SRC][W +: JW];
    assign s1_id[k] = s3_od[SRC][W-1:0];
  end

  // Line 0 bypasses subnetwork 1', delayed to match it.
  logic         z_v [D1+1];
  logic [W-1:0] z_d [D1+1];
  assign z_v[0] = s3_ov[0];
  assign z_d[0] = s3_od[0][W-1:0];
  for (genvar s = 0; s < D1; s++) begin : g_delay0
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) z_v[s+1] <= 1'b0;
      else        z_v[s+1] <= z_v[s];
    end
    always_ff @(posedge clk) z_d[s+1] <= z_d[s];
  end

  // Subnetwork 1' ----------------------------------------------------------
  logic           s1_ov [M-1];
  logic [JW-1:0]  s1_ot [M-1];
  logic [P1W-1:0] s1_od [M-1];
  barrel_shifter #(.N(M-1), .W(P1W), .TAG_W(JW), .DOWN(1'b1), .PIPE(PIPE)) u_bs1 (
    .clk, .rst_n,
    .in_valid(s1_iv), .in_tag(s1_it), .in_data(s1_id),
    .out_valid(s1_ov), .out_tag(s1_ot), .out_data(s1_od),
    .conflict(c1)
  );

  assign out_valid[0] = z_v[D1];
  assign out_data[0]  = z_d[D1];
  for (genvar k = 0; k < M - 1; k++) begin : g_out
    localparam int unsigned DST = pow_mod(G, k, M);
    assign out_valid[DST] = s1_ov[k];
    assign out_data[DST]  = s1_od[k];
  end

  assign conflict = c1 || c3;

  if (!is_prime(M)) begin : g_bad_m
    $error("lpn_rev: M must be prime");
  end
  if (!is_generator(G, M)) begin : g_bad_g
    $error("lpn_rev: G must generate the multiplicative group modulo M");
  end
endmodule
