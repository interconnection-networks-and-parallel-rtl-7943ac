// barrel_shifter: pipelined circular barrel shifter with routing tags.
//
// N element positions, ceil(log2 N) stages. Stage i can move an element
// 2^i positions around the ring (upward, position p to p+2^i mod N, or
// downward when DOWN = 1); composed, the stages rotate by any amount 0..N-1.
// Control is distributed: each element carries its own shift amount as a tag,
// and bit i of that tag decides whether the element moves in stage i. If all
// valid elements carry the same tag this is exactly a centrally controlled
// shifter and no two elements ever meet; if tags differ, two elements can
// claim one position in a stage, which is reported on `conflict` (the moving
// element wins). Invalid positions are empty and claim nothing.
// With PIPE = 1 a register follows each stage: latency ceil(log2 N) cycles,
// a new set of inputs accepted every cycle, and since tags travel with their
// data, successive sets may use different shifts. PIPE = 0 is combinational.
// Stage structure and tag control follow the source design; the conflict report,
// the payload/valid format and the reset of the valid bits are this
// implementation's choices.
module barrel_shifter
  import pms_pkg::*;
#(
  parameter int unsigned N     = 6,
  parameter int unsigned W     = 8,
  parameter int unsigned TAG_W = idx_w(N),
  parameter bit          DOWN  = 1'b0,
  parameter bit          PIPE  = 1'b1,
  localparam int unsigned STAGES = idx_w(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid [N],
  input  logic [TAG_W-1:0] in_tag   [N],
  input  logic [W-1:0]     in_data  [N],
  output logic             out_valid[N],
  output logic [TAG_W-1:0] out_tag  [N],
  output logic [W-1:0]     out_data [N],
  output logic             conflict
);
  // Each stage holds its own input and output arrays; stage s reads the
  // outputs of stage s-1, and the outputs of the last stage are the result.
  logic [STAGES-1:0] stage_conflict;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned SH = (1 << s) % N;
    logic             iv [N], nv [N], ov [N];
    logic [TAG_W-1:0] it [N], nt [N], ot [N];
    logic [W-1:0]     id [N], nd [N], od [N];
    logic [N-1:0]     clash;

    for (genvar p = 0; p < N; p++) begin : g_pos
      // Element that arrives at p if it moves in this stage.
      localparam int unsigned SRC = DOWN ? (p + SH) % N : (p + N - SH) % N;
      logic take_moved, take_stay;
      if (s == 0) begin : g_first
        assign iv[p] = in_valid[p];
        assign it[p] = in_tag[p];
        assign id[p] = in_data[p];
      end else begin : g_next
        assign iv[p] = g_stage[s-1].ov[p];
        assign it[p] = g_stage[s-1].ot[p];
        assign id[p] = g_stage[s-1].od[p];
      end
      assign take_moved = iv[SRC] &&  it[SRC][s];
      assign take_stay  = iv[p]   && !it[p][s];
      assign clash[p]   = take_moved && take_stay;
      assign nv[p] = take_moved || take_stay;
      assign nt[p] = take_moved ? it[SRC] : it[p];
      assign nd[p] = take_moved ? id[SRC] : id[p];
    end
    assign stage_conflict[s] = |clash;

    if (PIPE) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int p = 0; p < int'(N); p++) ov[p] <= 1'b0;
        end else begin
          for (int p = 0; p < int'(N); p++) ov[p] <= nv[p];
        end
      end
      always_ff @(posedge clk) begin
        for (int p = 0; p < int'(N); p++) begin
          ot[p] <= nt[p];
          od[p] <= nd[p];
        end
      end
    end else begin : g_comb
      always_comb begin
        for (int p = 0; p < int'(N); p++) begin
          ov[p] = nv[p];
          ot[p] = nt[p];
          od[p] = nd[p];
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < int'(N); p++) begin
      out_valid[p] = g_stage[STAGES-1].ov[p];
      out_tag[p]   = g_stage[STAGES-1].ot[p];
      out_data[p]  = g_stage[STAGES-1].od[p];
    end
  end

  assign conflict = |stage_conflict;
endmodule
