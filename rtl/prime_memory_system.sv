// prime_memory_system: P processors sharing M = 2^W-1 (prime) memory banks
// through a pair of Linear Permutation Networks.
//
// An address A lives in bank A mod M at word A mod 2^(ADDR_W-W) of that bank
// (residue representation: every bank word is used). For any linear section
// whose separation k is not a multiple of M, the elements of one superword
// lie in distinct banks, and processor i's element lies in bank a*i + b
// (a = k mod M, b = bank of lane 0): exactly the permutation the Linear
// Permutation Network performs without blocking. So a whole superword moves
// between processors and banks in one network pass, and passes are pipelined
// one per cycle.
//
// Data path:
//   section_ctrl  turns a section command into per-lane requests (bank,
//                 offset) and the routing tags (j, b);
//   lpn           carries each request {write, offset, write data, bank,
//                 element index} from processor port i to bank a*i+b;
//   bank ports    M memories outside this module: a request on a bank port
//                 is a read or write at bank_addr; read data must be on
//                 bank_rdata MEM_LAT cycles later;
//   lpn_rev       carries read data back with the same tags, which were held
//                 per bank port for MEM_LAT cycles.
// Processor side: while proc_req[i] is high, lane i issues element
// proc_elem[i] of the section; on a write it takes proc_wdata[i] in that
// cycle. A processor not ready raises proc_hold[i]; with P = M the other
// lanes carry on (lanes of one section need not run in lockstep), otherwise
// the whole superword waits. Read data returns on proc_rvalid/proc_rdata/proc_relem
// 2*(ceil(log2(M-1)) + ceil(log2 M)) + MEM_LAT cycles after proc_req
// (21 cycles at the defaults). route_error flags, in the cycle it happens, a
// request reaching a bank other than its own or two messages meeting in a
// network; neither can happen with correct tags.
// Routing tags come from the central controller (the source design's SIMD
// arrangement). With DIST_TAGS = 1 each processor instead computes its own
// pair in a lane_tag_unit (the source design's distributed control); the
// routes are the same, only where the tags are formed changes, and the
// controller's tag outputs are then left unused.
// Defaults: 40-bit addresses, 31 banks and 31 processors, generator 3.
// Data width, command interface and MEM_LAT are this implementation's
// choices; the bank count, address width and generator come from the source
// design's examples.
module prime_memory_system
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  parameter int unsigned G        = 3,
  parameter int unsigned P        = 31,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned LEN_W    = 16,
  parameter int unsigned MEM_LAT  = 1,
  parameter bit          DIST_TAGS = 1'b0,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BW      = idx_w(M),
  localparam int unsigned JW      = idx_w(M-1),
  localparam int unsigned OFF_W   = ADDR_W - W
) (
  input  logic              clk,
  input  logic              rst_n,
  // section command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_start,
  input  logic [ADDR_W-1:0] cmd_stride,
  input  logic [LEN_W-1:0]  cmd_len,
  output logic              seq_mode,
  // processor side
  input  logic              proc_hold  [P],
  output logic              proc_req   [P],
  output logic [LEN_W-1:0]  proc_elem  [P],
  input  logic [DATA_W-1:0] proc_wdata [P],
  output logic              proc_rvalid[P],
  output logic [DATA_W-1:0] proc_rdata [P],
  output logic [LEN_W-1:0]  proc_relem [P],
  // memory side
  output logic              bank_req   [M],
  output logic              bank_we    [M],
  output logic [OFF_W-1:0]  bank_addr  [M],
  output logic [DATA_W-1:0] bank_wdata [M],
  input  logic [DATA_W-1:0] bank_rdata [M],
  output logic              route_error
);
  localparam int unsigned FW = 1 + OFF_W + DATA_W + BW + LEN_W;  // request
  localparam int unsigned RW = DATA_W + LEN_W;                   // response

  // Controller ---------------------------------------------------------
  logic             iss_valid [P];
  logic [BW-1:0]    iss_bank  [P];
  logic [OFF_W-1:0] iss_off   [P];
  logic [LEN_W-1:0] iss_elem  [P];
  logic [JW-1:0]    iss_j;
  logic [BW-1:0]    iss_b;
  logic             iss_we;

  section_ctrl #(
    .ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE), .G(G), .P(P), .LEN_W(LEN_W)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_write, .cmd_start, .cmd_stride, .cmd_len,
    .lane_hold(proc_hold),
    .iss_valid, .iss_bank, .iss_off, .iss_elem, .iss_j, .iss_b, .iss_we,
    .seq_mode
  );

  // Forward network ----------------------------------------------------
  logic          f_iv [M];
  logic [JW-1:0] f_ij [M];
  logic [BW-1:0] f_ib [M];
  logic [FW-1:0] f_id [M];
  logic          f_ov [M];
  logic [JW-1:0] f_oj [M];
  logic [BW-1:0] f_ob [M];
  logic [FW-1:0] f_od [M];
  logic          f_conflict, r_conflict;

  for (genvar i = 0; i < M; i++) begin : g_fwd_in
    if (i < P) begin : g_lane
      assign f_iv[i] = iss_valid[i];
      assign f_id[i] = {iss_we, iss_off[i], proc_wdata[i], iss_bank[i], iss_elem[i]};
      assign proc_req[i]  = iss_valid[i];
      assign proc_elem[i] = iss_elem[i];
    end else begin : g_idle
      assign f_iv[i] = 1'b0;
      assign f_id[i] = '0;
    end
    if (DIST_TAGS && i < P) begin : g_own_tags
      // Distributed control: the processor computes its own tags.
      logic seq_unused;
      lane_tag_unit #(
        .ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE), .G(G), .LANE(i)
      ) u_tag (
        .clk, .rst_n, .load(cmd_valid && cmd_ready), .stride(cmd_stride),
        .bank(iss_bank[i]), .j(f_ij[i]), .b(f_ib[i]), .seq(seq_unused)
      );
    end else begin : g_ctrl_tags
      assign f_ij[i] = iss_j;
      assign f_ib[i] = iss_b;
    end
  end

  lpn #(.M(M), .G(G), .W(FW), .PIPE(1'b1)) u_fwd (
    .clk, .rst_n,
    .in_valid(f_iv), .in_j(f_ij), .in_b(f_ib), .in_data(f_id),
    .out_valid(f_ov), .out_j(f_oj), .out_b(f_ob), .out_data(f_od),
    .conflict(f_conflict)
  );

  // Bank ports and response tags ----------------------------------------
  logic [M-1:0]  misroute;
  logic          r_iv [M];
  logic [JW-1:0] r_ij [M];
  logic [BW-1:0] r_ib [M];
  logic [RW-1:0] r_id [M];

  for (genvar p = 0; p < M; p++) begin : g_bank
    logic             req_we;
    logic [OFF_W-1:0] req_off;
    logic [DATA_W-1:0] req_wdata;
    logic [BW-1:0]    req_bank;
    logic [LEN_W-1:0] req_elem;
    assign {req_we, req_off, req_wdata, req_bank, req_elem} = f_od[p];

    assign bank_req[p]   = f_ov[p];
    assign bank_we[p]    = req_we;
    assign bank_addr[p]  = req_off;
    assign bank_wdata[p] = req_wdata;
    assign misroute[p]   = f_ov[p] && (req_bank != BW'(p));

    // Hold the routing tags of a read for the memory latency.
    logic             hv [MEM_LAT+1];
    logic [JW-1:0]    hj [MEM_LAT+1];
    logic [BW-1:0]    hb [MEM_LAT+1];
    logic [LEN_W-1:0] he [MEM_LAT+1];
    assign hv[0] = f_ov[p] && !req_we;
    assign hj[0] = f_oj[p];
    assign hb[0] = f_ob[p];
    assign he[0] = req_elem;
    for (genvar s = 0; s < MEM_LAT; s++) begin : g_hold
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) hv[s+1] <= 1'b0;
        else        hv[s+1] <= hv[s];
      end
      always_ff @(posedge clk) begin
        hj[s+1] <= hj[s];
        hb[s+1] <= hb[s];
        he[s+1] <= he[s];
      end
    end
    assign r_iv[p] = hv[MEM_LAT];
    assign r_ij[p] = hj[MEM_LAT];
    assign r_ib[p] = hb[MEM_LAT];
    assign r_id[p] = {bank_rdata[p], he[MEM_LAT]};
  end

  // Return network -------------------------------------------------------
  logic          r_ov [M];
  logic [RW-1:0] r_od [M];
  lpn_rev #(.M(M), .G(G), .W(RW), .PIPE(1'b1)) u_rev (
    .clk, .rst_n,
    .in_valid(r_iv), .in_j(r_ij), .in_b(r_ib), .in_data(r_id),
    .out_valid(r_ov), .out_data(r_od),
    .conflict(r_conflict)
  );

  for (genvar i = 0; i < P; i++) begin : g_proc_out
    assign proc_rvalid[i] = r_ov[i];
    assign {proc_rdata[i], proc_relem[i]} = r_od[i];
  end

  assign route_error = (|misroute) || f_conflict || r_conflict;
endmodule
