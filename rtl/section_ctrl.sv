// section_ctrl: SIMD controller for accessing one linear section.
//
// A linear section is given by its first address v0, separation k and length
// l (addresses v0, v0+k, ..., v0+(l-1)k). Its elements are handed to the P
// processor lanes a superword at a time: in superword s, lane i takes element
// s*P + i, address v0 + (s*P+i)*k. Each lane has a residue address generator
// (lane_agu) loaded with v0 + i*k and separation P*k, so later addresses come
// from additions only. The network settings are worked out once per section:
// k is reduced modulo M with the remainder hardware, and the logarithm table
// gives j = log_mod(k mod M), the shift of the first subnetwork. The shift of
// the third subnetwork is the bank of lane 0's current address; with P = M it
// stays the same for the whole section, with P < M it changes from superword
// to superword. Both shift amounts go out with every request as routing tags.
// When k mod M = 0 every element lies in one bank and the network cannot
// spread them: the controller then issues one lane per cycle (sequential
// mode), steering lane c with tags j = 0 and b = bank - c mod M.
//
// A lane that is not ready raises lane_hold. With P = M (and k mod M not 0)
// every lane keeps using one bank for the whole section and the routing tags
// never change, so lanes need not move in lockstep: a held lane simply issues
// later, and lanes may be working on different superwords in one cycle.
// With P < M, or in sequential mode, the tags belong to one superword, so a
// hold on any lane that still has work stalls the whole superword.
//
// Timing: a command is taken in a cycle with cmd_valid and cmd_ready; one
// cycle loads the lanes; then, without holds, one superword is issued per
// cycle (P cycles per superword in sequential mode) and cmd_ready returns in
// the cycle after the last one. A command with length 0 is taken and
// ignored. The issue outputs depend on registered state and lane_hold.
// Taking j from a table, b as start bank, sequential handling of
// k mod M = 0 and lanes that need not run in lockstep within a section
// follow the source design; the command interface, the hold inputs, the
// per-lane start computation and the one-cycle load are this
// implementation's choices.
module section_ctrl
  import pms_pkg::*;
#(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  parameter int unsigned G        = 3,
  parameter int unsigned P        = 31,
  parameter int unsigned LEN_W    = 16,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned BW      = idx_w(M),
  localparam int unsigned JW      = idx_w(M-1),
  localparam int unsigned OFF_W   = ADDR_W - W
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [ADDR_W-1:0] cmd_start,
  input  logic [ADDR_W-1:0] cmd_stride,
  input  logic [LEN_W-1:0]  cmd_len,
  // lanes not ready to issue this cycle
  input  logic              lane_hold [P],
  // issued requests, one set per cycle
  output logic              iss_valid [P],
  output logic [BW-1:0]     iss_bank  [P],
  output logic [OFF_W-1:0]  iss_off   [P],
  output logic [LEN_W-1:0]  iss_elem  [P],
  output logic [JW-1:0]     iss_j,
  output logic [BW-1:0]     iss_b,
  output logic              iss_we,
  output logic              seq_mode
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;
  state_t state;

  // Lanes work independently when the routing tags cannot change.
  localparam bit FREE_LANES = (P == M);

  logic [ADDR_W-1:0] start_r, stride_r;
  logic [LEN_W-1:0]  len_r;
  logic              we_r;
  logic [JW-1:0]     j_r;
  logic              seq_r;
  logic [idx_w(P)-1:0] seq_lane;
  logic [LEN_W:0]    lane_elem [P];   // next element of each lane

  // Network setting for the separation.
  logic [BW-1:0]    k_bank;
  logic [OFF_W-1:0] k_off_unused;
  logic [JW-1:0]    k_log;
  logic             k_zero;
  addr_convert #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE)) u_cvt_k (
    .addr(stride_r), .bank(k_bank), .offset(k_off_unused)
  );
  logmod_rom #(.M(M), .G(G)) u_log (.x(k_bank), .j(k_log), .zero(k_zero));

  // Lanes.
  logic [BW-1:0]    lane_bank [P];
  logic [OFF_W-1:0] lane_off  [P];
  logic             active    [P];    // lane still has elements
  logic             step      [P];
  logic             load;
  for (genvar i = 0; i < P; i++) begin : g_lane
    lane_agu #(.ADDR_W(ADDR_W), .W(W), .PLUS_ONE(PLUS_ONE)) u_agu (
      .clk, .rst_n,
      .load,
      .start (start_r + ADDR_W'(i) * stride_r),
      .stride(ADDR_W'(P) * stride_r),
      .step  (step[i]),
      .cur_bank(lane_bank[i]),
      .cur_off (lane_off[i])
    );
    assign active[i] = (state == S_RUN) && (lane_elem[i] < {1'b0, len_r});
  end
  assign load = (state == S_LOAD);

  // Hold of any lane that still has work; last lane of a sequential
  // superword; whether any lane has work after this cycle.
  logic any_hold, seq_last, more;
  always_comb begin
    any_hold   = 1'b0;
    seq_last   = 1'b1;
    for (int i = 0; i < int'(P); i++) begin
      if (active[i] && lane_hold[i]) any_hold = 1'b1;
      if (i > int'(seq_lane) && active[i]) seq_last = 1'b0;
    end
  end

  always_comb begin
    more = 1'b0;
    for (int i = 0; i < int'(P); i++)
      if (lane_elem[i] + (step[i] ? (LEN_W+1)'(P) : '0) < {1'b0, len_r}) more = 1'b1;
  end

  // Bank of the lane served in sequential mode.
  logic [BW-1:0] seq_bank;
  logic          seq_hold;
  always_comb begin
    seq_bank = '0;
    seq_hold = 1'b0;
    for (int i = 0; i < int'(P); i++)
      if (seq_lane == idx_w(P)'(i)) begin
        seq_bank = lane_bank[i];
        seq_hold = lane_hold[i];
      end
  end

  always_comb begin
    for (int i = 0; i < int'(P); i++) begin
      iss_bank[i] = lane_bank[i];
      iss_off[i]  = lane_off[i];
      iss_elem[i] = lane_elem[i][LEN_W-1:0];
      if (seq_r)           iss_valid[i] = active[i] && (seq_lane == idx_w(P)'(i)) && !lane_hold[i];
      else if (FREE_LANES) iss_valid[i] = active[i] && !lane_hold[i];
      else                 iss_valid[i] = active[i] && !any_hold;
      // Sequential mode moves all lanes on after the superword's last lane.
      step[i] = seq_r ? (active[0] && seq_last && !seq_hold) : iss_valid[i];
    end
    iss_we = we_r;
    if (seq_r) begin
      iss_j = '0;
      iss_b = (seq_bank >= BW'(seq_lane)) ? seq_bank - BW'(seq_lane)
                                          : seq_bank + BW'(M) - BW'(seq_lane);
    end else begin
      iss_j = j_r;
      iss_b = lane_bank[0];   // with P = M this bank never changes
    end
  end

  assign cmd_ready = (state == S_IDLE);
  assign seq_mode  = seq_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      start_r  <= '0;
      stride_r <= '0;
      len_r    <= '0;
      we_r     <= 1'b0;
      j_r      <= '0;
      seq_r    <= 1'b0;
      seq_lane <= '0;
      for (int i = 0; i < int'(P); i++) lane_elem[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid && cmd_len != '0) begin
          start_r  <= cmd_start;
          stride_r <= cmd_stride;
          len_r    <= cmd_len;
          we_r     <= cmd_write;
          seq_lane <= '0;
          for (int i = 0; i < int'(P); i++) lane_elem[i] <= (LEN_W+1)'(i);
          state    <= S_LOAD;
        end
        S_LOAD: begin
          j_r   <= k_log;
          seq_r <= k_zero;
          state <= S_RUN;
        end
        S_RUN: begin
          for (int i = 0; i < int'(P); i++)
            if (step[i]) lane_elem[i] <= lane_elem[i] + (LEN_W+1)'(P);
          if (seq_r && !seq_hold) seq_lane <= seq_last ? '0 : seq_lane + 1'b1;
          if (!more) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  if (P > M) begin : g_bad_p
    $error("section_ctrl: P must not exceed the number of banks M");
  end
endmodule
