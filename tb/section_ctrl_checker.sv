// section_ctrl_checker: drives one section_ctrl (16-bit addresses, 7 banks,
// generator 3, P lanes) with NCMD random section commands and checks what it
// issues against values computed here:
//   * every element 0..len-1 is issued exactly once, by lane elem mod P,
//     with bank = A mod 7 and offset = A mod 2^13, A = start + elem*stride;
//   * the tags route each issuing lane i to its bank: 3^j*i + b = bank mod 7,
//     and j is the logarithm of stride mod 7 when that is not zero;
//   * stride mod 7 = 0 selects sequential mode, one element per cycle;
//   * without holds the issue takes ceil(len/P) cycles (len cycles in
//     sequential mode);
//   * every third command raises random lane holds; no held lane issues, and
//     lanes of different superwords issue in one cycle only when P = M
//     outside sequential mode.
// Counts sequential commands, short last superwords, changes of b inside a
// section and cycles mixing superwords. Used by tb_section_ctrl.
module section_ctrl_checker #(
  parameter int unsigned P    = 7,
  parameter int unsigned NCMD = 60
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_seq,
  output int   n_short,
  output int   n_bchange,
  output int   n_mixed,
  output bit   done
);
  localparam int M = 7;
  logic        cmd_valid = 0, cmd_ready, cmd_write = 0;
  logic [15:0] cmd_start = 0, cmd_stride = 0;
  logic [15:0] cmd_len = 0;
  logic        lane_hold [P];
  logic        iss_valid [P];
  logic [2:0]  iss_bank  [P];
  logic [12:0] iss_off   [P];
  logic [15:0] iss_elem  [P];
  logic [2:0]  iss_j, iss_b;
  logic        iss_we, seq_mode;

  section_ctrl #(.ADDR_W(16), .W(3), .PLUS_ONE(1'b0), .G(3), .P(P), .LEN_W(16)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_start, .cmd_stride,
    .cmd_len, .lane_hold, .iss_valid, .iss_bank, .iss_off, .iss_elem, .iss_j, .iss_b,
    .iss_we, .seq_mode);

  function automatic int pw(int g, int k, int m);
    int r = 1;
    for (int i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  initial begin
    int start, stride, len, cycles, nvalid, a, prev_b, addr;
    bit seen [0:299];
    bit we, hold_mode, mixed;
    int sw;
    checks = 0; failures = 0; n_seq = 0; n_short = 0; n_bchange = 0; n_mixed = 0; done = 0;
    for (int i = 0; i < int'(P); i++) lane_hold[i] = 0;
    @(posedge rst_n);
    for (int c = 0; c < NCMD; c++) begin
      len    = 1 + $urandom % 60;
      if (c % 10 == 9) len = 2 * P;
      stride = (c % 4 == 3) ? M * (1 + $urandom % 40) : 1 + $urandom % 300;
      start  = $urandom % 40000;
      we     = 1'($urandom);
      hold_mode = (c % 3 == 1);
      for (int e = 0; e < 300; e++) seen[e] = 0;
      @(negedge clk);
      cmd_valid = 1; cmd_start = 16'(start); cmd_stride = 16'(stride);
      cmd_len = 16'(len); cmd_write = we;
      @(negedge clk);   // taken at the edge between
      cmd_valid = 0;
      checks++;
      if (cmd_ready) failures++;
      cycles = 0;
      prev_b = -1;
      while (!cmd_ready) begin
        for (int i = 0; i < int'(P); i++) lane_hold[i] = hold_mode && ($urandom % 10 < 3);
        #1;
        nvalid = 0;
        mixed  = 0;
        sw     = -1;
        for (int i = 0; i < int'(P); i++) if (iss_valid[i]) begin
          nvalid++;
          checks++;
          if (lane_hold[i]) failures++;
          if (sw >= 0 && sw != int'(iss_elem[i]) / int'(P)) mixed = 1;
          sw = int'(iss_elem[i]) / int'(P);
        end
        if (mixed) begin
          n_mixed++;
          if (seq_mode || P != M) failures++;
        end
        if (nvalid > 0) begin
          cycles++;
          checks++;
          if (seq_mode != (stride % M == 0) || iss_we != we) failures++;
          if (seq_mode) begin
            checks++;
            if (nvalid != 1) failures++;
          end else begin
            checks++;
            if (pw(3, int'(iss_j), M) != stride % M) failures++;
            if (nvalid < int'(P) && !hold_mode) n_short++;
            if (prev_b >= 0 && prev_b != int'(iss_b)) n_bchange++;
            prev_b = int'(iss_b);
          end
          a = pw(3, int'(iss_j), M);
          for (int i = 0; i < int'(P); i++) if (iss_valid[i]) begin
            addr = start + int'(iss_elem[i]) * stride;
            checks += 4;
            if (int'(iss_elem[i]) >= len || int'(iss_elem[i]) % int'(P) != i
                || seen[iss_elem[i]]) failures++;
            else seen[iss_elem[i]] = 1;
            if (int'(iss_bank[i]) != addr % M) failures++;
            if (int'(iss_off[i]) != addr % 8192) failures++;
            if ((a * i + int'(iss_b)) % M != int'(iss_bank[i])) failures++;
          end
        end
        @(negedge clk);
      end
      for (int i = 0; i < int'(P); i++) lane_hold[i] = 0;
      if (stride % M == 0) n_seq++;
      checks += 2;
      if (!hold_mode && cycles != ((stride % M == 0) ? len : (len + int'(P) - 1) / int'(P))) begin
        failures++;
        $display("FAIL P=%0d issue took %0d cycles for len %0d", P, cycles, len);
      end
      for (int e = 0; e < len; e++) if (!seen[e]) begin
        failures++;
        break;
      end
    end
    done = 1;
  end
endmodule
