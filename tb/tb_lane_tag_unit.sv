// tb_lane_tag_unit: the per-processor tag generators of all 31 lanes of the
// full-size system (40-bit addresses, M = 31, G = 3) and of all 17 lanes of
// a 17-bank system (M = 2^4 + 1, 24-bit addresses). For random separations a
// (some multiples of M) and random banks, each lane must give a j with
// 3^j mod M = a mod M, and a b that sends its input to the bank:
// (a*lane + b) mod M = bank, with a taken as 1 when a mod M = 0 and `seq`
// raised exactly then. Reference values use % on 64-bit integers. Tags are
// checked the cycle after `load`, and `bank` is changed after load to check
// that b follows it.
module tb_lane_tag_unit;
  localparam int unsigned MA = 31, MB = 17;
  int checks = 0, failures = 0;

  logic clk, rst_n, load;
  logic [39:0] stride_a;
  logic [23:0] stride_b;
  logic [4:0]  bank_a [MA], b_a [MA], j_a [MA];
  logic [4:0]  bank_b [MB], b_b [MB];
  logic [3:0]  j_b [MB];
  logic        seq_a [MA], seq_b [MB];

  for (genvar i = 0; i < MA; i++) begin : g_a
    lane_tag_unit #(.ADDR_W(40), .W(5), .PLUS_ONE(1'b0), .G(3), .LANE(i)) dut (
      .clk, .rst_n, .load, .stride(stride_a), .bank(bank_a[i]),
      .j(j_a[i]), .b(b_a[i]), .seq(seq_a[i])
    );
  end
  for (genvar i = 0; i < MB; i++) begin : g_b
    lane_tag_unit #(.ADDR_W(24), .W(4), .PLUS_ONE(1'b1), .G(3), .LANE(i)) dut (
      .clk, .rst_n, .load, .stride(stride_b), .bank(bank_b[i]),
      .j(j_b[i]), .b(b_b[i]), .seq(seq_b[i])
    );
  end

  always #5 clk = ~clk;

  function automatic int pw(int g, int k, int m);
    int r = 1;
    for (int i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sa, sb;
    int ra, rb, aa, ab, n_seq;
    n_seq = 0;
    clk = 0; rst_n = 0; load = 0;
    stride_a = '0; stride_b = '0;
    for (int i = 0; i < int'(MA); i++) bank_a[i] = '0;
    for (int i = 0; i < int'(MB); i++) bank_b[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      sa = {24'd0, 8'($urandom), 32'($urandom)};
      sb = {40'd0, 24'($urandom)};
      if (t % 10 == 3) sa = sa / 64 * MA;
      if (t % 10 == 7) sb = (sb / 32) * MB;
      if (t < 31) sa = longint'(t);
      if (t < 17) sb = longint'(t);
      stride_a = sa[39:0];
      stride_b = sb[23:0];
      load = 1;
      @(negedge clk);
      load = 0;
      stride_a = {8'($urandom), 32'($urandom)};   // loaded values must be held
      stride_b = 24'($urandom);
      ra = int'(sa % 64'(MA));
      rb = int'(sb % 64'(MB));
      aa = (ra == 0) ? 1 : ra;
      ab = (rb == 0) ? 1 : rb;
      if (ra == 0) n_seq++;
      for (int rep = 0; rep < 2; rep++) begin
        for (int i = 0; i < int'(MA); i++) bank_a[i] = 5'($urandom % MA);
        for (int i = 0; i < int'(MB); i++) bank_b[i] = 5'($urandom % MB);
        #1;
        for (int i = 0; i < int'(MA); i++) begin
          checks += 3;
          if (seq_a[i] != (ra == 0)) failures++;
          if (pw(3, int'(j_a[i]), MA) != aa) failures++;
          if ((aa * i + int'(b_a[i])) % MA != int'(bank_a[i])) failures++;
        end
        for (int i = 0; i < int'(MB); i++) begin
          checks += 3;
          if (seq_b[i] != (rb == 0)) failures++;
          if (pw(3, int'(j_b[i]), MB) != ab) failures++;
          if ((ab * i + int'(b_b[i])) % MB != int'(bank_b[i])) failures++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_seq == 0) failures++;
    $display("single-bank separations: %0d", n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
