// tb_lane_agu: a lane address generator (40-bit addresses, 31 banks) is
// loaded with random starts and separations and stepped; after each step its
// residue address must equal (A mod 31, A mod 2^35) of A = start + n*stride,
// computed here in exact integer arithmetic. The first address must be
// visible one cycle after load, and each next one a cycle after step.
module tb_lane_agu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, step = 0;
  logic [39:0] start, stride;
  logic [4:0]  cur_bank;
  logic [34:0] cur_off;

  lane_agu #(.ADDR_W(40), .W(5), .PLUS_ONE(1'b0)) dut (
    .clk, .rst_n, .load, .start, .stride, .step, .cur_bank, .cur_off);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_addr(input longint unsigned a);
    checks += 2;
    if (longint'(cur_bank) != a % 31) begin
      failures++;
      if (failures < 10) $display("FAIL bank %0d expected %0d", cur_bank, a % 31);
    end
    if (cur_off != 35'(a)) failures++;
  endtask

  initial begin
    longint unsigned s0, k;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      s0 = {$urandom, $urandom} & 64'hFF_FFFF_FFFF;
      k  = (t % 5 == 0) ? 64'd31 * ($urandom % 1000) : 64'($urandom % (1 << 30));
      @(negedge clk);
      start = 40'(s0); stride = 40'(k); load = 1;
      @(negedge clk);
      load = 0;
      expect_addr(s0);
      for (int n = 1; n <= 40; n++) begin
        step = 1;
        @(negedge clk);
        step = 0;
        expect_addr(s0 + longint'(n) * k);
        // Holding step low keeps the address.
        @(negedge clk);
        expect_addr(s0 + longint'(n) * k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
