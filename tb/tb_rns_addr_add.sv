// tb_rns_addr_add: residue addition and subtraction for M = 31 and M = 17.
// Random binary addresses X and Y are converted by the testbench itself; the
// sum (or difference) of their residues must equal the residues of X+Y (or
// X-Y, taken modulo M*2^35 resp. M*2^36, the size of the residue address
// space). is_zero must be high exactly when the result is address 0, which
// X - X and a few constructed pairs produce.
module tb_rns_addr_add;
  int checks = 0, failures = 0;
  logic        sub;
  logic [4:0]  ab31, bb31, sb31;
  logic [34:0] ao31, bo31, so31;
  logic [4:0]  ab17, bb17, sb17;
  logic [35:0] ao17, bo17, so17;
  logic        z31, z17;

  rns_addr_add #(.ADDR_W(40), .W(5), .PLUS_ONE(1'b0)) dut31 (.sub,
    .a_bank(ab31), .a_off(ao31), .b_bank(bb31), .b_off(bo31), .s_bank(sb31), .s_off(so31), .is_zero(z31));
  rns_addr_add #(.ADDR_W(40), .W(4), .PLUS_ONE(1'b1)) dut17 (.sub,
    .a_bank(ab17), .a_off(ao17), .b_bank(bb17), .b_off(bo17), .s_bank(sb17), .s_off(so17), .is_zero(z17));

  localparam longint unsigned SPACE31 = 64'd31 << 35;
  localparam longint unsigned SPACE17 = 64'd17 << 36;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, y, s31, s17;
    int nzero = 0;
    for (int i = 0; i < 8000; i++) begin
      x = ({$urandom, $urandom} & 64'hFF_FFFF_FFFF) % SPACE17;
      y = ({$urandom, $urandom} & 64'hFF_FFFF_FFFF) % SPACE17;
      sub = 1'(i % 2);
      if (i < 4) begin
        x = 30 + 64'(i);
        y = 31 - 64'(i);
      end
      if (i % 50 == 1) y = x;
      if (sub) begin
        s31 = ((x % SPACE31) + SPACE31 - (y % SPACE31)) % SPACE31;
        s17 = (x + SPACE17 - y) % SPACE17;
      end else begin
        s31 = ((x % SPACE31) + (y % SPACE31)) % SPACE31;
        s17 = (x + y) % SPACE17;
      end
      ab31 = 5'(x % 31); ao31 = 35'(x); bb31 = 5'(y % 31); bo31 = 35'(y);
      ab17 = 5'(x % 17); ao17 = 36'(x); bb17 = 5'(y % 17); bo17 = 36'(y);
      #1;
      checks += 6;
      if (longint'(sb31) != s31 % 31) failures++;
      if (so31 != 35'(s31)) failures++;
      if (longint'(sb17) != s17 % 17) failures++;
      if (so17 != 36'(s17)) failures++;
      if (z31 != (s31 == 0)) failures++;
      if (z17 != (s17 == 0)) failures++;
      if (s31 == 0) nzero++;
    end
    checks++;
    if (nzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
