// tb_mod_mersenne: the 40-bit, 5-bit-digit remainder tree against the
// arithmetic remainder modulo 31, for edge values and random addresses.
// The output must be in 0..30 (the all-ones sum folded to zero).
module tb_mod_mersenne;
  int checks = 0, failures = 0;
  logic [39:0] a;
  logic [4:0]  r;

  mod_mersenne #(.ADDR_W(40), .W(5)) dut (.a, .r);

  task automatic check(input logic [39:0] v);
    longint unsigned expv;
    a = v;
    #1;
    expv = longint'(v) % 31;
    checks++;
    if (longint'(r) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL mod31(%0d) = %0d, expected %0d", v, r, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(40'd31);
    check(40'd62);
    check(40'd30);
    check(40'h1F);
    check(40'h3FF);
    for (int i = 0; i < 40; i++) check(40'd1 << i);
    for (int i = 0; i < 5000; i++) check({$urandom, $urandom} & 40'hFF_FFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
