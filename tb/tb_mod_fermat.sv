// tb_mod_fermat: remainders modulo 17 (4-bit digits) and 257 (8-bit digits)
// of 40-bit numbers against the arithmetic remainder.
module tb_mod_fermat;
  int checks = 0, failures = 0;
  logic [39:0] a;
  logic [4:0]  r17;
  logic [8:0]  r257;

  mod_fermat #(.ADDR_W(40), .W(4)) dut17  (.a, .r(r17));
  mod_fermat #(.ADDR_W(40), .W(8)) dut257 (.a, .r(r257));

  task automatic check(input logic [39:0] v);
    a = v;
    #1;
    checks += 2;
    if (longint'(r17) != longint'(v) % 17) begin
      failures++;
      if (failures < 10) $display("FAIL mod17(%0d) = %0d", v, r17);
    end
    if (longint'(r257) != longint'(v) % 257) begin
      failures++;
      if (failures < 10) $display("FAIL mod257(%0d) = %0d", v, r257);
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
    check(40'd16);
    check(40'd17);
    check(40'd256);
    check(40'd257);
    check(40'hF0F0F0F0F0);
    check(40'h0F0F0F0F0F);
    for (int i = 0; i < 40; i++) check(40'd1 << i);
    for (int i = 0; i < 5000; i++) check({$urandom, $urandom} & 40'hFF_FFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
