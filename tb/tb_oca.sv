// tb_oca: exhaustive check of the 5-bit one's complement adder.
// Every operand pair is applied; the result must be congruent to a+b modulo
// 31 and stay within 5 bits (all-ones is an allowed spelling of zero).
module tb_oca;
  int checks = 0, failures = 0;
  logic [4:0] a, b, s;

  oca #(.W(5)) dut (.a, .b, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        a = 5'(x);
        b = 5'(y);
        #1;
        checks++;
        if ((int'(s) % 31) != ((x + y) % 31)) begin
          failures++;
          if (failures < 10) $display("FAIL oca %0d+%0d gave %0d", x, y, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
