// tb_logmod_rom: the discrete-logarithm tables for M = 7 and M = 31 with
// generator 3. For every x in 1..M-1, 3^j mod M (computed here) must give x
// back; x = 0 must raise `zero`. Also checks the M = 7 values 3^0..3^5 =
// 1, 3, 2, 6, 4, 5 (the input order of the 7-port network).
module tb_logmod_rom;
  int checks = 0, failures = 0;
  logic [2:0] x7, j7;
  logic       z7;
  logic [4:0] x31, j31;
  logic       z31;

  logmod_rom #(.M(7),  .G(3)) dut7  (.x(x7),  .j(j7),  .zero(z7));
  logmod_rom #(.M(31), .G(3)) dut31 (.x(x31), .j(j31), .zero(z31));

  function automatic int pw(int g, int k, int m);
    int r = 1;
    for (int i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order7 [6] = '{1, 3, 2, 6, 4, 5};
    x7 = 0; x31 = 0;
    #1;
    checks += 2;
    if (!z7) failures++;
    if (!z31) failures++;
    for (int x = 1; x < 7; x++) begin
      x7 = 3'(x);
      #1;
      checks++;
      if (z7 || pw(3, int'(j7), 7) != x) failures++;
    end
    for (int k = 0; k < 6; k++) begin
      x7 = 3'(order7[k]);
      #1;
      checks++;
      if (int'(j7) != k) failures++;
    end
    for (int x = 1; x < 31; x++) begin
      x31 = 5'(x);
      #1;
      checks++;
      if (z31 || int'(j31) > 29 || pw(3, int'(j31), 31) != x) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
