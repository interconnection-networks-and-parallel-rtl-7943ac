// tb_addr_convert: binary to residue conversion for 31 banks (5-bit digits)
// and 17 banks (4-bit digits) of a 40-bit address. The bank must be the
// remainder modulo M and the offset the low 40-W bits. A sweep of 31*64
// consecutive addresses must also hit every (bank, offset) pair of that
// window exactly once, i.e. no two addresses share a bank word.
module tb_addr_convert;
  int checks = 0, failures = 0;
  logic [39:0] a;
  logic [4:0]  bank31;
  logic [34:0] off31;
  logic [4:0]  bank17;
  logic [35:0] off17;

  addr_convert #(.ADDR_W(40), .W(5), .PLUS_ONE(1'b0)) dut31 (.addr(a), .bank(bank31), .offset(off31));
  addr_convert #(.ADDR_W(40), .W(4), .PLUS_ONE(1'b1)) dut17 (.addr(a), .bank(bank17), .offset(off17));

  task automatic check(input logic [39:0] v);
    a = v;
    #1;
    checks += 4;
    if (longint'(bank31) != longint'(v) % 31) failures++;
    if (off31 != v[34:0]) failures++;
    if (longint'(bank17) != longint'(v) % 17) failures++;
    if (off17 != v[35:0]) failures++;
  endtask

  bit seen [31][64];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) check({$urandom, $urandom} & 40'hFF_FFFF_FFFF);
    // Addresses 0 .. 31*64-1 with 6-bit offsets: a bijection onto 31x64 words.
    for (int b = 0; b < 31; b++) for (int o = 0; o < 64; o++) seen[b][o] = 1'b0;
    for (int v = 0; v < 31 * 64; v++) begin
      a = 40'(v);
      #1;
      checks++;
      if (seen[bank31][off31[5:0]]) failures++;
      seen[bank31][off31[5:0]] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
