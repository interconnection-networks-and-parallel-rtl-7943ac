// tb_lpn_rev: the return-direction networks of 7 and 31 ports, generator 3.
// Every cycle a fresh (j, b) is applied to all memory-side ports; the message
// entering at port a*i+b mod M (a = 3^j, computed here) must leave at
// processor port i exactly 6 (M = 7) or 10 (M = 31) cycles later. Some sets
// fill only part of the ports, as a superword with fewer elements does.
// No conflict may be reported.
module tb_lpn_rev;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int cyc = 0;

  logic       v7i [7], v7o [7];
  logic [2:0] j7i [7], b7i [7];
  logic [7:0] d7i [7], d7o [7];
  logic       c7;
  logic       v31i [31], v31o [31];
  logic [4:0] j31i [31], b31i [31];
  logic [7:0] d31i [31], d31o [31];
  logic       c31;

  lpn_rev #(.M(7), .G(3), .W(8)) dut7 (
    .clk, .rst_n, .in_valid(v7i), .in_j(j7i), .in_b(b7i), .in_data(d7i),
    .out_valid(v7o), .out_data(d7o), .conflict(c7));
  lpn_rev #(.M(31), .G(3), .W(8)) dut31 (
    .clk, .rst_n, .in_valid(v31i), .in_j(j31i), .in_b(b31i), .in_data(d31i),
    .out_valid(v31o), .out_data(d31o), .conflict(c31));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int pw(int g, int k, int m);
    int r = 1;
    for (int i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  bit         e7v  [0:511][7];
  logic [7:0] e7d  [0:511][7];
  bit         e31v [0:511][31];
  logic [7:0] e31d [0:511][31];
  bit         due  [0:511];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && cyc < 512 && due[cyc]) begin
    for (int p = 0; p < 7; p++) begin
      checks++;
      if (v7o[p] != e7v[cyc][p] || (v7o[p] && d7o[p] != e7d[cyc][p])) failures++;
    end
    for (int p = 0; p < 31; p++) begin
      checks++;
      if (v31o[p] != e31v[cyc][p] || (v31o[p] && d31o[p] != e31d[cyc][p])) failures++;
    end
    checks++;
    if (c7 || c31) failures++;
  end

  initial begin
    int j, b, a, v;
    for (int c = 0; c < 512; c++) begin
      due[c] = 0;
      for (int p = 0; p < 7; p++)  e7v[c][p] = 0;
      for (int p = 0; p < 31; p++) e31v[c][p] = 0;
    end
    for (int i = 0; i < 7; i++)  begin v7i[i] = 0; j7i[i] = 0; b7i[i] = 0; d7i[i] = 0; end
    for (int i = 0; i < 31; i++) begin v31i[i] = 0; j31i[i] = 0; b31i[i] = 0; d31i[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      due[cyc + 6] = 1;  // M = 7 and M = 31 sets share one due slot each
      j = $urandom % 6;
      b = $urandom % 7;
      a = pw(3, j, 7);
      for (int p = 0; p < 7; p++) begin v7i[p] = 0; e7v[cyc + 6][p] = 0; end
      for (int i = 0; i < 7; i++) begin
        v = (a * i + b) % 7;
        v7i[v] = (n % 3 == 2) ? (i < 3) : 1'b1;
        j7i[v] = 3'(j); b7i[v] = 3'(b); d7i[v] = 8'($urandom);
        e7v[cyc + 6][i] = v7i[v];
        e7d[cyc + 6][i] = d7i[v];
      end
      j = $urandom % 30;
      b = $urandom % 31;
      a = pw(3, j, 31);
      due[cyc + 10] = 1;
      for (int p = 0; p < 31; p++) begin v31i[p] = 0; e31v[cyc + 10][p] = 0; end
      for (int i = 0; i < 31; i++) begin
        v = (a * i + b) % 31;
        v31i[v] = (n % 4 == 1) ? (i < 9) : 1'b1;
        j31i[v] = 5'(j); b31i[v] = 5'(b); d31i[v] = 8'($urandom);
        e31v[cyc + 10][i] = v31i[v];
        e31d[cyc + 10][i] = d31i[v];
      end
      @(negedge clk);
    end
    for (int i = 0; i < 7; i++)  v7i[i] = 0;
    for (int i = 0; i < 31; i++) v31i[i] = 0;
    repeat (12) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
