// tb_lpn: Linear Permutation Networks of 7 ports (the worked example,
// generator 3) and 31 ports. Every cycle a new set of messages enters with a
// fresh random multiplier a = 3^j and offset b; some inputs are left idle,
// as with fewer processors than banks. Each message from input i must leave
// at output a*i+b mod M (a computed here) exactly 6 (M = 7) or 10 (M = 31)
// cycles later, carrying its tags; idle inputs leave idle outputs, and the
// network never reports a conflict. The M = 7 run also checks, for j = 1 and
// b = 0, that input 3 lands on output 2 and input 6 on output 4. A third,
// combinational 7-port network (PIPE = 0) gets the same inputs and must show
// the same permutation within the cycle.
module tb_lpn;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  int cyc = 0;

  logic       v7i [7], v7o [7];
  logic [2:0] j7i [7], j7o [7], b7i [7], b7o [7];
  logic [7:0] d7i [7], d7o [7];
  logic       c7;
  logic       v7co [7];
  logic [2:0] j7co [7], b7co [7];
  logic [7:0] d7co [7];
  logic       c7c;
  logic       v31i [31], v31o [31];
  logic [4:0] j31i [31], j31o [31], b31i [31], b31o [31];
  logic [7:0] d31i [31], d31o [31];
  logic       c31;

  lpn #(.M(7), .G(3), .W(8)) dut7 (
    .clk, .rst_n, .in_valid(v7i), .in_j(j7i), .in_b(b7i), .in_data(d7i),
    .out_valid(v7o), .out_j(j7o), .out_b(b7o), .out_data(d7o), .conflict(c7));
  lpn #(.M(7), .G(3), .W(8), .PIPE(1'b0)) dut7c (
    .clk, .rst_n, .in_valid(v7i), .in_j(j7i), .in_b(b7i), .in_data(d7i),
    .out_valid(v7co), .out_j(j7co), .out_b(b7co), .out_data(d7co), .conflict(c7c));
  lpn #(.M(31), .G(3), .W(8)) dut31 (
    .clk, .rst_n, .in_valid(v31i), .in_j(j31i), .in_b(b31i), .in_data(d31i),
    .out_valid(v31o), .out_j(j31o), .out_b(b31o), .out_data(d31o), .conflict(c31));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int pw(int g, int k, int m);
    int r = 1;
    for (int i = 0; i < k; i++) r = (r * g) % m;
    return r;
  endfunction

  // Expected per due cycle: valid, data, tags per output.
  bit         e7v  [0:511][7];
  logic [7:0] e7d  [0:511][7];
  int         e7j  [0:511], e7b [0:511];
  bit         e31v [0:511][31];
  logic [7:0] e31d [0:511][31];
  int         e31j [0:511], e31b [0:511];
  bit         due7 [0:511], due31 [0:511];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && cyc < 512) begin
    if (due7[cyc]) for (int p = 0; p < 7; p++) begin
      checks++;
      if (v7o[p] != e7v[cyc][p]) failures++;
      else if (v7o[p] && (d7o[p] != e7d[cyc][p] || int'(j7o[p]) != e7j[cyc]
                          || int'(b7o[p]) != e7b[cyc])) failures++;
    end
    if (due31[cyc]) for (int p = 0; p < 31; p++) begin
      checks++;
      if (v31o[p] != e31v[cyc][p]) failures++;
      else if (v31o[p] && (d31o[p] != e31d[cyc][p] || int'(j31o[p]) != e31j[cyc]
                           || int'(b31o[p]) != e31b[cyc])) failures++;
    end
    checks++;
    if (c7 || c31) failures++;
  end

  initial begin
    int j, b, a;
    for (int c = 0; c < 512; c++) begin due7[c] = 0; due31[c] = 0; end
    for (int i = 0; i < 7; i++)  begin v7i[i] = 0; j7i[i] = 0; b7i[i] = 0; d7i[i] = 0; end
    for (int i = 0; i < 31; i++) begin v31i[i] = 0; j31i[i] = 0; b31i[i] = 0; d31i[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      // M = 7
      j = (n == 0) ? 1 : $urandom % 6;
      b = (n == 0) ? 0 : $urandom % 7;
      a = pw(3, j, 7);
      for (int p = 0; p < 7; p++) e7v[cyc + 6][p] = 0;
      e7j[cyc + 6] = j; e7b[cyc + 6] = b; due7[cyc + 6] = 1;
      for (int i = 0; i < 7; i++) begin
        v7i[i] = (n % 4 == 3) ? (i < 4) : 1'b1;
        j7i[i] = 3'(j); b7i[i] = 3'(b); d7i[i] = 8'($urandom);
        if (n == 0) d7i[i] = 8'(i);
        if (v7i[i]) begin
          e7v[cyc + 6][(a * i + b) % 7] = 1;
          e7d[cyc + 6][(a * i + b) % 7] = d7i[i];
        end
      end
      #1;
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (v7co[(a * i + b) % 7] != v7i[i] || c7c) failures++;
        else if (v7i[i] && (d7co[(a * i + b) % 7] != d7i[i]
                            || int'(j7co[(a * i + b) % 7]) != j
                            || int'(b7co[(a * i + b) % 7]) != b)) failures++;
      end
      // M = 31
      j = $urandom % 30;
      b = $urandom % 31;
      a = pw(3, j, 31);
      for (int p = 0; p < 31; p++) e31v[cyc + 10][p] = 0;
      e31j[cyc + 10] = j; e31b[cyc + 10] = b; due31[cyc + 10] = 1;
      for (int i = 0; i < 31; i++) begin
        v31i[i] = (n % 5 == 4) ? (i < 12) : 1'b1;
        j31i[i] = 5'(j); b31i[i] = 5'(b); d31i[i] = 8'($urandom);
        if (v31i[i]) begin
          e31v[cyc + 10][(a * i + b) % 31] = 1;
          e31d[cyc + 10][(a * i + b) % 31] = d31i[i];
        end
      end
      @(negedge clk);
    end
    for (int i = 0; i < 7; i++)  v7i[i] = 0;
    for (int i = 0; i < 31; i++) v31i[i] = 0;
    repeat (12) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Worked example: j = 1 (a = 3), b = 0 entered at the first stimulus cycle
  // (cycle 3), due at cycle 9: input 3 -> output 2, input 6 -> output 4.
  always @(negedge clk) if (rst_n && cyc == 9) begin
    checks += 2;
    if (!v7o[2] || d7o[2] != 8'd3) failures++;
    if (!v7o[4] || d7o[4] != 8'd6) failures++;
  end
endmodule
