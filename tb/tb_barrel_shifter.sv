// tb_barrel_shifter: pipelined circular barrel shifters of 6 (upward) and 7
// (downward) elements. A new random input set with a new random shift is
// applied every cycle (all tags equal, i.e. central control); each set must
// come out exactly 3 cycles later, rotated by its own shift, with no
// conflict. Finally two elements with different tags are steered onto the
// same position, which must raise `conflict`.
module tb_barrel_shifter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic       iv6 [6], ov6 [6];
  logic [2:0] it6 [6], ot6 [6];
  logic [7:0] id6 [6], od6 [6];
  logic       c6;
  logic       iv7 [7], ov7 [7];
  logic [2:0] it7 [7], ot7 [7];
  logic [7:0] id7 [7], od7 [7];
  logic       c7;

  barrel_shifter #(.N(6), .W(8), .DOWN(1'b0), .PIPE(1'b1)) dut6 (
    .clk, .rst_n, .in_valid(iv6), .in_tag(it6), .in_data(id6),
    .out_valid(ov6), .out_tag(ot6), .out_data(od6), .conflict(c6));
  barrel_shifter #(.N(7), .W(8), .DOWN(1'b1), .PIPE(1'b1)) dut7 (
    .clk, .rst_n, .in_valid(iv7), .in_tag(it7), .in_data(id7),
    .out_valid(ov7), .out_tag(ot7), .out_data(od7), .conflict(c7));

  always #5 clk = ~clk;

  // Expected outputs, indexed by the cycle they are due.
  logic [7:0] exp6 [0:255][6];
  logic [7:0] exp7 [0:255][7];
  bit         due  [0:255];
  int cyc = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // Compare each cycle (at negedge, before new inputs are driven).
  always @(negedge clk) if (rst_n && cyc < 256 && due[cyc]) begin
    for (int p = 0; p < 6; p++) begin
      checks++;
      if (!ov6[p] || od6[p] != exp6[cyc][p]) failures++;
    end
    for (int p = 0; p < 7; p++) begin
      checks++;
      if (!ov7[p] || od7[p] != exp7[cyc][p]) failures++;
    end
    checks++;
    if (c6 || c7) failures++;
  end

  initial begin
    int sh6, sh7;
    for (int c = 0; c < 256; c++) due[c] = 0;
    for (int p = 0; p < 6; p++) begin iv6[p] = 0; it6[p] = 0; id6[p] = 0; end
    for (int p = 0; p < 7; p++) begin iv7[p] = 0; it7[p] = 0; id7[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      sh6 = $urandom % 6;
      sh7 = $urandom % 7;
      for (int p = 0; p < 6; p++) begin
        iv6[p] = 1; it6[p] = 3'(sh6); id6[p] = 8'($urandom);
        exp6[cyc + 3][(p + sh6) % 6] = id6[p];
      end
      for (int p = 0; p < 7; p++) begin
        iv7[p] = 1; it7[p] = 3'(sh7); id7[p] = 8'($urandom);
        exp7[cyc + 3][(p + 7 - sh7) % 7] = id7[p];
      end
      due[cyc + 3] = 1;
      @(negedge clk);
    end
    for (int p = 0; p < 6; p++) iv6[p] = 0;
    for (int p = 0; p < 7; p++) iv7[p] = 0;
    repeat (5) @(negedge clk);
    // Distributed control with unequal tags: element 0 shifts by 1 onto
    // position 1, element 1 stays: both claim position 1 in stage 0.
    iv6[0] = 1; it6[0] = 3'd1; id6[0] = 8'hAA;
    iv6[1] = 1; it6[1] = 3'd0; id6[1] = 8'hBB;
    #1;
    @(negedge clk);
    checks++;
    if (!c6) begin
      failures++;
      $display("FAIL conflict not reported");
    end
    iv6[0] = 0; iv6[1] = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
