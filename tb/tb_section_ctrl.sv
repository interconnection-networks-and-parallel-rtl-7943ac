// tb_section_ctrl: the section controller with as many lanes as banks
// (P = M = 7) and with fewer (P = 5), each given random section commands
// checked by section_ctrl_checker. Sequential mode, short last superwords,
// (for P < M) a third-subnetwork shift that changes between superwords and
// (for P = M) held lanes falling behind into a later superword must each
// occur; with P < M lanes must never mix superwords.
module tb_section_ctrl;
  logic clk = 0, rst_n = 0;
  int c7, f7, s7, h7, b7, x7, c5, f5, s5, h5, b5, x5;
  bit d7, d5;
  int checks, failures;

  section_ctrl_checker #(.P(7)) u_p7 (.clk, .rst_n, .checks(c7), .failures(f7),
    .n_seq(s7), .n_short(h7), .n_bchange(b7), .n_mixed(x7), .done(d7));
  section_ctrl_checker #(.P(5)) u_p5 (.clk, .rst_n, .checks(c5), .failures(f5),
    .n_seq(s5), .n_short(h5), .n_bchange(b5), .n_mixed(x5), .done(d5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c7 + c5, f7 + f5 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d7 && d5);
    checks   = c7 + c5 + 6;
    failures = f7 + f5;
    if (x7 == 0) failures++;
    if (x5 != 0) failures++;
    if (s7 == 0 || s5 == 0) failures++;
    if (h7 == 0 || h5 == 0) failures++;
    if (b5 == 0) failures++;
    if (b7 != 0) failures++;   // with P = M the shift stays fixed
    $display("sequential sections %0d/%0d, short superwords %0d/%0d, b changes %0d/%0d, mixed cycles %0d/%0d",
             s7, s5, h7, h5, b7, b5, x7, x5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
