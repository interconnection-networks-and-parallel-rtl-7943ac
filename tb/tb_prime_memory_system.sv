// tb_prime_memory_system: end-to-end run of the full-size system (40-bit
// addresses, 31 banks, 31 processors, generator 3; no parameter overrides)
// with behavioural banks, driven and checked by pms_driver. Besides the data
// and latency checks it requires that parallel superwords, short final
// superwords, sequential (single-bank) sections, overlapping sections with
// different routing and held lanes running a superword behind the others
// all occurred at least once.
module tb_prime_memory_system;
  localparam int unsigned M = 31, P = 31, ADDR_W = 40, OFF_W = 35, DATA_W = 32, LEN_W = 16;
  logic clk = 0, rst_n = 0;

  logic              cmd_valid, cmd_ready, cmd_write, seq_mode, route_error;
  logic [ADDR_W-1:0] cmd_start, cmd_stride;
  logic [LEN_W-1:0]  cmd_len;
  logic              proc_hold [P], proc_req [P], proc_rvalid [P];
  logic [LEN_W-1:0]  proc_elem [P], proc_relem [P];
  logic [DATA_W-1:0] proc_wdata [P], proc_rdata [P];
  logic              bank_req [M], bank_we [M];
  logic [OFF_W-1:0]  bank_addr [M];
  logic [DATA_W-1:0] bank_wdata [M], bank_rdata [M];
  int checks, failures, n_par, n_short, n_seq, n_overlap, n_bshift, n_mixed, n_reads;
  bit done;

  prime_memory_system u_dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_start, .cmd_stride,
    .cmd_len, .seq_mode, .proc_hold, .proc_req, .proc_elem, .proc_wdata, .proc_rvalid,
    .proc_rdata, .proc_relem, .bank_req, .bank_we, .bank_addr, .bank_wdata,
    .bank_rdata, .route_error);

  pms_driver #(.ADDR_W(ADDR_W), .W(5), .PLUS_ONE(1'b0), .P(P), .DATA_W(DATA_W), .LEN_W(LEN_W)) u_drv (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_start, .cmd_stride,
    .cmd_len, .seq_mode, .proc_hold, .proc_req, .proc_elem, .proc_wdata, .proc_rvalid,
    .proc_rdata, .proc_relem, .bank_req, .bank_we, .bank_addr, .bank_wdata,
    .bank_rdata, .route_error, .checks, .failures, .n_par, .n_short, .n_seq,
    .n_overlap, .n_bshift, .n_mixed, .n_reads, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    f = failures;
    if (n_mixed == 0) f++;
    if (n_par == 0 || n_short == 0 || n_seq == 0 || n_overlap == 0 || n_reads == 0) f++;
    $display("parallel superwords %0d, short %0d, sequential elements %0d, overlapping sections %0d, mixed-superword cycles %0d, reads %0d",
             n_par, n_short, n_seq, n_overlap, n_mixed, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end
endmodule
