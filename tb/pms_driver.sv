// pms_driver: stimulus, bank models and checking for one prime_memory_system.
//
// Connects to every port of the system under test and models its M memory
// banks with memory_bank_model. It runs a fixed list of section commands
// (rows, columns, diagonals, sections at high addresses, sections whose
// separation is a multiple of M) followed by NRAND random read and write
// sections, each issued as soon as the system is ready, so successive
// sections with different routing overlap in the pipelines. Checks:
//   * each write reaching bank port p carries an address A with
//     A mod M = p and bank word A mod 2^OFF_W (write data identify A);
//   * each read returns, on the lane that issued it, the element index and
//     the data last written to that address (0 if never), exactly LAT
//     cycles after it was issued;
//   * route_error never rises; every element of every section is issued.
// Every third random section holds random lanes (proc_hold) in random
// cycles. Counts parallel superwords, short superwords, sequentially issued
// elements, sections started while reads of an earlier section with other
// routing were still in flight, superwords whose lane 0 bank differs from the
// section's first (a changing third-subnetwork shift) and cycles in which
// lanes of different superwords issued together (lanes out of lockstep).
module pms_driver #(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned W        = 5,
  parameter bit          PLUS_ONE = 1'b0,
  parameter int unsigned P        = 31,
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned LEN_W    = 16,
  parameter int unsigned NRAND    = 40,
  localparam int unsigned M       = PLUS_ONE ? (1 << W) + 1 : (1 << W) - 1,
  localparam int unsigned OFF_W   = ADDR_W - W,
  localparam int unsigned LAT     = 2 * ($clog2(M - 1) + $clog2(M)) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              cmd_valid,
  input  logic              cmd_ready,
  output logic              cmd_write,
  output logic [ADDR_W-1:0] cmd_start,
  output logic [ADDR_W-1:0] cmd_stride,
  output logic [LEN_W-1:0]  cmd_len,
  input  logic              seq_mode,
  output logic              proc_hold  [P],
  input  logic              proc_req   [P],
  input  logic [LEN_W-1:0]  proc_elem  [P],
  output logic [DATA_W-1:0] proc_wdata [P],
  input  logic              proc_rvalid[P],
  input  logic [DATA_W-1:0] proc_rdata [P],
  input  logic [LEN_W-1:0]  proc_relem [P],
  input  logic              bank_req   [M],
  input  logic              bank_we    [M],
  input  logic [OFF_W-1:0]  bank_addr  [M],
  input  logic [DATA_W-1:0] bank_wdata [M],
  output logic [DATA_W-1:0] bank_rdata [M],
  input  logic              route_error,
  output int                checks,
  output int                failures,
  output int                n_par,
  output int                n_short,
  output int                n_seq,
  output int                n_overlap,
  output int                n_bshift,
  output int                n_mixed,
  output int                n_reads,
  output bit                done
);
  localparam longint unsigned AMASK = (ADDR_W >= 64) ? '1 : ((64'd1 << ADDR_W) - 1);
  localparam longint unsigned OMASK = (64'd1 << OFF_W) - 1;

  for (genvar p = 0; p < M; p++) begin : g_bank
    memory_bank_model #(.OFF_W(OFF_W), .DATA_W(DATA_W)) u_bank (
      .clk, .req(bank_req[p]), .we(bank_we[p]), .addr(bank_addr[p]),
      .wdata(bank_wdata[p]), .rdata(bank_rdata[p]));
  end

  // Reference memory by address, and address of each write datum.
  logic [DATA_W-1:0] ref_mem  [longint unsigned];
  longint unsigned   addr_of  [logic [DATA_W-1:0]];

  // Section being issued.
  longint unsigned cur_start, cur_stride;
  int              cur_len, cur_id;
  bit              cur_we;
  int              cyc;
  bit              hold_en;

  always @(posedge clk)
    for (int i = 0; i < int'(P); i++) proc_hold[i] <= hold_en && ($urandom % 10 < 3);
  int              outstanding;
  longint unsigned last_read_stride;

  // Per-lane queues of expected read returns.
  typedef struct {
    int                due;
    logic [LEN_W-1:0]  elem;
    logic [DATA_W-1:0] data;
  } exp_t;
  exp_t lane_q [P][$];

  function automatic logic [DATA_W-1:0] wdata_for(longint unsigned a, int id);
    return DATA_W'(a * 64'd2654435761 + longint'(id) * 64'd40503 + 64'd17);
  endfunction

  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // Issue side: write data, reference update, expected reads.
  always_comb begin
    for (int i = 0; i < int'(P); i++)
      proc_wdata[i] = wdata_for((cur_start + longint'(proc_elem[i]) * cur_stride) & AMASK, cur_id);
  end

  always @(negedge clk) if (rst_n) begin
    int nv;
    longint unsigned a;
    exp_t e;
    int sw;
    bit mixed;
    nv = 0;
    sw = -1;
    mixed = 0;
    for (int i = 0; i < int'(P); i++) if (proc_req[i]) begin
      nv++;
      checks++;
      if (proc_hold[i]) failures++;
      if (sw >= 0 && sw != int'(proc_elem[i]) / int'(P)) mixed = 1;
      sw = int'(proc_elem[i]) / int'(P);
      a = (cur_start + longint'(proc_elem[i]) * cur_stride) & AMASK;
      if (cur_we) begin
        ref_mem[a] = proc_wdata[i];
        addr_of[proc_wdata[i]] = a;
      end else begin
        e.due  = cyc + int'(LAT);
        e.elem = proc_elem[i];
        e.data = ref_mem.exists(a) ? ref_mem[a] : '0;
        lane_q[i].push_back(e);
        outstanding++;
        n_reads++;
      end
    end
    if (mixed) n_mixed++;
    if (nv > 0) begin
      if (seq_mode) n_seq++;
      else begin
        n_par++;
        if (nv < int'(P)) n_short++;
        if (proc_req[0]) begin
          a = (cur_start + longint'(proc_elem[0]) * cur_stride) & AMASK;
          if (a % M != cur_start % M) n_bshift++;
        end
      end
    end
  end

  // Memory side: writes must land where the residue mapping puts them.
  always @(negedge clk) if (rst_n) begin
    longint unsigned a;
    for (int p = 0; p < int'(M); p++) if (bank_req[p] && bank_we[p]) begin
      checks++;
      if (!addr_of.exists(bank_wdata[p])) failures++;
      else begin
        a = addr_of[bank_wdata[p]];
        if (a % M != longint'(p) || (a & OMASK) != longint'(bank_addr[p])) begin
          failures++;
          if (failures < 10) $display("FAIL write of address %0d at bank %0d word %0d", a, p, bank_addr[p]);
        end
      end
    end
    checks++;
    if (route_error) failures++;
  end

  // Processor side: read returns.
  always @(negedge clk) if (rst_n) begin
    exp_t e;
    for (int i = 0; i < int'(P); i++) if (proc_rvalid[i]) begin
      checks += 3;
      if (lane_q[i].size() == 0) failures++;
      else begin
        e = lane_q[i].pop_front();
        outstanding--;
        if (e.due != cyc) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d read due %0d came %0d", i, e.due, cyc);
        end
        if (e.elem != proc_relem[i]) failures++;
        if (e.data != proc_rdata[i]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d elem %0d read %h expected %h", i, e.elem, proc_rdata[i], e.data);
        end
      end
    end
  end

  task automatic run(input bit we, input longint unsigned start, input longint unsigned stride,
                     input int len);
    while (!cmd_ready) @(negedge clk);
    if (outstanding > 0 && stride % M != last_read_stride % M) n_overlap++;
    cur_start  = start & AMASK;
    cur_stride = stride & AMASK;
    cur_len    = len;
    cur_we     = we;
    cur_id++;
    if (!we) last_read_stride = stride;
    cmd_valid  = 1;
    cmd_write  = we;
    cmd_start  = ADDR_W'(start);
    cmd_stride = ADDR_W'(stride);
    cmd_len    = LEN_W'(len);
    @(negedge clk);
    cmd_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    longint unsigned hi;
    int rows;
    cmd_valid = 0; cmd_write = 0; cmd_start = '0; cmd_stride = '0; cmd_len = '0;
    checks = 0; failures = 0; n_par = 0; n_short = 0; n_seq = 0; n_overlap = 0;
    n_bshift = 0; n_mixed = 0; n_reads = 0; done = 0; hold_en = 0; outstanding = 0; cur_id = 0;
    cur_start = 0; cur_stride = 0; cur_len = 0; cur_we = 0; last_read_stride = 0;
    hi = (64'd1 << (ADDR_W - 1)) + 64'd12345;
    rows = 64;   // a 64 x 64 array stored by rows at address 1000
    @(posedge rst_n);
    @(negedge clk);
    // Rows, columns and diagonals of the array.
    run(1, 1000, 1, 3 * rows);                   // three rows
    run(1, 1000 + 5, rows, rows);                // column 5
    run(1, 1000, rows + 1, rows);                // main diagonal
    run(0, 1000, 1, 3 * rows);
    run(0, 1000 + 5, rows, rows);
    run(0, 1000 + 2, rows - 1, 40);              // anti-diagonal
    run(0, 1000, rows + 1, rows);
    // Separation a multiple of M: one bank, issued one element per cycle.
    run(1, 300, M * 3, 2 * P + 3);
    run(0, 300, M * 3, 2 * P + 3);
    run(0, 300, 3, 3 * P);                       // same words, other routing
    // High addresses (the section stays below 2^ADDR_W: residue addresses
    // wrap modulo M*2^OFF_W, not modulo 2^ADDR_W).
    run(1, hi, (64'd1 << (ADDR_W - 20)) + 3, 3 * P + 1);
    run(0, hi, (64'd1 << (ADDR_W - 20)) + 3, 3 * P + 1);
    // Random sections over a small window so reads meet earlier writes.
    for (int c = 0; c < int'(NRAND); c++) begin
      longint unsigned st, sd;
      st = 64'(2000 + $urandom % 3000);
      sd = (c % 6 == 5) ? longint'(M) * (1 + $urandom % 4) : 64'(1 + $urandom % 90);
      hold_en = (c % 3 == 1);
      run(1'($urandom % 2), st, sd, 1 + $urandom % (3 * P));
    end
    hold_en = 0;
    while (!cmd_ready || outstanding > 0) @(negedge clk);
    repeat (LAT + 2) @(negedge clk);
    done = 1;
  end
endmodule
