// memory_bank_model: behavioural model of one memory bank for simulation.
// Not synthesizable logic: a sparse word store (associative array, unwritten
// words read as 0) so that banks of 2^35 words can be modelled. A request
// with we = 1 writes wdata at addr at the clock edge; a read request returns
// the stored word on rdata in the next cycle (one cycle of latency).
module memory_bank_model #(
  parameter int unsigned OFF_W  = 35,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              req,
  input  logic              we,
  input  logic [OFF_W-1:0]  addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [longint unsigned];

  initial rdata = '0;

  always @(posedge clk) begin
    if (req && we) mem[longint'(addr)] = wdata;
    if (req && !we) rdata <= mem.exists(longint'(addr)) ? mem[longint'(addr)] : '0;
  end
endmodule
