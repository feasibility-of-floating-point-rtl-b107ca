// pe_memory_model: behavioural model of the memory bank attached to one
// processing element (board SRAM, 2^ADDR_W words of 32 bits).
//
// One access per cycle. A read request (req with rw = 1) in cycle t returns
// the word on rdata in cycle t+1; a write request (rw = 0) stores wdata at
// the clock edge. The testbench acting as host reads and writes the array
// `mem` directly while the PE is held in reset. Counts reads and writes.
module pe_memory_model #(
  parameter int unsigned ADDR_W = 18
) (
  input  logic              clk,
  input  logic              req,
  input  logic              rw,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);
  logic [31:0] mem [2**ADDR_W];
  int unsigned n_reads = 0, n_writes = 0;

  always_ff @(posedge clk) begin
    if (req && rw) begin
      rdata   <= mem[addr];
      n_reads <= n_reads + 1;
    end
    if (req && !rw) begin
      mem[addr] <= wdata;
      n_writes  <= n_writes + 1;
    end
  end
endmodule
