// rc_matmul_top: the reconfigurable board used for matrix multiplication,
// NUM_PE processing elements working side by side, each on its own memory.
//
// C = A * B is split four ways: A into an upper and a lower half of its
// rows, B into a left and a right half of its columns, and PE p (p = 2r + c)
// computes the quarter C[r half][c half] from A's half r and B's half c held
// in its own memory. It runs in two sessions. In the first, each PE is
// configured with the two-input multiplication module and forms, for every
// output element, the element-wise products of an A row and a B column. In
// the second it is reconfigured with the accumulation module and sums each
// group of products into the output element. The host loads memories and
// instructions, sets cfg and releases rst_n for each session, and waits for
// all irq lines (all_irq) before reading results.
//
// Ports are per-PE arrays: rst_n, cfg and irq to and from the host, and one
// memory port per PE to that PE's 2^ADDR_W x 32-bit memory (one cycle read
// latency, see vec_module). The four PEs, the two sessions and the 18-bit
// (1 MB) memory per PE follow the design description; the host and the
// memories are outside this module.
module rc_matmul_top
  import fp_pkg::*;
#(
  parameter int unsigned NUM_PE = 4,
  parameter int unsigned ADDR_W = ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n     [NUM_PE],
  input  pe_cfg_e           cfg       [NUM_PE],
  output logic              mem_req   [NUM_PE],
  output logic              mem_rw    [NUM_PE],
  output logic [ADDR_W-1:0] mem_addr  [NUM_PE],
  output logic [31:0]       mem_wdata [NUM_PE],
  input  logic [31:0]       mem_rdata [NUM_PE],
  output logic              irq       [NUM_PE],
  output logic              all_irq
);

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe #(.ADDR_W(ADDR_W)) u_pe (
      .clk, .rst_n(rst_n[p]), .cfg(cfg[p]),
      .mem_req(mem_req[p]), .mem_rw(mem_rw[p]), .mem_addr(mem_addr[p]),
      .mem_wdata(mem_wdata[p]), .mem_rdata(mem_rdata[p]), .irq(irq[p])
    );
  end

  always_comb begin
    all_irq = 1'b1;
    for (int p = 0; p < NUM_PE; p++) all_irq &= irq[p];
  end

endmodule
