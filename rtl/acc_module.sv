// acc_module: the complete accumulation module.
//
// Joins the accumulator controller, the accumulator data processor (M0, M1,
// R0, R1 and an adder core with feedback) and the fetch/decode unit (CR, RF,
// CW, PC, ECnt, comparator and M2). Each instruction (N, X, S) sums the N
// words from address X on and writes the sum to address S. Numbers are read
// one per cycle and nothing is written until the sum is complete, so the
// core works every cycle, about four times the rate of the vector modules.
//
// Memory port and irq behave as in vec_module: one access per cycle, read
// data one cycle after the request, irq high after the zero-length end
// marker until reset. The sum is formed as a tree of partial sums, so its
// rounding can differ from a left-to-right sum.
module acc_module
  import fp_pkg::*;
#(
  parameter int unsigned ADDR_W = ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              mem_req,
  output logic              mem_rw,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  output logic              irq
);

  fd_uinst_t         fd_uinst;
  adp_uinst_t        dp_uinst;
  logic              done, final_o, result_ready;
  logic              left_ready, right_ready;
  logic [ECNT_W-1:0] ecnt;

  acc_controller u_ctrl (
    .clk, .rst_n,
    .done, .final_o, .ecnt, .result_ready, .left_ready, .right_ready,
    .fd_uinst, .dp_uinst,
    .mem_req, .mem_rw, .irq
  );

  acc_data_processor u_dp (
    .clk, .rst_n,
    .uinst(dp_uinst), .data_in(mem_rdata),
    .left_ready, .right_ready,
    .result_ready, .data_out(mem_wdata)
  );

  fetch_decode_unit #(.ADDR_W(ADDR_W), .HAS_CR1(1'b0), .ELEM_WORDS(1)) u_fd (
    .clk, .rst_n,
    .uinst(fd_uinst), .data_in(mem_rdata),
    .addr_out(mem_addr), .done, .final_o, .ecnt
  );

endmodule
