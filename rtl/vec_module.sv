// vec_module: a complete vector addition, subtraction or multiplication
// module, as loaded into one FPGA processing element.
//
// It joins the module controller, the data processor (operand registers and
// floating-point core) and the fetch/decode unit, and talks to a single
// 32-bit wide memory through one port. The memory has one cycle of read
// latency: for a read request (mem_req with mem_rw = 1) in cycle t the word
// is expected on mem_rdata in cycle t+1; a write request (mem_rw = 0) writes
// mem_wdata at mem_addr at the end of the cycle. Only one access happens per
// cycle.
//
// TWO_INPUT = 1 builds the two-input-vector module (A and B in separate
// vectors, instruction = N, A, B, C); TWO_INPUT = 0 builds the one-input-
// vector module (A and B interleaved in one vector, instruction = N, AB, C).
// OP chooses the core. Results C[i] = A[i] op B[i] are written from address
// C on, one every 4 cycles. Writes trail reads by two element pairs, so C may
// equal A (or AB) to compute in place. irq rises when an instruction of
// length 0 is reached and stays high until reset; releasing rst_n starts the
// module at instruction address 0.
//
// The partition into controller, data processor and fetch/decode unit, and
// the 18-bit address, follow the design description; the memory handshake
// and instruction format are this design's own.
module vec_module
  import fp_pkg::*;
#(
  parameter fp_op_e      OP        = OP_ADD,
  parameter bit          TWO_INPUT = 1'b1,
  parameter int unsigned ADDR_W    = ADDR_W_DEF
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
  vdp_uinst_t        dp_uinst;
  logic              done, final_o, result_ready;
  logic              left_ready, right_ready;
  logic [ECNT_W-1:0] ecnt;

  vec_controller #(.TWO_INPUT(TWO_INPUT)) u_ctrl (
    .clk, .rst_n,
    .done, .final_o, .ecnt, .result_ready,
    .fd_uinst, .dp_uinst,
    .mem_req, .mem_rw, .irq
  );

  vec_data_processor #(.OP(OP)) u_dp (
    .clk, .rst_n,
    .uinst(dp_uinst), .data_in(mem_rdata),
    .left_ready, .right_ready,
    .result_ready, .data_out(mem_wdata)
  );

  fetch_decode_unit #(
    .ADDR_W(ADDR_W), .HAS_CR1(TWO_INPUT), .ELEM_WORDS(TWO_INPUT ? 1 : 2)
  ) u_fd (
    .clk, .rst_n,
    .uinst(fd_uinst), .data_in(mem_rdata),
    .addr_out(mem_addr), .done, .final_o, .ecnt
  );

endmodule
