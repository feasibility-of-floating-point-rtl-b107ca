// vec_data_processor: data-processor half of the vector-module datapath.
//
// Two 32-bit operand registers R0 and R1 capture words from the memory data
// bus (one word can be read per cycle, so the operands arrive one at a time)
// and feed the floating-point core, whose inputs are not registered. Each
// register has a ready flag: it is set when the register is loaded and
// drives the core's left_ready or right_ready input. In the cycle both flags
// are high the core starts, and both flags clear unless reloaded in that
// cycle. The core's result goes straight to data_out with result_ready.
//
// OP selects the core: OP_ADD or OP_SUB instantiate the adder/subtractor
// core, OP_MUL the multiplier core. Registers and core follow the design
// description; keeping the ready flags in the data processor is this
// design's own choice.
module vec_data_processor
  import fp_pkg::*;
#(
  parameter fp_op_e OP = OP_ADD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  vdp_uinst_t  uinst,
  input  logic [31:0] data_in,
  output logic        left_ready,
  output logic        right_ready,
  output logic        result_ready,
  output logic [31:0] data_out
);

  logic [31:0] r0, r1;
  logic        fire;

  assign fire = left_ready & right_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0          <= '0;
      r1          <= '0;
      left_ready  <= 1'b0;
      right_ready <= 1'b0;
    end else begin
      if (uinst.ld_r0) r0 <= data_in;
      if (uinst.ld_r1) r1 <= data_in;
      left_ready  <= uinst.ld_r0 | (left_ready & ~fire);
      right_ready <= uinst.ld_r1 | (right_ready & ~fire);
    end
  end

  if (OP == OP_MUL) begin : g_mul
    fp_mul_core u_core (
      .clk, .rst_n,
      .left_ready, .left_data(r0),
      .right_ready, .right_data(r1),
      .result_ready, .data_out
    );
  end else begin : g_addsub
    fp_addsub_core #(.SUBTRACT(OP == OP_SUB)) u_core (
      .clk, .rst_n,
      .left_ready, .left_data(r0),
      .right_ready, .right_data(r1),
      .result_ready, .data_out
    );
  end

endmodule
