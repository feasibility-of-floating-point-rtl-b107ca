// acc_data_processor: data-processor half of the accumulator datapath.
//
// Like the vector data processor it has operand registers R0 and R1 with
// ready flags in front of an adder core, but each register is fed through a
// multiplexor (M0 for R0, M1 for R1) that chooses between the memory data
// bus and the core's own output. The feedback lets running partial sums
// re-enter the pipeline. R1 can also be cleared to +0.0, which is how a
// fresh number is passed through the adder unchanged while the pipeline
// fills.
//
// Interface: one adp_uinst_t micro-instruction per cycle. A load or clear
// sets the register's ready flag; when both flags are high the core starts
// and the flags clear (unless reloaded in the same cycle). result_ready and
// data_out come from the core; data_out is also the value written to memory.
// left_ready and right_ready are visible to the controller, which uses them
// to pair partial sums while the pipeline is emptied.
//
// M0, M1, R0, R1 and the feedback path follow the design description; the
// clear-to-zero of R1 is this design's own way to forward numbers while the
// pipeline fills.
module acc_data_processor
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  adp_uinst_t  uinst,
  input  logic [31:0] data_in,
  output logic        left_ready,
  output logic        right_ready,
  output logic        result_ready,
  output logic [31:0] data_out
);

  logic [31:0] r0, r1, m0, m1;
  logic        fire;

  assign fire = left_ready & right_ready;
  assign m0   = uinst.m0_fb ? data_out : data_in;
  assign m1   = uinst.m1_fb ? data_out : data_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0          <= '0;
      r1          <= '0;
      left_ready  <= 1'b0;
      right_ready <= 1'b0;
    end else begin
      if (uinst.ld_r0)       r0 <= m0;
      if (uinst.clr_r1)      r1 <= '0;
      else if (uinst.ld_r1)  r1 <= m1;
      left_ready  <= uinst.ld_r0 | (left_ready & ~fire);
      right_ready <= uinst.ld_r1 | uinst.clr_r1 | (right_ready & ~fire);
    end
  end

  fp_addsub_core #(.SUBTRACT(1'b0)) u_core (
    .clk, .rst_n,
    .left_ready, .left_data(r0),
    .right_ready, .right_data(r1),
    .result_ready, .data_out
  );

endmodule
