// lat_core_dp_model: behavioural stand-in for vec_data_processor with an
// adder of any latency LAT, used to show that the vector controller does not
// depend on the core latency. R0 and R1 load from data_in on the
// micro-instruction, each sets its ready flag, and when both flags are set the
// sum (reference arithmetic) enters a LAT-deep delay line and both flags
// clear; result_ready and data_out come out LAT cycles later. Same ports and
// timing as the real data processor apart from the latency.
module lat_core_dp_model
  import fp_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int LAT = 8
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
  logic        v  [LAT];
  logic [31:0] d  [LAT];
  logic        fire;

  assign fire = left_ready && right_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_ready  <= 1'b0;
      right_ready <= 1'b0;
      r0 <= '0;
      r1 <= '0;
      for (int i = 0; i < LAT; i++) begin
        v[i] <= 1'b0;
        d[i] <= '0;
      end
    end else begin
      if (uinst.ld_r0) r0 <= data_in;
      if (uinst.ld_r1) r1 <= data_in;
      left_ready  <= uinst.ld_r0 | (left_ready & ~fire);
      right_ready <= uinst.ld_r1 | (right_ready & ~fire);
      v[0] <= fire;
      d[0] <= ref_op(0, r0, r1);
      for (int i = 1; i < LAT; i++) begin
        v[i] <= v[i-1];
        d[i] <= d[i-1];
      end
    end
  end

  // A start in cycle t is in v[0] at t + 1, so v[LAT-1] is high at t + LAT.
  assign result_ready = v[LAT-1];
  assign data_out     = d[LAT-1];
endmodule
