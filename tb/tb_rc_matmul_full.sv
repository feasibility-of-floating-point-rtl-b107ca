// tb_rc_matmul_full: the two matrix sizes of the evaluation, 40 x 40 and
// 96 x 96, each as one complete two-session run (multiplier modules, then
// accumulator modules) on its own four-PE board with every parameter of the
// top at its default. See matmul_host for the memory layout, the instruction
// streams and what is checked.
module tb_rc_matmul_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int   c40, f40, c96, f96;
  logic fin40, fin96;

  matmul_host #(.M(40)) u_host40 (.clk, .checks_o(c40), .failures_o(f40), .fin(fin40));
  matmul_host #(.M(96)) u_host96 (.clk, .checks_o(c96), .failures_o(f96), .fin(fin96));

  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c40 + c96, f40 + f96 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin40 && fin96);
    $display("TB_RESULT checks=%0d failures=%0d", c40 + c96, f40 + f96);
    $finish;
  end
endmodule
