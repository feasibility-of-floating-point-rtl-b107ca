// tb_rc_matmul_top: end-to-end test of the four-PE board: a 16 x 16 matrix
// product in two sessions (multiplier modules, then accumulator modules),
// with the top at its default parameters. See matmul_host for the memory
// layout, the instruction streams and what is checked.
module tb_rc_matmul_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int   checks, failures;
  logic fin;

  matmul_host #(.M(16)) u_host (.clk, .checks_o(checks), .failures_o(failures), .fin);

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
