// tb_vec_module: runs all six vector modules (addition, subtraction and
// multiplication, each as a one-input and a two-input module) through a
// four-instruction program each, see vec_mod_env for what is checked.
module tb_vec_module;
  import fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  int   c [6], f [6], checks, failures;
  logic fin [6];

  vec_mod_env #(.OP(OP_ADD), .TWO(1'b1)) u_add2 (.clk, .start, .checks_o(c[0]), .failures_o(f[0]), .fin(fin[0]));
  vec_mod_env #(.OP(OP_SUB), .TWO(1'b1)) u_sub2 (.clk, .start, .checks_o(c[1]), .failures_o(f[1]), .fin(fin[1]));
  vec_mod_env #(.OP(OP_MUL), .TWO(1'b1)) u_mul2 (.clk, .start, .checks_o(c[2]), .failures_o(f[2]), .fin(fin[2]));
  vec_mod_env #(.OP(OP_ADD), .TWO(1'b0)) u_add1 (.clk, .start, .checks_o(c[3]), .failures_o(f[3]), .fin(fin[3]));
  vec_mod_env #(.OP(OP_SUB), .TWO(1'b0)) u_sub1 (.clk, .start, .checks_o(c[4]), .failures_o(f[4]), .fin(fin[4]));
  vec_mod_env #(.OP(OP_MUL), .TWO(1'b0)) u_mul1 (.clk, .start, .checks_o(c[5]), .failures_o(f[5]), .fin(fin[5]));

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin
      checks += c[i];
      failures += f[i];
    end
  endfunction

  initial begin
    #3000000;
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    start = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
