// tb_vec_controller: checks the memory access schedule produced by the
// vector-module controllers (two-input and one-input), cycle by cycle.
// Each controller drives a real data processor (adder core), fetch/decode
// unit and memory model. The testbench builds the expected trace on its own:
// K instruction-word reads at PC, two idle cycles, then per element pair
// read A, read B, idle, write (the write carrying the result of the pair two
// earlier), then 8 emptying cycles holding the last two writes, and finally
// the end marker and irq. Any extra, missing or misplaced access fails.
// Further controllers run with stand-in cores of latency 5, 6, 9, 10 and 11
// (two-input) and 10 (one-input): every sum must be right; the run time must
// be exactly (K + 2) + 4 N + latency per instruction for latency 11, and at
// most one cycle more per pair for the others; for latencies 9 and 10 a read
// must have waited for a result write at least once, for 11 never.
module tb_vec_controller;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  int          c [2], f [2];
  logic        fin [2];

  vec_ctrl_env #(.TWO(1'b1)) u_two (.clk, .rst_n, .checks_o(c[0]), .failures_o(f[0]), .fin(fin[0]));
  vec_ctrl_env #(.TWO(1'b0)) u_one (.clk, .rst_n, .checks_o(c[1]), .failures_o(f[1]), .fin(fin[1]));

  int   lc [6], lf [6], lw [6];
  logic lfin [6];
  vec_ctrl_lat_env #(.TWO(1'b1), .LAT(5))  u_l5  (.clk, .rst_n, .checks_o(lc[0]), .failures_o(lf[0]), .waits_o(lw[0]), .fin(lfin[0]));
  vec_ctrl_lat_env #(.TWO(1'b1), .LAT(6))  u_l6  (.clk, .rst_n, .checks_o(lc[1]), .failures_o(lf[1]), .waits_o(lw[1]), .fin(lfin[1]));
  vec_ctrl_lat_env #(.TWO(1'b1), .LAT(9))  u_l9  (.clk, .rst_n, .checks_o(lc[2]), .failures_o(lf[2]), .waits_o(lw[2]), .fin(lfin[2]));
  vec_ctrl_lat_env #(.TWO(1'b1), .LAT(10)) u_l10 (.clk, .rst_n, .checks_o(lc[3]), .failures_o(lf[3]), .waits_o(lw[3]), .fin(lfin[3]));
  vec_ctrl_lat_env #(.TWO(1'b1), .LAT(11)) u_l11 (.clk, .rst_n, .checks_o(lc[4]), .failures_o(lf[4]), .waits_o(lw[4]), .fin(lfin[4]));
  vec_ctrl_lat_env #(.TWO(1'b0), .LAT(10)) u_o10 (.clk, .rst_n, .checks_o(lc[5]), .failures_o(lf[5]), .waits_o(lw[5]), .fin(lfin[5]));

  function automatic bit all_fin();
    bit r = fin[0] && fin[1];
    for (int i = 0; i < 6; i++) r &= lfin[i];
    return r;
  endfunction

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    while (!all_fin()) @(negedge clk);
    checks = c[0] + c[1];
    failures = f[0] + f[1];
    for (int i = 0; i < 6; i++) begin
      checks += lc[i];
      failures += lf[i];
    end
    $display("reads that waited for a result write, latency 5 6 9 10 11 / one-input 10: %0d %0d %0d %0d %0d / %0d",
             lw[0], lw[1], lw[2], lw[3], lw[4], lw[5]);
    checks += 3;
    if (lw[4] != 0) failures++;
    if (lw[2] == 0) failures++;
    if (lw[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
