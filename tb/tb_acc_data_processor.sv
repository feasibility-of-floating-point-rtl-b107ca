// tb_acc_data_processor: checks the M0/M1 selections, the clear of R1 and
// the feedback path. Sequence: a + 0 (forwarding), then a partial sum fed
// back through M1 and added to a new number, then two results paired by
// holding one in R0 via M0 and the other in R1 via M1. Values are small
// integers so every sum is exact; each result must come 8 cycles after the
// core starts.
module tb_acc_data_processor;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  adp_uinst_t  u;
  logic [31:0] din, dout;
  logic        lr, rr, rdy;

  acc_data_processor u_dut (.clk, .rst_n, .uinst(u), .data_in(din),
    .left_ready(lr), .right_ready(rr), .result_ready(rdy), .data_out(dout));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  task automatic wait_result(output logic [31:0] v, output int lat);
    int t0;
    t0 = cycle;
    while (!rdy) @(negedge clk);
    v = dout; lat = cycle - t0;
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v, w;
    int lat;
    u = '0; din = '0;
    #12 rst_n = 1;
    // 5 + 0
    @(negedge clk); u = '0; u.ld_r0 = 1; u.clr_r1 = 1; din = int2f(5);
    @(negedge clk); u = '0; din = int2f(99);
    check("started", {31'd0, lr & rr}, 1);
    @(negedge clk);
    check("flags cleared", {31'd0, lr | rr}, 0);
    wait_result(v, lat);
    check("5 + 0", v, int2f(5));
    check("latency", lat, 7);   // counted from the cycle after the start
    // feedback: R1 <= core output (5) via M1, R0 <= 7 from memory
    u = '0; u.ld_r0 = 1; u.ld_r1 = 1; u.m1_fb = 1; din = int2f(7);
    @(negedge clk); u = '0;
    wait_result(v, lat);
    check("5 + 7 via M1", v, int2f(12));
    // hold 12 in R0 via M0
    u = '0; u.ld_r0 = 1; u.m0_fb = 1;
    @(negedge clk); u = '0;
    check("held", {31'd0, lr & ~rr}, 1);
    // second number -3 via M1 from memory
    u.ld_r1 = 1; din = int2f(-3);
    @(negedge clk); u = '0;
    wait_result(v, lat);
    check("12 + -3 via M0 hold", v, int2f(9));
    // start two sums back to back, then pair their results
    u = '0; u.ld_r0 = 1; u.clr_r1 = 1; din = int2f(100);
    @(negedge clk); u = '0; u.ld_r0 = 1; u.clr_r1 = 1; din = int2f(20);
    @(negedge clk); u = '0;
    wait_result(v, lat);
    u = '0; u.ld_r0 = 1; u.m0_fb = 1;             // hold 100
    @(negedge clk);
    check("second result follows", {31'd0, rdy}, 1);
    w = dout;
    u = '0; u.ld_r1 = 1; u.m1_fb = 1;             // pair with 20
    @(negedge clk); u = '0;
    check("first value", v, int2f(100));
    check("second value", w, int2f(20));
    wait_result(v, lat);
    check("100 + 20 from feedback", v, int2f(120));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
