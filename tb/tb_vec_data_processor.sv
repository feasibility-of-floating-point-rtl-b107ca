// tb_vec_data_processor: loads operands into R0 and R1 of a multiplying and
// a subtracting data processor in the order and spacing the controller
// uses (and in other orders), checks that the ready flags start the core
// exactly when both operands are present, and that every result arrives
// 8 cycles after the start with the correctly rounded value.
module tb_vec_data_processor;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  vdp_uinst_t  u;
  logic [31:0] din;
  logic        lr [2], rr [2], rdy [2];
  logic [31:0] dout [2];

  vec_data_processor #(.OP(OP_MUL)) u_mul (.clk, .rst_n, .uinst(u), .data_in(din),
    .left_ready(lr[0]), .right_ready(rr[0]), .result_ready(rdy[0]), .data_out(dout[0]));
  vec_data_processor #(.OP(OP_SUB)) u_sub (.clk, .rst_n, .uinst(u), .data_in(din),
    .left_ready(lr[1]), .right_ready(rr[1]), .result_ready(rdy[1]), .data_out(dout[1]));

  logic [31:0] e_mul [$], e_sub [$];
  int          t_q [$];

  always @(negedge clk) if (rst_n && rdy[0]) begin
    checks++;
    if (t_q.size() == 0) begin
      failures++; $display("unexpected result");
    end else begin
      int t;
      logic [31:0] em, es;
      t  = t_q.pop_front();
      em = e_mul.pop_front();
      es = e_sub.pop_front();
      if (cycle - t != 8) begin failures++; $display("latency %0d", cycle - t); end
      if (!fp_match(dout[0], em)) begin failures++; $display("mul %h exp %h", dout[0], em); end
      if (!fp_match(dout[1], es) || !rdy[1]) begin failures++; $display("sub %h exp %h", dout[1], es); end
    end
  end

  // load a then b with `gap` idle cycles between, then idle `tail` cycles
  task automatic pair(input logic [31:0] a, input logic [31:0] b, input bit b_first, input int gap, input int tail);
    @(negedge clk); u = '0; din = b_first ? b : a;
    if (b_first) u.ld_r1 = 1; else u.ld_r0 = 1;
    repeat (gap) begin
      @(negedge clk); u = '0;
      checks++;
      if (lr[0] && rr[0]) begin failures++; $display("core started with one operand"); end
    end
    @(negedge clk); u = '0; din = b_first ? a : b;
    if (b_first) u.ld_r0 = 1; else u.ld_r1 = 1;
    @(negedge clk); u = '0;
    checks++;
    if (!(lr[0] && rr[0])) begin failures++; $display("core not started"); end
    t_q.push_back(cycle);
    e_mul.push_back(ref_op(2, a, b));
    e_sub.push_back(ref_op(1, a, b));
    repeat (tail) @(negedge clk);
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u = '0; din = '0;
    #12 rst_n = 1;
    pair(32'h40400000, 32'h3F000000, 0, 0, 0);   // 3 * 0.5, 3 - 0.5
    for (int i = 0; i < 200; i++)
      pair(rand_fp(100, 50), rand_fp(100, 50), 1'($urandom_range(1)), $urandom_range(3), $urandom_range(2));
    repeat (12) @(negedge clk);
    checks++;
    if (t_q.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
