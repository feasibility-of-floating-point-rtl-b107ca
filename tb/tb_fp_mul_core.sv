// tb_fp_mul_core: checks the multiplier core against double-precision
// reference arithmetic, bit for bit. Operands: random normals (products in
// range, near overflow and near underflow), zeros, infinities, NaNs and
// rounding corner cases. Random ready patterns; each result must appear
// exactly 8 cycles after both ready inputs were high.
module tb_fp_mul_core;
  import fp_ref_pkg::*;

  localparam int LAT = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lr, rr, rdy;
  logic [31:0] ld, rd, dout;
  int checks = 0, failures = 0, cycle = 0;

  fp_mul_core u_dut (.clk, .rst_n, .left_ready(lr), .left_data(ld),
    .right_ready(rr), .right_data(rd), .result_ready(rdy), .data_out(dout));

  logic [31:0] exp_q [$], a_q [$], b_q [$];
  int          t_q [$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && rdy) begin
    logic [31:0] a, b, e;
    int t;
    checks++;
    if (t_q.size() == 0) begin
      failures++;
      $display("unexpected result");
    end else begin
      t = t_q.pop_front();
      a = a_q.pop_front();
      b = b_q.pop_front();
      e = exp_q.pop_front();
      if (cycle - t != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t, LAT);
      end
      if (!fp_match(dout, e)) begin
        failures++;
        $display("MUL %h * %h = %h, expected %h", a, b, dout, e);
      end
    end
  end

  task automatic apply(input logic [31:0] a, input logic [31:0] b, input logic l, input logic r);
    @(negedge clk);
    ld = a; rd = b; lr = l; rr = r;
    if (l && r) begin
      t_q.push_back(cycle);
      a_q.push_back(a);
      b_q.push_back(b);
      exp_q.push_back(ref_op(2, a, b));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lr = 0; rr = 0; ld = 0; rd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    apply(32'h3FC00000, 32'h40000000, 1, 1);  // 1.5 * 2
    apply(32'h3F800001, 32'h3F800001, 1, 1);
    apply(32'h3FFFFFFF, 32'h3FFFFFFF, 1, 1);  // product near 4
    apply(32'h00000000, 32'hC0000000, 1, 1);  // 0 * -2
    apply(32'h7F800000, 32'h00000000, 1, 1);  // inf * 0
    apply(32'h7F800000, 32'hC0000000, 1, 1);  // inf * -2
    apply(32'h7FC00000, 32'h3F800000, 1, 1);  // NaN
    apply(32'h7F000000, 32'h7F000000, 1, 1);  // overflow
    apply(32'h00800000, 32'h3E800000, 1, 1);  // underflow
    apply(32'h7F7FFFFF, 32'h3F800000, 1, 1);
    for (int i = 0; i < 3000; i++)
      apply(rand_fp(64, 128), rand_fp(64, 128), 1'($urandom_range(3) != 0), 1'($urandom_range(3) != 0));
    for (int i = 0; i < 1000; i++)
      apply(rand_fp(1, 40), rand_fp(60, 40), 1, 1);     // around the underflow limit
    for (int i = 0; i < 1000; i++)
      apply(rand_fp(200, 54), rand_fp(150, 40), 1, 1);  // around the overflow limit
    @(negedge clk); lr = 0; rr = 0;
    repeat (LAT + 4) @(negedge clk);
    if (t_q.size() != 0) begin
      failures++;
      $display("%0d results missing", t_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
