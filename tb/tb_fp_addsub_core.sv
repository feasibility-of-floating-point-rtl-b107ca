// tb_fp_addsub_core: checks an adding and a subtracting instance of the
// adder core against double-precision reference arithmetic, bit for bit.
// Operands: random normals over a wide and a narrow exponent range (heavy
// cancellation), zeros, infinities, NaNs and overflowing sums. The ready
// inputs are driven in random patterns so that only cycles with both high
// start an operation; each result must appear exactly 8 cycles later.
module tb_fp_addsub_core;
  import fp_ref_pkg::*;

  localparam int LAT = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lr, rr;
  logic [31:0] ld, rd;
  logic        rdy [2];
  logic [31:0] dout [2];
  int checks = 0, failures = 0, cycle = 0;

  fp_addsub_core #(.SUBTRACT(1'b0)) u_add (.clk, .rst_n, .left_ready(lr), .left_data(ld),
    .right_ready(rr), .right_data(rd), .result_ready(rdy[0]), .data_out(dout[0]));
  fp_addsub_core #(.SUBTRACT(1'b1)) u_sub (.clk, .rst_n, .left_ready(lr), .left_data(ld),
    .right_ready(rr), .right_data(rd), .result_ready(rdy[1]), .data_out(dout[1]));

  logic [31:0] exp_q [2][$];
  int          t_q [$];
  logic [31:0] a_q [$], b_q [$];

  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(negedge clk) if (rst_n) begin
    if (rdy[0] !== rdy[1]) begin
      failures++;
      $display("ready mismatch between instances");
    end
    if (rdy[0]) begin
      logic [31:0] a, b, e0, e1;
      int t;
      checks++;
      if (t_q.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        t = t_q.pop_front();
        a = a_q.pop_front();
        b = b_q.pop_front();
        e0 = exp_q[0].pop_front();
        e1 = exp_q[1].pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - t, LAT);
        end
        if (!fp_match(dout[0], e0)) begin
          failures++;
          $display("ADD %h + %h = %h, expected %h", a, b, dout[0], e0);
        end
        if (!fp_match(dout[1], e1)) begin
          failures++;
          $display("SUB %h - %h = %h, expected %h", a, b, dout[1], e1);
        end
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
      exp_q[0].push_back(ref_op(0, a, b));
      exp_q[1].push_back(ref_op(1, a, b));
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
    logic [31:0] a, b;
    lr = 0; rr = 0; ld = 0; rd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed cases
    apply(32'h3F800000, 32'h3F800000, 1, 1);  // 1 + 1
    apply(32'h3F800000, 32'h33800000, 1, 1);  // tie to even
    apply(32'h3F800001, 32'h33800000, 1, 1);  // tie, round up
    apply(32'h40490FDB, 32'hC0490FDB, 1, 1);  // x - x
    apply(32'h00000000, 32'h80000000, 1, 1);  // +0 and -0
    apply(32'h80000000, 32'h80000000, 1, 1);
    apply(32'h7F7FFFFF, 32'h7F7FFFFF, 1, 1);  // overflow
    apply(32'h7F800000, 32'hFF800000, 1, 1);  // inf - inf
    apply(32'h7FC00000, 32'h3F800000, 1, 1);  // NaN
    apply(32'h7F800000, 32'h3F800000, 1, 1);  // inf
    apply(32'h00800000, 32'h80800001, 1, 1);  // underflow to zero
    apply(32'h3F800000, 32'h00000000, 1, 1);
    apply(32'h4B7FFFFF, 32'h3F000000, 1, 1);  // carry out of rounding
    // random, wide range, random ready patterns
    for (int i = 0; i < 3000; i++) begin
      a = rand_fp(90, 80);
      b = rand_fp(90, 80);
      apply(a, b, 1'($urandom_range(3) != 0), 1'($urandom_range(3) != 0));
    end
    // random, close exponents (cancellation)
    for (int i = 0; i < 3000; i++) begin
      a = rand_fp(127, 3);
      b = rand_fp(127, 3);
      if ($urandom_range(1) != 0) b[22:8] = a[22:8];
      apply(a, b, 1, 1);
    end
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
