// tb_vector_workloads: the vector workloads of the evaluation on one
// processing element with its default 2^18-word memory: vectors of 131,000
// elements. Runs, with reconfiguration in between:
//   1 two-input addition C = A + B, computed in place over A (A and B fill
//     262,000 of the 262,144 words);
//   2 one-input multiplication of the interleaved pairs in words 0..261,999,
//     in place;
//   3 accumulation of 131,000 numbers.
// Checks every result bit for bit (the sum against an error bound) and the
// run times: 6 + 4 N + 8 + 6 and 5 + 4 N + 8 + 5 cycles for the vector
// modules, N + fetch + emptying for the accumulator, printed as milliseconds
// at 50 MHz.
module tb_vector_workloads;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 131000;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pe_cfg_e     cfg;
  logic        req, rw, irq;
  logic [17:0] addr;
  logic [31:0] wdata, rdata;

  pe u_dut (.clk, .rst_n, .cfg, .mem_req(req), .mem_rw(rw), .mem_addr(addr),
    .mem_wdata(wdata), .mem_rdata(rdata), .irq);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  logic [31:0] expv [N];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s", msg);
    end
  endtask

  // Configure, release reset, wait for irq, hold reset again.
  task automatic run(input pe_cfg_e c, output int cycles);
    int t0;
    cfg = c;
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    while (!irq && cyc - t0 < 2000000) @(negedge clk);
    cycles = cyc - t0;
    rst_n = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, base_a, base_b;
    real exact, mag, got;
    cfg = CFG_ADD2;
    #1 rst_n = 1'b0;
    // 1: two-input addition in place. Program at 0..4, A at 8, B at 8 + N.
    base_a = 8; base_b = 8 + N;
    u_mem.mem[0] = N; u_mem.mem[1] = base_a; u_mem.mem[2] = base_b; u_mem.mem[3] = base_a;
    u_mem.mem[4] = 0;
    for (int i = 0; i < N; i++) begin
      u_mem.mem[base_a + i] = rand_fp(110, 30);
      u_mem.mem[base_b + i] = rand_fp(110, 30);
      expv[i] = ref_op(0, u_mem.mem[base_a + i], u_mem.mem[base_b + i]);
    end
    run(CFG_ADD2, cycles);
    chk(cycles == 6 + 4 * N + 8 + 6, $sformatf("ADD2: %0d cycles", cycles));
    $display("two-input addition, N = %0d: %0d cycles, %0.3f ms at 50 MHz", N, cycles, cycles / 50000.0);
    for (int i = 0; i < N; i++)
      chk(fp_match(u_mem.mem[base_a + i], expv[i]), $sformatf("ADD2 C[%0d] = %h expected %h", i, u_mem.mem[base_a + i], expv[i]));
    // 2: one-input multiplication in place over interleaved pairs at 8..
    u_mem.mem[0] = N; u_mem.mem[1] = base_a; u_mem.mem[2] = base_a; u_mem.mem[3] = 0;
    for (int i = 0; i < 2 * N; i++) u_mem.mem[base_a + i] = rand_fp(100, 50);
    for (int i = 0; i < N; i++)
      expv[i] = ref_op(2, u_mem.mem[base_a + 2 * i], u_mem.mem[base_a + 2 * i + 1]);
    run(CFG_MUL1, cycles);
    chk(cycles == 5 + 4 * N + 8 + 5, $sformatf("MUL1: %0d cycles", cycles));
    $display("one-input multiplication, N = %0d: %0d cycles, %0.3f ms at 50 MHz", N, cycles, cycles / 50000.0);
    for (int i = 0; i < N; i++)
      chk(fp_match(u_mem.mem[base_a + i], expv[i]), $sformatf("MUL1 C[%0d] = %h expected %h", i, u_mem.mem[base_a + i], expv[i]));
    // 3: accumulation of the N products just computed
    u_mem.mem[0] = N; u_mem.mem[1] = base_a; u_mem.mem[2] = 7; u_mem.mem[3] = 0;
    exact = 0.0; mag = 0.0;
    for (int i = 0; i < N; i++) begin
      exact += f2r(u_mem.mem[base_a + i]);
      mag += (f2r(u_mem.mem[base_a + i]) < 0.0) ? -f2r(u_mem.mem[base_a + i]) : f2r(u_mem.mem[base_a + i]);
    end
    run(CFG_ACC, cycles);
    chk(cycles > N && cycles < N + 60, $sformatf("ACC: %0d cycles", cycles));
    $display("accumulation, N = %0d: %0d cycles, %0.3f ms at 50 MHz", N, cycles, cycles / 50000.0);
    got = f2r(u_mem.mem[7]);
    chk((got - exact <= N * mag / 16777216.0) && (exact - got <= N * mag / 16777216.0),
        $sformatf("ACC: sum %g exact %g", got, exact));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
