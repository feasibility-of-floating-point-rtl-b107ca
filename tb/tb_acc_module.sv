// tb_acc_module: runs the accumulation module over a program of eight
// instructions: sums of small integers (must be exact whatever the order of
// addition) and sums of random values of mixed sign and magnitude (must lie
// within N * 2^-24 * sum|x| of the exact sum, a bound for any order of
// addition). Also checks that the N numbers of an instruction are read in N
// consecutive cycles (one per cycle, the core busy every cycle), that each
// instruction writes exactly once, and that irq follows the end marker.
module tb_acc_module;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;

  logic        req, rw, irq;
  logic [17:0] addr;
  logic [31:0] wdata, rdata;

  acc_module u_dut (.clk, .rst_n, .mem_req(req), .mem_rw(rw), .mem_addr(addr),
    .mem_wdata(wdata), .mem_rdata(rdata), .irq);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  localparam int NI = 8;
  localparam int NV [NI]   = '{1, 3, 9, 17, 100, 1000, 5, 250};
  localparam bit INTV [NI] = '{1, 1, 1, 1, 1, 0, 0, 0};

  int first_rd [NI], last_rd [NI], n_wr [NI];

  function automatic int base(input int j);
    return 4096 * (j + 1);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int j = 0; j < NI; j++) begin
      if (req && rw && addr >= 18'(base(j)) && addr < 18'(base(j) + NV[j])) begin
        if (first_rd[j] < 0) first_rd[j] <= cyc;
        last_rd[j] <= cyc;
      end
      if (req && !rw && addr == 18'(base(j) + 3000)) n_wr[j] <= n_wr[j] + 1;
    end
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc;
    real exact [NI], mag [NI], got, bound;
    logic [31:0] v;
    #1 rst_n = 1'b0;
    pc = 0;
    for (int j = 0; j < NI; j++) begin
      first_rd[j] = -1; last_rd[j] = -1; n_wr[j] = 0;
      exact[j] = 0.0; mag[j] = 0.0;
      u_mem.mem[pc++] = NV[j];
      u_mem.mem[pc++] = base(j);
      u_mem.mem[pc++] = base(j) + 3000;
      for (int i = 0; i < NV[j]; i++) begin
        v = INTV[j] ? int2f(int'($urandom_range(2000)) - 1000) : rand_fp(120, 14);
        u_mem.mem[base(j) + i] = v;
        exact[j] += f2r(v);
        mag[j] += (f2r(v) < 0.0) ? -f2r(v) : f2r(v);
      end
    end
    u_mem.mem[pc] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    while (!irq && cyc < 100000) @(negedge clk);
    for (int j = 0; j < NI; j++) begin
      v = u_mem.mem[base(j) + 3000];
      got = f2r(v);
      checks++;
      if (INTV[j]) begin
        if (v !== r2f(exact[j])) begin
          failures++;
          $display("instr %0d: sum %h, expected %h", j, v, r2f(exact[j]));
        end
      end else begin
        bound = NV[j] * mag[j] / 16777216.0;
        if ((got - exact[j] > bound) || (exact[j] - got > bound)) begin
          failures++;
          $display("instr %0d: sum %g, exact %g, bound %g", j, got, exact[j], bound);
        end
      end
      checks++;
      if (last_rd[j] - first_rd[j] != NV[j] - 1) begin
        failures++;
        $display("instr %0d: %0d numbers read over %0d cycles", j, NV[j], last_rd[j] - first_rd[j] + 1);
      end
      checks++;
      if (n_wr[j] != 1) begin
        failures++;
        $display("instr %0d: %0d writes of the sum", j, n_wr[j]);
      end
    end
    checks++;
    if (!irq) begin
      failures++;
      $display("no irq");
    end
    $display("run time %0d cycles for %0d numbers", cyc, 1385);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
