// tb_parallel_workloads: the vector workloads of the evaluation spread over
// several processing elements working in parallel. A board of five PEs
// (rc_matmul_top with NUM_PE = 5, one per FPGA of the original board) splits
// 131,000 operations evenly over 2 and over 5 PEs, for each of the seven
// module configurations. Each PE gets its share of the data and one module
// instruction, all of them are configured and released from reset together,
// and the run ends when every PE used has raised irq; unused PEs stay in
// reset.
//
// Memory layout in each PE (n = 131,000 / K elements): program at word 0,
// two-input A at 8 and B at 8 + n, one-input interleaved pairs at 8, the
// result vector at 8 + 2n; the accumulator sums n numbers at 8 into word 7
// and the host adds the K partial sums.
// Checked: every result bit for bit against the reference arithmetic, each
// partial and total sum against an error bound, and the run time of the
// board: 6 + 4n + 8 + 6 cycles (two-input), 5 + 4n + 8 + 5 (one-input), at
// most n + 60 (accumulator), printed as milliseconds at 50 MHz.
module tb_parallel_workloads;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  localparam int P     = 5;
  localparam int TOTAL = 131000;
  localparam int BASE  = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        rst_n [P];
  pe_cfg_e     cfg [P];
  logic        req [P], rw [P], irq [P], all_irq;
  logic [17:0] addr [P];
  logic [31:0] wdata [P], rdata [P];

  rc_matmul_top #(.NUM_PE(P)) u_top (.clk, .rst_n, .cfg, .mem_req(req), .mem_rw(rw),
    .mem_addr(addr), .mem_wdata(wdata), .mem_rdata(rdata), .irq, .all_irq);

  for (genvar p = 0; p < P; p++) begin : g_mem
    pe_memory_model u_mem (.clk, .req(req[p]), .rw(rw[p]), .addr(addr[p]),
      .wdata(wdata[p]), .rdata(rdata[p]));
  end

  task automatic put(input int p, input int a, input logic [31:0] v);
    case (p)
      0: g_mem[0].u_mem.mem[a] = v;
      1: g_mem[1].u_mem.mem[a] = v;
      2: g_mem[2].u_mem.mem[a] = v;
      3: g_mem[3].u_mem.mem[a] = v;
      default: g_mem[4].u_mem.mem[a] = v;
    endcase
  endtask

  function automatic logic [31:0] get(input int p, input int a);
    case (p)
      0: return g_mem[0].u_mem.mem[a];
      1: return g_mem[1].u_mem.mem[a];
      2: return g_mem[2].u_mem.mem[a];
      3: return g_mem[3].u_mem.mem[a];
      default: return g_mem[4].u_mem.mem[a];
    endcase
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%s", msg);
    end
  endtask

  // Operation code of the reference model: 0 add, 1 sub, 2 mul.
  function automatic int ref_code(input pe_cfg_e c);
    case (c)
      CFG_SUB1, CFG_SUB2: return 1;
      CFG_MUL1, CFG_MUL2: return 2;
      default:            return 0;
    endcase
  endfunction

  // Configure K PEs with c, release them together, wait until all K have
  // raised irq, then hold every PE in reset again.
  task automatic run(input pe_cfg_e c, input int k, output int cycles);
    int t0;
    bit all_done;
    for (int p = 0; p < P; p++) cfg[p] = c;
    @(negedge clk);
    for (int p = 0; p < k; p++) rst_n[p] = 1'b1;
    t0 = cyc;
    all_done = 1'b0;
    while (!all_done && cyc - t0 < 2000000) begin
      @(negedge clk);
      all_done = 1'b1;
      for (int p = 0; p < k; p++) all_done &= irq[p];
    end
    cycles = cyc - t0;
    for (int p = 0; p < P; p++) rst_n[p] = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pe_cfg_e cfgs [7] = '{CFG_ADD1, CFG_SUB1, CFG_MUL1, CFG_ADD2, CFG_SUB2, CFG_MUL2, CFG_ACC};
  int      mods [2] = '{2, 5};

  initial begin
    int n, k, cycles, expect_cyc, op, res;
    bit two;
    real exact, mag, part, total, part_exact, part_mag;
    for (int p = 0; p < P; p++) begin
      rst_n[p] = 1'b1;
      cfg[p] = CFG_ADD1;
    end
    #1;
    for (int p = 0; p < P; p++) rst_n[p] = 1'b0;

    foreach (mods[m]) begin
      k = mods[m];
      n = TOTAL / k;
      res = BASE + 2 * n;
      foreach (cfgs[ci]) begin
        op  = ref_code(cfgs[ci]);
        two = (cfgs[ci] inside {CFG_ADD2, CFG_SUB2, CFG_MUL2});
        exact = 0.0; mag = 0.0;
        for (int p = 0; p < k; p++) begin
          for (int i = 0; i < 2 * n; i++) put(p, BASE + i, rand_fp(100, 50));
          put(p, 0, n);
          put(p, 1, BASE);
          if (cfgs[ci] == CFG_ACC) begin
            put(p, 2, 7); put(p, 3, 0);
            for (int i = 0; i < n; i++) begin
              exact += f2r(get(p, BASE + i));
              mag   += (f2r(get(p, BASE + i)) < 0.0) ? -f2r(get(p, BASE + i)) : f2r(get(p, BASE + i));
            end
          end else if (two) begin
            put(p, 2, BASE + n); put(p, 3, res); put(p, 4, 0);
          end else begin
            put(p, 2, res); put(p, 3, 0);
          end
        end
        run(cfgs[ci], k, cycles);
        $display("%-9s on %0d PEs, %0d elements each: %0d cycles, %0.3f ms at 50 MHz",
                 cfgs[ci].name(), k, n, cycles, cycles / 50000.0);
        if (cfgs[ci] == CFG_ACC) begin
          chk(cycles > n && cycles < n + 60, $sformatf("ACC on %0d PEs: %0d cycles", k, cycles));
          total = 0.0;
          for (int p = 0; p < k; p++) begin
            part_exact = 0.0; part_mag = 0.0;
            for (int i = 0; i < n; i++) begin
              part_exact += f2r(get(p, BASE + i));
              part_mag   += (f2r(get(p, BASE + i)) < 0.0) ? -f2r(get(p, BASE + i)) : f2r(get(p, BASE + i));
            end
            part = f2r(get(p, 7));
            chk((part - part_exact <= n * part_mag / 16777216.0) && (part_exact - part <= n * part_mag / 16777216.0),
                $sformatf("ACC PE %0d: sum %g exact %g", p, part, part_exact));
            total += part;
          end
          chk((total - exact <= TOTAL * mag / 16777216.0) && (exact - total <= TOTAL * mag / 16777216.0),
              $sformatf("ACC on %0d PEs: total %g exact %g", k, total, exact));
        end else begin
          expect_cyc = two ? 6 + 4 * n + 8 + 6 : 5 + 4 * n + 8 + 5;
          chk(cycles == expect_cyc, $sformatf("%s on %0d PEs: %0d cycles, expected %0d",
              cfgs[ci].name(), k, cycles, expect_cyc));
          for (int p = 0; p < k; p++)
            for (int i = 0; i < n; i++) begin
              logic [31:0] e;
              e = two ? ref_op(op, get(p, BASE + i), get(p, BASE + n + i))
                      : ref_op(op, get(p, BASE + 2 * i), get(p, BASE + 2 * i + 1));
              chk(fp_match(get(p, res + i), e), $sformatf("%s PE %0d C[%0d] = %h expected %h",
                  cfgs[ci].name(), p, i, get(p, res + i), e));
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
