// matmul_host: host-side environment for the matrix-multiplication runs.
// It instantiates rc_matmul_top with its default parameters and one memory
// model per PE, and plays the host and its instruction generator: for an
// M x M product (M even, H = M/2) PE p = 2r + c gets rows r*H.. of A
// (row-major) and columns c*H.. of B (column-major) and computes
// C[r*H+i][c*H+j] for i, j < H.
//
// Per-PE memory layout (words): session-1 instructions at 0 (4 H^2 + 1),
// then A half (H*M), B half (H*M), then the product vectors, M words for each
// (i, j). Session 1: the PE is configured with the two-input multiplier and
// each instruction (M, A row i, B column j, products of (i, j)) forms the
// element-wise products. Session 2: accumulator instructions (M, products of
// (i, j), A_BASE + i*H + j) overwrite the instruction area and the sums land
// in the A-half area, which held session-1 input. The host then reads C.
//
// Checked: C exactly (integer entries in [-4, 4], so every sum is exact),
// the session-1 run time (H^2 (4 M + 14) + 6 cycles per PE), and that every
// mechanism happened: instruction fetches, element pairs, pipeline emptying
// of the vector module, accumulator fill, accumulate with feedback, holding
// and pairing of partial sums while emptying, end-of-list halt with irq, and
// reconfiguration between the sessions.
module matmul_host
  import fp_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int M = 16
) (
  input  logic clk,
  output int   checks_o,
  output int   failures_o,
  output logic fin
);
  localparam int P      = 4;
  localparam int H      = M / 2;
  localparam int A_BASE = 4 * H * H + 1;
  localparam int B_BASE = A_BASE + H * M;
  localparam int P_BASE = B_BASE + H * M;
  localparam int NMECH  = 10;

  logic        rst_n [P];
  pe_cfg_e     cfg [P];
  logic        req [P], rw [P], irq [P], all_irq;
  logic [17:0] addr [P];
  logic [31:0] wdata [P], rdata [P];

  rc_matmul_top u_top (.clk, .rst_n, .cfg, .mem_req(req), .mem_rw(rw), .mem_addr(addr),
    .mem_wdata(wdata), .mem_rdata(rdata), .irq, .all_irq);

  int mech [P][NMECH];
  string mech_name [NMECH] = '{"instruction word loads", "vector element pairs",
    "vector pipeline emptyings", "accumulator fill (add to zero)",
    "accumulate with feedback (M1)", "partial sum held (M0)",
    "partial sums paired while emptying", "accumulator sums written",
    "end-of-list halts (irq)", "reconfigurations"};

  for (genvar p = 0; p < P; p++) begin : g_mem
    pe_memory_model u_mem (.clk, .req(req[p]), .rw(rw[p]), .addr(addr[p]),
      .wdata(wdata[p]), .rdata(rdata[p]));
    always @(posedge clk) begin
      if (rst_n[p]) begin
        if (cfg[p] == CFG_MUL2) begin
          if (u_top.g_pe[p].u_pe.g_mod[5].g_vec.u_mod.fd_uinst.ld_en)     mech[p][0]++;
          if (u_top.g_pe[p].u_pe.g_mod[5].g_vec.u_mod.dp_uinst.ld_r1)     mech[p][1]++;
          if (u_top.g_pe[p].u_pe.g_mod[5].g_vec.u_mod.fd_uinst.ecnt_load) mech[p][2]++;
        end
        if (cfg[p] == CFG_ACC) begin
          if (u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.fd_uinst.ld_en)     mech[p][0]++;
          if (u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.dp_uinst.clr_r1)    mech[p][3]++;
          if (u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.dp_uinst.ld_r0 &&
              !u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.dp_uinst.m0_fb &&
              u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.dp_uinst.m1_fb)     mech[p][4]++;
          if (u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.dp_uinst.m0_fb)     mech[p][5]++;
          if (u_top.g_pe[p].u_pe.g_mod[6].g_acc.u_mod.fd_uinst.ecnt_dec)  mech[p][6]++;
          if (req[p] && !rw[p])                                          mech[p][7]++;
        end
      end
    end
  end

  int  a_m [M][M], b_m [M][M];
  int  cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string msg);
    checks_o++;
    if (!ok) begin
      failures_o++;
      if (failures_o < 10) $display("%s", msg);
    end
  endtask

  task automatic run_session(input pe_cfg_e c, output int cycles);
    int t0;
    for (int p = 0; p < P; p++) begin
      if (cfg[p] != c) mech[p][9]++;
      cfg[p] = c;
    end
    @(negedge clk);
    for (int p = 0; p < P; p++) rst_n[p] = 1'b1;
    t0 = cyc;
    while (!all_irq && cyc - t0 < 50000000) @(negedge clk);
    cycles = cyc - t0;
    for (int p = 0; p < P; p++) begin
      if (irq[p]) mech[p][8]++;
      rst_n[p] = 1'b0;
    end
    @(negedge clk);
  endtask

  initial begin
    int r, c, pc, s1, s2, acc;
    checks_o = 0; failures_o = 0; fin = 1'b0; cyc = 0;
    for (int p = 0; p < P; p++) begin
      rst_n[p] = 1'b1;
      cfg[p] = CFG_ADD1;
      for (int k = 0; k < NMECH; k++) mech[p][k] = 0;
    end
    #1;
    for (int p = 0; p < P; p++) rst_n[p] = 1'b0;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        a_m[i][j] = int'($urandom_range(8)) - 4;
        b_m[i][j] = int'($urandom_range(8)) - 4;
      end
    // session 1: data and multiplier instructions
    for (int p = 0; p < P; p++) begin
      r = p / 2; c = p % 2;
      for (int i = 0; i < H; i++)
        for (int k = 0; k < M; k++) begin
          g_put(p, A_BASE + i * M + k, int2f(a_m[r * H + i][k]));
          g_put(p, B_BASE + i * M + k, int2f(b_m[k][c * H + i]));
        end
      pc = 0;
      for (int i = 0; i < H; i++)
        for (int j = 0; j < H; j++) begin
          g_put(p, pc++, M);
          g_put(p, pc++, A_BASE + i * M);
          g_put(p, pc++, B_BASE + j * M);
          g_put(p, pc++, P_BASE + (i * H + j) * M);
        end
      g_put(p, pc, 0);
    end
    run_session(CFG_MUL2, s1);
    chk(s1 == H * H * (4 * M + 14) + 6, $sformatf("session 1 took %0d cycles, expected %0d", s1, H * H * (4 * M + 14) + 6));
    // session 2: accumulator instructions only
    for (int p = 0; p < P; p++) begin
      pc = 0;
      for (int i = 0; i < H; i++)
        for (int j = 0; j < H; j++) begin
          g_put(p, pc++, M);
          g_put(p, pc++, P_BASE + (i * H + j) * M);
          g_put(p, pc++, A_BASE + i * H + j);
        end
      g_put(p, pc, 0);
    end
    run_session(CFG_ACC, s2);
    $display("M = %0d: session 1 %0d cycles, session 2 %0d cycles (%0.3f ms + %0.3f ms at 50 MHz)",
             M, s1, s2, s1 / 50000.0, s2 / 50000.0);
    // read C
    for (int p = 0; p < P; p++) begin
      r = p / 2; c = p % 2;
      for (int i = 0; i < H; i++)
        for (int j = 0; j < H; j++) begin
          acc = 0;
          for (int k = 0; k < M; k++) acc += a_m[r * H + i][k] * b_m[k][c * H + j];
          chk(g_get(p, A_BASE + i * H + j) === int2f(acc),
              $sformatf("C[%0d][%0d] = %h, expected %h", r * H + i, c * H + j, g_get(p, A_BASE + i * H + j), int2f(acc)));
        end
    end
    for (int k = 0; k < NMECH; k++) begin
      acc = 0;
      for (int p = 0; p < P; p++) acc += mech[p][k];
      $display("  %-36s %0d", mech_name[k], acc);
      chk(acc > 0, $sformatf("mechanism never happened: %s", mech_name[k]));
    end
    fin = 1'b1;
  end

  // memory access by PE index (generate blocks cannot be indexed by a variable)
  task automatic g_put(input int p, input int a, input logic [31:0] v);
    case (p)
      0: g_mem[0].u_mem.mem[a] = v;
      1: g_mem[1].u_mem.mem[a] = v;
      2: g_mem[2].u_mem.mem[a] = v;
      default: g_mem[3].u_mem.mem[a] = v;
    endcase
  endtask

  function automatic logic [31:0] g_get(input int p, input int a);
    case (p)
      0: return g_mem[0].u_mem.mem[a];
      1: return g_mem[1].u_mem.mem[a];
      2: return g_mem[2].u_mem.mem[a];
      default: return g_mem[3].u_mem.mem[a];
    endcase
  endfunction
endmodule
