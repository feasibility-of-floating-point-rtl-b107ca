// vec_mod_env: checking environment for one vector module configuration,
// used by tb_vec_module. Loads a program of four instructions (lengths 7, 1,
// 33 and 16, the third computed in place over its A vector, or AB vector for
// one-input modules) with random operands, releases the module, and when irq
// rises checks every result bit for bit against reference arithmetic, checks
// that nothing outside the output vectors was written, and checks the run
// time: (K + 2) + 4 N + 8 cycles per instruction plus K + 2 for the end
// marker, with K = 4 instruction words (two-input) or 3 (one-input).
module vec_mod_env
  import fp_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter fp_op_e OP  = OP_ADD,
  parameter bit     TWO = 1'b1
) (
  input  logic clk,
  input  logic start,
  output int   checks_o,
  output int   failures_o,
  output logic fin
);
  localparam int K  = TWO ? 4 : 3;
  localparam int NI = 4;
  localparam int NV [NI] = '{7, 1, 33, 16};

  logic              rst_n, req, rw, irq;
  logic [17:0]       addr;
  logic [31:0]       wdata, rdata;
  int                cyc;

  vec_module #(.OP(OP), .TWO_INPUT(TWO)) u_dut (.clk, .rst_n, .mem_req(req), .mem_rw(rw),
    .mem_addr(addr), .mem_wdata(wdata), .mem_rdata(rdata), .irq);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  logic [31:0] expect_mem [int];   // address -> expected final contents
  int          n_writes;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && req && !rw) n_writes <= n_writes + 1;
  end

  initial begin
    int pc, a, b, c, exp_cycles;
    logic [31:0] va, vb;
    checks_o = 0; failures_o = 0; fin = 1'b0; n_writes = 0; cyc = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset at once
    pc = 0; exp_cycles = 0;
    for (int j = 0; j < NI; j++) begin
      a = 4096 * (j + 1);
      b = a + 1024;
      c = (j == 2) ? a : a + 2048;
      u_mem.mem[pc++] = NV[j];
      u_mem.mem[pc++] = a;
      if (TWO) u_mem.mem[pc++] = b;
      u_mem.mem[pc++] = c;
      exp_cycles += K + 2 + 4 * NV[j] + 8;
      for (int i = 0; i < 2 * NV[j] + 4; i++) begin
        u_mem.mem[a + i] = rand_fp(110, 30);
        u_mem.mem[b + i] = rand_fp(110, 30);
      end
      for (int i = 0; i < 2 * NV[j] + 4; i++) begin
        expect_mem[a + i] = u_mem.mem[a + i];
        expect_mem[b + i] = u_mem.mem[b + i];
        expect_mem[c + i] = u_mem.mem[c + i];
      end
      for (int i = 0; i < NV[j]; i++) begin
        va = TWO ? u_mem.mem[a + i] : u_mem.mem[a + 2 * i];
        vb = TWO ? u_mem.mem[b + i] : u_mem.mem[a + 2 * i + 1];
        expect_mem[c + i] = ref_op(int'(OP), va, vb);
      end
    end
    u_mem.mem[pc] = 0;
    exp_cycles += K + 2;
    wait (start);
    @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!irq && cyc < 100000) @(negedge clk);
    checks_o++;
    if (cyc != exp_cycles) begin
      failures_o++;
      $display("op %0d two %0d: irq after %0d cycles, expected %0d", OP, TWO, cyc, exp_cycles);
    end
    foreach (expect_mem[ad]) begin
      checks_o++;
      if (!fp_match(u_mem.mem[ad], expect_mem[ad])) begin
        failures_o++;
        if (failures_o < 6) $display("op %0d two %0d: mem[%0d] = %h, expected %h", OP, TWO, ad, u_mem.mem[ad], expect_mem[ad]);
      end
    end
    checks_o++;
    if (n_writes != 7 + 1 + 33 + 16) begin
      failures_o++;
      $display("op %0d two %0d: %0d writes", OP, TWO, n_writes);
    end
    fin = 1'b1;
  end
endmodule
