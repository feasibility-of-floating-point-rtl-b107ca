// tb_pe: reconfigures one processing element with each of its seven modules
// in turn, on the same memory, the way the host does: hold reset, select the
// configuration, load data and instructions, release reset, wait for irq.
// Each vector configuration computes 20 results (two instructions, lengths
// 12 and 8); the accumulator configuration sums 40 integers. Results are
// checked bit for bit, and the run time of each vector program against
// (K + 2) + 4 N + 8 cycles per instruction.
module tb_pe;
  import fp_pkg::*;
  import fp_ref_pkg::*;

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

  task automatic run(output int cycles);
    int t0;
    @(negedge clk);
    rst_n = 1'b1;
    t0 = cyc;
    while (!irq && cyc - t0 < 20000) @(negedge clk);
    cycles = cyc - t0;
    rst_n = 1'b0;
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc, k, cycles, expc, s;
    bit two;
    int op;
    logic [31:0] e;
    cfg = CFG_ADD1;
    #1 rst_n = 1'b0;
    for (int ci = 0; ci < 7; ci++) begin
      cfg = pe_cfg_e'(ci);
      pc = 0;
      if (cfg == CFG_ACC) begin
        s = 0;
        u_mem.mem[0] = 40; u_mem.mem[1] = 1000; u_mem.mem[2] = 2000; u_mem.mem[3] = 0;
        for (int i = 0; i < 40; i++) begin
          u_mem.mem[1000 + i] = int2f(i * 7 - 100);
          s += i * 7 - 100;
        end
        run(cycles);
        checks++;
        if (!irq || u_mem.mem[2000] !== int2f(s)) begin
          failures++;
          $display("ACC: irq %0d sum %h expected %h", irq, u_mem.mem[2000], int2f(s));
        end
      end else begin
        two = (ci >= 3);
        op  = ci % 3;
        k   = two ? 4 : 3;
        expc = 0;
        for (int j = 0; j < 2; j++) begin
          u_mem.mem[pc++] = j ? 8 : 12;
          u_mem.mem[pc++] = 1000 + 100 * j;
          if (two) u_mem.mem[pc++] = 3000 + 100 * j;
          u_mem.mem[pc++] = 5000 + 100 * j;
          expc += k + 2 + 4 * (j ? 8 : 12) + 8;
          for (int i = 0; i < 24; i++) begin
            u_mem.mem[1000 + 100 * j + i] = rand_fp(115, 20);
            u_mem.mem[3000 + 100 * j + i] = rand_fp(115, 20);
          end
        end
        u_mem.mem[pc] = 0;
        expc += k + 2;
        run(cycles);
        checks++;
        if (cycles != expc) begin
          failures++;
          $display("cfg %0d: %0d cycles, expected %0d", ci, cycles, expc);
        end
        for (int j = 0; j < 2; j++) begin
          for (int i = 0; i < (j ? 8 : 12); i++) begin
            if (two) e = ref_op(op, u_mem.mem[1000 + 100 * j + i], u_mem.mem[3000 + 100 * j + i]);
            else     e = ref_op(op, u_mem.mem[1000 + 100 * j + 2 * i], u_mem.mem[1000 + 100 * j + 2 * i + 1]);
            checks++;
            if (!fp_match(u_mem.mem[5000 + 100 * j + i], e)) begin
              failures++;
              $display("cfg %0d: C[%0d][%0d] = %h expected %h", ci, j, i, u_mem.mem[5000 + 100 * j + i], e);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
