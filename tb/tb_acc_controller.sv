// tb_acc_controller: checks the accumulator controller's memory schedule
// and its emptying. The controller drives a real accumulator data processor,
// fetch/decode unit and memory model. For each instruction the expected
// trace is built independently: three instruction-word reads, two idle
// cycles, then one number read per cycle for N cycles (the core busy every
// cycle), then no access until exactly one write of the sum. Also checked:
// ECnt is loaded with min(N, 9) partial sums when emptying starts, emptying
// ends within 60 cycles, the sum of 1..N is exact, and irq follows the end
// marker.
module tb_acc_controller;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fd_uinst_t   fd_u;
  adp_uinst_t  dp_u;
  logic        done, final_o, rr, lr, rdyr, req, rw, irq;
  logic [3:0]  ecnt;
  logic [17:0] addr;
  logic [31:0] rdata, wdata;

  acc_controller u_ctrl (.clk, .rst_n, .done, .final_o, .ecnt, .result_ready(rdyr),
    .left_ready(lr), .right_ready(rr), .fd_uinst(fd_u), .dp_uinst(dp_u),
    .mem_req(req), .mem_rw(rw), .irq);
  acc_data_processor u_dp (.clk, .rst_n, .uinst(dp_u), .data_in(rdata),
    .left_ready(lr), .right_ready(rr), .result_ready(rdyr), .data_out(wdata));
  fetch_decode_unit #(.HAS_CR1(1'b0), .ELEM_WORDS(1)) u_fd (.clk, .rst_n,
    .uinst(fd_u), .data_in(rdata), .addr_out(addr), .done, .final_o, .ecnt);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  localparam int NI = 6;
  localparam int NV [NI] = '{1, 2, 9, 10, 23, 64};

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pc, x, s, wait_cyc;
    pc = 0;
    for (int j = 0; j < NI; j++) begin
      x = 1000 + 100 * j;
      u_mem.mem[pc++] = NV[j];
      u_mem.mem[pc++] = x;
      u_mem.mem[pc++] = 5000 + j;
      for (int i = 0; i < NV[j]; i++) u_mem.mem[x + i] = int2f(i + 1);
    end
    u_mem.mem[pc] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1;
    pc = 0;
    for (int j = 0; j < NI; j++) begin
      x = 1000 + 100 * j;
      s = 5000 + j;
      for (int w = 0; w < 3; w++) begin
        chk(req && rw && addr == 18'(pc + w), $sformatf("instr %0d fetch word %0d: req %0d addr %0d", j, w, req, addr));
        @(negedge clk); #1;
      end
      pc += 3;
      for (int w = 0; w < 2; w++) begin
        chk(!req, $sformatf("instr %0d: access during decode", j));
        @(negedge clk); #1;
      end
      for (int i = 0; i < NV[j]; i++) begin
        chk(req && rw && addr == 18'(x + i), $sformatf("instr %0d read %0d: req %0d rw %0d addr %0d", j, i, req, rw, addr));
        @(negedge clk); #1;
      end
      // data of the last read arrives now; ECnt is loaded at the next edge
      chk(!req, $sformatf("instr %0d: access after the last read", j));
      @(negedge clk); #1;
      chk(ecnt == 4'((NV[j] < 9) ? NV[j] : 9), $sformatf("instr %0d: ECnt %0d", j, ecnt));
      wait_cyc = 0;
      while (!req && wait_cyc < 60) begin
        @(negedge clk); #1;
        wait_cyc++;
      end
      chk(req && !rw && addr == 18'(s), $sformatf("instr %0d: write req %0d rw %0d addr %0d", j, req, rw, addr));
      chk(wdata == int2f(NV[j] * (NV[j] + 1) / 2), $sformatf("instr %0d: sum %h", j, wdata));
      $display("N=%0d: emptying %0d cycles after the last number", NV[j], wait_cyc + 2);
      @(negedge clk); #1;
    end
    repeat (6) @(negedge clk);
    chk(irq, "no irq after the end marker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
