// vec_ctrl_env: one checking environment for tb_vec_controller. It wires a
// vector-module controller (TWO = two-input or one-input) to a data
// processor, a fetch/decode unit and a memory model, loads a program of three
// instructions, compares every memory access with the expected schedule and
// checks the sums written.
module vec_ctrl_env
  import fp_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter bit TWO = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   failures_o,
  output logic fin
);

  typedef struct packed {
    logic        req;
    logic        rw;
    logic [17:0] addr;
  } acc_t;

  localparam int NV [3] = '{5, 1, 12};

  initial begin
    checks_o = 0;
    failures_o = 0;
    fin = 1'b0;
  end

  localparam int K   = TWO ? 4 : 3;

  fd_uinst_t         fd_u;
  vdp_uinst_t        dp_u;
  logic              done, final_o, rr, lr, rdyr, req, rw, irq;
  logic [3:0]        ecnt;
  logic [17:0]       addr;
  logic [31:0]       rdata, wdata;

  vec_controller #(.TWO_INPUT(TWO)) u_ctrl (.clk, .rst_n, .done, .final_o, .ecnt,
    .result_ready(rdyr), .fd_uinst(fd_u), .dp_uinst(dp_u), .mem_req(req), .mem_rw(rw), .irq);
  vec_data_processor #(.OP(OP_ADD)) u_dp (.clk, .rst_n, .uinst(dp_u), .data_in(rdata),
    .left_ready(lr), .right_ready(rr), .result_ready(rdyr), .data_out(wdata));
  fetch_decode_unit #(.HAS_CR1(TWO), .ELEM_WORDS(TWO ? 1 : 2)) u_fd (.clk, .rst_n,
    .uinst(fd_u), .data_in(rdata), .addr_out(addr), .done, .final_o, .ecnt);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  acc_t exp_q [$];

  function automatic acc_t mk(input logic r, input logic w, input int ad);
    acc_t x;
    x.req = r; x.rw = w; x.addr = 18'(ad);
    return x;
  endfunction

  task automatic idle(input int n);
    repeat (n) exp_q.push_back('0);
  endtask

  initial begin
    int pc, cyc, mism, a, b, c;
    acc_t e;
    pc = 0; cyc = 0; mism = 0;
    // program: three instructions, then the end marker
    for (int j = 0; j < 3; j++) begin
      a = 1000 + 100 * j; b = 2000 + 100 * j; c = 3000 + 100 * j;
      u_mem.mem[pc++] = NV[j];
      u_mem.mem[pc++] = a;
      if (TWO) u_mem.mem[pc++] = b;
      u_mem.mem[pc++] = c;
      for (int w = 0; w < K; w++) exp_q.push_back(mk(1'b1, 1'b1, pc - K + w));
      idle(2);
      for (int i = 0; i < NV[j] + 2; i++) begin
        if (i < NV[j]) begin
          exp_q.push_back(mk(1'b1, 1'b1, TWO ? a + i : a + 2 * i));
          exp_q.push_back(mk(1'b1, 1'b1, TWO ? b + i : a + 2 * i + 1));
        end else idle(2);
        idle(1);
        if (i >= 2) exp_q.push_back(mk(1'b1, 1'b0, c + i - 2));
        else idle(1);
      end
      for (int i = 0; i < 2 * NV[j] + 2; i++) begin
        u_mem.mem[a + i] = int2f(i);
        u_mem.mem[b + i] = int2f(3 * i);
      end
    end
    u_mem.mem[pc] = 0;  // end marker; the controller still reads K words
    for (int w = 0; w < K; w++) exp_q.push_back(mk(1'b1, 1'b1, pc + w));
    idle(2);
    @(posedge rst_n);
    #1;
    while (!irq && cyc < 1000) begin
      e = (exp_q.size() != 0) ? exp_q.pop_front() : mk(1'b0, 1'b0, 0);
      checks_o++;
      if (req !== e.req || (req && (rw !== e.rw || addr !== e.addr))) begin
        failures_o++;
        if (mism++ < 5) $display("%s cycle %0d: req %0d rw %0d addr %0d, expected %0d %0d %0d",
                                 TWO ? "two" : "one", cyc, req, rw, addr, e.req, e.rw, e.addr);
      end
      cyc++;
      @(negedge clk);
    end
    checks_o++;
    if (exp_q.size() != 0 || !irq) begin
      failures_o++;
      $display("%s: irq %0d after %0d cycles, %0d expected accesses left",
               TWO ? "two" : "one", irq, cyc, exp_q.size());
    end
    // the values written are the element sums
    for (int i = 0; i < NV[2]; i++) begin
      checks_o++;
      if (u_mem.mem[3200 + i] !== int2f(TWO ? 4 * i : 4 * i + 1)) begin
        failures_o++;
        $display("%s: C[%0d] = %h", TWO ? "two" : "one", i, u_mem.mem[3200 + i]);
      end
    end
    fin = 1'b1;
  end

endmodule
