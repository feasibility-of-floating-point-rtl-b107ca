// vec_ctrl_lat_env: checks the vector controller with a core of latency LAT
// (lat_core_dp_model in place of the data processor). It runs two addition
// instructions (N = 7 and N = 13) and the end marker, then checks every sum
// written and the run time: (K + 2) + 4 N + LAT cycles per instruction when
// LAT mod 4 is 0 or 3 (no read ever meets a write), and at most one extra
// cycle per pair otherwise, when a read waits for a write. Each wait adds
// exactly one cycle, so the number of waits is the run time less the
// no-wait time.
module vec_ctrl_lat_env
  import fp_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter bit TWO = 1'b1,
  parameter int LAT = 9
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks_o,
  output int   failures_o,
  output int   waits_o,
  output logic fin
);
  localparam int K     = TWO ? 4 : 3;
  localparam int NV [2] = '{7, 13};

  fd_uinst_t   fd_u;
  vdp_uinst_t  dp_u;
  logic        done, final_o, rr, lr, rdyr, req, rw, irq;
  logic [3:0]  ecnt;
  logic [17:0] addr;
  logic [31:0] rdata, wdata;

  vec_controller #(.TWO_INPUT(TWO), .EMPTY_CYCLES(LAT)) u_ctrl (.clk, .rst_n, .done,
    .final_o, .ecnt, .result_ready(rdyr), .fd_uinst(fd_u), .dp_uinst(dp_u),
    .mem_req(req), .mem_rw(rw), .irq);
  lat_core_dp_model #(.LAT(LAT)) u_dp (.clk, .rst_n, .uinst(dp_u), .data_in(rdata),
    .left_ready(lr), .right_ready(rr), .result_ready(rdyr), .data_out(wdata));
  fetch_decode_unit #(.HAS_CR1(TWO), .ELEM_WORDS(TWO ? 1 : 2)) u_fd (.clk, .rst_n,
    .uinst(fd_u), .data_in(rdata), .addr_out(addr), .done, .final_o, .ecnt);
  pe_memory_model u_mem (.clk, .req, .rw, .addr, .wdata, .rdata);

  initial begin
    int pc, cyc, lo, hi, a, b, c;
    checks_o = 0; failures_o = 0; waits_o = 0; fin = 1'b0;
    pc = 0; lo = K + 2;
    for (int j = 0; j < 2; j++) begin
      a = 1000 + 100 * j; b = 2000 + 100 * j; c = 3000 + 100 * j;
      u_mem.mem[pc++] = NV[j];
      u_mem.mem[pc++] = a;
      if (TWO) u_mem.mem[pc++] = b;
      u_mem.mem[pc++] = c;
      for (int i = 0; i < 2 * NV[j]; i++) begin
        u_mem.mem[a + i] = rand_fp(120, 12);
        u_mem.mem[b + i] = rand_fp(120, 12);
      end
      lo += K + 2 + 4 * NV[j] + LAT;
    end
    u_mem.mem[pc] = 0;
    hi = (LAT % 4 == 0 || LAT % 4 == 3) ? lo : lo + NV[0] + NV[1];
    @(posedge rst_n);
    #1;
    cyc = 0;
    while (!irq && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    waits_o = cyc - lo;
    checks_o++;
    if (!irq || cyc < lo || cyc > hi) begin
      failures_o++;
      $display("%s LAT %0d: irq %0d after %0d cycles, expected %0d..%0d",
               TWO ? "two" : "one", LAT, irq, cyc, lo, hi);
    end
    for (int j = 0; j < 2; j++)
      for (int i = 0; i < NV[j]; i++) begin
        logic [31:0] e;
        a = 1000 + 100 * j; b = 2000 + 100 * j; c = 3000 + 100 * j;
        e = TWO ? ref_op(0, u_mem.mem[a + i], u_mem.mem[b + i])
                : ref_op(0, u_mem.mem[a + 2 * i], u_mem.mem[a + 2 * i + 1]);
        checks_o++;
        if (!fp_match(u_mem.mem[c + i], e)) begin
          failures_o++;
          $display("%s LAT %0d: C%0d[%0d] = %h expected %h", TWO ? "two" : "one",
                   LAT, j, i, u_mem.mem[c + i], e);
        end
      end
    fin = 1'b1;
  end
endmodule
