// tb_fetch_decode_unit: drives the fetch/decode unit's micro-instructions
// directly and checks its registers through the M2 address output, the
// DONE/FINAL comparator (one- and two-word elements) and the emptying
// counter, including the clipped load used by the accumulator.
module tb_fetch_decode_unit;
  import fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fd_uinst_t   u1, u2;
  logic [31:0] din;
  logic [17:0] a1, a2;
  logic        d1, d2, f1, f2;
  logic [3:0]  e1, e2;

  fetch_decode_unit #(.HAS_CR1(1'b1), .ELEM_WORDS(1)) u_two (.clk, .rst_n, .uinst(u1),
    .data_in(din), .addr_out(a1), .done(d1), .final_o(f1), .ecnt(e1));
  fetch_decode_unit #(.HAS_CR1(1'b0), .ELEM_WORDS(2)) u_one (.clk, .rst_n, .uinst(u2),
    .data_in(din), .addr_out(a2), .done(d2), .final_o(f2), .ecnt(e2));

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    // operands are zero-extended to 32 bits
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic step(input fd_uinst_t x, input logic [31:0] d);
    @(negedge clk);
    u1 = x; u2 = x; din = d;
    @(posedge clk);
    #1;
  endtask

  task automatic load(input ld_sel_e s, input logic [31:0] d);
    fd_uinst_t x = '0;
    x.ld_en = 1; x.ld_sel = s;
    step(x, d);
  endtask

  function automatic fd_uinst_t sel(input addr_sel_e s);
    fd_uinst_t x = '0;
    x.addr_sel = s;
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fd_uinst_t x;
    u1 = '0; u2 = '0; din = '0;
    #12 rst_n = 1;
    step(sel(ASEL_PC), 0);
    check("PC after reset", a1, 0);
    check("FINAL with RF=0", f1, 1);
    load(LD_RF, 5);
    check("FINAL with RF=5", f1, 0);
    load(LD_CR0, 32'h100);
    load(LD_CR1, 32'h200);
    load(LD_CW, 32'h3FFFF);
    step(sel(ASEL_CR0), 0); check("M2 CR0", a1, 18'h100);
    step(sel(ASEL_CR1), 0); check("M2 CR1", a1, 18'h200);
    check("one-input: CR1 reads CR0", a2, 18'h100);
    step(sel(ASEL_CW), 0);  check("M2 CW", a1, 18'h3FFFF);
    check("DONE before reading", d1, 0);
    // walk CR0 and CR1, four increments for each element of u_two
    for (int i = 0; i < 10; i++) begin
      x = '0; x.inc_cr0 = 1; x.inc_cr1 = 1; x.inc_cw = 1; x.inc_pc = 1; x.addr_sel = ASEL_CR0;
      step(x, 0);
      check("CR0 count", a1, 18'h100 + i + 1);
      check("DONE two-input", d1, (i + 1) == 5);
      check("DONE one-input", d2, (i + 1) == 10);
    end
    step(sel(ASEL_CR1), 0); check("CR1 count", a1, 18'h20A);
    step(sel(ASEL_CW), 0);  check("CW wraps", a1, 18'h00009);
    step(sel(ASEL_PC), 0);  check("PC count", a1, 10);
    // emptying counter
    x = '0; x.ecnt_load = 1; x.ecnt_val = 8; step(x, 0);
    check("ECnt load", e1, 8);
    x = '0; x.ecnt_dec = 1;
    for (int i = 7; i >= 1; i--) begin
      step(x, 0);
      check("ECnt dec", e1, i);
    end
    x = '0; x.ecnt_load = 1; x.ecnt_min_rf = 1; x.ecnt_val = 9; step(x, 0);
    check("ECnt clipped to RF", e1, 5);
    load(LD_RF, 20);
    x = '0; x.ecnt_load = 1; x.ecnt_min_rf = 1; x.ecnt_val = 9; step(x, 0);
    check("ECnt not clipped", e1, 9);
    // reloading CR0 restarts the comparator
    load(LD_RF, 2);
    load(LD_CR0, 32'h50);
    check("DONE after reload", d1, 0);
    x = '0; x.inc_cr0 = 1; step(x, 0); step(x, 0);
    check("DONE after 2", d1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
