// acc_controller: module controller for the accumulation module.
//
// Runs a list of accumulate instructions from memory. Each instruction is
// three words at PC: the length N, the start address of the numbers and the
// address the sum is written to. N = 0 ends the list; the controller then
// halts and raises irq until reset.
//
// A pipelined adder with an L = 9 cycle loop (8 core stages plus the operand
// register) accumulates in three steps:
//   1 fill:       each number read is added to +0.0 (R1 cleared) until the
//                 first partial sum comes out of the core;
//   2 accumulate: one number is read per cycle and added to the partial sum
//                 leaving the core in the same cycle (M1 feedback), so L
//                 interleaved partial sums circulate and the core is busy
//                 every cycle. Steps 1 and 2 are one state here: a number is
//                 paired with the core output if there is one, else with zero;
//   3 empty:      ECnt is loaded with the number of live partial sums,
//                 min(N, L). Each partial sum leaving the core is either held
//                 in R0 (M0 feedback) or, if one is already held, loaded into
//                 R1 so the two are added; ECnt counts one fewer sum for each
//                 such pair. When ECnt is 1 the value leaving the core is the
//                 total and it is written to memory.
// Timing: fetch K + 2 = 5 cycles, then one read per cycle for N cycles, then
// the emptying, whose length depends on min(N, L) (about 40 cycles for
// N >= 9).
//
// The three steps, the feedback through M0/M1, reading every cycle and the
// use of ECnt while emptying follow the design description. The instruction
// layout, the zero-length end marker, forwarding through an add with +0.0
// and the pairing rule used while emptying are this design's own.
// The micro-instruction field inc_cr1 (second input vector) is always 0
// here: the accumulator has no CR1.
module acc_controller
  import fp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              done,
  input  logic              final_o,
  input  logic [ECNT_W-1:0] ecnt,
  input  logic              result_ready,
  input  logic              left_ready,
  input  logic              right_ready,
  output fd_uinst_t         fd_uinst,
  output adp_uinst_t        dp_uinst,
  output logic              mem_req,
  output logic              mem_rw,   // 1 read, 0 write
  output logic              irq
);

  localparam int unsigned K    = 3;
  localparam int unsigned LOOP = CORE_STAGES + 1;

  typedef enum logic [2:0] {
    S_FETCH, S_DECODE, S_ACCUM, S_EMPTY, S_HALT
  } state_e;

  state_e     state;
  logic [2:0] fi;
  logic       pend;
  ld_sel_e    pend_sel;
  logic       rd_pend;   // a number read last cycle is on the data bus

  function automatic ld_sel_e word_sel(input logic [2:0] idx);
    unique case (idx)
      3'd0:    return LD_RF;
      3'd1:    return LD_CR0;
      default: return LD_CW;
    endcase
  endfunction

  always_comb begin
    fd_uinst = '0;
    dp_uinst = '0;
    mem_req  = 1'b0;
    mem_rw   = 1'b1;
    fd_uinst.addr_sel = ASEL_PC;
    unique case (state)
      S_FETCH: begin
        if (fi < 3'(K)) begin
          mem_req         = 1'b1;
          fd_uinst.inc_pc = 1'b1;
        end
        fd_uinst.ld_en  = pend;
        fd_uinst.ld_sel = pend_sel;
      end
      S_ACCUM: begin
        if (!done) begin
          mem_req           = 1'b1;
          fd_uinst.addr_sel = ASEL_CR0;
          fd_uinst.inc_cr0  = 1'b1;
        end
        if (rd_pend) begin
          dp_uinst.ld_r0 = 1'b1;              // M0 = data in
          if (result_ready) begin
            dp_uinst.ld_r1 = 1'b1;            // M1 = feedback
            dp_uinst.m1_fb = 1'b1;
          end else begin
            dp_uinst.clr_r1 = 1'b1;           // pipeline still filling
          end
          if (done) begin
            fd_uinst.ecnt_load   = 1'b1;
            fd_uinst.ecnt_min_rf = 1'b1;
            fd_uinst.ecnt_val    = ECNT_W'(LOOP);
          end
        end
      end
      S_EMPTY: begin
        if (result_ready) begin
          if (ecnt == 1) begin
            mem_req           = 1'b1;         // the total
            mem_rw            = 1'b0;
            fd_uinst.addr_sel = ASEL_CW;
            fd_uinst.inc_cw   = 1'b1;
          end else if (left_ready && !right_ready) begin
            dp_uinst.ld_r1    = 1'b1;         // pair with the held sum
            dp_uinst.m1_fb    = 1'b1;
            fd_uinst.ecnt_dec = 1'b1;
          end else begin
            dp_uinst.ld_r0 = 1'b1;            // hold it
            dp_uinst.m0_fb = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FETCH;
      fi       <= '0;
      pend     <= 1'b0;
      pend_sel <= LD_RF;
      rd_pend  <= 1'b0;
    end else begin
      unique case (state)
        S_FETCH: begin
          pend     <= (fi < 3'(K));
          pend_sel <= word_sel(fi);
          if (fi < 3'(K)) fi <= fi + 1'b1;
          else begin
            fi    <= '0;
            state <= S_DECODE;
          end
        end
        S_DECODE: begin
          rd_pend <= 1'b0;
          state   <= final_o ? S_HALT : S_ACCUM;
        end
        S_ACCUM: begin
          rd_pend <= !done;
          if (done && rd_pend) state <= S_EMPTY;
        end
        S_EMPTY: if (result_ready && ecnt == 1) state <= S_FETCH;
        default: ;
      endcase
    end
  end

  assign irq = (state == S_HALT);

  // While accumulating, every core result meets a number from memory.
  a_result_has_partner: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ACCUM && result_ready) |-> rd_pend)
    else $error("partial sum without a number to add");

endmodule
