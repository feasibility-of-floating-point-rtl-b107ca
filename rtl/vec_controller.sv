// vec_controller: module controller for the one- and two-input vector
// addition, subtraction and multiplication modules.
//
// It runs a list of module instructions from memory. Each instruction is a
// few consecutive words at PC: the vector length N, the start address of
// the input vector(s) and the start address of the output vector
// (two-input: N, A, B, C; one-input: N, AB, C where AB holds A0,B0,A1,B1,...).
// An instruction with N = 0 ends the list: the controller halts and raises
// irq until reset.
//
// Per instruction:
//   FETCH  : the instruction words are read at PC, one per cycle, and loaded
//            into RF, CR0, (CR1,) CW one cycle later (K+1 cycles for K words);
//   DECODE : one cycle, checks FINAL;
//   RUN    : a repeating four-cycle schedule per element pair:
//            slot 0 read A, slot 1 read B, slots 2 and 3 free; each operand
//            register loads one cycle after its read (R0 in slot 1, R1 in
//            slot 2) and the core starts by itself once both are loaded.
//            A result is written to CW in the cycle the core signals
//            RESULT_READY. If that cycle is slot 0 or 1, the read waits one
//            cycle. With the 8-cycle cores a result always falls in slot 3, so
//            there is never a wait: one read, read, idle, write pattern per
//            pair, one result every 4 cycles. Any other latency works too:
//            for a latency of 4k + 3 the writes fall in slot 2 and the rate
//            is the same; for 4k + 1 and 4k + 2 reads wait for writes and a
//            pair takes up to 5 cycles;
//   EMPTY  : after the last pair, ECnt is set to the core latency
//            (EMPTY_CYCLES, 8) and the controller keeps writing results until
//            it runs out.
// So an instruction takes (K + 2) + 4 N + 8 cycles, K = 4 (two-input) or 3.
//
// The 4-cycle pair schedule with one idle state, the 8-cycle emptying, the
// use of ECnt, DONE, FINAL and RESULT_READY, and a controller that does not
// depend on the core latency follow the design description. The instruction
// word layout, the zero-length end marker, the pipelined instruction fetch,
// the one-cycle wait of a read that meets a result and the interrupt output
// are this design's own; the fetch is shorter than the 9 (one-input) and 10
// (two-input) cycles the description quotes for its own instruction format.
// EMPTY_CYCLES must equal the core latency (at most 15, the width of ECnt).
// The micro-instruction field ecnt_min_rf, used by the accumulator only, is
// always 0 here.
module vec_controller
  import fp_pkg::*;
#(
  parameter bit          TWO_INPUT    = 1'b1,
  parameter int unsigned EMPTY_CYCLES = CORE_STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the fetch/decode unit
  input  logic              done,
  input  logic              final_o,
  input  logic [ECNT_W-1:0] ecnt,
  // from the data processor
  input  logic              result_ready,
  // micro-instructions
  output fd_uinst_t         fd_uinst,
  output vdp_uinst_t        dp_uinst,
  // memory control
  output logic              mem_req,
  output logic              mem_rw,   // 1 read, 0 write
  output logic              irq
);

  localparam int unsigned K = TWO_INPUT ? 4 : 3;  // instruction words

  typedef enum logic [2:0] {
    S_FETCH, S_DECODE, S_RUN, S_EMPTY, S_HALT
  } state_e;

  state_e     state;
  logic [2:0] fi;        // instruction words issued
  logic       pend;      // a word read last cycle is on the data bus
  ld_sel_e    pend_sel;
  logic [1:0] slot;
  logic       rd_a_q;    // first operand read last cycle
  logic       rd_b_q;    // second operand read last cycle
  logic       stall;     // read slot taken by a result write

  function automatic ld_sel_e word_sel(input logic [2:0] idx);
    unique case (idx)
      3'd0:    return LD_RF;
      3'd1:    return LD_CR0;
      3'd2:    return TWO_INPUT ? LD_CR1 : LD_CW;
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
      S_RUN: begin
        // Operand registers load one cycle after their read.
        dp_uinst.ld_r0 = rd_a_q;
        dp_uinst.ld_r1 = rd_b_q;
        if (result_ready) begin
          // A result is written in the cycle it leaves the core; a read slot
          // that meets it waits one cycle.
          mem_req           = 1'b1;
          mem_rw            = 1'b0;
          fd_uinst.addr_sel = ASEL_CW;
          fd_uinst.inc_cw   = 1'b1;
        end else if (slot == 2'd0) begin
          mem_req           = 1'b1;
          fd_uinst.addr_sel = ASEL_CR0;
          fd_uinst.inc_cr0  = 1'b1;
        end else if (slot == 2'd1) begin
          mem_req = 1'b1;
          if (TWO_INPUT) begin
            fd_uinst.addr_sel = ASEL_CR1;
            fd_uinst.inc_cr1  = 1'b1;
          end else begin
            fd_uinst.addr_sel = ASEL_CR0;
            fd_uinst.inc_cr0  = 1'b1;
          end
        end
        if (slot == 2'd3 && done) begin
          fd_uinst.ecnt_load = 1'b1;
          fd_uinst.ecnt_val  = ECNT_W'(EMPTY_CYCLES);
        end
      end
      S_EMPTY: begin
        if (result_ready) begin
          mem_req           = 1'b1;
          mem_rw            = 1'b0;
          fd_uinst.addr_sel = ASEL_CW;
          fd_uinst.inc_cw   = 1'b1;
        end
        fd_uinst.ecnt_dec = (ecnt != 1);
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
      slot     <= '0;
      rd_a_q   <= 1'b0;
      rd_b_q   <= 1'b0;
    end else begin
      rd_a_q <= (state == S_RUN) && (slot == 2'd0) && !result_ready;
      rd_b_q <= (state == S_RUN) && (slot == 2'd1) && !result_ready;
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
          slot  <= '0;
          state <= final_o ? S_HALT : S_RUN;
        end
        S_RUN: begin
          if (!stall) slot <= slot + 1'b1;
          if (slot == 2'd3 && done) state <= S_EMPTY;
        end
        S_EMPTY: if (ecnt == 1) state <= S_FETCH;
        default: ;
      endcase
    end
  end

  assign stall = result_ready && (slot inside {2'd0, 2'd1});
  assign irq   = (state == S_HALT);

  // Results only arrive while vectors are processed or the core empties.
  a_result_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    result_ready |-> (state == S_RUN) || (state == S_EMPTY))
    else $error("core result outside a vector run");

endmodule
