// fetch_decode_unit: address management half of a module datapath.
//
// Holds the loadable address counters CR0 (first or only input vector),
// CR1 (second input vector, two-input modules only), CW (output vector)
// and PC (next module-instruction word), the RF register with the vector
// length, the emptying counter ECnt, the address multiplexor M2 and the
// specialised comparator. All of it is driven by one micro-instruction
// (fd_uinst_t) per cycle from the module controller.
//
// Comparator: DONE is high once the read counter CR0 has moved RF elements
// past the start address it was loaded with (ELEM_WORDS words per element:
// 2 for an interleaved one-input pair A0,B0,A1,B1,..., 1 otherwise). FINAL is
// high when RF holds zero; a module instruction of length zero therefore
// marks the end of the instruction list.
//
// Timing: all registers load or count on the rising clock edge; addr_out,
// done, final_o and ecnt are functions of the registers (addr_out also of
// the M2 select in the current micro-instruction). PC starts at word 0 after
// reset.
//
// The register set, M2, ECnt (4 bits), the 18-bit address and the DONE/FINAL
// outputs follow the design description. How the comparator decides DONE
// and FINAL, the start address 0 and the clipped ECnt load used by the
// accumulator are this design's own choices.
module fetch_decode_unit
  import fp_pkg::*;
#(
  parameter int unsigned ADDR_W     = ADDR_W_DEF,
  parameter bit          HAS_CR1    = 1'b1,  // two-input module datapath
  parameter int unsigned ELEM_WORDS = 1      // words read by CR0 per element
) (
  input  logic              clk,
  input  logic              rst_n,
  input  fd_uinst_t         uinst,
  input  logic [31:0]       data_in,
  output logic [ADDR_W-1:0] addr_out,
  output logic              done,
  output logic              final_o,
  output logic [ECNT_W-1:0] ecnt
);

  logic [ADDR_W-1:0] cr0, cr1, cw, pc, rf, cr0_base;
  logic [ECNT_W-1:0] ecnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr0      <= '0;
      cr1      <= '0;
      cw       <= '0;
      pc       <= '0;
      rf       <= '0;
      cr0_base <= '0;
      ecnt_q   <= '0;
    end else begin
      if (uinst.ld_en) begin
        unique case (uinst.ld_sel)
          LD_RF:  rf <= data_in[ADDR_W-1:0];
          LD_CR0: begin
            cr0      <= data_in[ADDR_W-1:0];
            cr0_base <= data_in[ADDR_W-1:0];
          end
          LD_CR1: if (HAS_CR1) cr1 <= data_in[ADDR_W-1:0];
          LD_CW:  cw <= data_in[ADDR_W-1:0];
        endcase
      end
      if (uinst.inc_cr0)            cr0 <= cr0 + 1'b1;
      if (uinst.inc_cr1 && HAS_CR1) cr1 <= cr1 + 1'b1;
      if (uinst.inc_cw)             cw  <= cw + 1'b1;
      if (uinst.inc_pc)             pc  <= pc + 1'b1;
      if (uinst.ecnt_load) begin
        if (uinst.ecnt_min_rf && (rf < ADDR_W'(uinst.ecnt_val))) ecnt_q <= rf[ECNT_W-1:0];
        else                                                  ecnt_q <= uinst.ecnt_val;
      end else if (uinst.ecnt_dec) begin
        ecnt_q <= ecnt_q - 1'b1;
      end
    end
  end

  // multiplexor M2
  always_comb begin
    unique case (uinst.addr_sel)
      ASEL_CR0: addr_out = cr0;
      ASEL_CR1: addr_out = HAS_CR1 ? cr1 : cr0;
      ASEL_CW:  addr_out = cw;
      ASEL_PC:  addr_out = pc;
    endcase
  end

  // specialised comparator
  logic [ADDR_W-1:0] consumed;
  assign consumed  = cr0 - cr0_base;
  assign done      = (consumed == ADDR_W'(rf * ELEM_WORDS));
  assign final_o   = (rf == '0);
  assign ecnt      = ecnt_q;

endmodule
