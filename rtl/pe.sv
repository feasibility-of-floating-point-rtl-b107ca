// pe: one processing element, an FPGA that the host configures with one of
// the seven floating-point modules and that owns one bank of memory.
//
// Loading a new configuration into the FPGA is modelled by the cfg input:
// every module is present, the one chosen by cfg is released from reset
// together with rst_n, the others stay in reset, and the memory port and
// irq follow the chosen module. cfg must only change while rst_n is low
// (the host reconfigures a PE between sessions, with the PE held in reset).
//
// Configurations (pe_cfg_e): CFG_ADD1/SUB1/MUL1 one-input-vector modules,
// CFG_ADD2/SUB2/MUL2 two-input-vector modules, CFG_ACC accumulator.
// Memory port timing is that of vec_module / acc_module. The set of modules
// follows the design description; modelling reconfiguration with a select
// input is this design's own.
module pe
  import fp_pkg::*;
#(
  parameter int unsigned ADDR_W = ADDR_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pe_cfg_e           cfg,
  output logic              mem_req,
  output logic              mem_rw,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata,
  output logic              irq
);

  localparam int unsigned NCFG = 7;

  logic              m_req   [NCFG];
  logic              m_rw    [NCFG];
  logic [ADDR_W-1:0] m_addr  [NCFG];
  logic [31:0]       m_wdata [NCFG];
  logic              m_irq   [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_mod
    logic m_rst_n;
    assign m_rst_n = rst_n && (cfg == pe_cfg_e'(i));
    if (i == int'(CFG_ACC)) begin : g_acc
      acc_module #(.ADDR_W(ADDR_W)) u_mod (
        .clk, .rst_n(m_rst_n),
        .mem_req(m_req[i]), .mem_rw(m_rw[i]), .mem_addr(m_addr[i]),
        .mem_wdata(m_wdata[i]), .mem_rdata, .irq(m_irq[i])
      );
    end else begin : g_vec
      localparam fp_op_e OP = (i % 3 == 0) ? OP_ADD : (i % 3 == 1) ? OP_SUB : OP_MUL;
      vec_module #(.OP(OP), .TWO_INPUT(i >= 3), .ADDR_W(ADDR_W)) u_mod (
        .clk, .rst_n(m_rst_n),
        .mem_req(m_req[i]), .mem_rw(m_rw[i]), .mem_addr(m_addr[i]),
        .mem_wdata(m_wdata[i]), .mem_rdata, .irq(m_irq[i])
      );
    end
  end

  always_comb begin
    mem_req   = 1'b0;
    mem_rw    = 1'b1;
    mem_addr  = '0;
    mem_wdata = '0;
    irq       = 1'b0;
    for (int i = 0; i < NCFG; i++) begin
      if (cfg == pe_cfg_e'(i)) begin
        mem_req   = m_req[i];
        mem_rw    = m_rw[i];
        mem_addr  = m_addr[i];
        mem_wdata = m_wdata[i];
        irq       = m_irq[i];
      end
    end
  end

endmodule
