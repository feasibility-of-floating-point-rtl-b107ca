// fp_pkg: types and constants shared by the floating-point vector modules.
//
// Holds the IEEE-754 single-precision word layout, the core pipeline depth,
// the module configurations a processing element can be loaded with and the
// memory-port bundle between a module and its memory. The 32-bit word, the
// eight core stages, the 18-bit memory address and the set of seven modules
// follow the design description; the enum encodings are this design's own.
package fp_pkg;

  localparam int unsigned FP_W       = 32;  // single-precision word
  localparam int unsigned EXP_W      = 8;
  localparam int unsigned MAN_W      = 23;
  localparam int unsigned CORE_STAGES = 8;  // standard core latency
  localparam int unsigned ADDR_W_DEF = 18;  // 2^18 words x 32 bit = 1 MB per PE

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

  localparam fp32_t FP_ZERO = '0;
  localparam fp32_t FP_QNAN = '{sign: 1'b0, exp: 8'hFF, man: 23'h400000};

  // Operation carried out by a core.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } fp_op_e;

  // The module a processing element is configured with.
  typedef enum logic [2:0] {
    CFG_ADD1 = 3'd0,  // one-input-vector (interleaved) addition
    CFG_SUB1 = 3'd1,
    CFG_MUL1 = 3'd2,
    CFG_ADD2 = 3'd3,  // two-input-vector (separate) addition
    CFG_SUB2 = 3'd4,
    CFG_MUL2 = 3'd5,
    CFG_ACC  = 3'd6   // accumulation
  } pe_cfg_e;

  // Address sources selected by multiplexor M2.
  typedef enum logic [1:0] {
    ASEL_CR0 = 2'd0,
    ASEL_CR1 = 2'd1,
    ASEL_CW  = 2'd2,
    ASEL_PC  = 2'd3
  } addr_sel_e;

  // Destination of an instruction word being fetched.
  typedef enum logic [1:0] {
    LD_RF  = 2'd0,
    LD_CR0 = 2'd1,
    LD_CR1 = 2'd2,
    LD_CW  = 2'd3
  } ld_sel_e;

  localparam int unsigned ECNT_W = 4;  // emptying counter width

  // Micro-instruction for the fetch/decode unit (address management).
  typedef struct packed {
    logic              ld_en;        // load the register chosen by ld_sel from data_in
    ld_sel_e           ld_sel;
    logic              inc_cr0;
    logic              inc_cr1;
    logic              inc_cw;
    logic              inc_pc;
    addr_sel_e         addr_sel;     // multiplexor M2
    logic              ecnt_load;    // ECnt <= ecnt_val (clipped to RF if ecnt_min_rf)
    logic              ecnt_min_rf;
    logic [ECNT_W-1:0] ecnt_val;
    logic              ecnt_dec;
  } fd_uinst_t;

  // Micro-instruction for the two-register data processor of a vector module.
  typedef struct packed {
    logic ld_r0;   // R0 <= data_in, left operand becomes ready
    logic ld_r1;   // R1 <= data_in, right operand becomes ready
  } vdp_uinst_t;

  // Micro-instruction for the accumulator data processor.
  typedef struct packed {
    logic ld_r0;   // R0 <= M0 output, left operand becomes ready
    logic m0_fb;   // M0: 0 = data_in, 1 = core output
    logic ld_r1;   // R1 <= M1 output, right operand becomes ready
    logic m1_fb;   // M1: 0 = data_in, 1 = core output
    logic clr_r1;  // R1 <= +0.0, right operand becomes ready
  } adp_uinst_t;

endpackage
