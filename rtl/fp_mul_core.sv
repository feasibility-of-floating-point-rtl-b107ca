// fp_mul_core: eight-stage pipelined IEEE-754 single-precision multiplier
// with the standard core interface.
//
// Interface: identical to fp_addsub_core. When left_ready and right_ready
// are both high in a cycle the core takes left_data and right_data and
// starts an operation; CORE_STAGES (8) cycles later result_ready is high
// for one cycle with left * right on data_out. One operation per cycle, no
// back-pressure.
//
// Pipeline: 1 unpack, classify, sign and biased exponent sum;
// 2 two 24x12 partial products; 3 sum of the partial products (48 bits);
// 4 normalise the product and form guard, round and sticky bits;
// 5 round to nearest even; 6 renormalise after a rounding carry;
// 7 detect overflow and underflow; 8 pack and select special results.
//
// The interface, word width and latency follow the design description; the
// stage split and the numeric corner cases are this design's choices:
// subnormal inputs are read as zero, subnormal results are flushed to a
// signed zero, overflow gives a signed infinity, NaN operands or 0 * inf
// give a quiet NaN.
module fp_mul_core
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        left_ready,
  input  logic [31:0] left_data,
  input  logic        right_ready,
  input  logic [31:0] right_data,
  output logic        result_ready,
  output logic [31:0] data_out
);

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        is_zero;
    logic [9:0]  exp;         // ea + eb - 127, two's complement
  } ctl_t;

  typedef struct packed {
    ctl_t        c;
    logic [23:0] ma;
    logic [23:0] mb;
  } s1_t;

  typedef struct packed {
    ctl_t        c;
    logic [35:0] p_lo;        // ma * mb[11:0]
    logic [35:0] p_hi;        // ma * mb[23:12]
  } s2_t;

  typedef struct packed {
    ctl_t        c;
    logic [47:0] prod;
  } s3_t;

  typedef struct packed {
    ctl_t        c;
    logic [26:0] man;         // hidden bit, 23 fraction bits, G R S
  } s4_t;

  typedef struct packed {
    ctl_t        c;
    logic [24:0] man;         // rounded significand with carry bit
  } s5_t;

  typedef struct packed {
    ctl_t        c;
    logic [22:0] frac;
  } s67_t;

  logic [CORE_STAGES:1] vld;
  s1_t  s1_q;
  s2_t  s2_q;
  s3_t  s3_q;
  s4_t  s4_q;
  s5_t  s5_q;
  s67_t s6_q, s7_q;
  logic [31:0] out_q;

  logic fire;
  assign fire = left_ready & right_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[CORE_STAGES-1:1], fire};
  end

  // stage 1: unpack and classify
  s1_t s1_d;
  always_comb begin
    fp32_t a, b;
    logic  a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    a = fp32_t'(left_data);
    b = fp32_t'(right_data);
    a_zero = (a.exp == 8'h00);
    b_zero = (b.exp == 8'h00);
    a_inf  = (a.exp == 8'hFF) && (a.man == '0);
    b_inf  = (b.exp == 8'hFF) && (b.man == '0);
    a_nan  = (a.exp == 8'hFF) && (a.man != '0);
    b_nan  = (b.exp == 8'hFF) && (b.man != '0);
    s1_d = '0;
    s1_d.c.sign    = a.sign ^ b.sign;
    s1_d.c.is_zero = a_zero | b_zero;
    s1_d.c.exp     = {2'b00, a.exp} + {2'b00, b.exp} - 10'd127;
    s1_d.ma        = {1'b1, a.man};
    s1_d.mb        = {1'b1, b.man};
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      s1_d.c.special     = 1'b1;
      s1_d.c.special_val = FP_QNAN;
    end else if (a_inf || b_inf) begin
      s1_d.c.special     = 1'b1;
      s1_d.c.special_val = {a.sign ^ b.sign, 8'hFF, 23'd0};
    end
  end

  // stage 2: partial products
  s2_t s2_d;
  always_comb begin
    s2_d.c    = s1_q.c;
    s2_d.p_lo = s1_q.ma * {24'd0, s1_q.mb[11:0]};
    s2_d.p_hi = s1_q.ma * {24'd0, s1_q.mb[23:12]};
  end

  // stage 3: full product
  s3_t s3_d;
  always_comb begin
    s3_d.c    = s2_q.c;
    s3_d.prod = {12'd0, s2_q.p_lo} + {s2_q.p_hi, 12'd0};
  end

  // stage 4: normalise; the product of two significands lies in [1, 4)
  s4_t s4_d;
  always_comb begin
    s4_d.c = s3_q.c;
    if (s3_q.prod[47]) begin
      s4_d.man   = {s3_q.prod[47:22], |s3_q.prod[21:0]};
      s4_d.c.exp = s3_q.c.exp + 10'd1;
    end else begin
      s4_d.man   = {s3_q.prod[46:21], |s3_q.prod[20:0]};
    end
  end

  // stage 5: round to nearest, ties to even
  s5_t s5_d;
  always_comb begin
    logic rnd;
    rnd      = s4_q.man[2] & (s4_q.man[1] | s4_q.man[0] | s4_q.man[3]);
    s5_d.c   = s4_q.c;
    s5_d.man = {1'b0, s4_q.man[26:3]} + 25'(rnd);
  end

  // stage 6: renormalise after a rounding carry
  s67_t s6_d;
  always_comb begin
    s6_d.c    = s5_q.c;
    s6_d.frac = s5_q.man[22:0];
    if (s5_q.man[24]) begin
      s6_d.c.exp = s5_q.c.exp + 10'd1;
      s6_d.frac  = s5_q.man[23:1];
    end
  end

  // stage 7: range limits
  s67_t s7_d;
  always_comb begin
    s7_d = s6_q;
    if (!s6_q.c.special && !s6_q.c.is_zero) begin
      if (s6_q.c.exp[9] || (s6_q.c.exp == 10'd0)) begin
        s7_d.c.is_zero = 1'b1;                       // underflow
      end else if (s6_q.c.exp >= 10'd255) begin
        s7_d.c.special     = 1'b1;                   // overflow
        s7_d.c.special_val = {s6_q.c.sign, 8'hFF, 23'd0};
      end
    end
  end

  // stage 8: pack
  logic [31:0] out_d;
  always_comb begin
    if (s7_q.c.special)      out_d = s7_q.c.special_val;
    else if (s7_q.c.is_zero) out_d = {s7_q.c.sign, 31'd0};
    else                     out_d = {s7_q.c.sign, s7_q.c.exp[7:0], s7_q.frac};
  end

  always_ff @(posedge clk) begin
    s1_q  <= s1_d;
    s2_q  <= s2_d;
    s3_q  <= s3_d;
    s4_q  <= s4_d;
    s5_q  <= s5_d;
    s6_q  <= s6_d;
    s7_q  <= s7_d;
    out_q <= out_d;
  end

  assign result_ready = vld[CORE_STAGES];
  assign data_out     = out_q;

endmodule
