// fp_addsub_core: eight-stage pipelined IEEE-754 single-precision adder or
// subtractor with the standard core interface.
//
// Interface: the core is self-controlled. In any cycle where both
// left_ready and right_ready are high the core takes left_data and
// right_data (its inputs are not registered, the datapath registers feed
// them) and starts an operation; exactly CORE_STAGES (8) cycles later
// result_ready is high for one cycle with the result on data_out. A new
// operation can start every cycle; there is no back-pressure. With
// SUBTRACT = 1 the core computes left - right, otherwise left + right.
//
// Pipeline: 1 unpack, classify and order operands by magnitude;
// 2 align the smaller significand (guard, round and sticky bits);
// 3 add or subtract significands; 4 count leading zeros;
// 5 normalise; 6 round to nearest even; 7 renormalise after rounding and
// detect overflow; 8 pack and select special results.
//
// The interface, the 32-bit words and the 8-stage depth follow the design
// description. The stage split, the rounding mode (round to nearest even)
// and the handling of unusual operands are this design's choices:
// subnormal inputs are read as zero and subnormal results are flushed to a
// signed zero, NaN operands or inf - inf give a quiet NaN, and overflow
// gives a signed infinity.
module fp_addsub_core
  import fp_pkg::*;
#(
  parameter bit SUBTRACT = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        left_ready,
  input  logic [31:0] left_data,
  input  logic        right_ready,
  input  logic [31:0] right_data,
  output logic        result_ready,
  output logic [31:0] data_out
);

  // ---------------------------------------------------------------- stage 1
  typedef struct packed {
    logic        special;    // result fixed by a NaN or infinity operand
    logic [31:0] special_val;
    logic        sign;       // sign of the larger operand
    logic        eff_sub;    // significands are subtracted
    logic        zero_sign;  // sign of an exact zero result
    logic [9:0]  exp;        // exponent of the larger operand
    logic [23:0] major;
    logic [23:0] minor;
    logic [5:0]  diff;       // exponent difference, clamped
  } s1_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        eff_sub;
    logic        zero_sign;
    logic [9:0]  exp;
    logic [26:0] major;        // significand followed by guard, round, sticky
    logic [26:0] minor;
  } s2_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        zero_sign;
    logic [9:0]  exp;
    logic [27:0] sum;
  } s3_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        zero_sign;
    logic [9:0]  exp;
    logic [27:0] sum;
    logic [4:0]  lz;         // leading zeros of sum
  } s4_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        is_zero;
    logic [9:0]  exp;
    logic [26:0] man;        // hidden bit at 26, then 23 fraction bits, G R S
  } s5_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        is_zero;
    logic [9:0]  exp;
    logic [24:0] man;        // rounded significand with carry bit
  } s6_t;

  typedef struct packed {
    logic        special;
    logic [31:0] special_val;
    logic        sign;
    logic        is_zero;
    logic [9:0]  exp;
    logic [22:0] frac;
  } s7_t;

  logic [CORE_STAGES:1] vld;
  s1_t s1_q;
  s2_t s2_q;
  s3_t s3_q;
  s4_t s4_q;
  s5_t s5_q;
  s6_t s6_q;
  s7_t s7_q;
  logic [31:0] out_q;

  logic fire;
  assign fire = left_ready & right_ready;

  // valid bits travel with the data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[CORE_STAGES-1:1], fire};
  end

  // stage 1: unpack, classify, order by magnitude
  s1_t s1_d;
  always_comb begin
    fp32_t a, b;
    logic  a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_ge;
    logic [23:0] ma, mb;
    logic [7:0]  d;
    a = fp32_t'(left_data);
    b = fp32_t'(right_data);
    b.sign = b.sign ^ SUBTRACT;
    a_zero = (a.exp == 8'h00);
    b_zero = (b.exp == 8'h00);
    a_inf  = (a.exp == 8'hFF) && (a.man == '0);
    b_inf  = (b.exp == 8'hFF) && (b.man == '0);
    a_nan  = (a.exp == 8'hFF) && (a.man != '0);
    b_nan  = (b.exp == 8'hFF) && (b.man != '0);
    ma = a_zero ? 24'd0 : {1'b1, a.man};
    mb = b_zero ? 24'd0 : {1'b1, b.man};
    a_ge = {a.exp, ma} >= {b.exp, mb};

    s1_d = '0;
    s1_d.zero_sign = a.sign & b.sign;
    s1_d.eff_sub   = a.sign ^ b.sign;
    if (a_nan || b_nan || (a_inf && b_inf && (a.sign != b.sign))) begin
      s1_d.special     = 1'b1;
      s1_d.special_val = FP_QNAN;
    end else if (a_inf) begin
      s1_d.special     = 1'b1;
      s1_d.special_val = {a.sign, 8'hFF, 23'd0};
    end else if (b_inf) begin
      s1_d.special     = 1'b1;
      s1_d.special_val = {b.sign, 8'hFF, 23'd0};
    end
    if (a_ge) begin
      s1_d.sign  = a.sign;
      s1_d.exp   = {2'b00, a.exp};
      s1_d.major   = ma;
      s1_d.minor = mb;
      d          = a.exp - b.exp;
    end else begin
      s1_d.sign  = b.sign;
      s1_d.exp   = {2'b00, b.exp};
      s1_d.major   = mb;
      s1_d.minor = ma;
      d          = b.exp - a.exp;
    end
    if (a_zero || b_zero) d = 8'd0;  // zero significand needs no alignment
    s1_d.diff = (d > 8'd27) ? 6'd27 : d[5:0];
  end

  // stage 2: align the smaller significand
  s2_t s2_d;
  always_comb begin
    logic [53:0] wide;
    wide = {s1_q.minor, 30'd0} >> s1_q.diff;
    s2_d.special     = s1_q.special;
    s2_d.special_val = s1_q.special_val;
    s2_d.sign        = s1_q.sign;
    s2_d.eff_sub     = s1_q.eff_sub;
    s2_d.zero_sign   = s1_q.zero_sign;
    s2_d.exp         = s1_q.exp;
    s2_d.major         = {s1_q.major, 3'b000};
    s2_d.minor       = {wide[53:28], wide[27] | (|wide[26:0])};
  end

  // stage 3: add or subtract significands (major >= minor in magnitude)
  s3_t s3_d;
  always_comb begin
    s3_d.special     = s2_q.special;
    s3_d.special_val = s2_q.special_val;
    s3_d.sign        = s2_q.sign;
    s3_d.zero_sign   = s2_q.zero_sign;
    s3_d.exp         = s2_q.exp;
    s3_d.sum         = s2_q.eff_sub ? ({1'b0, s2_q.major} - {1'b0, s2_q.minor})
                                    : ({1'b0, s2_q.major} + {1'b0, s2_q.minor});
  end

  // stage 4: leading-zero count
  s4_t s4_d;
  always_comb begin
    s4_d.special     = s3_q.special;
    s4_d.special_val = s3_q.special_val;
    s4_d.sign        = s3_q.sign;
    s4_d.zero_sign   = s3_q.zero_sign;
    s4_d.exp         = s3_q.exp;
    s4_d.sum         = s3_q.sum;
    s4_d.lz          = 5'd28;
    for (int i = 0; i < 28; i++) begin
      if (s3_q.sum[i]) s4_d.lz = 5'(27 - i);
    end
  end

  // stage 5: normalise so that the hidden bit sits at position 26
  s5_t s5_d;
  always_comb begin
    logic [26:0] shifted;
    shifted          = s4_q.sum[26:0] << (s4_q.lz - 5'd1);
    s5_d.special     = s4_q.special;
    s5_d.special_val = s4_q.special_val;
    s5_d.is_zero     = (s4_q.sum == '0);
    s5_d.sign        = s5_d.is_zero ? s4_q.zero_sign : s4_q.sign;
    if (s4_q.sum[27]) begin
      s5_d.man = {s4_q.sum[27:2], s4_q.sum[1] | s4_q.sum[0]};
      s5_d.exp = s4_q.exp + 10'd1;
    end else begin
      s5_d.man = shifted;
      s5_d.exp = s4_q.exp - 10'(s4_q.lz) + 10'd1;
    end
  end

  // stage 6: round to nearest, ties to even
  s6_t s6_d;
  always_comb begin
    logic rnd;
    rnd = s5_q.man[2] & (s5_q.man[1] | s5_q.man[0] | s5_q.man[3]);
    s6_d.special     = s5_q.special;
    s6_d.special_val = s5_q.special_val;
    s6_d.sign        = s5_q.sign;
    s6_d.is_zero     = s5_q.is_zero;
    s6_d.exp         = s5_q.exp;
    s6_d.man         = {1'b0, s5_q.man[26:3]} + 25'(rnd);
  end

  // stage 7: renormalise after a rounding carry, detect range limits
  s7_t s7_d;
  always_comb begin
    logic [9:0] e;
    e = s6_q.exp;
    s7_d.frac = s6_q.man[22:0];
    if (s6_q.man[24]) begin
      e         = e + 10'd1;
      s7_d.frac = s6_q.man[23:1];
    end
    s7_d.special     = s6_q.special;
    s7_d.special_val = s6_q.special_val;
    s7_d.sign        = s6_q.sign;
    s7_d.is_zero     = s6_q.is_zero || e[9] || (e == 10'd0);  // underflow flushes
    s7_d.exp         = e;
    if (!s6_q.special && !s7_d.is_zero && (e >= 10'd255)) begin
      s7_d.special     = 1'b1;
      s7_d.special_val = {s6_q.sign, 8'hFF, 23'd0};
    end
  end

  // stage 8: pack
  logic [31:0] out_d;
  always_comb begin
    if (s7_q.special)      out_d = s7_q.special_val;
    else if (s7_q.is_zero) out_d = {s7_q.sign, 31'd0};
    else                   out_d = {s7_q.sign, s7_q.exp[7:0], s7_q.frac};
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
