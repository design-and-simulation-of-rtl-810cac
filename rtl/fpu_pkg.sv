// fpu_pkg: types, constants and the shared round-and-pack step of the
// single-precision floating-point ALU.
//
// An IEEE 754 binary32 word is one sign bit, an 8-bit biased exponent
// (bias 127) and a 23-bit fraction; normal numbers carry an implicit leading
// one (the hidden bit) that turns the fraction into a 24-bit significand.
// Exponent 255 with a zero fraction is an infinity, with a non-zero
// fraction a NaN. The three arithmetic units use these definitions, a
// common operation code for the selection lines and one function that
// rounds a normalised 24-bit significand to nearest (ties to even) and
// packs the result, saturating to infinity on overflow and flushing to zero
// on underflow.
package fpu_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned SIG_W  = FRAC_W + 1;   // significand with hidden bit
  localparam int signed   BIAS   = 127;
  localparam int signed   EXP_MAX_NORMAL = 254;

  // Internal exponents are signed and wide enough for E1+E2-Bias, E1-E2+Bias
  // and the normalisation shifts that follow.
  typedef logic signed [9:0] exp_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  localparam fp32_t QNAN    = '{sign: 1'b0, exp: 8'hFF, frac: 23'h400000};

  // Selection-line code {s1, s0}: 00 add/subtract, 01 multiply, 10 divide.
  typedef enum logic [1:0] {
    OP_ADD  = 2'b00,
    OP_MUL  = 2'b01,
    OP_DIV  = 2'b10,
    OP_NONE = 2'b11
  } fpu_op_e;

  typedef struct packed {
    fp32_t z;
    logic  overflow;
    logic  underflow;
  } pack_result_t;

  function automatic logic is_nan(input fp32_t x);
    return (x.exp == 8'hFF) && (x.frac != '0);
  endfunction

  function automatic logic is_inf(input fp32_t x);
    return (x.exp == 8'hFF) && (x.frac == '0);
  endfunction

  function automatic logic is_zero(input fp32_t x);
    return (x.exp == '0) && (x.frac == '0);
  endfunction

  // Exponent as used in arithmetic: a stored zero exponent (zero or
  // subnormal, hidden bit 0) counts as 1.
  function automatic exp_t eff_exp(input fp32_t x);
    return (x.exp == '0) ? exp_t'(1) : exp_t'({2'b00, x.exp});
  endfunction

  function automatic logic [SIG_W-1:0] significand(input fp32_t x);
    return {(x.exp != '0), x.frac};
  endfunction

  function automatic fp32_t signed_inf(input logic sign);
    return '{sign: sign, exp: 8'hFF, frac: '0};
  endfunction

  function automatic fp32_t signed_zero(input logic sign);
    return '{sign: sign, exp: '0, frac: '0};
  endfunction

  // Round sig (value sig * 2^(exp-Bias-23)) to nearest, ties to even, using
  // the guard, round and sticky bits below it, and pack the result. The
  // significand is normalised (sig[23] = 1) unless exp is 1, where a
  // subnormal result is packed with a zero exponent field. A rounded
  // exponent above 254 gives infinity and the overflow flag; one below 1
  // gives zero and the underflow flag.
  function automatic pack_result_t round_pack(input logic sign, input exp_t exp,
                                              input logic [SIG_W-1:0] sig,
                                              input logic guard, input logic round_bit,
                                              input logic sticky);
    pack_result_t    res;
    logic [SIG_W:0]  rsig;
    exp_t            e;
    logic            round_up;
    round_up = guard & (round_bit | sticky | sig[0]);
    rsig = {1'b0, sig} + {{SIG_W{1'b0}}, round_up};
    e    = exp;
    if (rsig[SIG_W]) begin
      rsig = rsig >> 1;
      e    = e + exp_t'(1);
    end
    res = '0;
    if (rsig == '0) begin
      res.z = signed_zero(sign);
    end else if (e > exp_t'(EXP_MAX_NORMAL)) begin
      res.z        = signed_inf(sign);
      res.overflow = 1'b1;
    end else if (e < exp_t'(1)) begin
      res.z         = signed_zero(sign);
      res.underflow = 1'b1;
    end else begin
      res.z.sign = sign;
      res.z.exp  = rsig[SIG_W-1] ? e[EXP_W-1:0] : '0;
      res.z.frac = rsig[FRAC_W-1:0];
    end
    return res;
  endfunction

endpackage
