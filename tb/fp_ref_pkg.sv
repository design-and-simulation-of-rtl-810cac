// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Operands are turned into exact double-precision reals, the operation is
// done in double precision by the simulator, and the result is rounded to
// single precision (nearest, ties to even, subnormals included) by
// real_to_f32. For +, -, * and / a double result rounded once more to
// single precision equals the correctly rounded single result, because
// 53 >= 2 * 24 + 2. This gives expected values computed without any of the
// design's own logic. Random operand generators are included.
package fp_ref_pkg;

  localparam logic [31:0] REF_QNAN = 32'h7FC0_0000;

  function automatic logic ref_is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic logic ref_is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction

  function automatic logic ref_is_zero(input logic [31:0] x);
    return x[30:0] == 0;
  endfunction

  function automatic real f32_to_real(input logic [31:0] x);
    real m, r;
    int  e;
    if (x[30:23] == 0) begin
      m = real'(x[22:0]);
      e = -149;
    end else begin
      m = real'({1'b1, x[22:0]});
      e = int'(x[30:23]) - 150;
    end
    r = m * (2.0 ** e);
    return x[31] ? -r : r;
  endfunction

  // Round a finite or infinite real to the nearest single-precision value.
  function automatic logic [31:0] real_to_f32(input real r);
    logic [63:0] d;
    logic        s;
    int          e, unb, sh;
    logic [63:0] sig, q, rem, half;
    logic [31:0] bits;
    d   = $realtobits(r);
    s   = d[63];
    e   = int'(d[62:52]);
    if (e == 2047) return (d[51:0] != 0) ? REF_QNAN : {s, 8'hFF, 23'h0};
    if (e == 0) return {s, 31'h0};
    unb = e - 1023;
    if (unb > 127) return {s, 8'hFF, 23'h0};
    sig = {11'h0, 1'b1, d[51:0]};
    sh  = (unb >= -126) ? 29 : 29 + (-126 - unb);
    if (sh > 55) return {s, 31'h0};
    q    = sig >> sh;
    rem  = sig & ((64'h1 << sh) - 64'h1);
    half = 64'h1 << (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 64'h1;
    if (unb >= -126) bits = {s, 31'h0} + ((32'(unb + 126)) << 23) + q[31:0];
    else             bits = {s, 31'h0} + q[31:0];
    return bits;
  endfunction

  // Random single-precision operand. kind 0: normal number with exponent
  // field in [lo, hi]; 1: any bit pattern; 2: a special value.
  function automatic logic [31:0] rand_normal(input int lo, input int hi);
    logic [7:0] e;
    e = 8'(lo + int'($urandom % 32'(hi - lo + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic logic [31:0] rand_special();
    case ($urandom % 8)
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return 32'h7F80_0000;
      3: return 32'hFF80_0000;
      4: return 32'h7FC0_0000;
      5: return {1'($urandom), 8'h00, 23'($urandom)};   // subnormal
      6: return {1'($urandom), 8'hFE, 23'($urandom)};   // large
      default: return {1'($urandom), 8'h01, 23'($urandom)}; // smallest normals
    endcase
  endfunction

endpackage
