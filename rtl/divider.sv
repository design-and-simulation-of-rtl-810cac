// divider: single-precision floating-point divider, q = x / d with x on
// input_a (N1) and d on input_b (N2).
//
// A state machine takes x, then d, and computes
//   S = S1 xor S2,  E = E1 - E2 + Bias,  M = M1 / M2.
//   UNPACK  NaN, 0/0 and inf/inf give the quiet NaN 0x7FC00000; inf/d and
//           x/0 (divide by zero) give +/-infinity; 0/d and x/inf give
//           +/-zero.
//   PRENORM A subnormal operand (hidden bit 0) is shifted left, one
//           position per clock, with its exponent lowered, so that both
//           significands lie in [1, 2).
//   DIVIDE  Restoring division, one quotient bit per clock: 27 bits with
//           weights 2^0 .. 2^-26, the final remainder giving a sticky bit.
//           The quotient lies in (1/2, 2).
//   NORM    A quotient below 1 is shifted left by one and E drops by one.
//   ROUND   Round to nearest, ties to even; an exponent above 254 gives
//           +/-infinity and raises overflow, one below 1 gives +/-zero and
//           raises underflow.
// The sequence (sign, exponent difference, significand quotient,
// normalisation, rounding, exception values) follows the flow chart of the
// divider. This design's own choices: the bias is added back to E1 - E2 so
// that the result is again a biased exponent; the significand division is
// a bit-serial restoring divider; underflow flushes to zero as in the
// multiplier; the right-shift branch of the flow chart (quotient >= 2)
// cannot occur for significands in [1, 2) and is not built.
//
// Interface: strobe/acknowledge handshake on input_a, input_b and output_z
// (a word moves in a cycle where both are high); output_z, overflow and
// underflow hold until output_z_ack. rst is synchronous, active high.
// output_z_stb is high at the 33rd rising clock edge after the edge that
// takes input_b (27 of them in DIVIDE), later by one edge per normalising
// shift of a subnormal operand.
module divider
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] input_a,
  input  logic        input_a_stb,
  output logic        input_a_ack,
  input  logic [31:0] input_b,
  input  logic        input_b_stb,
  output logic        input_b_ack,
  output logic [31:0] output_z,
  output logic        output_z_stb,
  input  logic        output_z_ack,
  output logic        overflow,
  output logic        underflow
);

  localparam int unsigned QW = SIG_W + 3;   // quotient bits: 24 + guard + round + 1 for a quotient < 1

  typedef enum logic [2:0] {
    GET_A, GET_B, UNPACK, PRENORM, DIVIDE, NORM, ROUND, PUT_Z
  } state_e;

  state_e             state;
  fp32_t              a, b;
  logic               z_s;
  exp_t               a_e, b_e, z_e;
  logic [SIG_W-1:0]   a_m, b_m;
  logic [QW-1:0]      q;
  logic [SIG_W+1:0]   rem;        // partial remainder, always < 2 * divisor
  logic [4:0]         count;

  logic [SIG_W+1:0]   rem_sub;
  logic               rem_ge;
  assign rem_ge  = rem >= {2'b00, b_m};
  assign rem_sub = rem - {2'b00, b_m};

  pack_result_t rounded;
  assign rounded = round_pack(z_s, z_e, q[QW-1:3], q[2], q[1], q[0] | (rem != '0));

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= GET_A;
      input_a_ack  <= 1'b0;
      input_b_ack  <= 1'b0;
      output_z_stb <= 1'b0;
      output_z     <= '0;
      overflow     <= 1'b0;
      underflow    <= 1'b0;
    end else begin
      unique case (state)
        GET_A: begin
          input_a_ack <= 1'b1;
          if (input_a_ack && input_a_stb) begin
            a           <= fp32_t'(input_a);
            input_a_ack <= 1'b0;
            state       <= GET_B;
          end
        end
        GET_B: begin
          input_b_ack <= 1'b1;
          if (input_b_ack && input_b_stb) begin
            b           <= fp32_t'(input_b);
            input_b_ack <= 1'b0;
            state       <= UNPACK;
          end
        end
        UNPACK: begin
          overflow  <= 1'b0;
          underflow <= 1'b0;
          z_s       <= a.sign ^ b.sign;
          if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b)) || (is_zero(a) && is_zero(b))) begin
            output_z <= QNAN;
            state    <= PUT_Z;
          end else if (is_inf(a) || is_zero(b)) begin
            output_z <= signed_inf(a.sign ^ b.sign);
            state    <= PUT_Z;
          end else if (is_zero(a) || is_inf(b)) begin
            output_z <= signed_zero(a.sign ^ b.sign);
            state    <= PUT_Z;
          end else begin
            a_e   <= eff_exp(a);
            b_e   <= eff_exp(b);
            a_m   <= significand(a);
            b_m   <= significand(b);
            state <= PRENORM;
          end
        end
        PRENORM: begin
          if (!a_m[SIG_W-1]) begin
            a_m <= a_m << 1;
            a_e <= a_e - exp_t'(1);
          end
          if (!b_m[SIG_W-1]) begin
            b_m <= b_m << 1;
            b_e <= b_e - exp_t'(1);
          end
          if (a_m[SIG_W-1] && b_m[SIG_W-1]) begin
            z_e   <= a_e - b_e + exp_t'(BIAS);
            rem   <= {2'b00, a_m};
            q     <= '0;
            count <= 5'(QW - 1);
            state <= DIVIDE;
          end
        end
        DIVIDE: begin
          q   <= {q[QW-2:0], rem_ge};
          rem <= (rem_ge ? rem_sub : rem) << 1;
          if (count == '0) state <= NORM;
          else count <= count - 5'd1;
        end
        NORM: begin
          if (!q[QW-1]) begin
            q   <= q << 1;
            z_e <= z_e - exp_t'(1);
          end
          state <= ROUND;
        end
        ROUND: begin
          output_z  <= rounded.z;
          overflow  <= rounded.overflow;
          underflow <= rounded.underflow;
          state     <= PUT_Z;
        end
        PUT_Z: begin
          output_z_stb <= 1'b1;
          if (output_z_stb && output_z_ack) begin
            output_z_stb <= 1'b0;
            state        <= GET_A;
          end
        end
        default: state <= GET_A;
      endcase
    end
  end

  d_z_hold: assert property (@(posedge clk) disable iff (rst)
    output_z_stb && !output_z_ack |=> output_z_stb && $stable(output_z));

endmodule
