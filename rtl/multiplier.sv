// multiplier: single-precision floating-point multiplier.
//
// A state machine takes operand A, then operand B, and computes
//   S = S1 xor S2,  E = E1 + E2 - Bias,  M = M1 * M2
// where M1 and M2 are the 24-bit significands with their hidden bits and the
// product M is 48 bits wide, its binary point between bits 46 and 45.
//   UNPACK  NaN, 0 x inf (quiet NaN 0x7FC00000), infinity and zero operands
//           are settled directly. Otherwise the exponents are added and the
//           bias subtracted; a zero exponent field counts as 1 with a
//           hidden bit of 0.
//   MULT    The 24 x 24 bit unsigned product.
//   NORM    A zero product gives zero. A leading one in bit 47 (the product
//           overflowed the 1.x form) shifts M right by one and adds 1 to E.
//           While bit 46 is 0 (only with a subnormal operand) M moves left
//           by one and E drops by one, one position per clock.
//   ROUND   Round the 24 bits below and including bit 46 to nearest, ties
//           to even, from the bits beneath them; then a final exponent above
//           254 gives +/-infinity and raises overflow, one below 1 gives
//           +/-zero and raises underflow, the sign being S in both cases.
// The steps, the bit positions of the normalisation and the handling of
// overflow and underflow follow the description of the multiplier. This
// design's own choices: ties-to-even rounding with a sticky bit; the flags
// are outputs valid with output_z_stb; subnormal operands are accepted.
//
// Interface: strobe/acknowledge handshake on input_a, input_b and output_z
// (a word moves in a cycle where both are high); output_z, overflow and
// underflow hold until output_z_ack. rst is synchronous, active high.
// output_z_stb is high at the 6th rising clock edge after the edge that
// takes input_b when the product's leading one is at bit 46; one edge later
// when it is at bit 47, and one more per left shift (subnormal operands).
module multiplier
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

  typedef enum logic [2:0] {
    GET_A, GET_B, UNPACK, MULT, NORM, ROUND, PUT_Z
  } state_e;

  state_e                state;
  fp32_t                 a, b;
  logic                  z_s;
  exp_t                  z_e;
  logic [SIG_W-1:0]      a_m, b_m;
  logic [2*SIG_W-1:0]    p;        // intermediate product
  logic                  sticky;   // bits lost by the right shift

  pack_result_t rounded;
  assign rounded = round_pack(z_s, z_e, p[46:23], p[22], p[21], (p[20:0] != '0) | sticky);

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
          if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
            output_z <= QNAN;
            state    <= PUT_Z;
          end else if (is_inf(a) || is_inf(b)) begin
            output_z <= signed_inf(a.sign ^ b.sign);
            state    <= PUT_Z;
          end else if (is_zero(a) || is_zero(b)) begin
            output_z <= signed_zero(a.sign ^ b.sign);
            state    <= PUT_Z;
          end else begin
            z_e    <= eff_exp(a) + eff_exp(b) - exp_t'(BIAS);
            a_m    <= significand(a);
            b_m    <= significand(b);
            sticky <= 1'b0;
            state  <= MULT;
          end
        end
        MULT: begin
          p     <= a_m * b_m;
          state <= NORM;
        end
        NORM: begin
          if (p == '0) begin
            output_z <= signed_zero(z_s);
            state    <= PUT_Z;
          end else if (p[47]) begin
            p      <= p >> 1;
            sticky <= sticky | p[0];
            z_e    <= z_e + exp_t'(1);
          end else if (!p[46]) begin
            p   <= p << 1;
            z_e <= z_e - exp_t'(1);
          end else begin
            state <= ROUND;
          end
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

  m_z_hold: assert property (@(posedge clk) disable iff (rst)
    output_z_stb && !output_z_ack |=> output_z_stb && $stable(output_z));

endmodule
