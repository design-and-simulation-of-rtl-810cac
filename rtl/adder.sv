// adder: single-precision floating-point adder/subtractor.
//
// Subtraction is addition of an operand whose sign bit is set; there is no
// separate subtract command. The unit is a small state machine that takes
// operand A, then operand B, computes, and offers the result:
//   UNPACK  NaN and infinity cases are settled directly (NaN in, or
//           +inf + -inf, gives the quiet NaN 0x7FC00000; an infinite operand
//           otherwise passes through). A zero exponent gives a hidden bit of
//           0. If E2 > E1 the operands are swapped so that N1 has the larger
//           exponent.
//   ALIGN   S2 is shifted right by d = E1 - E2, zeros filling from the left;
//           both operands now share exponent E1.
//   ADD     Same signs: S = S1 + S2, and a carry out moves S right by one
//           and adds 1 to the exponent. Different signs: S = S1 + (2's
//           complement of S2); with a carry out the carry is dropped and the
//           sign is that of N1, without one S is replaced by its 2's
//           complement and the sign is that of N2 (the larger magnitude).
//   NORM    While the MSB of S is 0, S moves left by one and the exponent
//           drops by one, one position per clock, stopping at exponent 1
//           (the result is then subnormal).
//   ROUND   Round to nearest, ties to even, and pack the 32-bit word.
// The algorithm, the swap, the 2's complement subtraction and the
// normalisation loop follow the flow chart of the adder. This design's own
// choices: significands carry three extra bits (guard, round, sticky) so
// that the bits shifted out in ALIGN and in the right shift after a carry
// are used for rounding instead of being dropped; an exact zero difference
// is +0; subnormal operands and results are kept (gradual underflow).
//
// Interface: each of input_a, input_b and output_z has a strobe (valid,
// from the sender) and an acknowledge (from the receiver). A word moves in
// a clock cycle where both are high. input_a_ack is high in the GET_A state,
// input_b_ack in GET_B; output_z_stb stays high with output_z stable until
// output_z_ack is seen. Reset (rst, synchronous, active high) returns to
// GET_A. output_z_stb is high at the 7th rising clock edge after the edge
// that takes input_b, one edge later per normalising left shift (8 for
// 2 + (-3)). input_a_ack rises one clock after the unit enters GET_A.
module adder
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
  input  logic        output_z_ack
);

  localparam int unsigned XW = SIG_W + 3;   // significand + guard, round, sticky

  typedef enum logic [2:0] {
    GET_A, GET_B, UNPACK, ALIGN, ADD, NORM, ROUND, PUT_Z
  } state_e;

  state_e          state;
  fp32_t           a, b;
  logic            a_s, b_s, z_s;
  exp_t            a_e, b_e, z_e;
  logic [XW-1:0]   a_m, b_m, z_m;

  // Alignment shift of S2 by d with the shifted-out bits kept as sticky.
  exp_t            d;
  logic [XW-1:0]   b_shifted;
  logic            b_lost;
  always_comb begin
    d = a_e - b_e;
    if (d >= exp_t'(XW)) begin
      b_shifted = '0;
      b_lost    = (b_m != '0);
    end else begin
      b_shifted = b_m >> d;
      b_lost    = ((b_m & ~({XW{1'b1}} << d)) != '0);
    end
  end

  // Significand addition, S1 + S2 or S1 + (2's complement of S2).
  logic [XW:0] sum;
  always_comb begin
    if (a_s == b_s) sum = {1'b0, a_m} + {1'b0, b_m};
    else            sum = {1'b0, a_m} + {1'b0, ~b_m} + (XW+1)'(1);
  end

  pack_result_t rounded;
  assign rounded = round_pack(z_s, z_e, z_m[XW-1:3], z_m[2], z_m[1], z_m[0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= GET_A;
      input_a_ack  <= 1'b0;
      input_b_ack  <= 1'b0;
      output_z_stb <= 1'b0;
      output_z     <= '0;
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
          if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && (a.sign != b.sign))) begin
            output_z <= QNAN;
            state    <= PUT_Z;
          end else if (is_inf(a)) begin
            output_z <= a;
            state    <= PUT_Z;
          end else if (is_inf(b)) begin
            output_z <= b;
            state    <= PUT_Z;
          end else begin
            // N1 keeps the larger exponent: swap when E2 > E1.
            if (eff_exp(b) > eff_exp(a)) begin
              a_s <= b.sign; a_e <= eff_exp(b); a_m <= {significand(b), 3'b000};
              b_s <= a.sign; b_e <= eff_exp(a); b_m <= {significand(a), 3'b000};
            end else begin
              a_s <= a.sign; a_e <= eff_exp(a); a_m <= {significand(a), 3'b000};
              b_s <= b.sign; b_e <= eff_exp(b); b_m <= {significand(b), 3'b000};
            end
            state <= ALIGN;
          end
        end
        ALIGN: begin
          b_m   <= b_shifted | XW'(b_lost);
          b_e   <= a_e;
          state <= ADD;
        end
        ADD: begin
          z_e <= a_e;
          if (a_s == b_s) begin
            z_s <= a_s;
            if (sum[XW]) begin
              z_m <= {1'b1, sum[XW-1:2], sum[1] | sum[0]};
              z_e <= a_e + exp_t'(1);
            end else begin
              z_m <= sum[XW-1:0];
            end
          end else if (sum[XW]) begin
            z_m <= sum[XW-1:0];
            z_s <= (sum[XW-1:0] == '0) ? (a_s & b_s) : a_s;
          end else begin
            z_m <= -sum[XW-1:0];
            z_s <= b_s;
          end
          state <= NORM;
        end
        NORM: begin
          if (!z_m[XW-1] && (z_e > exp_t'(1)) && (z_m != '0)) begin
            z_m <= z_m << 1;
            z_e <= z_e - exp_t'(1);
          end else begin
            state <= ROUND;
          end
        end
        ROUND: begin
          output_z <= rounded.z;
          state    <= PUT_Z;
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

  // Handshake rule: an offered result stays offered, unchanged, until taken.
  a_z_hold: assert property (@(posedge clk) disable iff (rst)
    output_z_stb && !output_z_ack |=> output_z_stb && $stable(output_z));

endmodule
