// fpu: single-precision (IEEE 754 binary32) floating-point arithmetic unit.
//
// Three independent units, an adder/subtractor (a1), a multiplier (m1) and
// a divider (d1), share the operand buses input_a and input_b. The
// selection lines {s1, s0} choose the operation:
//   00  add (subtract by giving input_b a negative sign)
//   01  multiply
//   10  divide, input_a / input_b
//   11  no unit: output_z is 0 and no acknowledge or strobe is given
// A multiplexer per output (output_z, output_z_stb, input_a_ack,
// input_b_ack, and the overflow/underflow flags) passes the signals of the
// selected unit, as in the synthesised view of the original design.
//
// This design's own choice: the strobes input_a_stb, input_b_stb and
// output_z_ack reach only the selected unit, so the other two stay idle
// waiting for operand A and never hold a stale result. Change s1/s0 only
// between operations (after output_z has been taken, before the next
// input_a is offered); the top asserts that the selection holds while a
// result waits. The flags come from the multiplier and divider; with the
// adder selected they read 0.
//
// Interface and timing: each word moves on a strobe/acknowledge handshake
// (a transfer happens in a clock cycle where both are high). A whole
// operation is: input_a taken, input_b taken, computation, then
// output_z_stb high with output_z stable until output_z_ack. output_z_stb
// is high at the 7th rising edge after the one that takes input_b for an
// addition (one more per normalising shift of a cancelling subtraction),
// the 6th for a multiplication and the 33rd for a division. rst is synchronous,
// active high.
module fpu
  import fpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        s1,
  input  logic        s0,
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

  fpu_op_e op;
  assign op = fpu_op_e'({s1, s0});

  logic sel_add, sel_mul, sel_div;
  assign sel_add = (op == OP_ADD);
  assign sel_mul = (op == OP_MUL);
  assign sel_div = (op == OP_DIV);

  logic [31:0] add_z, mul_z, div_z;
  logic        add_z_stb, mul_z_stb, div_z_stb;
  logic        add_a_ack, mul_a_ack, div_a_ack;
  logic        add_b_ack, mul_b_ack, div_b_ack;
  logic        mul_ovf, mul_unf, div_ovf, div_unf;

  adder a1 (
    .clk, .rst,
    .input_a,      .input_a_stb (input_a_stb & sel_add),  .input_a_ack (add_a_ack),
    .input_b,      .input_b_stb (input_b_stb & sel_add),  .input_b_ack (add_b_ack),
    .output_z (add_z), .output_z_stb (add_z_stb), .output_z_ack (output_z_ack & sel_add)
  );

  multiplier m1 (
    .clk, .rst,
    .input_a,      .input_a_stb (input_a_stb & sel_mul),  .input_a_ack (mul_a_ack),
    .input_b,      .input_b_stb (input_b_stb & sel_mul),  .input_b_ack (mul_b_ack),
    .output_z (mul_z), .output_z_stb (mul_z_stb), .output_z_ack (output_z_ack & sel_mul),
    .overflow (mul_ovf), .underflow (mul_unf)
  );

  divider d1 (
    .clk, .rst,
    .input_a,      .input_a_stb (input_a_stb & sel_div),  .input_a_ack (div_a_ack),
    .input_b,      .input_b_stb (input_b_stb & sel_div),  .input_b_ack (div_b_ack),
    .output_z (div_z), .output_z_stb (div_z_stb), .output_z_ack (output_z_ack & sel_div),
    .overflow (div_ovf), .underflow (div_unf)
  );

  always_comb begin
    unique case (op)
      OP_ADD: begin
        output_z     = add_z;     output_z_stb = add_z_stb;
        input_a_ack  = add_a_ack; input_b_ack  = add_b_ack;
        overflow     = 1'b0;      underflow    = 1'b0;
      end
      OP_MUL: begin
        output_z     = mul_z;     output_z_stb = mul_z_stb;
        input_a_ack  = mul_a_ack; input_b_ack  = mul_b_ack;
        overflow     = mul_ovf;   underflow    = mul_unf;
      end
      OP_DIV: begin
        output_z     = div_z;     output_z_stb = div_z_stb;
        input_a_ack  = div_a_ack; input_b_ack  = div_b_ack;
        overflow     = div_ovf;   underflow    = div_unf;
      end
      default: begin
        output_z     = 32'h0000_0000; output_z_stb = 1'b0;
        input_a_ack  = 1'b0;          input_b_ack  = 1'b0;
        overflow     = 1'b0;          underflow    = 1'b0;
      end
    endcase
  end

  // The selection must not change while a result waits to be taken.
  fpu_sel_stable: assert property (@(posedge clk) disable iff (rst)
    output_z_stb && !output_z_ack |=> $stable({s1, s0}));

endmodule
