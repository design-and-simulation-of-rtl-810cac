// divider_tb: self-checking testbench for the floating-point multiplier.
//
// Drives operand pairs through the strobe/acknowledge handshake and compares
// each result with the double-precision reference of fp_ref_pkg: the exact
// product rounded to nearest single. Where that reference is subnormal the
// multiplier is expected to give a signed zero with underflow raised, and
// where a finite product rounds to infinity, overflow must be raised.
// Covers 2 x 3 = 6, both normalisation cases (leading one at bit 46 or 47),
// rounding, overflow, underflow, subnormal operands and the special values.
// output_z_ack is held back for a random number of cycles. A watchdog ends
// a hung run.
module divider_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] input_a = '0, input_b = '0;
  logic        input_a_stb = 1'b0, input_b_stb = 1'b0, output_z_ack = 1'b0;
  logic        input_a_ack, input_b_ack, output_z_stb;
  logic [31:0] output_z;
  logic        overflow, underflow;

  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0;

  always #5 clk = ~clk;

  divider dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y,
                     output logic [31:0] z, output logic ovf, output logic unf);
    input_a     <= x;
    input_a_stb <= 1'b1;
    @(posedge clk iff input_a_ack);
    input_a_stb <= 1'b0;
    input_b     <= y;
    input_b_stb <= 1'b1;
    @(posedge clk iff input_b_ack);
    input_b_stb <= 1'b0;
    @(posedge clk iff output_z_stb);
    repeat ($urandom % 3) @(posedge clk);
    output_z_ack <= 1'b1;
    @(posedge clk iff (output_z_stb && output_z_ack));
    z   = output_z;
    ovf = overflow;
    unf = underflow;
    output_z_ack <= 1'b0;
  endtask

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] z, e;
    logic        ovf, unf, e_ovf, e_unf;
    run(x, y, z, ovf, unf);
    e     = real_to_f32(f32_to_real(x) / f32_to_real(y));
    e_ovf = 1'b0;
    e_unf = 1'b0;
    if (ref_is_nan(x) || ref_is_nan(y) || (ref_is_inf(x) && ref_is_inf(y)) ||
        (ref_is_zero(x) && ref_is_zero(y))) begin
      e = REF_QNAN;
    end else if (ref_is_inf(x) || ref_is_zero(y)) begin
      e = {x[31] ^ y[31], 8'hFF, 23'h0};
    end else if (ref_is_zero(x) || ref_is_inf(y)) begin
      e = {x[31] ^ y[31], 31'h0};
    end else if (ref_is_inf(e)) begin
      e_ovf = 1'b1;
    end else if (e[30:23] == 8'h00) begin
      e     = {x[31] ^ y[31], 31'h0};
      e_unf = 1'b1;
    end
    checks++;
    if ((ref_is_nan(e) ? !ref_is_nan(z) : (z !== e)) || ovf !== e_ovf || unf !== e_unf) begin
      failures++;
      if (failures < 20) $display("FAIL %h / %h: got %h o%b u%b expected %h o%b u%b",
                                  x, y, z, ovf, unf, e, e_ovf, e_unf);
    end
    n_ovf += int'(ovf);
    n_unf += int'(unf);
  endtask

  initial begin
    logic [31:0] a, b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(32'h4000_0000, 32'h4040_0000);          // 2 / 3 = 0x3F2AAAAB
    check(32'h4040_0000, 32'h4000_0000);          // 3 / 2, quotient above 1
    check(32'h7F00_0000, 32'h3E80_0000);          // overflow
    check(32'h0100_0000, 32'h7E00_0000);          // underflow
    check(32'h0000_0001, 32'h3400_0000);          // subnormal dividend
    check(32'h4000_0000, 32'h0040_0000);          // subnormal divisor
    check(32'h4000_0000, 32'h0000_0000);          // divide by zero
    check(32'h8000_0000, 32'h0000_0000);          // 0 / 0
    check(32'h7F80_0000, 32'hFF80_0000);          // inf / inf
    check(32'h4000_0000, 32'h7F80_0000);
    for (int i = 0; i < 3000; i++) begin
      case ($urandom % 4)
        0, 1: begin a = rand_normal(64, 190); b = rand_normal(64, 190); end
        2: begin a = rand_normal(1, 254); b = rand_normal(1, 254); end
        default: begin a = ($urandom % 2) ? rand_special() : rand_normal(100, 150); b = rand_special(); end
      endcase
      if ($urandom % 2) check(a, b); else check(b, a);
    end
    if (n_ovf == 0) begin failures++; $display("overflow never raised"); end
    if (n_unf == 0) begin failures++; $display("underflow never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
