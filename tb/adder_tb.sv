// adder_tb: self-checking testbench for the floating-point adder/subtractor.
//
// Drives operand pairs through the strobe/acknowledge handshake and compares
// each result with the double-precision reference of fp_ref_pkg (sum
// rounded to nearest single, subnormals kept; any NaN accepted for a NaN
// reference). Covers the worked examples 2 + 3 = 5 and 2 + (-3) = -1,
// same-sign carries, cancellation (the left-normalising loop), widely
// different exponents, subnormals, overflow to infinity and the special
// values. output_z_ack is held back for a random number of cycles to check
// that a waiting result stays put. A watchdog ends a hung run.
module adder_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] input_a = '0, input_b = '0;
  logic        input_a_stb = 1'b0, input_b_stb = 1'b0, output_z_ack = 1'b0;
  logic        input_a_ack, input_b_ack, output_z_stb;
  logic [31:0] output_z;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  adder dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y, output logic [31:0] z);
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
    z = output_z;
    output_z_ack <= 1'b0;
  endtask

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] z, e;
    run(x, y, z);
    e = real_to_f32(f32_to_real(x) + f32_to_real(y));
    if (ref_is_nan(x) || ref_is_nan(y) ||
        (ref_is_inf(x) && ref_is_inf(y) && x[31] != y[31])) e = REF_QNAN;
    else if (ref_is_inf(x)) e = x;
    else if (ref_is_inf(y)) e = y;
    checks++;
    if (ref_is_nan(e) ? !ref_is_nan(z) : (z !== e)) begin
      failures++;
      if (failures < 20) $display("FAIL %h + %h: got %h expected %h", x, y, z, e);
    end
  endtask

  initial begin
    logic [31:0] a, b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // Worked examples: 2 + 3 and 2 - 3.
    check(32'h4000_0000, 32'h4040_0000);
    check(32'h4000_0000, 32'hC040_0000);
    check(32'h3F80_0000, 32'hBF80_0000);          // exact cancellation -> +0
    check(32'h8000_0000, 32'h8000_0000);          // -0 + -0
    check(32'h3F80_0000, 32'h3380_0000);          // 1 + 2^-24, tie to even
    check(32'h3F80_0001, 32'h3380_0000);          // tie rounds up
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);          // overflow
    check(32'h0000_0001, 32'h8000_0002);          // subnormals
    check(32'h0080_0000, 32'h8000_0001);          // normal - subnormal
    check(32'h7F80_0000, 32'hFF80_0000);          // inf - inf
    check(32'h7F80_0000, 32'h4000_0000);
    check(32'h4000_0000, 32'hFF80_0000);
    check(32'h7FC0_0000, 32'h4000_0000);
    for (int i = 0; i < 3000; i++) begin
      case ($urandom % 4)
        0: begin a = rand_normal(1, 254); b = rand_normal(1, 254); end
        1: begin a = rand_normal(100, 150); b = {1'($urandom), 8'(int'(a[30:23]) + int'($urandom % 5) - 2), 23'($urandom)}; end
        2: begin a = rand_normal(100, 150); b = {~a[31], a[30:23], a[22:0] ^ 23'($urandom % 64)}; end
        default: begin a = ($urandom % 2) ? rand_special() : rand_normal(1, 30); b = rand_special(); end
      endcase
      if ($urandom % 2) check(a, b); else check(b, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
