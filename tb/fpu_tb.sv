// fpu_tb: end-to-end testbench of the floating-point ALU top level, at its
// default configuration (the top has no parameters).
//
// Runs the four worked examples (2 + 3, 2 + (-3), 2 x 3, 2 / 3 with the
// selection codes 00, 00, 01, 10 and the expected words 0x40A00000,
// 0xBF800000, 0x40C00000, 0x3F2AAAAB), then a random mix of operations with
// the selection lines switched between operations, each result compared
// with the double-precision reference of fp_ref_pkg. It also checks that
// code 11 selects no unit (no acknowledge, output_z = 0) and counts how
// often each mechanism of the design happened: every operation, the
// adder's carry and cancellation paths, the multiplier's bit-47
// normalisation, overflow, underflow, divide by zero, NaN results, a held
// back output_z_ack, a change of selection and free-running operation
// with the strobes and output_z_ack held high. A mechanism that never
// happened counts as a failure. The clock counts of the worked examples
// are checked against the units' state sequences. A watchdog ends a hung run.
module fpu_tb;
  import fp_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        s1 = 1'b0, s0 = 1'b0;
  logic [31:0] input_a = '0, input_b = '0;
  logic        input_a_stb = 1'b0, input_b_stb = 1'b0, output_z_ack = 1'b0;
  logic        input_a_ack, input_b_ack, output_z_stb;
  logic [31:0] output_z;
  logic        overflow, underflow;

  int checks = 0, failures = 0;
  int cyc = 0;
  int last_latency;   // clocks from the input_b transfer to output_z_stb

  typedef enum int {
    EV_ADD, EV_SUB, EV_MUL, EV_DIV, EV_NONE, EV_ADD_CARRY, EV_CANCEL,
    EV_MUL_BIT47, EV_OVF, EV_UNF, EV_DIV0, EV_NAN, EV_HOLD, EV_SWITCH, EV_STREAM,
    EV_COUNT
  } event_e;
  int unsigned seen [EV_COUNT];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fpu dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] reference(input logic [1:0] sel, input logic [31:0] x,
                                            input logic [31:0] y, output logic e_ovf,
                                            output logic e_unf);
    logic [31:0] e;
    e_ovf = 1'b0;
    e_unf = 1'b0;
    case (sel)
      2'b00: begin
        e = real_to_f32(f32_to_real(x) + f32_to_real(y));
        if (ref_is_nan(x) || ref_is_nan(y) || (ref_is_inf(x) && ref_is_inf(y) && x[31] != y[31])) e = REF_QNAN;
        else if (ref_is_inf(x)) e = x;
        else if (ref_is_inf(y)) e = y;
      end
      2'b01: begin
        e = real_to_f32(f32_to_real(x) * f32_to_real(y));
        if (ref_is_nan(x) || ref_is_nan(y) || (ref_is_inf(x) && ref_is_zero(y)) ||
            (ref_is_zero(x) && ref_is_inf(y))) e = REF_QNAN;
        else if (ref_is_inf(x) || ref_is_inf(y)) e = {x[31] ^ y[31], 8'hFF, 23'h0};
        else if (ref_is_zero(x) || ref_is_zero(y)) e = {x[31] ^ y[31], 31'h0};
        else if (ref_is_inf(e)) e_ovf = 1'b1;
        else if (e[30:23] == 8'h00) begin e = {x[31] ^ y[31], 31'h0}; e_unf = 1'b1; end
      end
      default: begin
        e = real_to_f32(f32_to_real(x) / f32_to_real(y));
        if (ref_is_nan(x) || ref_is_nan(y) || (ref_is_inf(x) && ref_is_inf(y)) ||
            (ref_is_zero(x) && ref_is_zero(y))) e = REF_QNAN;
        else if (ref_is_inf(x) || ref_is_zero(y)) e = {x[31] ^ y[31], 8'hFF, 23'h0};
        else if (ref_is_zero(x) || ref_is_inf(y)) e = {x[31] ^ y[31], 31'h0};
        else if (ref_is_inf(e)) e_ovf = 1'b1;
        else if (e[30:23] == 8'h00) begin e = {x[31] ^ y[31], 31'h0}; e_unf = 1'b1; end
      end
    endcase
    return e;
  endfunction

  // One complete operation through the handshake with selection sel.
  task automatic op(input logic [1:0] sel, input logic [31:0] x, input logic [31:0] y,
                    input logic [31:0] expect_word, input logic use_expect);
    logic [31:0] z, e;
    logic        ovf, unf, e_ovf, e_unf;
    int          hold, t_b;
    if ({s1, s0} != sel) seen[EV_SWITCH]++;
    s1 <= sel[1];
    s0 <= sel[0];
    @(posedge clk);
    input_a     <= x;
    input_a_stb <= 1'b1;
    @(posedge clk iff input_a_ack);
    input_a_stb <= 1'b0;
    input_b     <= y;
    input_b_stb <= 1'b1;
    @(posedge clk iff input_b_ack);
    input_b_stb <= 1'b0;
    t_b = cyc;
    @(posedge clk iff output_z_stb);
    last_latency = cyc - t_b;
    hold = int'($urandom % 3);
    if (hold > 0) seen[EV_HOLD]++;
    repeat (hold) @(posedge clk);
    output_z_ack <= 1'b1;
    @(posedge clk iff (output_z_stb && output_z_ack));
    z   = output_z;
    ovf = overflow;
    unf = underflow;
    output_z_ack <= 1'b0;

    e = reference(sel, x, y, e_ovf, e_unf);
    if (use_expect) e = expect_word;
    checks++;
    if ((ref_is_nan(e) ? !ref_is_nan(z) : (z !== e)) || ovf !== e_ovf || unf !== e_unf) begin
      failures++;
      if (failures < 20) $display("FAIL sel=%b %h, %h: got %h o%b u%b expected %h o%b u%b",
                                  sel, x, y, z, ovf, unf, e, e_ovf, e_unf);
    end

    // Mechanism counters, worked out from the operands.
    case (sel)
      2'b00: begin
        if (x[31] == y[31]) seen[EV_ADD]++; else seen[EV_SUB]++;
        if (x[31] == y[31] && x[30:23] == y[30:23] && x[30:23] != 0 && x[30:23] != 8'hFF)
          seen[EV_ADD_CARRY]++;
        if (x[31] != y[31] && x[30:23] == y[30:23] && x[30:23] != 0 && x[30:23] != 8'hFF)
          seen[EV_CANCEL]++;
      end
      2'b01: begin
        seen[EV_MUL]++;
        if (x[30:23] != 0 && y[30:23] != 0 && x[30:23] != 8'hFF && y[30:23] != 8'hFF &&
            ({1'b1, x[22:0]} * {1'b1, y[22:0]}) >= 48'h8000_0000_0000)
          seen[EV_MUL_BIT47]++;
      end
      default: begin
        seen[EV_DIV]++;
        if (ref_is_zero(y) && !ref_is_zero(x) && !ref_is_nan(x)) seen[EV_DIV0]++;
      end
    endcase
    if (ovf) seen[EV_OVF]++;
    if (unf) seen[EV_UNF]++;
    if (ref_is_nan(z)) seen[EV_NAN]++;
  endtask

  task automatic check_latency(input int expected);
    checks++;
    if (last_latency != expected) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", last_latency, expected);
    end
  endtask

  // Free-running use: both operand strobes and output_z_ack held high, so
  // the selected unit repeats the same operation back to back. Each result
  // must be the expected word.
  task automatic stream(input logic [1:0] sel, input logic [31:0] x, input logic [31:0] y,
                        input logic [31:0] expect_word, input int n);
    int got = 0;
    if ({s1, s0} != sel) seen[EV_SWITCH]++;
    s1 <= sel[1];
    s0 <= sel[0];
    @(posedge clk);
    input_a      <= x;
    input_b      <= y;
    input_a_stb  <= 1'b1;
    input_b_stb  <= 1'b1;
    output_z_ack <= 1'b1;
    while (got < n) begin
      @(posedge clk iff (output_z_stb && output_z_ack));
      got++;
      checks++;
      if (output_z !== expect_word) begin
        failures++;
        $display("FAIL stream sel=%b: got %h expected %h", sel, output_z, expect_word);
      end
    end
    // Stop offering operands just after one input_b transfer; the
    // operation in flight then delivers one last result.
    @(posedge clk iff (input_b_stb && input_b_ack));
    input_a_stb  <= 1'b0;
    input_b_stb  <= 1'b0;
    @(posedge clk iff (output_z_stb && output_z_ack));
    output_z_ack <= 1'b0;
    checks++;
    if (output_z !== expect_word) begin
      failures++;
      $display("FAIL stream sel=%b: got %h expected %h", sel, output_z, expect_word);
    end
    seen[EV_STREAM]++;
  endtask

  // Code 11: no unit answers and output_z reads 0.
  task automatic idle_code();
    if ({s1, s0} != 2'b11) seen[EV_SWITCH]++;
    s1 <= 1'b1;
    s0 <= 1'b1;
    input_a     <= 32'h4000_0000;
    input_a_stb <= 1'b1;
    repeat (10) begin
      @(posedge clk);
      checks++;
      if (input_a_ack || input_b_ack || output_z_stb || output_z != 32'h0) begin
        failures++;
        $display("FAIL code 11 gave a response");
      end
    end
    input_a_stb <= 1'b0;
    seen[EV_NONE]++;
  endtask

  initial begin
    logic [1:0]  sel;
    logic [31:0] a, b;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // The four worked examples with their printed results, and the
    // latency of each from the state sequences of the units: the number
    // of rising clock edges from the one that takes input_b to the first
    // at which output_z_stb is high is 7 for add (+1 per normalising left
    // shift), 6 for multiply and 33 for divide.
    op(2'b00, 32'h4000_0000, 32'h4040_0000, 32'h40A0_0000, 1'b1);
    check_latency(7);
    op(2'b00, 32'h4000_0000, 32'hC040_0000, 32'hBF80_0000, 1'b1);
    check_latency(8);
    op(2'b01, 32'h4000_0000, 32'h4040_0000, 32'h40C0_0000, 1'b1);
    check_latency(6);
    op(2'b10, 32'h4000_0000, 32'h4040_0000, 32'h3F2A_AAAB, 1'b1);
    check_latency(33);
    idle_code();
    // The same four operations with strobes and acknowledge held high.
    stream(2'b00, 32'h4000_0000, 32'h4040_0000, 32'h40A0_0000, 5);
    stream(2'b00, 32'h4000_0000, 32'hC040_0000, 32'hBF80_0000, 5);
    stream(2'b01, 32'h4000_0000, 32'h4040_0000, 32'h40C0_0000, 5);
    stream(2'b10, 32'h4000_0000, 32'h4040_0000, 32'h3F2A_AAAB, 5);
    // Directed corner cases.
    op(2'b01, 32'h7F00_0000, 32'h4080_0000, '0, 1'b0);   // overflow
    op(2'b10, 32'h0100_0000, 32'h7E00_0000, '0, 1'b0);   // underflow
    op(2'b10, 32'h4000_0000, 32'h0000_0000, '0, 1'b0);   // divide by zero
    op(2'b00, 32'h7F80_0000, 32'hFF80_0000, '0, 1'b0);   // inf - inf
    for (int i = 0; i < 1500; i++) begin
      sel = 2'($urandom % 3);
      case ($urandom % 4)
        0: begin a = rand_normal(1, 254); b = rand_normal(1, 254); end
        1: begin a = rand_normal(100, 150); b = {1'($urandom), a[30:23], 23'($urandom)}; end
        2: begin a = rand_normal(64, 190); b = rand_normal(64, 190); end
        default: begin a = ($urandom % 2) ? rand_special() : rand_normal(100, 150); b = rand_special(); end
      endcase
      op(sel, a, b, '0, 1'b0);
      if (i % 500 == 250) idle_code();
    end
    for (int k = 0; k < EV_COUNT; k++) begin
      $display("  %-14s %0d", event_e'(k), seen[k]);
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", event_e'(k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
