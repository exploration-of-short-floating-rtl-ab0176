// tb_fp_mult: self-checking test of fp_mult in three formats: (8,23) single
// precision, (5,5), the shortest format of the precision sweep, and (6,9).
// Random operands are compared bit for bit with the double-precision reference of
// fp_ref_pkg; the (5,5) instance, with exponents drawn over the whole range, also
// exercises overflow to infinity and flush to zero. Zero, infinity and NaN cases
// are checked directly. The unit is combinational: each check is one time step.
`timescale 1ns/1ps
module tb_fp_mult;
  import fp_ref_pkg::*;

  logic [31:0] a0, b0, z0;
  logic [10:0] a1, b1, z1;
  logic [15:0] a2, b2, z2;
  int checks = 0, failures = 0;

  fp_mult #(.EXP_W(8), .MAN_W(23)) u_f32 (.a(a0), .b(b0), .z(z0));
  fp_mult #(.EXP_W(5), .MAN_W(5))  u_f11 (.a(a1), .b(b1), .z(z1));
  fp_mult #(.EXP_W(6), .MAN_W(9))  u_f16 (.a(a2), .b(b2), .z(z2));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed cases in single precision.
    a0 = 32'h3fc00000; b0 = 32'h40000000; #1;      // 1.5 * 2 = 3
    check(64'(z0), 64'h40400000, "1.5*2");
    a0 = 32'h3f800001; b0 = 32'h3f800001; #1;      // (1+u)^2 rounds to 1+2u
    check(64'(z0), 64'h3f800002, "(1+u)^2");
    a0 = 32'hbf800000; b0 = 32'h00000000; #1;      // -1 * +0 = -0
    check(64'(z0), 64'h80000000, "-1*0");
    a0 = 32'h7f800000; b0 = 32'hc0000000; #1;      // inf * -2 = -inf
    check(64'(z0), 64'hff800000, "inf*-2");
    a0 = 32'h7f800000; b0 = 32'h00000000; #1;      // inf * 0 = NaN
    check(64'(z0), 64'h7fc00000, "inf*0");
    a0 = 32'h7f000000; b0 = 32'h40000000; #1;      // 2^127 * 2 overflows
    check(64'(z0), 64'h7f800000, "overflow");
    a0 = 32'h00800000; b0 = 32'h3f000000; #1;      // 2^-126 * 0.5 flushes
    check(64'(z0), 64'h00000000, "underflow");
    a0 = 32'h00400000; b0 = 32'h40000000; #1;      // subnormal input reads as zero
    check(64'(z0), 64'h00000000, "subnormal in");

    for (int n = 0; n < 20000; n++) begin
      a0 = 32'(rand_fp(8, 23, 40));  b0 = 32'(rand_fp(8, 23, 40));
      a1 = 11'(rand_fp(5, 5, 15));   b1 = 11'(rand_fp(5, 5, 15));
      a2 = 16'(rand_fp(6, 9, 20));   b2 = 16'(rand_fp(6, 9, 20));
      #1;
      check(64'(z0), ref_mul(64'(a0), 64'(b0), 8, 23), "rand (8,23)");
      check(64'(z1), ref_mul(64'(a1), 64'(b1), 5, 5),  "rand (5,5)");
      check(64'(z2), ref_mul(64'(a2), 64'(b2), 6, 9),  "rand (6,9)");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
