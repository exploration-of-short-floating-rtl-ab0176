// tb_fp_addsub: self-checking test of fp_addsub in three formats, (8,23), (5,5)
// and (6,9). Random operand pairs, added and subtracted, are compared bit for bit
// with the double-precision reference of fp_ref_pkg. Operands are drawn with
// nearby exponents so that cancellation, carry-out and deep alignment shifts all
// occur; the (5,5) instance also reaches overflow and flush to zero. Zero,
// infinity and NaN rules are checked directly. Combinational: one check per step.
`timescale 1ns/1ps
module tb_fp_addsub;
  import fp_ref_pkg::*;

  logic [31:0] a0, b0, z0;
  logic [10:0] a1, b1, z1;
  logic [15:0] a2, b2, z2;
  logic        sub;
  int checks = 0, failures = 0;
  int cancel = 0;

  fp_addsub #(.EXP_W(8), .MAN_W(23)) u_f32 (.a(a0), .b(b0), .sub(sub), .z(z0));
  fp_addsub #(.EXP_W(5), .MAN_W(5))  u_f11 (.a(a1), .b(b1), .sub(sub), .z(z1));
  fp_addsub #(.EXP_W(6), .MAN_W(9))  u_f16 (.a(a2), .b(b2), .sub(sub), .z(z2));

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
    sub = 1'b0;
    a0 = 32'h3f800000; b0 = 32'h3f800000; #1;      // 1 + 1 = 2
    check(64'(z0), 64'h40000000, "1+1");
    a0 = 32'h3f800000; b0 = 32'h33800000; #1;      // 1 + 2^-24: tie, stays 1
    check(64'(z0), 64'h3f800000, "tie even");
    a0 = 32'h3f800001; b0 = 32'h33800000; #1;      // odd + half ulp rounds up
    check(64'(z0), 64'h3f800002, "tie odd");
    a0 = 32'h40400000; b0 = 32'hc0400000; #1;      // 3 + -3 = +0
    check(64'(z0), 64'h00000000, "cancel");
    a0 = 32'h80000000; b0 = 32'h80000000; #1;      // -0 + -0 = -0
    check(64'(z0), 64'h80000000, "-0+-0");
    a0 = 32'h7f800000; b0 = 32'hff800000; #1;      // inf + -inf = NaN
    check(64'(z0), 64'h7fc00000, "inf-inf");
    a0 = 32'h7f7fffff; b0 = 32'h7f7fffff; #1;      // max + max overflows
    check(64'(z0), 64'h7f800000, "overflow");
    sub = 1'b1;
    a0 = 32'h40a00000; b0 = 32'h40400000; #1;      // 5 - 3 = 2
    check(64'(z0), 64'h40000000, "5-3");
    a0 = 32'h00c00000; b0 = 32'h00800000; #1;      // result below normal range
    check(64'(z0), 64'h00000000, "flush");
    a0 = 32'h00000000; b0 = 32'h3f800000; #1;      // 0 - 1 = -1
    check(64'(z0), 64'hbf800000, "0-1");

    for (int n = 0; n < 30000; n++) begin
      sub = 1'($urandom_range(1));
      a0 = 32'(rand_fp(8, 23, 3));   b0 = 32'(rand_fp(8, 23, 3));
      a1 = 11'(rand_fp(5, 5, 15));   b1 = 11'(rand_fp(5, 5, 15));
      a2 = 16'(rand_fp(6, 9, 6));    b2 = 16'(rand_fp(6, 9, 6));
      if (n % 7 == 0) b0 = {~a0[31] ^ sub, a0[30:8], 8'($urandom)};   // near cancellation
      if (n % 11 == 0) b1 = {~a1[10] ^ sub, a1[9:0]};                  // exact cancellation
      #1;
      if (z0[30:0] < a0[30:0] && z0[30:0] < b0[30:0]) cancel++;
      check(64'(z0), sub ? ref_add(64'(a0), neg(64'(b0), 8, 23), 8, 23)
                         : ref_add(64'(a0), 64'(b0), 8, 23), "rand (8,23)");
      check(64'(z1), sub ? ref_add(64'(a1), neg(64'(b1), 5, 5), 5, 5)
                         : ref_add(64'(a1), 64'(b1), 5, 5), "rand (5,5)");
      check(64'(z2), sub ? ref_add(64'(a2), neg(64'(b2), 6, 9), 6, 9)
                         : ref_add(64'(a2), 64'(b2), 6, 9), "rand (6,9)");
    end
    if (cancel == 0) begin
      failures++;
      $display("no cancellation was exercised");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
