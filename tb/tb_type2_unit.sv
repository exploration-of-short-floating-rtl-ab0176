// tb_type2_unit: self-checking test of the Type II operation
// z = phi_i * phi_j * conj(phi_k) in (8,23) and in (5,7). The reference builds
// the same two rounded complex products from double-precision operations
// (fp_ref_pkg). A directed case uses the same value three times, |x|^2 * x, the
// typical third-order term. Combinational: one check per time step.
`timescale 1ns/1ps
module tb_type2_unit;
  import fp_ref_pkg::*;

  logic [31:0] ir0, ii0, jr0, ji0, kr0, ki0, zr0, zi0;
  logic [12:0] ir1, ii1, jr1, ji1, kr1, ki1, zr1, zi1;
  int checks = 0, failures = 0;

  type2_unit #(.EXP_W(8), .MAN_W(23)) u_f32 (
    .i_re(ir0), .i_im(ii0), .j_re(jr0), .j_im(ji0), .k_re(kr0), .k_im(ki0),
    .z_re(zr0), .z_im(zi0));
  type2_unit #(.EXP_W(5), .MAN_W(7)) u_f13 (
    .i_re(ir1), .i_im(ii1), .j_re(jr1), .j_im(ji1), .k_re(kr1), .k_im(ki1),
    .z_re(zr1), .z_im(zi1));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic ref_cmul(input logic [63:0] ar, ai, br, bi, input logic cj,
                          input int w, t, output logic [63:0] zr, zi);
    logic [63:0] bb;
    bb = cj ? neg(bi, w, t) : bi;
    zr = ref_add(ref_mul(ar, br, w, t), neg(ref_mul(ai, bb, w, t), w, t), w, t);
    zi = ref_add(ref_mul(ar, bb, w, t), ref_mul(ai, br, w, t), w, t);
  endtask

  task automatic ref_t2(input logic [63:0] ir, ii, jr, ji, kr, ki, input int w, t,
                        output logic [63:0] zr, zi);
    logic [63:0] pr, pi;
    ref_cmul(ir, ii, jr, ji, 1'b0, w, t, pr, pi);
    ref_cmul(pr, pi, kr, ki, 1'b1, w, t, zr, zi);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] er, ei;
    // x = 1+1j: x*x*conj(x) = |x|^2 x = 2+2j
    ir0 = 32'h3f800000; ii0 = 32'h3f800000;
    jr0 = ir0; ji0 = ii0; kr0 = ir0; ki0 = ii0; #1;
    check(64'(zr0), 64'h40000000, "re |x|^2 x");
    check(64'(zi0), 64'h40000000, "im |x|^2 x");
    for (int n = 0; n < 10000; n++) begin
      ir0 = 32'(rand_fp(8, 23, 3)); ii0 = 32'(rand_fp(8, 23, 3));
      jr0 = 32'(rand_fp(8, 23, 3)); ji0 = 32'(rand_fp(8, 23, 3));
      kr0 = 32'(rand_fp(8, 23, 3)); ki0 = 32'(rand_fp(8, 23, 3));
      ir1 = 13'(rand_fp(5, 7, 3));  ii1 = 13'(rand_fp(5, 7, 3));
      jr1 = 13'(rand_fp(5, 7, 3));  ji1 = 13'(rand_fp(5, 7, 3));
      kr1 = 13'(rand_fp(5, 7, 3));  ki1 = 13'(rand_fp(5, 7, 3));
      #1;
      ref_t2(64'(ir0), 64'(ii0), 64'(jr0), 64'(ji0), 64'(kr0), 64'(ki0), 8, 23, er, ei);
      check(64'(zr0), er, "rand re (8,23)");
      check(64'(zi0), ei, "rand im (8,23)");
      ref_t2(64'(ir1), 64'(ii1), 64'(jr1), 64'(ji1), 64'(kr1), 64'(ki1), 5, 7, er, ei);
      check(64'(zr1), er, "rand re (5,7)");
      check(64'(zi1), ei, "rand im (5,7)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
