// tb_cplx_mult: self-checking test of cplx_mult in single precision (8,23) and
// in the short (6,7) format. Random complex operands, with and without
// conjugation of b, are compared bit for bit with a reference that performs the
// same four rounded products and two rounded sums in double precision
// (fp_ref_pkg). Combinational: one check per time step.
`timescale 1ns/1ps
module tb_cplx_mult;
  import fp_ref_pkg::*;

  logic [31:0] ar0, ai0, br0, bi0, zr0, zi0;
  logic [13:0] ar1, ai1, br1, bi1, zr1, zi1;
  logic        conj_b;
  int checks = 0, failures = 0;

  cplx_mult #(.EXP_W(8), .MAN_W(23)) u_f32 (.a_re(ar0), .a_im(ai0), .b_re(br0), .b_im(bi0),
                                           .conj_b(conj_b), .z_re(zr0), .z_im(zi0));
  cplx_mult #(.EXP_W(6), .MAN_W(7))  u_f14 (.a_re(ar1), .a_im(ai1), .b_re(br1), .b_im(bi1),
                                           .conj_b(conj_b), .z_re(zr1), .z_im(zi1));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Reference complex product in format (w,t).
  task automatic ref_cmul(input logic [63:0] ar, ai, br, bi, input logic cj,
                          input int w, t, output logic [63:0] zr, zi);
    logic [63:0] bb;
    bb = cj ? neg(bi, w, t) : bi;
    zr = ref_add(ref_mul(ar, br, w, t), neg(ref_mul(ai, bb, w, t), w, t), w, t);
    zi = ref_add(ref_mul(ar, bb, w, t), ref_mul(ai, br, w, t), w, t);
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
    // (1+2j)*(3+4j) = -5+10j ; with conj: (1+2j)*(3-4j) = 11+2j
    ar0 = 32'h3f800000; ai0 = 32'h40000000; br0 = 32'h40400000; bi0 = 32'h40800000;
    conj_b = 1'b0; #1;
    check(64'(zr0), 64'hc0a00000, "re (1+2j)(3+4j)");
    check(64'(zi0), 64'h41200000, "im (1+2j)(3+4j)");
    conj_b = 1'b1; #1;
    check(64'(zr0), 64'h41300000, "re (1+2j)(3-4j)");
    check(64'(zi0), 64'h40000000, "im (1+2j)(3-4j)");

    for (int n = 0; n < 10000; n++) begin
      conj_b = 1'($urandom_range(1));
      ar0 = 32'(rand_fp(8, 23, 4)); ai0 = 32'(rand_fp(8, 23, 4));
      br0 = 32'(rand_fp(8, 23, 4)); bi0 = 32'(rand_fp(8, 23, 4));
      ar1 = 14'(rand_fp(6, 7, 4));  ai1 = 14'(rand_fp(6, 7, 4));
      br1 = 14'(rand_fp(6, 7, 4));  bi1 = 14'(rand_fp(6, 7, 4));
      #1;
      ref_cmul(64'(ar0), 64'(ai0), 64'(br0), 64'(bi0), conj_b, 8, 23, er, ei);
      check(64'(zr0), er, "rand re (8,23)");
      check(64'(zi0), ei, "rand im (8,23)");
      ref_cmul(64'(ar1), 64'(ai1), 64'(br1), 64'(bi1), conj_b, 6, 7, er, ei);
      check(64'(zr1), er, "rand re (6,7)");
      check(64'(zi1), ei, "rand im (6,7)");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
