// tb_cplx_add: self-checking test of cplx_add in (8,23) and (5,5). Random complex
// operand pairs are compared bit for bit with the double-precision reference of
// fp_ref_pkg, part by part. Combinational: one check per time step.
`timescale 1ns/1ps
module tb_cplx_add;
  import fp_ref_pkg::*;

  logic [31:0] ar0, ai0, br0, bi0, zr0, zi0;
  logic [10:0] ar1, ai1, br1, bi1, zr1, zi1;
  int checks = 0, failures = 0;

  cplx_add #(.EXP_W(8), .MAN_W(23)) u_f32 (.a_re(ar0), .a_im(ai0), .b_re(br0), .b_im(bi0),
                                          .z_re(zr0), .z_im(zi0));
  cplx_add #(.EXP_W(5), .MAN_W(5))  u_f11 (.a_re(ar1), .a_im(ai1), .b_re(br1), .b_im(bi1),
                                          .z_re(zr1), .z_im(zi1));

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
    // (1.5 - 2j) + (0.25 + 3j) = 1.75 + 1j
    ar0 = 32'h3fc00000; ai0 = 32'hc0000000; br0 = 32'h3e800000; bi0 = 32'h40400000; #1;
    check(64'(zr0), 64'h3fe00000, "re");
    check(64'(zi0), 64'h3f800000, "im");
    for (int n = 0; n < 10000; n++) begin
      ar0 = 32'(rand_fp(8, 23, 5)); ai0 = 32'(rand_fp(8, 23, 5));
      br0 = 32'(rand_fp(8, 23, 5)); bi0 = 32'(rand_fp(8, 23, 5));
      ar1 = 11'(rand_fp(5, 5, 5));  ai1 = 11'(rand_fp(5, 5, 5));
      br1 = 11'(rand_fp(5, 5, 5));  bi1 = 11'(rand_fp(5, 5, 5));
      #1;
      check(64'(zr0), ref_add(64'(ar0), 64'(br0), 8, 23), "rand re (8,23)");
      check(64'(zi0), ref_add(64'(ai0), 64'(bi0), 8, 23), "rand im (8,23)");
      check(64'(zr1), ref_add(64'(ar1), 64'(br1), 5, 5),  "rand re (5,5)");
      check(64'(zi1), ref_add(64'(ai1), 64'(bi1), 5, 5),  "rand im (5,5)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
