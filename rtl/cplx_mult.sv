// cplx_mult: floating-point complex multiplier, z = a * b, or z = a * conj(b)
// when conj_b is set.
//
// Four fp_mult units form the partial products and two fp_addsub units combine
// them: re = ar*br - ai*bi, im = ar*bi + ai*br, every operation rounded to
// nearest in the (EXP_W, MAN_W) format. Conjugation just flips the sign bit of
// b's imaginary part before the products. This four-multiplier form is this
// design's choice; the order of the operations fixes the rounding and is what
// the testbench reference follows. Purely combinational.
module cplx_mult #(
  parameter int unsigned EXP_W = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W = dpd_pkg::MAN_W_DEFAULT,
  localparam int unsigned N    = 1 + EXP_W + MAN_W
) (
  input  logic [N-1:0] a_re,
  input  logic [N-1:0] a_im,
  input  logic [N-1:0] b_re,
  input  logic [N-1:0] b_im,
  input  logic         conj_b,
  output logic [N-1:0] z_re,
  output logic [N-1:0] z_im
);

  logic [N-1:0] bi, p_rr, p_ii, p_ri, p_ir;

  assign bi = {b_im[N-1] ^ conj_b, b_im[N-2:0]};

  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_rr (.a(a_re), .b(b_re), .z(p_rr));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ii (.a(a_im), .b(bi),   .z(p_ii));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ri (.a(a_re), .b(bi),   .z(p_ri));
  fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ir (.a(a_im), .b(b_re), .z(p_ir));

  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_re (.a(p_rr), .b(p_ii), .sub(1'b1), .z(z_re));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_im (.a(p_ri), .b(p_ir), .sub(1'b0), .z(z_im));

endmodule
