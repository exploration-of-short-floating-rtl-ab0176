// cplx_add: floating-point complex adder, z = a + b, one fp_addsub for the real
// parts and one for the imaginary parts, rounded to nearest in the (EXP_W, MAN_W)
// format. It is the node of the balanced summation tree of the DPD computation.
// Complex adders in a tree follow the design description; using two
// independent real adders, with no register inside, is this design's choice.
// Purely combinational.
module cplx_add #(
  parameter int unsigned EXP_W = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W = dpd_pkg::MAN_W_DEFAULT,
  localparam int unsigned N    = 1 + EXP_W + MAN_W
) (
  input  logic [N-1:0] a_re,
  input  logic [N-1:0] a_im,
  input  logic [N-1:0] b_re,
  input  logic [N-1:0] b_im,
  output logic [N-1:0] z_re,
  output logic [N-1:0] z_im
);

  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_re (.a(a_re), .b(b_re), .sub(1'b0), .z(z_re));
  fp_addsub #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_im (.a(a_im), .b(b_im), .sub(1'b0), .z(z_im));

endmodule
