// type2_unit: the nonlinear (Type II) basis operation of BAPS,
// z = phi_i * phi_j * conj(phi_k).
//
// Two cplx_mult stages in series: the first forms phi_i * phi_j, the second
// multiplies that by the conjugate of phi_k. All six real products and four
// real additions per stage run in the common (EXP_W, MAN_W) format with
// round-to-nearest. The operation is the one the BAPS model defines; building it
// as two chained complex multipliers without a register between them is this
// design's choice, so the unit is combinational and one Type II basis function
// is produced per clock by the basis construction FSM.
module type2_unit #(
  parameter int unsigned EXP_W = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W = dpd_pkg::MAN_W_DEFAULT,
  localparam int unsigned N    = 1 + EXP_W + MAN_W
) (
  input  logic [N-1:0] i_re,
  input  logic [N-1:0] i_im,
  input  logic [N-1:0] j_re,
  input  logic [N-1:0] j_im,
  input  logic [N-1:0] k_re,
  input  logic [N-1:0] k_im,
  output logic [N-1:0] z_re,
  output logic [N-1:0] z_im
);

  logic [N-1:0] ij_re, ij_im;

  cplx_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ij (
    .a_re(i_re), .a_im(i_im), .b_re(j_re), .b_im(j_im), .conj_b(1'b0),
    .z_re(ij_re), .z_im(ij_im));

  cplx_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_ijk (
    .a_re(ij_re), .a_im(ij_im), .b_re(k_re), .b_im(k_im), .conj_b(1'b1),
    .z_re(z_re), .z_im(z_im));

endmodule
