// dpd_pkg: types and default sizes shared by the BAPS predistortion datapath.
//
// A BAPS (basis-propagating selection) predistorter builds R basis functions per
// input sample, one after another, each either a delayed copy of an earlier basis
// function (Type I, phi_r = phi_i(n-m)) or a product of three earlier ones with the
// last conjugated (Type II, phi_r = phi_i * phi_j * conj(phi_k)). The output is the
// coefficient-weighted sum of all R basis functions.
//
// All arithmetic is floating point in one custom format with a w-bit exponent and a
// t-bit mantissa (plus sign). The default format (8,23) is IEEE single precision and
// the default basis count is eight, as in the reference configurations. The encoding
// of one program step (basis_op_t) is this design's own choice.
package dpd_pkg;

  // Default floating-point format: IEEE binary32.
  localparam int unsigned EXP_W_DEFAULT = 8;
  localparam int unsigned MAN_W_DEFAULT = 23;

  // Default number of basis functions and the longest Type I delay supported.
  localparam int unsigned NUM_BASIS_DEFAULT = 8;
  localparam int unsigned MAX_DELAY_DEFAULT = 5;

  // Field widths of a program step: up to 16 basis functions, delays up to 15.
  localparam int unsigned IDX_W = 4;
  localparam int unsigned DLY_W = 4;

  typedef enum logic {
    OP_DELAY   = 1'b0,   // Type I:  phi_r = phi_i delayed by m samples
    OP_PRODUCT = 1'b1    // Type II: phi_r = phi_i * phi_j * conj(phi_k)
  } basis_op_e;

  // One step of the basis construction program. Step 0 is always phi_1 = x(n)
  // and its entry is ignored. For OP_DELAY only i and m are used; m = 0 copies
  // phi_i of the current sample. For OP_PRODUCT m is ignored.
  typedef struct packed {
    basis_op_e          op;
    logic [IDX_W-1:0]   i;
    logic [IDX_W-1:0]   j;
    logic [IDX_W-1:0]   k;
    logic [DLY_W-1:0]   m;
  } basis_op_t;

endpackage
