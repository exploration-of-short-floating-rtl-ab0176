// baps_ref_pkg: reference model of the BAPS predistorter for the testbenches.
//
// Complex values are pairs of (w,t) bit patterns held in 64-bit words; every
// operation is rounded to (w,t) through fp_ref_pkg, in the same order as the
// hardware (products ar*br - ai*bi and ar*bi + ai*br, Type II as
// (phi_i*phi_j)*conj(phi_k), adder tree summed pairwise). With real-valued
// arithmetic instead (exact = 1) the same model gives the unquantised reference
// used to measure how far a short format strays from ideal.
//
// It also holds two example eight-function programs used throughout the tests:
// one with unit delays only and one reaching delays of five samples.
package baps_ref_pkg;
  import fp_ref_pkg::*;
  import dpd_pkg::*;

  localparam int MAXR = 16;
  localparam int MAXD = 16;

  typedef struct {
    logic [63:0] re;
    logic [63:0] im;
  } cbits_t;

  function automatic cbits_t cmul(input cbits_t a, input cbits_t b, input logic cj,
                                  input int w, input int t);
    cbits_t z;
    logic [63:0] bi;
    bi   = cj ? neg(b.im, w, t) : b.im;
    z.re = ref_add(ref_mul(a.re, b.re, w, t), neg(ref_mul(a.im, bi, w, t), w, t), w, t);
    z.im = ref_add(ref_mul(a.re, bi, w, t), ref_mul(a.im, b.re, w, t), w, t);
    return z;
  endfunction

  function automatic cbits_t cadd(input cbits_t a, input cbits_t b, input int w, input int t);
    cbits_t z;
    z.re = ref_add(a.re, b.re, w, t);
    z.im = ref_add(a.im, b.im, w, t);
    return z;
  endfunction

  // State of the reference model: program, coefficients, history.
  class baps_model;
    int          w, t, nb, exact;
    basis_op_t   prog [MAXR];
    cbits_t      theta [MAXR];
    real         theta_r_re [MAXR], theta_r_im [MAXR];
    cbits_t      hist [MAXR][MAXD];      // hist[i][d-1] = phi_i(n-d), (w,t) model
    real         hr_re [MAXR][MAXD], hr_im [MAXR][MAXD];   // exact model
    cbits_t      phi  [MAXR];
    real         pr_re [MAXR], pr_im [MAXR];

    function new(int w_, int t_, int nb_);
      w = w_; t = t_; nb = nb_;
      reset();
    endfunction

    function void reset();
      for (int i = 0; i < MAXR; i++) begin
        for (int d = 0; d < MAXD; d++) begin
          hist[i][d] = '{64'd0, 64'd0};
          hr_re[i][d] = 0.0; hr_im[i][d] = 0.0;
        end
        phi[i] = '{64'd0, 64'd0};
      end
    endfunction

    function void set_theta(int r, real re, real im);
      theta_r_re[r] = re;
      theta_r_im[r] = im;
      theta[r].re = from_real(re, w, t);
      theta[r].im = from_real(im, w, t);
    endfunction

    // One sample through the (w,t) model; returns y(n).
    function cbits_t step(input cbits_t x);
      cbits_t y, lvl [MAXR];
      int n;
      phi[0] = x;
      for (int r = 1; r < nb; r++) begin
        if (prog[r].op == OP_PRODUCT)
          phi[r] = cmul(cmul(phi[prog[r].i], phi[prog[r].j], 1'b0, w, t),
                        phi[prog[r].k], 1'b1, w, t);
        else if (prog[r].m == 0)
          phi[r] = phi[prog[r].i];
        else
          phi[r] = hist[prog[r].i][prog[r].m - 1];
      end
      for (int i = 0; i < nb; i++) begin
        for (int d = MAXD - 1; d > 0; d--) hist[i][d] = hist[i][d-1];
        hist[i][0] = phi[i];
        lvl[i] = cmul(theta[i], phi[i], 1'b0, w, t);
      end
      n = nb;
      while (n > 1) begin
        for (int i = 0; i < n / 2; i++) lvl[i] = cadd(lvl[2*i], lvl[2*i+1], w, t);
        n = n / 2;
      end
      y = lvl[0];
      return y;
    endfunction

    // One sample through the unquantised model (real arithmetic).
    function void step_exact(input real xr, input real xi, output real yr, output real yi);
      real ar, ai, br, bi, cr, ci;
      pr_re[0] = xr; pr_im[0] = xi;
      for (int r = 1; r < nb; r++) begin
        if (prog[r].op == OP_PRODUCT) begin
          ar = pr_re[prog[r].i]; ai = pr_im[prog[r].i];
          br = pr_re[prog[r].j]; bi = pr_im[prog[r].j];
          cr = ar*br - ai*bi;    ci = ar*bi + ai*br;
          br = pr_re[prog[r].k]; bi = -pr_im[prog[r].k];
          pr_re[r] = cr*br - ci*bi;
          pr_im[r] = cr*bi + ci*br;
        end else if (prog[r].m == 0) begin
          pr_re[r] = pr_re[prog[r].i]; pr_im[r] = pr_im[prog[r].i];
        end else begin
          pr_re[r] = hr_re[prog[r].i][prog[r].m - 1];
          pr_im[r] = hr_im[prog[r].i][prog[r].m - 1];
        end
      end
      yr = 0.0; yi = 0.0;
      for (int i = 0; i < nb; i++) begin
        for (int d = MAXD - 1; d > 0; d--) begin
          hr_re[i][d] = hr_re[i][d-1]; hr_im[i][d] = hr_im[i][d-1];
        end
        hr_re[i][0] = pr_re[i]; hr_im[i][0] = pr_im[i];
        yr += theta_r_re[i]*pr_re[i] - theta_r_im[i]*pr_im[i];
        yi += theta_r_re[i]*pr_im[i] + theta_r_im[i]*pr_re[i];
      end
    endfunction
  endclass

  function automatic basis_op_t delay_op(int i, int m);
    basis_op_t o;
    o = '0;
    o.op = OP_DELAY;
    o.i  = IDX_W'(i);
    o.m  = DLY_W'(m);
    return o;
  endfunction

  function automatic basis_op_t prod_op(int i, int j, int k);
    basis_op_t o;
    o = '0;
    o.op = OP_PRODUCT;
    o.i  = IDX_W'(i);
    o.j  = IDX_W'(j);
    o.k  = IDX_W'(k);
    return o;
  endfunction

  // Example programs (indices 0-based: 0 is phi_1 = x(n)). Entry 0 is unused.
  // sel 0: unit delays only; sel 1: delays up to five samples.
  function automatic basis_op_t example_prog(int sel, int r);
    if (sel == 0) begin
      case (r)
        1: return prod_op(0, 0, 0);     // |x|^2 x
        2: return delay_op(0, 1);       // x(n-1)
        3: return prod_op(1, 0, 0);     // |x|^4 x
        4: return prod_op(2, 2, 2);     // |x(n-1)|^2 x(n-1)
        5: return delay_op(1, 1);       // (|x|^2 x)(n-1)
        6: return prod_op(0, 2, 0);     // |x|^2 x(n-1)
        7: return prod_op(3, 0, 0);     // |x|^6 x
        default: return '0;
      endcase
    end else begin
      case (r)
        1: return delay_op(0, 1);       // x(n-1)
        2: return delay_op(0, 5);       // x(n-5)
        3: return prod_op(0, 0, 0);     // |x|^2 x
        4: return delay_op(3, 3);       // (|x|^2 x)(n-3)
        5: return prod_op(1, 1, 0);     // x(n-1)^2 x*
        6: return delay_op(5, 2);       // (x(n-1)^2 x*)(n-2)
        7: return prod_op(0, 4, 2);     // x (|x|^2x)(n-3) x*(n-5)
        default: return '0;
      endcase
    end
  endfunction

endpackage
