// format_lane: one predistorter in a given (W,T) floating-point format, driven
// with the multi-carrier test signal and checked against the reference model.
// Used by the precision sweep testbench, which runs several lanes side by side.
//
// On each rising `start` the lane clears its model, loads example program `sel` and a fixed coefficient set
// (both rounded to its format), streams `samples` input samples back to back,
// compares every output bit for bit with the model rounded to (W,T), and
// accumulates the error against the unquantised model. When all outputs are in
// it raises `done`; nmse_db then holds this run's result, checks and failures
// the running totals. Dropping `start` drops `done` and readies the lane for the
// next run (the testbench resets the design in between).
`timescale 1ns/1ps
module format_lane #(
  parameter int W = 8,
  parameter int T = 23
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  int   sel,
  input  int   samples,
  output logic done,
  output real  nmse_db,
  output int   checks,
  output int   failures
);
  import dpd_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int N = 1 + W + T, NB = 8;

  logic             prog_we = 1'b0, coef_we = 1'b0, x_valid = 1'b0;
  logic [IDX_W-1:0] prog_addr = '0, coef_addr = '0;
  basis_op_t        prog_data = '0;
  logic [N-1:0]     coef_re = '0, coef_im = '0, x_re = '0, x_im = '0;
  logic             x_ready, y_valid, busy;
  logic [N-1:0]     y_re, y_im;

  baps_dpd_top #(.EXP_W(W), .MAN_W(T)) dut (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_re(coef_re), .coef_im(coef_im),
    .x_valid(x_valid), .x_ready(x_ready), .x_re(x_re), .x_im(x_im),
    .y_valid(y_valid), .y_re(y_re), .y_im(y_im), .busy(busy));

  baps_model model;
  cbits_t    exp_q [$];
  real       exr_q [$], exi_q [$];
  real       err_pow, ref_pow;
  int        outputs;

  // Fixed model coefficients: unit linear term, decaying nonlinear terms.
  function automatic real theta_re(int r);
    real tab [8] = '{1.0, -0.081, 0.043, 0.027, -0.019, 0.012, -0.0071, 0.0043};
    return tab[r];
  endfunction
  function automatic real theta_im(int r);
    real tab [8] = '{0.0, 0.037, -0.052, 0.015, 0.011, -0.0093, 0.0062, -0.0029};
    return tab[r];
  endfunction

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      cbits_t e;
      real    er, ei, gr, gi;
      outputs++;
      checks++;
      e  = exp_q.pop_front();
      er = exr_q.pop_front();
      ei = exi_q.pop_front();
      if (64'(y_re) !== e.re || 64'(y_im) !== e.im) begin
        failures++;
        if (failures < 5)
          $display("FAIL (%0d,%0d) y %0d: got %h/%h expected %h/%h", W, T, outputs,
                   y_re, y_im, e.re, e.im);
      end
      gr = to_real(64'(y_re), W, T);
      gi = to_real(64'(y_im), W, T);
      err_pow += (gr - er) * (gr - er) + (gi - ei) * (gi - ei);
      ref_pow += er * er + ei * ei;
    end
    if (rst_n && x_valid && x_ready) begin
      cbits_t y;
      real    yr, yi;
      y = model.step('{64'(x_re), 64'(x_im)});
      model.step_exact(to_real(64'(x_re), W, T), to_real(64'(x_im), W, T), yr, yi);
      exp_q.push_back(y);
      exr_q.push_back(yr);
      exi_q.push_back(yi);
    end
  end

  initial begin
    done = 1'b0; nmse_db = 0.0; checks = 0; failures = 0;
    model = new(W, T, NB);
    forever begin
      wait (start);
      err_pow = 0.0; ref_pow = 0.0; outputs = 0;
      model.reset();
      for (int r = 0; r < NB; r++) begin
        @(negedge clk);
        model.prog[r] = example_prog(sel, r);
        model.set_theta(r, theta_re(r), theta_im(r));
        prog_we = 1'b1; prog_addr = IDX_W'(r); prog_data = example_prog(sel, r);
        coef_we = 1'b1; coef_addr = IDX_W'(r);
        coef_re = N'(model.theta[r].re);
        coef_im = N'(model.theta[r].im);
      end
      @(negedge clk);
      prog_we = 1'b0;
      coef_we = 1'b0;
      for (int n = 0; n < samples; n++) begin
        real xr, xi;
        xr = 0.0; xi = 0.0;
        for (int k = 0; k < 8; k++) begin
          xr += $cos((0.02 + 0.03 * k) * n + 0.7 * k * k);
          xi += $sin((0.02 + 0.03 * k) * n + 0.7 * k * k);
        end
        x_valid = 1'b1;
        x_re = N'(from_real(xr * 0.25 / $sqrt(8.0), W, T));
        x_im = N'(from_real(xi * 0.25 / $sqrt(8.0), W, T));
        do @(posedge clk); while (!x_ready);
        @(negedge clk);
        x_valid = 1'b0;
      end
      while (busy || outputs < samples) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) failures++;
      nmse_db = 10.0 * $log10(err_pow / ref_pow + 1.0e-30);
      done = 1'b1;
      wait (!start);
      done = 1'b0;
    end
  end
endmodule
