// tb_dpd_engine: self-checking test of the DPD computation module at its
// default sizes (single precision, eight basis functions).
//
// Random coefficients are written through the coefficient port, then random
// basis-function sets are presented, some on consecutive cycles and some with
// gaps. Each y(n) is compared bit for bit with the reference: eight rounded
// complex products theta_r * phi_r summed pairwise as ((1+2)+(3+4))+((5+6)+(7+8)).
// The latency is checked: a set sampled at edge k gives y_valid sampled high at
// edge k+4, and every set must produce exactly one result.
`timescale 1ns/1ps
module tb_dpd_engine;
  import dpd_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int W = 8, T = 23, N = 1 + W + T, NB = 8, LAT = 4;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             coef_we = 1'b0;
  logic [IDX_W-1:0] coef_addr = '0;
  logic [N-1:0]     coef_re = '0, coef_im = '0;
  logic             phi_valid = 1'b0;
  logic [N-1:0]     phi_re [NB], phi_im [NB];
  logic             y_valid;
  logic [N-1:0]     y_re, y_im;

  cbits_t theta [NB];
  cbits_t exp_q [$];
  int     exp_cyc [$];
  int checks = 0, failures = 0, cycle = 0, results = 0, consecutive = 0;

  dpd_engine dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_re(coef_re), .coef_im(coef_im), .phi_valid(phi_valid),
    .phi_re(phi_re), .phi_im(phi_im), .y_valid(y_valid), .y_re(y_re), .y_im(y_im));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  function automatic cbits_t ref_y();
    cbits_t lvl [NB];
    for (int r = 0; r < NB; r++) begin
      cbits_t p;
      p.re = 64'(phi_re[r]);
      p.im = 64'(phi_im[r]);
      lvl[r] = cmul(theta[r], p, 1'b0, W, T);
    end
    for (int n = NB; n > 1; n = n / 2)
      for (int i = 0; i < n / 2; i++) lvl[i] = cadd(lvl[2*i], lvl[2*i+1], W, T);
    return lvl[0];
  endfunction

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      cbits_t e;
      int     c;
      checks++;
      results++;
      if (exp_q.size() == 0) begin
        fail("unexpected y_valid");
      end else begin
        e = exp_q.pop_front();
        c = exp_cyc.pop_front();
        if (cycle - c != LAT) fail($sformatf("latency %0d", cycle - c));
        if (64'(y_re) !== e.re || 64'(y_im) !== e.im)
          fail($sformatf("y %0d: got %h/%h expected %h/%h", results, y_re, y_im, e.re, e.im));
      end
    end
    if (rst_n && phi_valid) begin
      exp_q.push_back(ref_y());
      exp_cyc.push_back(cycle);
    end
  end

  initial begin
    #1000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NB; r++) begin phi_re[r] = '0; phi_im[r] = '0; end
    #12 rst_n = 1'b1;
    for (int r = 0; r < NB; r++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = IDX_W'(r);
      coef_re   = N'(rand_fp(W, T, 3));
      coef_im   = N'(rand_fp(W, T, 3));
      theta[r]  = '{64'(coef_re), 64'(coef_im)};
    end
    @(negedge clk);
    coef_we = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (phi_valid) consecutive++;
      phi_valid = ($urandom_range(2) != 0);
      for (int r = 0; r < NB; r++) begin
        phi_re[r] = N'(rand_fp(W, T, 3));
        phi_im[r] = N'(rand_fp(W, T, 3));
      end
    end
    @(negedge clk);
    phi_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail("results missing");
    checks++;
    if (consecutive == 0) fail("no consecutive sets");
    $display("results=%0d", results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
