// tb_baps_dpd_top: end-to-end test of the BAPS predistorter at its default
// parameters (single precision, eight basis functions, delay depth five).
//
// The stimulus is a multi-carrier baseband signal: a sum of eight complex tones
// with random phases, scaled to an RMS magnitude of 0.25. Coefficients are a
// unit linear term plus small random nonlinear terms, as a trained model has.
// Both example programs are run, one after the other (a program switch through
// the load port), each on a stream with random gaps and stretches where the
// next sample is already waiting.
//
// Every y(n) is compared bit for bit with the reference model rounded the same
// way, and the distance of the single-precision output from an unquantised
// real-valued model is reported as an NMSE in dB. Timing checks: y_valid is
// sampled high 13 edges after the edge accepting x(n), and back-to-back samples
// are accepted every 9 cycles. The test counts each mechanism of the design and
// fails if one never happened: Type I and Type II steps, the Done -> Compute
// transition on a waiting sample, basis construction of x(n+1) overlapping the
// DPD computation of x(n), an input held off by x_ready, and the program switch.
`timescale 1ns/1ps
module tb_baps_dpd_top;
  import dpd_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int W = 8, T = 23, N = 1 + W + T, NB = 8, LAT = 13;
  localparam int SAMPLES = 79280; // per program, the length of the reference test signal

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             prog_we = 1'b0;
  logic [IDX_W-1:0] prog_addr = '0;
  basis_op_t        prog_data = '0;
  logic             coef_we = 1'b0;
  logic [IDX_W-1:0] coef_addr = '0;
  logic [N-1:0]     coef_re = '0, coef_im = '0;
  logic             x_valid = 1'b0, x_ready;
  logic [N-1:0]     x_re = '0, x_im = '0;
  logic             y_valid, busy;
  logic [N-1:0]     y_re, y_im;

  baps_dpd_top dut (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_re(coef_re), .coef_im(coef_im),
    .x_valid(x_valid), .x_ready(x_ready), .x_re(x_re), .x_im(x_im),
    .y_valid(y_valid), .y_re(y_re), .y_im(y_im), .busy(busy));

  baps_model model;
  int checks = 0, failures = 0, cycle = 0, last_accept = -1, outputs = 0;
  int n_type1 = 0, n_type2 = 0, n_done_to_compute = 0, n_overlap = 0, n_stall = 0,
      n_switch = 0;
  real err_pow = 0.0, ref_pow = 0.0;
  real tone_f [8], tone_p [8];
  cbits_t exp_q [$];
  real    exr_q [$], exi_q [$];
  int     exp_cyc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // Mechanism counters, observed on the design's internal state (builder state
  // encoding: 1 = COMPUTE, 2 = DONE).
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_builder.state == 2'd1 && dut.u_builder.r != 0) begin
        if (dut.u_builder.op.op == OP_DELAY) n_type1++;
        else n_type2++;
        if (dut.in_engine != 0) n_overlap++;
      end
      if (dut.u_builder.state == 2'd2 && x_valid) n_done_to_compute++;
      if (x_valid && !x_ready) n_stall++;
    end
  end

  // Output checking.
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      cbits_t e;
      real    er, ei, gr, gi;
      int     c;
      checks++;
      outputs++;
      if (exp_q.size() == 0) begin
        fail("y_valid without a sample");
      end else begin
        e  = exp_q.pop_front();
        er = exr_q.pop_front();
        ei = exi_q.pop_front();
        c  = exp_cyc.pop_front();
        if (cycle - c != LAT) fail($sformatf("latency %0d, expected %0d", cycle - c, LAT));
        if (64'(y_re) !== e.re || 64'(y_im) !== e.im)
          fail($sformatf("y %0d: got %h/%h expected %h/%h", outputs, y_re, y_im, e.re, e.im));
        gr = to_real(64'(y_re), W, T);
        gi = to_real(64'(y_im), W, T);
        err_pow += (gr - er) * (gr - er) + (gi - ei) * (gi - ei);
        ref_pow += er * er + ei * ei;
      end
    end
    if (rst_n && x_valid && x_ready) begin
      cbits_t x, y;
      real    yr, yi;
      checks++;
      if (last_accept >= 0 && cycle - last_accept < NB + 1) fail("accepted too early");
      last_accept = cycle;
      x = '{64'(x_re), 64'(x_im)};
      y = model.step(x);
      model.step_exact(to_real(64'(x_re), W, T), to_real(64'(x_im), W, T), yr, yi);
      exp_q.push_back(y);
      exr_q.push_back(yr);
      exi_q.push_back(yi);
      exp_cyc.push_back(cycle);
    end
  end

  initial begin
    #50000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(input int sel);
    for (int r = 0; r < NB; r++) begin
      real cr, ci;
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = IDX_W'(r);
      prog_data = example_prog(sel, r);
      model.prog[r] = example_prog(sel, r);
      cr = (r == 0) ? 1.0 : ($urandom_range(2000) / 1000.0 - 1.0) * 0.1;
      ci = (r == 0) ? 0.0 : ($urandom_range(2000) / 1000.0 - 1.0) * 0.1;
      model.set_theta(r, cr, ci);
      coef_we   = 1'b1;
      coef_addr = IDX_W'(r);
      coef_re   = N'(model.theta[r].re);
      coef_im   = N'(model.theta[r].im);
    end
    @(negedge clk);
    prog_we = 1'b0;
    coef_we = 1'b0;
  endtask

  task automatic stream(input int count);
    for (int n = 0; n < count; n++) begin
      real xr, xi;
      xr = 0.0; xi = 0.0;
      for (int k = 0; k < 8; k++) begin
        xr += $cos(tone_f[k] * n + tone_p[k]);
        xi += $sin(tone_f[k] * n + tone_p[k]);
      end
      // Eight unit tones have RMS sqrt(8); scale to 0.25.
      xr = xr * 0.25 / $sqrt(8.0);
      xi = xi * 0.25 / $sqrt(8.0);
      @(negedge clk);
      x_valid = 1'b1;
      x_re = N'(from_real(xr, W, T));
      x_im = N'(from_real(xi, W, T));
      do @(posedge clk); while (!x_ready);
      @(negedge clk);
      x_valid = 1'b0;
      if ((n / 40) % 2 == 1) repeat ($urandom_range(15)) @(negedge clk);
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    real nmse;
    model = new(W, T, NB);
    for (int k = 0; k < 8; k++) begin
      tone_f[k] = 0.02 + 0.03 * k;                   // carriers across the band
      tone_p[k] = 6.283185307 * $urandom_range(1000) / 1000.0;
    end
    #12 rst_n = 1'b1;
    configure(0);
    stream(SAMPLES);
    // Program switch: clear history and load the second model.
    n_switch++;
    rst_n = 1'b0;
    last_accept = -1;
    model.reset();
    #12 rst_n = 1'b1;
    configure(1);
    stream(SAMPLES);

    checks++;
    if (outputs != 2 * SAMPLES) fail($sformatf("%0d outputs, %0d expected", outputs, 2 * SAMPLES));
    if (exp_q.size() != 0) fail("outputs missing");
    nmse = 10.0 * $log10(err_pow / ref_pow + 1.0e-30);
    $display("outputs=%0d nmse_vs_unquantised=%0.1f dB", outputs, nmse);
    $display("type1=%0d type2=%0d done_to_compute=%0d overlap=%0d stall=%0d switch=%0d",
             n_type1, n_type2, n_done_to_compute, n_overlap, n_stall, n_switch);
    checks++; if (n_type1 == 0) fail("no Type I step");
    checks++; if (n_type2 == 0) fail("no Type II step");
    checks++; if (n_done_to_compute == 0) fail("no Done -> Compute transition");
    checks++; if (n_overlap == 0) fail("no pipelined overlap");
    checks++; if (n_stall == 0) fail("no input stall");
    checks++; if (n_switch == 0) fail("no program switch");
    // Single precision must stay far below the distortion levels DPD corrects.
    checks++; if (nmse > -100.0) fail("single-precision output strays from the unquantised model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
