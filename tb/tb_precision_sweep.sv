// tb_precision_sweep: the predistorter run in sixteen floating-point formats at
// once, on the same multi-carrier signal (39,640 samples, half the length of
// the reference test signal, to keep the run short), for both example programs
// in turn.
//
// Formats: exponent 8 with mantissas 23, 19, 15, 11, 10, 9, 8, 7, 6 and 5 bits
// (the mantissa series), and exponents 7, 6 and 5 with mantissas of 23 and of
// 6 bits (the exponent series). Each lane checks every output bit for bit
// against a reference rounded to its own format and reports the error of its
// output against an unquantised model as an NMSE. The sweep then checks the
// expected shape: along the mantissa series the error grows at every step (by
// at least 3 dB), and at a 6-bit mantissa the exponent width changes the error
// by less than 1 dB. At a 23-bit mantissa the exponent series only has to stay
// below -60 dB, far under the distortion (around -40 dB) a predistorter
// corrects: with five exponent bits the smallest high-order terms of samples
// near zero fall below the normal range and are flushed to zero, which shows
// up against the -147 dB of single precision (about -70 dB) but does not
// matter for linearisation.
`timescale 1ns/1ps
module tb_precision_sweep;
  localparam int L = 16;
  localparam int SAMPLES = 39640;
  localparam int EXPW [L] = '{8, 8, 8, 8, 8, 8, 8, 8, 8, 8,  7, 6, 5,  7, 6, 5};
  localparam int MANT [L] = '{23, 19, 15, 11, 10, 9, 8, 7, 6, 5,  23, 23, 23,  6, 6, 6};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  int   sel = 0;
  logic done [L];
  real  nmse [L];
  int   lc [L], lf [L];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < L; g++) begin : g_lane
    format_lane #(.W(EXPW[g]), .T(MANT[g])) u_lane (
      .clk(clk), .rst_n(rst_n), .start(start), .sel(sel), .samples(SAMPLES),
      .done(done[g]), .nmse_db(nmse[g]), .checks(lc[g]), .failures(lf[g]));
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_shape(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic sweep(input int program_sel);
    sel = program_sel;
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    for (int i = 0; i < L; i++) wait (done[i]);
    for (int i = 0; i < L; i++)
      $display("program %0d format (%0d,%0d): NMSE vs unquantised %0.1f dB",
               sel, EXPW[i], MANT[i], nmse[i]);
    // Mantissa series, lanes 0..9.
    for (int i = 0; i < 9; i++)
      expect_shape(nmse[i + 1] >= nmse[i] + 3.0,
                   $sformatf("mantissa %0d not clearly worse than %0d", MANT[i + 1], MANT[i]));
    // Exponent series at 23 mantissa bits, lanes 0 and 10..12.
    for (int i = 10; i <= 12; i++)
      expect_shape(nmse[i] < -60.0, $sformatf("(%0d,23) error above -60 dB", EXPW[i]));
    // Exponent series at 6 mantissa bits, lanes 8 and 13..15.
    for (int i = 13; i <= 15; i++)
      expect_shape(nmse[i] < nmse[8] + 1.0 && nmse[i] > nmse[8] - 1.0,
                   $sformatf("(%0d,6) differs from (8,6) by 1 dB or more", EXPW[i]));
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < L; i++) wait (!done[i]);
  endtask

  initial begin
    sweep(0);   // unit delays only
    sweep(1);   // delays up to five samples
    for (int i = 0; i < L; i++) begin
      checks += lc[i];
      failures += lf[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
