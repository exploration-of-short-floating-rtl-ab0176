// tb_basis_builder: self-checking test of the basis construction FSM at its
// default sizes (single precision, eight basis functions, delay depth five).
//
// Both example programs are loaded in turn. Random complex samples are offered
// with random gaps, sometimes back to back; every phi_1 .. phi_8 set that comes
// out with phi_valid is compared bit for bit with the reference model, whose
// Type I values come from its own history of earlier samples. Cycle counts are
// checked too: phi_8 is written eight edges after the accepting edge, so
// phi_valid is sampled high at the ninth; back-to-back samples must be accepted
// every nine cycles.
`timescale 1ns/1ps
module tb_basis_builder;
  import dpd_pkg::*;
  import fp_ref_pkg::*;
  import baps_ref_pkg::*;

  localparam int W = 8, T = 23, N = 1 + W + T, NB = 8;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             prog_we = 1'b0;
  logic [IDX_W-1:0] prog_addr = '0;
  basis_op_t        prog_data = '0;
  logic             x_valid = 1'b0, x_ready;
  logic [N-1:0]     x_re = '0, x_im = '0;
  logic             phi_valid, busy;
  logic [N-1:0]     phi_re [NB], phi_im [NB];

  int checks = 0, failures = 0;
  int cycle = 0, last_accept = -1;
  int b2b = 0, sets = 0;

  baps_model model;

  basis_builder dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .x_valid(x_valid), .x_ready(x_ready), .x_re(x_re), .x_im(x_im),
    .phi_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // Samples accepted and not yet finished, with the cycle they were accepted in.
  logic [N-1:0] q_re [$], q_im [$];
  int           q_cyc [$];

  // Compare each finished set with the model, then note a new acceptance (the
  // builder accepts x(n+1) in the same cycle it presents the set of x(n)).
  always @(posedge clk) begin
    if (rst_n && phi_valid) begin
      cbits_t x, y;
      int     acc;
      checks++;
      if (q_re.size() == 0) begin
        fail("phi_valid without an accepted sample");
      end else begin
        x.re = 64'(q_re.pop_front());
        x.im = 64'(q_im.pop_front());
        acc  = q_cyc.pop_front();
        y = model.step(x);
        sets++;
        if (cycle - acc != NB + 1) fail($sformatf("phi_valid %0d cycles after accept", cycle - acc));
        for (int r = 0; r < NB; r++) begin
          checks++;
          if (64'(phi_re[r]) !== model.phi[r].re || 64'(phi_im[r]) !== model.phi[r].im)
            fail($sformatf("set %0d phi_%0d: got %h/%h expected %h/%h", sets, r + 1,
                           phi_re[r], phi_im[r], model.phi[r].re, model.phi[r].im));
        end
      end
    end
    if (rst_n && x_valid && x_ready) begin
      if (last_accept >= 0 && cycle - last_accept == NB + 1) b2b++;
      checks++;
      if (last_accept >= 0 && cycle - last_accept < NB + 1) fail("accepted too early");
      last_accept = cycle;
      q_re.push_back(x_re);
      q_im.push_back(x_im);
      q_cyc.push_back(cycle);
    end
  end

  initial begin
    #2000000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_prog(input int sel);
    for (int r = 0; r < NB; r++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_addr = IDX_W'(r);
      prog_data = example_prog(sel, r);
      model.prog[r] = example_prog(sel, r);
    end
    @(negedge clk);
    prog_we = 1'b0;
  endtask

  task automatic run_samples(input int count);
    for (int n = 0; n < count; n++) begin
      @(negedge clk);
      x_valid = 1'b1;
      x_re = N'(rand_fp(W, T, 2));
      x_im = N'(rand_fp(W, T, 2));
      do @(posedge clk); while (!x_ready);
      @(negedge clk);
      x_valid = 1'b0;
      // Random gap; zero gap means the next sample waits during computation.
      repeat ($urandom_range(3) == 0 ? $urandom_range(12) : 0) @(negedge clk);
    end
    while (busy) @(negedge clk);
  endtask

  initial begin
    model = new(W, T, NB);
    #12 rst_n = 1'b1;
    load_prog(0);
    run_samples(60);
    // Switch to the second program and start from a clean history.
    rst_n = 1'b0;
    last_accept = -1;
    model.reset();
    #12 rst_n = 1'b1;
    load_prog(1);
    run_samples(60);
    checks++;
    if (sets != 120) fail($sformatf("%0d sets produced, 120 expected", sets));
    checks++;
    if (b2b == 0) fail("no back-to-back acceptance");
    $display("sets=%0d back_to_back=%0d", sets, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
