// baps_dpd_top: BAPS digital predistorter, the wrapper that joins the basis
// function construction module and the DPD computation module.
//
// A complex input sample x(n) enters through a valid/ready handshake. The
// basis_builder constructs phi_1 .. phi_R for it sequentially, one per clock,
// following the loaded program of Type I (delay) and Type II (product) steps.
// When the set is complete it is handed, all R values at once, to the
// dpd_engine, which weights every phi_r with its prestored coefficient theta_r
// in parallel and sums the products in a balanced adder tree to give the
// predistorted sample y(n). While the engine works on y(n) the builder already
// accepts x(n+1), so the two modules form a two-stage pipeline.
//
// Every value is a floating-point number in one custom format: sign, EXP_W
// exponent bits, MAN_W mantissa bits, IEEE-754 bias, round to nearest even. The
// defaults (8,23, single precision), eight basis functions and the structure
// follow the design description; a delay depth of five (the deeper of the two
// reference models), the load ports for program and coefficients and the
// handshake are this design's choices.
//
// Timing (defaults): one sample every NUM_BASIS + 1 = 9 cycles. Counting the
// clock edge that accepts x(n) as edge 0, y_valid goes high right after edge
// NUM_BASIS + 1 + log2(NUM_BASIS) = 12 and stays high for one cycle. The output has no back-pressure: y_* is valid for the
// single cycle y_valid is high. Program and coefficients are written while the
// pipeline is empty (busy low).
module baps_dpd_top
  import dpd_pkg::*;
#(
  parameter int unsigned EXP_W     = EXP_W_DEFAULT,
  parameter int unsigned MAN_W     = MAN_W_DEFAULT,
  parameter int unsigned NUM_BASIS = NUM_BASIS_DEFAULT,
  parameter int unsigned MAX_DELAY = MAX_DELAY_DEFAULT,
  localparam int unsigned N        = 1 + EXP_W + MAN_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // basis construction program
  input  logic             prog_we,
  input  logic [IDX_W-1:0] prog_addr,
  input  basis_op_t        prog_data,
  // model coefficients theta
  input  logic             coef_we,
  input  logic [IDX_W-1:0] coef_addr,
  input  logic [N-1:0]     coef_re,
  input  logic [N-1:0]     coef_im,
  // input signal x(n)
  input  logic             x_valid,
  output logic             x_ready,
  input  logic [N-1:0]     x_re,
  input  logic [N-1:0]     x_im,
  // predistorted signal y(n)
  output logic             y_valid,
  output logic [N-1:0]     y_re,
  output logic [N-1:0]     y_im,
  // high while any sample is in flight
  output logic             busy
);

  logic             phi_valid, builder_busy;
  logic [N-1:0]     phi_re [NUM_BASIS];
  logic [N-1:0]     phi_im [NUM_BASIS];
  logic [$clog2(NUM_BASIS)+1:0] in_engine;   // samples inside the engine

  basis_builder #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NUM_BASIS(NUM_BASIS),
                  .MAX_DELAY(MAX_DELAY)) u_builder (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .x_valid(x_valid), .x_ready(x_ready), .x_re(x_re), .x_im(x_im),
    .phi_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im),
    .busy(builder_busy));

  dpd_engine #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NUM_BASIS(NUM_BASIS)) u_engine (
    .clk(clk), .rst_n(rst_n),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_re(coef_re), .coef_im(coef_im),
    .phi_valid(phi_valid), .phi_re(phi_re), .phi_im(phi_im),
    .y_valid(y_valid), .y_re(y_re), .y_im(y_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_engine <= '0;
    end else begin
      in_engine <= in_engine + $bits(in_engine)'(phi_valid) - $bits(in_engine)'(y_valid);
    end
  end

  assign busy = builder_busy || (in_engine != '0);

  // Configuration is only rewritten while no sample is in flight.
  assert property (@(posedge clk) disable iff (!rst_n) (prog_we || coef_we) |-> !busy)
    else $error("program or coefficients written while busy");

endmodule
