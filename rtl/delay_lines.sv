// delay_lines: the shift-register arrays behind the Type I (delay) basis
// operation phi_r(n) = phi_i(n-m).
//
// One shift register of depth MAX_DELAY per basis function holds that basis
// function's values for the last MAX_DELAY samples. When `shift` is high at a
// clock edge, the current sample's values din_* enter stage 1 of every line and
// each older value moves one stage on; stage d therefore holds phi_i(n-d) while
// sample n is being built. A combinational read port returns line rd_idx at
// stage rd_dly (1..MAX_DELAY). All stages reset to +0, so samples before the
// first one read as zero.
//
// Delays implemented as shift registers follow the design description; a delay
// line for every basis function, the read port and the reset value are this
// design's choices. A delay outside 1..MAX_DELAY reads as zero (basis_builder
// asserts that its program never asks for one).
module delay_lines #(
  parameter int unsigned EXP_W     = dpd_pkg::EXP_W_DEFAULT,
  parameter int unsigned MAN_W     = dpd_pkg::MAN_W_DEFAULT,
  parameter int unsigned NUM_BASIS = dpd_pkg::NUM_BASIS_DEFAULT,
  parameter int unsigned MAX_DELAY = dpd_pkg::MAX_DELAY_DEFAULT,
  localparam int unsigned N        = 1 + EXP_W + MAN_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      shift,
  input  logic [N-1:0]              din_re [NUM_BASIS],
  input  logic [N-1:0]              din_im [NUM_BASIS],
  input  logic [dpd_pkg::IDX_W-1:0] rd_idx,
  input  logic [dpd_pkg::DLY_W-1:0] rd_dly,
  output logic [N-1:0]              rd_re,
  output logic [N-1:0]              rd_im
);

  logic [N-1:0] line_re [NUM_BASIS][MAX_DELAY];
  logic [N-1:0] line_im [NUM_BASIS][MAX_DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_BASIS; r++) begin
        for (int d = 0; d < MAX_DELAY; d++) begin
          line_re[r][d] <= '0;
          line_im[r][d] <= '0;
        end
      end
    end else if (shift) begin
      for (int r = 0; r < NUM_BASIS; r++) begin
        line_re[r][0] <= din_re[r];
        line_im[r][0] <= din_im[r];
        for (int d = 1; d < MAX_DELAY; d++) begin
          line_re[r][d] <= line_re[r][d-1];
          line_im[r][d] <= line_im[r][d-1];
        end
      end
    end
  end

  always_comb begin
    rd_re = '0;
    rd_im = '0;
    for (int r = 0; r < NUM_BASIS; r++) begin
      for (int d = 0; d < MAX_DELAY; d++) begin
        if (32'(rd_idx) == r && 32'(rd_dly) == d + 1) begin
          rd_re = line_re[r][d];
          rd_im = line_im[r][d];
        end
      end
    end
  end

endmodule
