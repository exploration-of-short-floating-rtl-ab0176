// dpd_engine: the DPD computation module, y(n) = sum_r theta_r * phi_r(n).
//
// NUM_BASIS complex multipliers work in parallel, each weighting one basis
// function with its prestored coefficient theta_r; a balanced tree of complex
// adders (log2(NUM_BASIS) levels) sums the weighted terms. All arithmetic uses
// the common (EXP_W, MAN_W) format with round-to-nearest. With eight basis
// functions the sum is ((t1+t2)+(t3+t4))+((t5+t6)+(t7+t8)).
//
// The coefficients sit in a register file written through coef_we/coef_addr/
// coef_re/coef_im (reset to +0); they are the offline-trained model and are only
// rewritten between operations. A register follows the multipliers and each adder
// level, so a new set of basis functions can enter every cycle and y_valid rises
// 1 + log2(NUM_BASIS) cycles after phi_valid (4 cycles for eight basis functions).
// Parallel multipliers, prestored coefficients and the balanced tree follow the
// design description; the register placement, and so the latency, are this
// design's choice. NUM_BASIS must be a power of two; the tree then has no
// unused inputs.
module dpd_engine
  import dpd_pkg::*;
#(
  parameter int unsigned EXP_W     = EXP_W_DEFAULT,
  parameter int unsigned MAN_W     = MAN_W_DEFAULT,
  parameter int unsigned NUM_BASIS = NUM_BASIS_DEFAULT,
  localparam int unsigned N        = 1 + EXP_W + MAN_W,
  localparam int unsigned LEVELS   = $clog2(NUM_BASIS),
  localparam int unsigned AW       = $clog2(NUM_BASIS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // coefficient load
  input  logic             coef_we,
  input  logic [IDX_W-1:0] coef_addr,
  input  logic [N-1:0]     coef_re,
  input  logic [N-1:0]     coef_im,
  // basis functions of one sample
  input  logic             phi_valid,
  input  logic [N-1:0]     phi_re [NUM_BASIS],
  input  logic [N-1:0]     phi_im [NUM_BASIS],
  // predistorted output
  output logic             y_valid,
  output logic [N-1:0]     y_re,
  output logic [N-1:0]     y_im
);

  logic [N-1:0] theta_re [NUM_BASIS];
  logic [N-1:0] theta_im [NUM_BASIS];

  // Registered values at the input of each tree level; level LEVELS is the result.
  logic [N-1:0] node_re [LEVELS+1][NUM_BASIS];
  logic [N-1:0] node_im [LEVELS+1][NUM_BASIS];
  logic [N-1:0] comb_re [LEVELS+1][NUM_BASIS];
  logic [N-1:0] comb_im [LEVELS+1][NUM_BASIS];
  logic [LEVELS:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NUM_BASIS; q++) begin
        theta_re[q] <= '0;
        theta_im[q] <= '0;
      end
    end else if (coef_we) begin
      theta_re[coef_addr[AW-1:0]] <= coef_re;
      theta_im[coef_addr[AW-1:0]] <= coef_im;
    end
  end

  // Level 0: theta_r * phi_r for all r in parallel.
  for (genvar g = 0; g < NUM_BASIS; g++) begin : g_weight
    cplx_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mult (
      .a_re(theta_re[g]), .a_im(theta_im[g]), .b_re(phi_re[g]), .b_im(phi_im[g]),
      .conj_b(1'b0), .z_re(comb_re[0][g]), .z_im(comb_im[0][g]));
  end

  // Levels 1..LEVELS: pairwise sums of the level below.
  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar g = 0; g < NUM_BASIS; g++) begin : g_node
      if (g < (NUM_BASIS >> l)) begin : g_add
        cplx_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (
          .a_re(node_re[l-1][2*g]), .a_im(node_im[l-1][2*g]),
          .b_re(node_re[l-1][2*g+1]), .b_im(node_im[l-1][2*g+1]),
          .z_re(comb_re[l][g]), .z_im(comb_im[l][g]));
      end else begin : g_unused
        assign comb_re[l][g] = '0;
        assign comb_im[l][g] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int l = 0; l <= LEVELS; l++) begin
        for (int q = 0; q < NUM_BASIS; q++) begin
          node_re[l][q] <= '0;
          node_im[l][q] <= '0;
        end
      end
    end else begin
      valid_q <= {valid_q[LEVELS-1:0], phi_valid};
      for (int l = 0; l <= LEVELS; l++) begin
        if (l == 0 ? phi_valid : valid_q[l-1]) begin
          node_re[l] <= comb_re[l];
          node_im[l] <= comb_im[l];
        end
      end
    end
  end

  assign y_valid = valid_q[LEVELS];
  assign y_re    = node_re[LEVELS][0];
  assign y_im    = node_im[LEVELS][0];

  assert property (@(posedge clk) disable iff (!rst_n) coef_we |-> 32'(coef_addr) < NUM_BASIS)
    else $error("coefficient address %0d out of range", coef_addr);

  initial assert (NUM_BASIS == (1 << LEVELS) && NUM_BASIS > 1)
    else $error("NUM_BASIS must be a power of two above one");

endmodule
