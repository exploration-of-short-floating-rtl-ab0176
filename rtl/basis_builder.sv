// basis_builder: the BAPS basis function construction module.
//
// For each accepted input sample x(n) a finite state machine walks through the
// program, one basis function per clock: phi_1 = x(n), then phi_2 .. phi_R, each
// either a Type I delay phi_i(n-m) read from the delay lines or a Type II product
// phi_i * phi_j * conj(phi_k) formed by the type2_unit from basis functions of
// the current sample already built. The program is the offline (greedy search)
// selection of the model and is written through prog_we/prog_addr/prog_data
// while the builder is idle; entry r describes phi_(r+1), entry 0 is unused.
//
// States, as in the design description: IDLE -> COMPUTE phi_1 .. phi_R -> DONE.
// In DONE the finished set phi_1 .. phi_R is offered for one cycle on phi_*
// with phi_valid high, the delay lines take the new values, and a waiting
// x(n+1) is accepted at once (x_ready is high in IDLE and DONE), so the next
// sample's construction overlaps the DPD computation of the current one.
//
// Timing: x accepted at edge 0 (x_valid && x_ready); phi_1 .. phi_R are written at
// edges 1 .. R; phi_valid is high in the following cycle. A new sample can be
// accepted every R + 1 cycles. The program encoding, the valid/ready input
// handshake and this cycle count are this design's choices.
module basis_builder
  import dpd_pkg::*;
#(
  parameter int unsigned EXP_W     = EXP_W_DEFAULT,
  parameter int unsigned MAN_W     = MAN_W_DEFAULT,
  parameter int unsigned NUM_BASIS = NUM_BASIS_DEFAULT,
  parameter int unsigned MAX_DELAY = MAX_DELAY_DEFAULT,
  localparam int unsigned N        = 1 + EXP_W + MAN_W,
  localparam int unsigned AW       = $clog2(NUM_BASIS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // program load
  input  logic             prog_we,
  input  logic [IDX_W-1:0] prog_addr,
  input  basis_op_t        prog_data,
  // input sample
  input  logic             x_valid,
  output logic             x_ready,
  input  logic [N-1:0]     x_re,
  input  logic [N-1:0]     x_im,
  // finished basis functions of one sample
  output logic             phi_valid,
  output logic [N-1:0]     phi_re [NUM_BASIS],
  output logic [N-1:0]     phi_im [NUM_BASIS],
  // status
  output logic             busy
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_COMPUTE,
    S_DONE
  } state_e;

  state_e           state;
  logic [IDX_W-1:0] r;            // index of the basis function being computed
  logic [N-1:0]     x_re_q, x_im_q;
  basis_op_t        prog [NUM_BASIS];
  basis_op_t        op;

  logic [N-1:0]     i_re, i_im, j_re, j_im, k_re, k_im;
  logic [N-1:0]     t2_re, t2_im, dl_re, dl_im, new_re, new_im;
  logic             accept;

  assign x_ready   = (state == S_IDLE) || (state == S_DONE);
  assign accept    = x_valid && x_ready;
  assign phi_valid = (state == S_DONE);
  assign busy      = (state != S_IDLE);

  // Program memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NUM_BASIS; q++) prog[q] <= '0;
    end else if (prog_we) begin
      prog[prog_addr[AW-1:0]] <= prog_data;
    end
  end

  // Operand selection for the step being computed.
  always_comb begin
    op   = prog[r[AW-1:0]];
    i_re = phi_re[op.i[AW-1:0]];  i_im = phi_im[op.i[AW-1:0]];
    j_re = phi_re[op.j[AW-1:0]];  j_im = phi_im[op.j[AW-1:0]];
    k_re = phi_re[op.k[AW-1:0]];  k_im = phi_im[op.k[AW-1:0]];
  end

  type2_unit #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_type2 (
    .i_re(i_re), .i_im(i_im), .j_re(j_re), .j_im(j_im), .k_re(k_re), .k_im(k_im),
    .z_re(t2_re), .z_im(t2_im));

  delay_lines #(.EXP_W(EXP_W), .MAN_W(MAN_W), .NUM_BASIS(NUM_BASIS),
                .MAX_DELAY(MAX_DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .shift(state == S_DONE),
    .din_re(phi_re), .din_im(phi_im),
    .rd_idx(op.i), .rd_dly(op.m), .rd_re(dl_re), .rd_im(dl_im));

  always_comb begin
    if (r == '0) begin
      new_re = x_re_q;
      new_im = x_im_q;
    end else if (op.op == OP_PRODUCT) begin
      new_re = t2_re;
      new_im = t2_im;
    end else if (op.m == '0) begin
      new_re = i_re;
      new_im = i_im;
    end else begin
      new_re = dl_re;
      new_im = dl_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      r      <= '0;
      x_re_q <= '0;
      x_im_q <= '0;
      for (int q = 0; q < NUM_BASIS; q++) begin
        phi_re[q] <= '0;
        phi_im[q] <= '0;
      end
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (accept) begin
            x_re_q <= x_re;
            x_im_q <= x_im;
            r      <= '0;
            state  <= S_COMPUTE;
          end else begin
            state  <= S_IDLE;
          end
        end
        S_COMPUTE: begin
          phi_re[r[AW-1:0]] <= new_re;
          phi_im[r[AW-1:0]] <= new_im;
          if (32'(r) == NUM_BASIS - 1) begin
            state <= S_DONE;
          end else begin
            r <= r + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A program step may only use basis functions already built for this sample
  // and delays the delay lines hold.
  always_ff @(posedge clk) begin
    if (rst_n && state == S_COMPUTE && r != '0) begin
      if (op.op == OP_PRODUCT) begin
        assert (op.i < r && op.j < r && op.k < r)
          else $error("basis step %0d uses a basis function not yet built", r);
      end else begin
        assert (op.i < r && 32'(op.m) <= MAX_DELAY)
          else $error("basis step %0d: bad delay source or depth", r);
      end
    end
  end

  // Program writes stay inside the table.
  assert property (@(posedge clk) disable iff (!rst_n) prog_we |-> 32'(prog_addr) < NUM_BASIS)
    else $error("program address %0d out of range", prog_addr);

  // Input handshake: a sample offered and not taken stays offered.
  assert property (@(posedge clk) disable iff (!rst_n)
                   x_valid && !x_ready |=> x_valid)
    else $error("x_valid dropped before x_ready");

endmodule
