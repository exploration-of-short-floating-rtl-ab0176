// tb_delay_lines: self-checking test of the Type I delay lines, with an 11-bit
// value width, eight lines and depth five. Random values are pushed on random
// cycles; after every edge every (line, delay) pair is read through the read
// port and compared with a queue kept by the testbench. Delay 0 and delays past
// the depth must read zero; the reset state must read zero everywhere.
`timescale 1ns/1ps
module tb_delay_lines;
  localparam int W = 5, T = 5, N = 1 + W + T, NB = 8, MD = 5;

  logic         clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  logic [N-1:0] din_re [NB], din_im [NB];
  logic [3:0]   rd_idx, rd_dly;
  logic [N-1:0] rd_re, rd_im;
  logic [N-1:0] ref_re [NB][MD], ref_im [NB][MD];
  int checks = 0, failures = 0, shifts = 0;

  delay_lines #(.EXP_W(W), .MAN_W(T), .NUM_BASIS(NB), .MAX_DELAY(MD)) dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .din_re(din_re), .din_im(din_im),
    .rd_idx(rd_idx), .rd_dly(rd_dly), .rd_re(rd_re), .rd_im(rd_im));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < NB; i++) begin
      for (int d = 0; d <= MD + 1; d++) begin
        logic [N-1:0] er, ei;
        rd_idx = 4'(i);
        rd_dly = 4'(d);
        #0.1;
        er = (d >= 1 && d <= MD) ? ref_re[i][d-1] : '0;
        ei = (d >= 1 && d <= MD) ? ref_im[i][d-1] : '0;
        checks++;
        if (rd_re !== er || rd_im !== ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL line %0d delay %0d: got %h/%h expected %h/%h", i, d, rd_re, rd_im, er, ei);
        end
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NB; i++) begin
      din_re[i] = '0; din_im[i] = '0;
      for (int d = 0; d < MD; d++) begin ref_re[i][d] = '0; ref_im[i][d] = '0; end
    end
    rd_idx = '0; rd_dly = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      shift = ($urandom_range(3) != 0);
      for (int i = 0; i < NB; i++) begin
        din_re[i] = N'($urandom);
        din_im[i] = N'($urandom);
      end
      @(posedge clk);
      if (shift) begin
        shifts++;
        for (int i = 0; i < NB; i++) begin
          for (int d = MD - 1; d > 0; d--) begin
            ref_re[i][d] = ref_re[i][d-1];
            ref_im[i][d] = ref_im[i][d-1];
          end
          ref_re[i][0] = din_re[i];
          ref_im[i][0] = din_im[i];
        end
      end
      @(negedge clk);
      shift = 1'b0;
      check_all();
    end
    if (shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
