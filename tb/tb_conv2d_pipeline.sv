// tb_conv2d_pipeline -- feeds a new random window and kernel every cycle
// into the convolution datapath at the default 50x50 window and at 3x3, and
// checks each output against a sum of products computed here, exactly
// window_depth(WIN) cycles after its input (13 and 5 cycles). Includes the
// most negative and most positive sums.
module tb_conv2d_pipeline;
  import abs_fifo_pkg::*;
  localparam int unsigned WA = 50, WB = 3, P = 8, C = 8;
  localparam int unsigned NA = WA * WA, NB = WB * WB;
  localparam int unsigned DA = window_depth(WA), DB = window_depth(WB);
  localparam int unsigned RA = P + C + 1 + clog2_u(NA), RB = P + C + 1 + clog2_u(NB);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NA-1:0][P-1:0] a_pix;
  logic [NA-1:0][C-1:0] a_coef;
  logic [NB-1:0][P-1:0] b_pix;
  logic [NB-1:0][C-1:0] b_coef;
  logic [RA-1:0] a_res;
  logic [RB-1:0] b_res;

  conv2d_pipeline             dut_a (.clk, .pix(a_pix), .coef(a_coef), .result(a_res));
  conv2d_pipeline #(.WIN(WB)) dut_b (.clk, .pix(b_pix), .coef(b_coef), .result(b_res));

  int checks = 0, failures = 0;
  longint exp_a [$], exp_b [$];

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint sa, sb;
      sa = 0; sb = 0;
      for (int i = 0; i < NA; i++) begin
        case (t)
          0: begin a_pix[i] = '1; a_coef[i] = 8'h80; end        // 255 * -128
          1: begin a_pix[i] = '1; a_coef[i] = 8'h7F; end        // 255 * 127
          default: begin a_pix[i] = P'($urandom); a_coef[i] = C'($urandom); end
        endcase
        sa += longint'(a_pix[i]) * longint'($signed(a_coef[i]));
      end
      for (int i = 0; i < NB; i++) begin
        b_pix[i] = P'($urandom);
        b_coef[i] = C'($urandom);
        sb += longint'(b_pix[i]) * longint'($signed(b_coef[i]));
      end
      exp_a.push_back(sa);
      exp_b.push_back(sb);
      @(posedge clk);
      #1;
      // The window applied DEPTH edges ago is due at the output now.
      if (exp_a.size() == DA) begin
        checks++;
        if (longint'($signed(a_res)) != exp_a[0]) begin
          failures++;
          $display("FAIL 50x50 t=%0d got %0d expected %0d", t, $signed(a_res), exp_a[0]);
        end
        void'(exp_a.pop_front());
      end
      if (exp_b.size() == DB) begin
        checks++;
        if (longint'($signed(b_res)) != exp_b[0]) begin
          failures++;
          $display("FAIL 3x3 t=%0d got %0d expected %0d", t, $signed(b_res), exp_b[0]);
        end
        void'(exp_b.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
