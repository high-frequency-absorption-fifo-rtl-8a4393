// tb_sad_pipeline -- feeds a new random window pair every cycle into the
// SAD datapath at the default 50x50 window and at 3x3, and checks each
// output against a sum of absolute differences computed here, exactly
// window_depth(WIN) cycles after its input (13 and 5 cycles). Includes
// all-equal, all-max-difference and reversed windows.
module tb_sad_pipeline;
  import abs_fifo_pkg::*;
  localparam int unsigned WA = 50, WB = 3, P = 8;
  localparam int unsigned NA = WA * WA, NB = WB * WB;
  localparam int unsigned DA = window_depth(WA), DB = window_depth(WB);
  localparam int unsigned SA = P + clog2_u(NA), SB = P + clog2_u(NB);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NA-1:0][P-1:0] a_a, a_b;
  logic [NB-1:0][P-1:0] b_a, b_b;
  logic [SA-1:0] a_sad;
  logic [SB-1:0] b_sad;

  sad_pipeline                    dut_a (.clk, .win_a(a_a), .win_b(a_b), .sad(a_sad));
  sad_pipeline #(.WIN(WB))        dut_b (.clk, .win_a(b_a), .win_b(b_b), .sad(b_sad));

  int checks = 0, failures = 0;
  int unsigned exp_a [$], exp_b [$];

  function automatic int unsigned absd(input int unsigned x, input int unsigned y);
    return (x > y) ? x - y : y - x;
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      int unsigned sa, sb;
      sa = 0; sb = 0;
      for (int i = 0; i < NA; i++) begin
        case (t)
          0: begin a_a[i] = P'(i);   a_b[i] = P'(i);   end      // equal -> 0
          1: begin a_a[i] = '1;      a_b[i] = '0;      end      // maximum
          2: begin a_a[i] = '0;      a_b[i] = '1;      end
          default: begin a_a[i] = P'($urandom); a_b[i] = P'($urandom); end
        endcase
        sa += absd(32'(a_a[i]), 32'(a_b[i]));
      end
      for (int i = 0; i < NB; i++) begin
        b_a[i] = (t == 1) ? '1 : P'($urandom);
        b_b[i] = (t == 1) ? '0 : P'($urandom);
        sb += absd(32'(b_a[i]), 32'(b_b[i]));
      end
      exp_a.push_back(sa);
      exp_b.push_back(sb);
      @(posedge clk);
      #1;
      // The window applied DEPTH edges ago is due at the output now.
      if (exp_a.size() == DA) begin
        checks++;
        if (a_sad != SA'(exp_a[0])) begin
          failures++;
          $display("FAIL 50x50 t=%0d got %0d expected %0d", t, a_sad, exp_a[0]);
        end
        void'(exp_a.pop_front());
      end
      if (exp_b.size() == DB) begin
        checks++;
        if (b_sad != SB'(exp_b[0])) begin
          failures++;
          $display("FAIL 3x3 t=%0d got %0d expected %0d", t, b_sad, exp_b[0]);
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
