// conv2d_pipeline -- enable-free pipeline computing one output of a 2D
// convolution: the sum of WIN*WIN pixel-by-coefficient products.
//
// One of the sliding-window applications used to evaluate absorption-FIFO
// pipelining. The pixels of one window position and the kernel arrive in
// parallel in one cycle, and a new window may arrive in every cycle. Stage 1
// registers every product; an adder tree of ceil(log2(WIN*WIN)) registered
// levels sums them. No register has an enable or a reset.
//
// Interface: pix (WIN*WIN unsigned PIX_W-bit pixels), coef (WIN*WIN signed
// COEF_W-bit kernel taps, element r*WIN+c pairs with the pixel at the same
// index), result (signed). Latency: DEPTH = 1 + ceil(log2(WIN*WIN)) cycles,
// 13 for the default 50x50 window.
// The application and window sizes come from the evaluation this design is
// built for; taking the kernel as an input beside the window, the widths and
// the multiply-then-tree structure are this design's choices.
module conv2d_pipeline
  import abs_fifo_pkg::*;
#(
  parameter int unsigned WIN    = 50,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned N     = WIN * WIN,
  localparam int unsigned PROD_W = PIX_W + COEF_W + 1,
  localparam int unsigned RES_W = PROD_W + clog2_u(N)
) (
  input  logic                     clk,
  input  logic [N-1:0][PIX_W-1:0]  pix,
  input  logic [N-1:0][COEF_W-1:0] coef,
  output logic [RES_W-1:0]         result
);

  logic [N-1:0][RES_W-1:0] prod;

  // Signed product of an unsigned pixel and a signed tap, sign-extended to
  // the width of the final sum.
  function automatic logic [RES_W-1:0] mul(input logic [PIX_W-1:0]  p,
                                           input logic [COEF_W-1:0] c);
    logic signed [PROD_W-1:0] r;
    r = $signed({1'b0, p}) * $signed(c);
    return RES_W'(r);
  endfunction

  for (genvar i = 0; i < N; i++) begin : g_mul
    always_ff @(posedge clk) prod[i] <= mul(pix[i], coef[i]);
  end

  adder_tree #(.N(N), .W(RES_W)) u_tree (
    .clk      (clk),
    .operands (prod),
    .sum      (result)
  );

endmodule
