// sad_pipeline -- enable-free pipeline computing the sum of absolute
// differences (SAD) of two WIN x WIN windows.
//
// One of the sliding-window applications used to evaluate absorption-FIFO
// pipelining. All WIN*WIN pixel pairs of a window position arrive in parallel
// in one cycle, and a new window may arrive in every cycle. Stage 1 registers
// |a - b| for every pair; an adder tree of ceil(log2(WIN*WIN)) registered
// levels sums them. No register has an enable or a reset: the pipeline never
// stops, and a valid bit that travels beside it (outside this module) marks
// which outputs are real.
//
// Interface: win_a, win_b (WIN*WIN unsigned PIX_W-bit pixels, element
// r*WIN+c is row r, column c), sad (unsigned). Latency: DEPTH = 1 +
// ceil(log2(WIN*WIN)) cycles, 13 for the default 50x50 window.
// The application and the window sizes come from the evaluation this design
// is built for; the parallel-window interface, pixel width and tree
// structure are this design's choices.
module sad_pipeline
  import abs_fifo_pkg::*;
#(
  parameter int unsigned WIN   = 50,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned N     = WIN * WIN,
  localparam int unsigned SAD_W = PIX_W + clog2_u(N)
) (
  input  logic                    clk,
  input  logic [N-1:0][PIX_W-1:0] win_a,
  input  logic [N-1:0][PIX_W-1:0] win_b,
  output logic [SAD_W-1:0]        sad
);

  logic [N-1:0][SAD_W-1:0] absdiff;

  for (genvar i = 0; i < N; i++) begin : g_abs
    always_ff @(posedge clk)
      absdiff[i] <= (win_a[i] >= win_b[i]) ? SAD_W'(win_a[i] - win_b[i])
                                           : SAD_W'(win_b[i] - win_a[i]);
  end

  adder_tree #(.N(N), .W(SAD_W)) u_tree (
    .clk      (clk),
    .operands (absdiff),
    .sum      (sad)
  );

endmodule
