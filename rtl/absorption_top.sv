// absorption_top -- two sliding-window pipelines, SAD and 2D convolution,
// each run without clock enables behind its own absorption FIFO.
//
// Both channels work the same way. A sender offers one window per cycle
// while the channel's produce output is high (it marks the window with
// *_in_valid). The datapath runs every cycle; a valid bit delayed by the
// datapath's latency writes real results into the channel's absorption FIFO.
// The consumer pulls results with *_consume; *_rd_req tells whether a word
// was taken and *_rd_data/*_rd_valid deliver it one cycle later. When the
// consumer stalls, almost-full withdraws produce, and the FIFO's reserve
// (as many words as the datapath has stages) absorbs the results still in
// flight. With PRODUCE_ON_READ set, the sender may also produce whenever the
// FIFO is read, which keeps the datapath full across a stall.
//
// Defaults: 50x50 windows, 8-bit pixels and taps, datapath latency 13,
// FIFOs of 16 words with almost-full at 3 words. The two channels share only
// clock and reset. The window size is the largest evaluated on the
// HyperFlex device; widths, interfaces and the pairing of the two channels
// in one top are this design's choices.
module absorption_top
  import abs_fifo_pkg::*;
#(
  parameter int unsigned WIN             = 50,
  parameter int unsigned PIX_W           = 8,
  parameter int unsigned COEF_W          = 8,
  parameter bit          PRODUCE_ON_READ = 1'b1,
  localparam int unsigned N      = WIN * WIN,
  localparam int unsigned DEPTH  = window_depth(WIN),
  localparam int unsigned WORDS  = min_ram_words(DEPTH),
  localparam int unsigned CW     = clog2_u(WORDS + 1),
  localparam int unsigned SAD_W  = PIX_W + clog2_u(N),
  localparam int unsigned RES_W  = PIX_W + COEF_W + 1 + clog2_u(N)
) (
  input  logic                     clk,
  input  logic                     rst_n,

  // SAD channel
  input  logic                     sad_in_valid,
  input  logic [N-1:0][PIX_W-1:0]  sad_win_a,
  input  logic [N-1:0][PIX_W-1:0]  sad_win_b,
  output logic                     sad_produce,
  input  logic                     sad_consume,
  output logic                     sad_rd_req,
  output logic [SAD_W-1:0]         sad_rd_data,
  output logic                     sad_rd_valid,
  output logic                     sad_empty,
  output logic                     sad_almost_full,
  output logic [CW-1:0]            sad_count,
  output logic                     sad_overflow,

  // 2D convolution channel
  input  logic                     conv_in_valid,
  input  logic [N-1:0][PIX_W-1:0]  conv_pix,
  input  logic [N-1:0][COEF_W-1:0] conv_coef,
  output logic                     conv_produce,
  input  logic                     conv_consume,
  output logic                     conv_rd_req,
  output logic [RES_W-1:0]         conv_rd_data,
  output logic                     conv_rd_valid,
  output logic                     conv_empty,
  output logic                     conv_almost_full,
  output logic [CW-1:0]            conv_count,
  output logic                     conv_overflow
);

  // ---------------- SAD channel ----------------
  logic [SAD_W-1:0] sad_pipe;

  sad_pipeline #(.WIN(WIN), .PIX_W(PIX_W)) u_sad (
    .clk   (clk),
    .win_a (sad_win_a),
    .win_b (sad_win_b),
    .sad   (sad_pipe)
  );

  absorption_wrapper #(
    .WIDTH           (SAD_W),
    .DEPTH           (DEPTH),
    .WORDS           (WORDS),
    .PRODUCE_ON_READ (PRODUCE_ON_READ)
  ) u_sad_abs (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (sad_in_valid),
    .produce     (sad_produce),
    .pipe_data   (sad_pipe),
    .consume     (sad_consume),
    .rd_req      (sad_rd_req),
    .rd_data     (sad_rd_data),
    .rd_valid    (sad_rd_valid),
    .empty       (sad_empty),
    .almost_full (sad_almost_full),
    .count       (sad_count),
    .overflow    (sad_overflow)
  );

  // ---------------- 2D convolution channel ----------------
  logic [RES_W-1:0] conv_pipe;

  conv2d_pipeline #(.WIN(WIN), .PIX_W(PIX_W), .COEF_W(COEF_W)) u_conv (
    .clk    (clk),
    .pix    (conv_pix),
    .coef   (conv_coef),
    .result (conv_pipe)
  );

  absorption_wrapper #(
    .WIDTH           (RES_W),
    .DEPTH           (DEPTH),
    .WORDS           (WORDS),
    .PRODUCE_ON_READ (PRODUCE_ON_READ)
  ) u_conv_abs (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (conv_in_valid),
    .produce     (conv_produce),
    .pipe_data   (conv_pipe),
    .consume     (conv_consume),
    .rd_req      (conv_rd_req),
    .rd_data     (conv_rd_data),
    .rd_valid    (conv_rd_valid),
    .empty       (conv_empty),
    .almost_full (conv_almost_full),
    .count       (conv_count),
    .overflow    (conv_overflow)
  );

endmodule
