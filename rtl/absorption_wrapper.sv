// absorption_wrapper -- the control around an enable-free pipeline: valid
// delay line, absorption FIFO and stall logic.
//
// The pipeline itself (DEPTH register stages, no enable) is instantiated
// beside this block; its input is the sender's data and its output goes to
// pipe_data. The sender may start a new element in a cycle only while produce
// is high, and marks it with in_valid. That valid bit runs through a DEPTH-
// long shift register, so it reaches the FIFO's write request in the cycle
// the element leaves the pipeline. When the consumer stops reading, the
// FIFO's almost-full flag (raised DEPTH words below the top) drops produce,
// and the words left in reserve absorb everything still in the pipeline: no
// stage ever has to stop.
//
// With PRODUCE_ON_READ = 1 (default) the sender is also allowed to produce in
// every cycle the FIFO is read, which refills the pipeline while the FIFO
// drains and removes the stall penalty. With 0 the sender waits for
// almost-full to clear, and after a long stall the consumer sees up to
// abs_fifo_pkg::stall_penalty(DEPTH, ALMOST_FULL_COUNT) empty cycles.
//
// Interface and timing:
//   in_valid  -> element enters the pipeline this cycle (only while produce)
//   pipe_data <- pipeline output, DEPTH cycles after its input
//   consume   -> consumer wants a word this cycle; rd_req shows whether it
//                was taken (FIFO not empty)
//   rd_data/rd_valid  the word taken, one cycle after rd_req
// The structure follows the published absorption-FIFO method; sizes,
// reset and the extra status outputs are this design's choices.
module absorption_wrapper
  import abs_fifo_pkg::*;
#(
  parameter int unsigned WIDTH           = 32,
  parameter int unsigned DEPTH           = 13,
  parameter int unsigned WORDS           = min_ram_words(DEPTH),
  parameter bit          PRODUCE_ON_READ = 1'b1,
  localparam int unsigned CW             = clog2_u(WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // sender side
  input  logic             in_valid,
  output logic             produce,
  // pipeline output
  input  logic [WIDTH-1:0] pipe_data,
  // consumer side
  input  logic             consume,
  output logic             rd_req,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  // status
  output logic             almost_full,
  output logic [CW-1:0]    count,
  output logic             overflow
);

  logic wr_req;

  valid_delay #(.DEPTH(DEPTH)) u_valid (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .out_valid (wr_req)
  );

  absorption_fifo #(
    .WIDTH (WIDTH),
    .DEPTH (DEPTH),
    .WORDS (WORDS)
  ) u_fifo (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_req      (wr_req),
    .wr_data     (pipe_data),
    .rd_req      (rd_req),
    .rd_data     (rd_data),
    .rd_valid    (rd_valid),
    .empty       (empty),
    .almost_full (almost_full),
    .count       (count),
    .overflow    (overflow)
  );

  produce_ctrl #(.PRODUCE_ON_READ(PRODUCE_ON_READ)) u_ctrl (
    .consume     (consume),
    .empty       (empty),
    .almost_full (almost_full),
    .rd_req      (rd_req),
    .produce     (produce)
  );

  // The sender must honour produce.
  a_sender_obeys: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> produce)
    else $error("absorption_wrapper: element sent while produce was low");

endmodule
