// produce_ctrl -- stall logic between an absorption FIFO, its sender and its
// consumer.
//
// The consumer asks for data with consume; the FIFO is read (rd_req) only
// when it is not empty. The sender is allowed to start a new element into
// the pipeline (produce) while almost-full is low. With PRODUCE_ON_READ = 1
// the sender is also allowed to produce in every cycle in which the FIFO is
// read: each read frees a word, so the element started in that cycle still
// has room when it arrives, and the pipeline refills while the FIFO drains
// instead of after almost-full has cleared. That removes the stall penalty at
// the cost of tying sender and consumer to one clock.
//
//   rd_req  = consume & ~empty
//   produce = ~almost_full | (PRODUCE_ON_READ & rd_req)
//
// Purely combinational: the three signals are valid in the same cycle. The
// equations and the option follow the published stall logic; the
// parameter that switches the read term off is this design's, kept to show
// the penalty of the plain scheme.
module produce_ctrl #(
  parameter bit PRODUCE_ON_READ = 1'b1
) (
  input  logic consume,
  input  logic empty,
  input  logic almost_full,
  output logic rd_req,
  output logic produce
);

  always_comb begin
    rd_req  = consume && !empty;
    produce = !almost_full || (PRODUCE_ON_READ && rd_req);
  end

endmodule
