// valid_delay -- delay line for the sender's valid bit.
//
// The pipeline in front of an absorption FIFO runs every cycle, whether it
// holds real data or not. To know which pipeline outputs are real, the
// sender's valid bit travels through a shift register as long as the
// pipeline itself (DEPTH registers). Its output is the FIFO write request in
// the same cycle that the matching result leaves the pipeline.
//
// Interface: in_valid (from the sender), out_valid (to the FIFO's write
// request). Timing: out_valid in cycle t+DEPTH equals in_valid in cycle t.
// The shift register has no enable, like the pipeline it shadows. A synchronous, active-low
// reset clears it so that no stale valid bit writes the FIFO after reset (reset
// behaviour is this design's choice). DEPTH must be at least 1.
module valid_delay #(
  parameter int unsigned DEPTH = 13
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic out_valid
);

  // taps[0] is the input; taps[k] is the valid bit k cycles old.
  logic [DEPTH:0] taps;

  assign taps[0] = in_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) taps[DEPTH:1] <= '0;
    else        taps[DEPTH:1] <= taps[DEPTH-1:0];
  end

  assign out_valid = taps[DEPTH];

  initial assert (DEPTH >= 1) else $error("valid_delay: DEPTH must be at least 1");

endmodule
