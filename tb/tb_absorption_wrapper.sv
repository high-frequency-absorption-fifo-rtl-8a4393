// tb_absorption_wrapper -- runs the absorption control around model
// pipelines of several depths, with and without the produce-on-read option
// and with an oversized FIFO, using wrap_harness. Each instance checks data
// order, absence of overflow, full absorption of the pipeline during a long
// stall and the exact stall penalty that follows:
//   depth 2, 4 words, plain        -> penalty 2 (cycle-exact example)
//   depth 2, 4 words, read option  -> penalty 0, sender back in cycle 7
//   depth 7, 8 words, plain        -> penalty 8 (worst case below a power of 2)
//   depth 8, 16 words, plain       -> penalty 2
//   depth 13, 16 words, plain      -> penalty 12 (the 50x50 datapath depth)
//   depth 13, 16 words, option     -> penalty 0
//   depth 5, 16 words, plain       -> penalty 0 (bigger FIFO instead)
//   depth 4, 8 words, plain        -> penalty 2 (only DEPTH words below the
//                                     flag are not quite enough)
module tb_absorption_wrapper;
  localparam int NH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NH-1:0] done;
  int c [NH], f [NH], na [NH], np [NH], nr [NH];
  int checks, failures;

  always #5 clk = ~clk;

  wrap_harness #(.DEPTH(2),  .OPT(1'b0), .STALL(6), .FIG2(1'b1)) h0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_absorb(na[0]), .n_penalty(np[0]), .n_read_prod(nr[0]));
  wrap_harness #(.DEPTH(2),  .OPT(1'b1), .STALL(6), .FIG2(1'b1)) h1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_absorb(na[1]), .n_penalty(np[1]), .n_read_prod(nr[1]));
  wrap_harness #(.DEPTH(7),  .OPT(1'b0))                          h2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_absorb(na[2]), .n_penalty(np[2]), .n_read_prod(nr[2]));
  wrap_harness #(.DEPTH(8),  .OPT(1'b0))                          h3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .n_absorb(na[3]), .n_penalty(np[3]), .n_read_prod(nr[3]));
  wrap_harness #(.DEPTH(13), .OPT(1'b0))                          h4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]), .n_absorb(na[4]), .n_penalty(np[4]), .n_read_prod(nr[4]));
  wrap_harness #(.DEPTH(13), .OPT(1'b1))                          h5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]), .n_absorb(na[5]), .n_penalty(np[5]), .n_read_prod(nr[5]));
  wrap_harness #(.DEPTH(5),  .WORDS(16), .OPT(1'b0))              h6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]), .n_absorb(na[6]), .n_penalty(np[6]), .n_read_prod(nr[6]));
  wrap_harness #(.DEPTH(4),  .WORDS(8),  .OPT(1'b0))              h7 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]), .n_absorb(na[7]), .n_penalty(np[7]), .n_read_prod(nr[7]));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += c[i];
      failures += f[i];
      $display("instance %0d: checks=%0d failures=%0d absorb=%0d penalty_cycles=%0d read_grants=%0d",
               i, c[i], f[i], na[i], np[i], nr[i]);
    end
    // The read-grant path must have been used where the option is on, and
    // never where it is off.
    checks += 4;
    if (nr[1] == 0 || nr[5] == 0) failures++;
    if (nr[0] != 0 || nr[4] != 0) failures++;
    if (np[0] == 0) failures++;     // the plain scheme did show a penalty
    if (np[1] != 0) failures++;     // the option removed it
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
