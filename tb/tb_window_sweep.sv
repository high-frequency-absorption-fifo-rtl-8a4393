// tb_window_sweep -- runs the complete design at every window size of the
// published evaluation: 3x3, 6x6, 12x12, 15x15, 25x25 and 35x35 (the 50x50
// case is tb_absorption_top) and the additional 18x18, 21x21 and 24x24 of
// the smaller device's sweep. Each size gets its own datapath depth
// (1 + ceil(log2(WIN*WIN)): 5, 7, 9, 9, 11, 12, 10, 10, 11), FIFO size and
// almost-full level, and goes through the checks of top_harness.
module tb_window_sweep;
  localparam int NS = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NS-1:0] done;
  int c [NS], f [NS];
  int checks, failures;

  always #5 clk = ~clk;

  top_harness #(.WIN(3))  h0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  top_harness #(.WIN(6))  h1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  top_harness #(.WIN(12)) h2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  top_harness #(.WIN(15)) h3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  top_harness #(.WIN(25)) h4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  top_harness #(.WIN(35)) h5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));
  top_harness #(.WIN(18)) h6 (.clk, .rst_n, .done(done[6]), .checks(c[6]), .failures(f[6]));
  top_harness #(.WIN(21)) h7 (.clk, .rst_n, .done(done[7]), .checks(c[7]), .failures(f[7]));
  top_harness #(.WIN(24)) h8 (.clk, .rst_n, .done(done[8]), .checks(c[8]), .failures(f[8]));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < NS; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
