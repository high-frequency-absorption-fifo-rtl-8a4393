// tb_valid_delay -- drives random valid bits into the delay line and checks
// that each comes out exactly DEPTH cycles later, for the default depth and
// for depth 1. Reset must clear the line.
module tb_valid_delay;
  localparam int unsigned D0 = 13;
  localparam int unsigned D1 = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic out0, out1;
  logic hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  valid_delay dut0 (.clk, .rst_n, .in_valid, .out_valid(out0));
  valid_delay #(.DEPTH(D1)) dut1 (.clk, .rst_n, .in_valid, .out_valid(out1));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Right after reset nothing is in the line.
    checks += 2;
    if (out0 !== 1'b0 || out1 !== 1'b0) begin
      failures++;
      $display("FAIL: delay line not cleared by reset");
    end
    for (int t = 0; t < 400; t++) begin
      in_valid = 1'($urandom_range(0, 1));
      hist.push_front(in_valid);        // hist[k] = in_valid k cycles ago
      @(posedge clk);
      #1;
      if (hist.size() >= D0) begin
        checks++;
        if (out0 !== hist[D0-1]) begin
          failures++;
          $display("FAIL t=%0d depth %0d: got %b expected %b", t, D0, out0, hist[D0-1]);
        end
      end
      checks++;
      if (out1 !== hist[D1-1]) begin
        failures++;
        $display("FAIL t=%0d depth %0d: got %b expected %b", t, D1, out1, hist[D1-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
