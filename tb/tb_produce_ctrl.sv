// tb_produce_ctrl -- exhaustive check of the stall logic, with and without
// the produce-on-read term, against the truth table:
//   rd_req  = consume and not empty
//   produce = not almost_full, or (with the option) a read this cycle
module tb_produce_ctrl;
  logic consume, empty, almost_full;
  logic rd0, pr0, rd1, pr1;
  int checks = 0, failures = 0;

  produce_ctrl #(.PRODUCE_ON_READ(1'b0)) dut0 (.consume, .empty, .almost_full, .rd_req(rd0), .produce(pr0));
  produce_ctrl                            dut1 (.consume, .empty, .almost_full, .rd_req(rd1), .produce(pr1));

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_rd, exp_p0, exp_p1;
      {consume, empty, almost_full} = 3'(v);
      #1;
      exp_rd = (v == 4 || v == 5);       // consume=1, empty=0
      exp_p0 = !v[0];
      exp_p1 = !v[0] || exp_rd;
      checks += 4;
      if (rd0 !== exp_rd || rd1 !== exp_rd) begin
        failures++;
        $display("FAIL v=%03b rd_req %b/%b expected %b", v[2:0], rd0, rd1, exp_rd);
      end
      if (pr0 !== exp_p0) begin
        failures++;
        $display("FAIL v=%03b plain produce %b expected %b", v[2:0], pr0, exp_p0);
      end
      if (pr1 !== exp_p1) begin
        failures++;
        $display("FAIL v=%03b optimised produce %b expected %b", v[2:0], pr1, exp_p1);
      end
      // The option never withholds permission that the plain rule gives.
      if (pr0 && !pr1) begin
        failures++;
        $display("FAIL v=%03b option removed permission", v[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
