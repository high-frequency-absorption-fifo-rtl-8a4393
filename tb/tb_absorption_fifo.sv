// tb_absorption_fifo -- random writes and reads against a queue model, for
// two sizes: the minimum RAM for a 2-stage pipeline (4 words, almost-full at
// 2) and an oversized FIFO for a 5-stage pipeline (16 words, almost-full at
// 11). Each cycle the flags and the count are compared with the model, and
// every word read is compared with the model's oldest word. The stimulus
// never writes into a full FIFO. Also checks the registered read: a word
// written in cycle t cannot be read in t, and appears at rd_data one cycle
// after it is requested.
module tb_absorption_fifo;
  localparam int unsigned W = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------- FIFO A: depth 2, 4 words, almost-full at 2 ----------
  logic a_wr, a_rd, a_rdv, a_empty, a_af, a_ovf;
  logic [W-1:0] a_wd, a_rdd;
  logic [2:0] a_cnt;
  absorption_fifo #(.WIDTH(W), .DEPTH(2)) dut_a (
    .clk, .rst_n, .wr_req(a_wr), .wr_data(a_wd), .rd_req(a_rd), .rd_data(a_rdd),
    .rd_valid(a_rdv), .empty(a_empty), .almost_full(a_af), .count(a_cnt), .overflow(a_ovf));

  // ---------- FIFO B: depth 5, 16 words, almost-full at 11 ----------
  logic b_wr, b_rd, b_rdv, b_empty, b_af, b_ovf;
  logic [W-1:0] b_wd, b_rdd;
  logic [4:0] b_cnt;
  absorption_fifo #(.WIDTH(W), .DEPTH(5), .WORDS(16)) dut_b (
    .clk, .rst_n, .wr_req(b_wr), .wr_data(b_wd), .rd_req(b_rd), .rd_data(b_rdd),
    .rd_valid(b_rdv), .empty(b_empty), .almost_full(b_af), .count(b_cnt), .overflow(b_ovf));

  logic [W-1:0] qa [$], qb [$];
  logic [W-1:0] exp_a, exp_b;
  logic pend_a = 1'b0, pend_b = 1'b0;

  initial begin
    a_wr = 0; a_rd = 0; a_wd = '0; b_wr = 0; b_rd = 0; b_wd = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Write into the empty FIFO and request a read in the same cycle: the
    // read must be refused (no fall-through).
    a_wr = 1; a_wd = 12'h5A5; a_rd = 1;
    #1 chk("A read refused while empty", a_empty);
    @(posedge clk); #1;
    a_wr = 0; a_rd = 0;
    chk("A read in write cycle gave no data", !a_rdv);
    chk("A holds the word", a_cnt == 1 && !a_empty);
    a_rd = 1;
    @(posedge clk); #1;
    a_rd = 0;
    chk("A data one cycle after read", a_rdv && a_rdd == 12'h5A5);
    chk("A empty again", a_empty && a_cnt == 0);

    for (int t = 0; t < 3000; t++) begin
      // Choose stimulus from the model state before the edge.
      a_wr = (qa.size() < 4) && ($urandom_range(0, 99) < 55);
      a_wd = W'($urandom);
      a_rd = $urandom_range(0, 99) < 45;
      b_wr = (qb.size() < 16) && ($urandom_range(0, 99) < (((t / 500) % 2 != 0) ? 70 : 35));
      b_wd = W'($urandom);
      b_rd = $urandom_range(0, 99) < (((t / 500) % 2 != 0) ? 35 : 70);
      #1;
      // Flags against the model.
      chk("A empty",  a_empty == (qa.size() == 0));
      chk("A af",     a_af == (qa.size() >= 2));
      chk("A count",  a_cnt == 3'(qa.size()));
      chk("B empty",  b_empty == (qb.size() == 0));
      chk("B af",     b_af == (qb.size() >= 11));
      chk("B count",  b_cnt == 5'(qb.size()));
      chk("no overflow", !a_ovf && !b_ovf);
      @(posedge clk);
      // Model update for this edge.
      pend_a = a_rd && qa.size() > 0;
      if (pend_a) exp_a = qa.pop_front();
      if (a_wr) qa.push_back(a_wd);
      pend_b = b_rd && qb.size() > 0;
      if (pend_b) exp_b = qb.pop_front();
      if (b_wr) qb.push_back(b_wd);
      #1;
      chk("A rd_valid", a_rdv == pend_a);
      if (pend_a) chk("A data", a_rdd == exp_a);
      chk("B rd_valid", b_rdv == pend_b);
      if (pend_b) chk("B data", b_rdd == exp_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
