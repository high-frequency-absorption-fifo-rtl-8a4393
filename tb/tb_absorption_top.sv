// tb_absorption_top -- end-to-end run of both channels (SAD and 2D
// convolution) at the default 50x50 window, all parameters at their
// defaults. Each channel has a sender that offers a fresh random window
// whenever it wants to and produce allows, and a consumer that reads with
// consume. Every result read is compared, in order, with the SAD or sum of
// products computed here when the window was sent.
//
// Phase 1: the consumers stall for 40 cycles while the senders keep
// offering windows; the FIFOs must absorb the 13-stage datapaths without
// overflow (16 words stored). Then the consumers read every cycle: with the
// produce-on-read option there must be no empty cycle at all (stall penalty
// 0), and the first result must arrive one cycle after the first read.
// Phase 2: random sender and consumer activity, then a drain; every window
// sent must come out.
// Counted and required at least once per channel: sender held back by
// almost-full, production granted by a read while almost-full, consumer
// stall with data waiting, FIFO completely full.
module tb_absorption_top;
  import abs_fifo_pkg::*;
  localparam int unsigned WIN = 50, P = 8, C = 8, N = WIN * WIN;
  localparam int unsigned DEPTH = window_depth(WIN);
  localparam int unsigned WORDS = min_ram_words(DEPTH);
  localparam int unsigned CW = clog2_u(WORDS + 1);
  localparam int unsigned SAD_W = P + clog2_u(N);
  localparam int unsigned RES_W = P + C + 1 + clog2_u(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_want, s_in_valid, s_produce, s_consume, s_rd_req, s_rd_valid, s_empty, s_af, s_ovf;
  logic c_want, c_in_valid, c_produce, c_consume, c_rd_req, c_rd_valid, c_empty, c_af, c_ovf;
  logic [N-1:0][P-1:0] s_a, s_b, c_pix;
  logic [N-1:0][C-1:0] c_coef;
  logic [SAD_W-1:0] s_rd_data;
  logic [RES_W-1:0] c_rd_data;
  logic [CW-1:0] s_count, c_count;

  assign s_in_valid = s_want && s_produce;
  assign c_in_valid = c_want && c_produce;

  absorption_top dut (
    .clk, .rst_n,
    .sad_in_valid(s_in_valid), .sad_win_a(s_a), .sad_win_b(s_b), .sad_produce(s_produce),
    .sad_consume(s_consume), .sad_rd_req(s_rd_req), .sad_rd_data(s_rd_data),
    .sad_rd_valid(s_rd_valid), .sad_empty(s_empty), .sad_almost_full(s_af),
    .sad_count(s_count), .sad_overflow(s_ovf),
    .conv_in_valid(c_in_valid), .conv_pix(c_pix), .conv_coef(c_coef), .conv_produce(c_produce),
    .conv_consume(c_consume), .conv_rd_req(c_rd_req), .conv_rd_data(c_rd_data),
    .conv_rd_valid(c_rd_valid), .conv_empty(c_empty), .conv_almost_full(c_af),
    .conv_count(c_count), .conv_overflow(c_ovf));

  int checks = 0, failures = 0;
  longint s_exp [$], c_exp [$];
  int s_sent = 0, c_sent = 0, s_got = 0, c_got = 0;
  // Mechanism counters: [0] SAD channel, [1] convolution channel.
  int n_hold [2], n_readgrant [2], n_cstall [2], n_full [2], n_gap [2];

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // New random windows; the expected results are computed when sent.
  task automatic new_windows();
    for (int i = 0; i < N; i++) begin
      s_a[i] = P'($urandom);
      s_b[i] = P'($urandom);
      c_pix[i] = P'($urandom);
      c_coef[i] = C'($urandom);
    end
  endtask

  function automatic longint sad_ref();
    longint s = 0;
    for (int i = 0; i < N; i++) s += (s_a[i] > s_b[i]) ? longint'(s_a[i]) - longint'(s_b[i]) : longint'(s_b[i]) - longint'(s_a[i]);
    return s;
  endfunction

  function automatic longint conv_ref();
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'(c_pix[i]) * longint'($signed(c_coef[i]));
    return s;
  endfunction

  // Output checkers.
  always @(posedge clk) begin
    if (rst_n && s_rd_valid) begin
      chk("SAD result in order", s_exp.size() > 0 && longint'(s_rd_data) == s_exp[0]);
      if (s_exp.size() > 0) void'(s_exp.pop_front());
      s_got++;
    end
    if (rst_n && c_rd_valid) begin
      chk("conv result in order", c_exp.size() > 0 && longint'($signed(c_rd_data)) == c_exp[0]);
      if (c_exp.size() > 0) void'(c_exp.pop_front());
      c_got++;
    end
  end

  // One cycle of stimulus: inputs change 1 time unit after the edge; the
  // bookkeeping looks at the settled combinational outputs before the edge.
  task automatic step();
    new_windows();
    #3;
    if (s_in_valid) begin s_exp.push_back(sad_ref());  s_sent++; end
    if (c_in_valid) begin c_exp.push_back(conv_ref()); c_sent++; end
    if (s_want && s_af && !s_produce) n_hold[0]++;
    if (c_want && c_af && !c_produce) n_hold[1]++;
    if (s_af && s_produce) n_readgrant[0]++;
    if (c_af && c_produce) n_readgrant[1]++;
    if (!s_consume && !s_empty) n_cstall[0]++;
    if (!c_consume && !c_empty) n_cstall[1]++;
    if (s_count == CW'(WORDS)) n_full[0]++;
    if (c_count == CW'(WORDS)) n_full[1]++;
    chk("no overflow", !s_ovf && !c_ovf);
    @(posedge clk);
    #1;
  endtask

  int first_data_cyc;

  initial begin
    s_want = 0; c_want = 0; s_consume = 0; c_consume = 0;
    for (int k = 0; k < 2; k++) begin
      n_hold[k] = 0; n_readgrant[k] = 0; n_cstall[k] = 0; n_full[k] = 0; n_gap[k] = 0;
    end
    new_windows();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- phase 1: long consumer stall ----------------
    s_want = 1; c_want = 1;
    repeat (40) step();
    chk($sformatf("SAD FIFO absorbed the pipeline (count %0d)", s_count), s_count == CW'(WORDS));
    chk($sformatf("conv FIFO absorbed the pipeline (count %0d)", c_count), c_count == CW'(WORDS));
    chk("exactly WORDS windows accepted during the stall", s_sent == WORDS && c_sent == WORDS);
    s_consume = 1; c_consume = 1;
    first_data_cyc = -1;
    for (int t = 0; t < 80; t++) begin
      if (!s_rd_req && t > 0) n_gap[0]++;
      if (!c_rd_req && t > 0) n_gap[1]++;
      if (first_data_cyc < 0 && s_rd_valid) first_data_cyc = t;
      step();
    end
    chk($sformatf("no empty cycle after the stall (SAD %0d, conv %0d)", n_gap[0], n_gap[1]),
        n_gap[0] == 0 && n_gap[1] == 0);
    chk($sformatf("first result one cycle after the first read (%0d)", first_data_cyc),
        first_data_cyc == 1);

    // ---------------- phase 2: random traffic ----------------
    for (int t = 0; t < 600; t++) begin
      s_want = $urandom_range(0, 99) < 85;
      c_want = $urandom_range(0, 99) < 60;
      s_consume = $urandom_range(0, 99) < (((t / 100) % 2 != 0) ? 25 : 90);
      c_consume = $urandom_range(0, 99) < (((t / 150) % 2 != 0) ? 90 : 30);
      step();
    end
    s_want = 0; c_want = 0; s_consume = 1; c_consume = 1;
    repeat (WORDS + DEPTH + 6) step();
    chk($sformatf("all SAD windows came out (%0d/%0d)", s_got, s_sent), s_got == s_sent && s_exp.size() == 0);
    chk($sformatf("all conv windows came out (%0d/%0d)", c_got, c_sent), c_got == c_sent && c_exp.size() == 0);
    chk("both FIFOs empty at the end", s_empty && c_empty);

    for (int k = 0; k < 2; k++) begin
      $display("channel %0d: sender held by almost-full %0d, read grants %0d, consumer stalls %0d, full %0d, empty-after-stall %0d",
               k, n_hold[k], n_readgrant[k], n_cstall[k], n_full[k], n_gap[k]);
      chk("sender held back by almost-full", n_hold[k] > 0);
      chk("production granted by a read", n_readgrant[k] > 0);
      chk("consumer stall with data waiting", n_cstall[k] > 0);
      chk("FIFO filled completely", n_full[k] > 0);
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
