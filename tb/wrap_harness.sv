// wrap_harness -- drives one absorption_wrapper around a model pipeline and
// checks it. Used by tb_absorption_wrapper for several sizes.
//
// The model pipeline is DEPTH registers with no enable, computing
// f(x) = 3x + 7 on the way. The sender always wants to send and starts an
// element (numbered 1, 2, 3, ...) in every cycle that produce allows.
//
// Phase 1, long stall: the consumer does not read for STALL cycles, then
// reads every cycle. Checks that the FIFO absorbed the pipeline without
// overflow (count = WORDS at the end of the stall) and that the longest run
// of cycles in which the consumer found the FIFO empty equals the predicted
// stall penalty: stall_penalty(DEPTH, WORDS - DEPTH) without the
// produce-on-read option, zero with it.
// With FIG2 set (DEPTH 2, 4 words, STALL 6) it also checks the cycle-by-
// cycle example of a 2-stage pipeline, counting cycles from 1 after reset:
// almost-full from cycle 5; without the option the sender is held in cycles
// 5-9 and restarts in cycle 10, and the consumer finds no data in cycles
// 11-12; with the option the sender restarts in cycle 7, together with the
// first read, and the consumer never waits.
// Phase 2, random traffic: random sender and consumer activity, then a
// drain. Every word read must be f(n) for the next n in order, and every
// element sent must arrive.
module wrap_harness
  import abs_fifo_pkg::*;
#(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned WORDS = min_ram_words(DEPTH),
  parameter bit          OPT   = 1'b0,
  parameter int unsigned STALL = WORDS + DEPTH + 6,
  parameter bit          FIG2  = 1'b0,
  parameter int unsigned RAND_CYCLES = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_absorb,     // cycles almost-full held the sender back
  output int   n_penalty,    // cycles the consumer found the FIFO empty after a stall
  output int   n_read_prod   // cycles produce was granted only by the read term
);
  localparam int unsigned W  = 16;
  localparam int unsigned AF = WORDS - DEPTH;
  localparam int unsigned CW = clog2_u(WORDS + 1);
  localparam int unsigned EXP_PENALTY = OPT ? 0 : stall_penalty(DEPTH, AF);

  function automatic logic [W-1:0] f(input logic [W-1:0] x);
    return W'(3 * x + 7);
  endfunction

  logic want, consume, in_valid, produce, rd_req, rd_valid, empty, af, ovf;
  logic [W-1:0] seq, pipe_data, rd_data;
  logic [W-1:0] pipe [DEPTH];
  logic [CW-1:0] count;

  assign in_valid = want && produce;

  always_ff @(posedge clk) begin
    pipe[0] <= f(seq);
    for (int i = 1; i < DEPTH; i++) pipe[i] <= pipe[i-1];
  end
  assign pipe_data = pipe[DEPTH-1];

  always_ff @(posedge clk) begin
    if (!rst_n) seq <= W'(1);
    else if (in_valid) seq <= seq + W'(1);
  end

  absorption_wrapper #(.WIDTH(W), .DEPTH(DEPTH), .WORDS(WORDS), .PRODUCE_ON_READ(OPT)) dut (
    .clk, .rst_n, .in_valid, .produce, .pipe_data, .consume, .rd_req, .rd_data,
    .rd_valid, .empty, .almost_full(af), .count, .overflow(ovf));

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [D=%0d W=%0d opt=%0d] %s at %0t", DEPTH, WORDS, OPT, what, $time);
    end
  endtask

  // Checker of every word read, in both phases.
  logic [W-1:0] next_exp;
  int received;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      next_exp <= W'(1);
      received <= 0;
    end else if (rd_valid) begin
      chk("read data in order", rd_data == f(next_exp));
      next_exp <= next_exp + W'(1);
      received <= received + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_absorb <= 0;
      n_read_prod <= 0;
    end else begin
      if (want && af && !produce) n_absorb <= n_absorb + 1;
      if (produce && af) n_read_prod <= n_read_prod + 1;
      if (!ovf) ; else chk("no overflow", 1'b0);
    end
  end

  int cyc, run, max_run, first_af, first_resume;
  bit seen_read;
  bit [63:0] gap_cycles;     // FIG2: consumer cycles 1..63 with no data

  initial begin
    done = 0; checks = 0; failures = 0;
    n_penalty = 0;
    want = 0; consume = 0;
    first_af = 0; first_resume = 0; gap_cycles = '0;
    @(posedge rst_n);
    // ---------------- phase 1 ----------------
    want = 1; run = 0; max_run = 0; seen_read = 0;
    for (cyc = 1; cyc <= STALL + 3 * WORDS + 4 * DEPTH + 8; cyc++) begin
      consume = (cyc > STALL);
      #2;
      if (af && first_af == 0) first_af = cyc;
      if (first_af != 0 && first_resume == 0 && cyc > first_af && produce) first_resume = cyc;
      if (FIG2 && cyc >= 5 && cyc <= (OPT ? 6 : 9)) chk("sender held from cycle 5", !produce);
      if (cyc == STALL + 1) chk("FIFO holds the whole pipeline", count == CW'(WORDS));
      if (consume) begin
        if (rd_req) begin
          seen_read = 1;
          run = 0;
        end else if (seen_read) begin
          run++;
          n_penalty++;
          if (cyc < 64) gap_cycles[cyc] = 1'b1;
          if (run > max_run) max_run = run;
        end
      end
      @(posedge clk);
      #1;
    end
    chk($sformatf("stall penalty %0d expected %0d", max_run, EXP_PENALTY), max_run == EXP_PENALTY);
    if (FIG2) begin
      chk($sformatf("almost-full first in cycle %0d, expected 5", first_af), first_af == 5);
      chk($sformatf("sender restarts in cycle %0d, expected %0d", first_resume, OPT ? 7 : 10),
          first_resume == (OPT ? 7 : 10));
      chk("consumer starved in cycles 11-12 only, or never with the option",
          gap_cycles == (OPT ? 64'h0 : 64'h1800));
    end
    // ---------------- phase 2 ----------------
    for (int t = 0; t < RAND_CYCLES; t++) begin
      // Alternate calm and bursty stretches of consumer stalls.
      want    = $urandom_range(0, 99) < 80;
      consume = $urandom_range(0, 99) < (((t / 200) % 2 != 0) ? 30 : 85);
      @(posedge clk);
      #1;
    end
    want = 0; consume = 1;
    repeat (WORDS + DEPTH + 8) @(posedge clk);
    #1;
    chk($sformatf("all %0d elements arrived (%0d)", seq - 1, received), received == int'(seq) - 1);
    chk("FIFO empty after drain", empty && count == '0);
    chk("pipeline absorbed at least once", n_absorb > 0);
    done = 1;
  end
endmodule
