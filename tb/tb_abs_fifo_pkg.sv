// tb_abs_fifo_pkg -- checks the sizing functions against values worked out
// by hand from the sizing rules:
//   min RAM words  = 2^ceil(log2(depth+1))
//   almost-full    = words - depth
//   stall penalty  = depth - (almost_full - 2), not below zero
//   window depth   = 1 + ceil(log2(win*win))
module tb_abs_fifo_pkg;
  import abs_fifo_pkg::*;

  int checks = 0, failures = 0;

  task automatic chk(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    // Example of a 2-stage pipeline: 4 words, almost-full at 2, penalty 2.
    chk("min_ram_words(2)", min_ram_words(2), 4);
    chk("af(4,2)", almost_full_count(4, 2), 2);
    chk("penalty(2,2)", stall_penalty(2, 2), 2);
    // Just below a power of two: 8 words, flag at 1 word, penalty 8.
    chk("min_ram_words(7)", min_ram_words(7), 8);
    chk("penalty(7,1)", stall_penalty(7, almost_full_count(8, 7)), 8);
    // At a power of two the RAM doubles and the penalty falls to 2.
    chk("min_ram_words(8)", min_ram_words(8), 16);
    chk("penalty(8,8)", stall_penalty(8, almost_full_count(16, 8)), 2);
    chk("min_ram_words(63)", min_ram_words(63), 64);
    chk("min_ram_words(64)", min_ram_words(64), 128);
    chk("min_ram_words(127)", min_ram_words(127), 128);
    chk("min_ram_words(13)", min_ram_words(13), 16);
    chk("af(16,13)", almost_full_count(16, 13), 3);
    chk("penalty(13,3)", stall_penalty(13, 3), 12);
    // An oversized FIFO has no penalty.
    chk("penalty(5,11)", stall_penalty(5, 11), 0);
    chk("penalty(5,7)", stall_penalty(5, 7), 0);
    chk("penalty(5,6)", stall_penalty(5, 6), 1);
    chk("clog2_u(1)", clog2_u(1), 0);
    chk("clog2_u(2500)", clog2_u(2500), 12);
    chk("window_depth(50)", window_depth(50), 13);
    chk("window_depth(3)", window_depth(3), 5);
    chk("window_depth(35)", window_depth(35), 12);
    chk("window_depth(1)", window_depth(1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
