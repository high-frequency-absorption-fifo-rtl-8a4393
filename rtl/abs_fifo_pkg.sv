// abs_fifo_pkg -- sizing rules shared by the absorption-FIFO blocks.
//
// An absorption FIFO sits at the output of a pipeline that has no clock
// enable. When the consumer stalls, the FIFO raises almost-full early enough
// that everything still in flight in the pipeline fits in the words kept in
// reserve above the flag. The functions below give the numbers that
// rule this:
//   min_ram_words(d)      = 2^ceil(log2(d + 1))   words of a RAM FIFO for a
//                           pipeline of depth d (the "+1" keeps almost-full
//                           from being asserted permanently)
//   almost_full_count(s,d)= s - d                 occupancy at which the flag
//                           is raised for a FIFO of s words
//   stall_penalty(d,a)    = d - (a - 2)           worst-case number of empty
//                           cycles seen by the consumer after a long stall,
//                           when the sender waits for almost-full to clear;
//                           clipped at zero here (a large FIFO has none).
//   window_depth(w)       = 1 + ceil(log2(w*w))  latency of the SAD and 2D
//                           convolution datapaths of this design.
// The first three follow the sizing rules of the absorption-FIFO method; the clip at
// zero is this design's reading of the penalty rule for oversized FIFOs.
package abs_fifo_pkg;

  function automatic int unsigned clog2_u(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < v) r++;
    return r;
  endfunction

  function automatic int unsigned min_ram_words(input int unsigned depth);
    return 32'd1 << clog2_u(depth + 1);
  endfunction

  function automatic int unsigned almost_full_count(input int unsigned fifo_words,
                                                    input int unsigned depth);
    return fifo_words - depth;
  endfunction

  // Latency of a sliding-window datapath over a win x win window: one stage
  // for the per-pixel operation, then a registered adder tree.
  function automatic int unsigned window_depth(input int unsigned win);
    return 1 + clog2_u(win * win);
  endfunction

  function automatic int unsigned stall_penalty(input int unsigned depth,
                                                input int unsigned af_count);
    int signed p;
    p = int'(depth) - (int'(af_count) - 2);
    return (p < 0) ? 0 : p;
  endfunction

endpackage
