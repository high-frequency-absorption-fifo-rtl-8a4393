// absorption_fifo -- RAM FIFO with an almost-full flag placed to absorb a
// pipeline.
//
// The FIFO sits at the output of an enable-free pipeline of DEPTH stages.
// Almost-full is raised once ALMOST_FULL_COUNT words are stored, with
// ALMOST_FULL_COUNT = WORDS - DEPTH, so the DEPTH words above the flag are a
// reserve that takes in whatever the pipeline still carries when the sender
// is told to stop. By default WORDS = 2^ceil(log2(DEPTH + 1)), the smallest
// RAM that holds the pipeline plus one word. WORDS may be set larger: that is
// the "bigger FIFO" way of removing the stall penalty, which needs
// ALMOST_FULL_COUNT >= DEPTH + 2 (see abs_fifo_pkg::stall_penalty).
//
// Interface:
//   wr_req/wr_data   write port, driven by the valid delay line and the
//                    pipeline output; a write into a full FIFO is dropped and
//                    pulses overflow (which the sizing rule should prevent)
//   rd_req           read request; ignored while empty
//   rd_data/rd_valid the word read, one cycle after rd_req (registered RAM
//                    read, no fall-through: a word written in cycle t can be
//                    read from cycle t+1 and appears at rd_data in t+2)
//   empty, almost_full, count  status, all derived from the registered count
// The registered read follows the text's account of the two-cycle minimum
// penalty; the overflow pulse, the rd_valid output and the synchronous
// active-low reset are this design's choices.
module absorption_fifo
  import abs_fifo_pkg::*;
#(
  parameter int unsigned WIDTH             = 32,
  parameter int unsigned DEPTH             = 13,
  parameter int unsigned WORDS             = min_ram_words(DEPTH),
  parameter int unsigned ALMOST_FULL_COUNT = almost_full_count(WORDS, DEPTH),
  localparam int unsigned AW               = (WORDS > 1) ? clog2_u(WORDS) : 1,
  localparam int unsigned CW               = clog2_u(WORDS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_req,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_req,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  output logic             almost_full,
  output logic [CW-1:0]    count,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd, full;

  assign empty       = (count == '0);
  assign full        = (count == CW'(WORDS));
  assign almost_full = (count >= CW'(ALMOST_FULL_COUNT));
  assign do_rd       = rd_req && !empty;
  assign do_wr       = wr_req && !full;
  assign overflow    = wr_req && full;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(WORDS - 1)) ? '0 : p + AW'(1);
  endfunction

  // RAM: one write port, one registered read port, no reset on the array.
  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
    if (do_rd) rd_data <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  initial begin
    assert (WORDS > DEPTH)
      else $error("absorption_fifo: WORDS must exceed the pipeline DEPTH");
    assert (ALMOST_FULL_COUNT >= 1 && ALMOST_FULL_COUNT <= WORDS)
      else $error("absorption_fifo: ALMOST_FULL_COUNT out of range");
  end

  // The reserve above almost-full must always be enough: no write may find
  // the FIFO full.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow)
    else $error("absorption_fifo: write into a full FIFO");

endmodule
