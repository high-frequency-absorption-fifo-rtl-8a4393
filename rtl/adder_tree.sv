// adder_tree -- pipelined, enable-free binary adder tree.
//
// Sums N operands of W bits in LEVELS = ceil(log2(N)) register levels. Each
// level adds neighbouring pairs and registers the sums; an odd operand at the
// end of a level is carried to the next level in a register of its own, so
// every path has the same latency. The registers have no enable and no reset:
// the tree runs every cycle, which is what lets a retiming tool spread them
// over the routing fabric. Additions are W-bit two's complement, so the
// caller extends the operands (zero or sign) to a W that holds the sum.
//
// Timing: sum in cycle t+LEVELS is the sum of operands in cycle t (LEVELS = 0
// when N = 1, and the output is then the input).
module adder_tree
  import abs_fifo_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16,
  localparam int unsigned LEVELS = clog2_u(N)
) (
  input  logic                 clk,
  input  logic [N-1:0][W-1:0]  operands,
  output logic [W-1:0]         sum
);

  // Number of values present at level l.
  function automatic int unsigned cnt(input int unsigned l);
    return (N + (32'd1 << l) - 1) >> l;
  endfunction

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [cnt(l)-1:0][W-1:0] v;
    if (l == 0) begin : g_in
      assign v = operands;
    end else begin : g_add
      for (genvar i = 0; i < cnt(l); i++) begin : g_node
        if (2 * i + 1 < cnt(l - 1)) begin : g_pair
          always_ff @(posedge clk) v[i] <= g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
        end else begin : g_odd
          always_ff @(posedge clk) v[i] <= g_lvl[l-1].v[2*i];
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS].v[0];

endmodule
