// adder_tree: balanced parallel addition network.
//
// Sums N operands of W bits into one W+clog2(N)-bit result in clog2(N)
// levels. Level k holds ceil(N / 2^k) partial sums of W+k bits; each is the
// sum of two neighbouring partial sums of level k-1, formed by a
// parallel_adder, or a copy of the last one when level k-1 has an odd count.
// All adders of a level work side by side, so the depth is clog2(N) adders
// instead of the N-1 of a chain. The document asks for a balanced parallel
// adder structure; this pairwise arrangement is this library's way of
// building it.
//
// Interface: in (N packed operands, operand i at in[i]) in, sum out.
// Combinational. The defaults (16 operands of 12 bits) are the size of the
// default modular multiplier's sum; the operators set N and W themselves.
module adder_tree #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 12,
  localparam int unsigned OW = W + $clog2(N)
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [OW-1:0]       sum
);

  localparam int unsigned LEVELS = $clog2(N);

  for (genvar k = 0; k <= LEVELS; k++) begin : g_lvl
    localparam int unsigned CNT = (N + (1 << k) - 1) >> k;  // partial sums at level k
    localparam int unsigned LW  = W + k;                    // their width
    logic [CNT-1:0][LW-1:0] v;

    if (k == 0) begin : g_in
      assign v = in;
    end else begin : g_add
      localparam int unsigned PCNT = (N + (1 << (k - 1)) - 1) >> (k - 1);
      for (genvar j = 0; j < CNT; j++) begin : g_node
        if (2 * j + 1 < PCNT) begin : g_pair
          parallel_adder #(.W(LW - 1)) u_add (
            .a(g_lvl[k-1].v[2*j]),
            .b(g_lvl[k-1].v[2*j+1]),
            .s(v[j])
          );
        end else begin : g_pass
          assign v[j] = {1'b0, g_lvl[k-1].v[2*j]};
        end
      end
    end
  end

  assign sum = g_lvl[LEVELS].v[0];

endmodule
