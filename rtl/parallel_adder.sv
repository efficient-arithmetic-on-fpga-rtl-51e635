// parallel_adder: two-operand adder whose lower and higher halves are
// computed at the same time.
//
// The operands are split at bit L = W/2. The lower half is added directly;
// the higher half is added twice in parallel, once assuming no carry and once
// assuming a carry out of the lower half, and the lower half's carry only
// selects between the two (carry-select). This is how this library reads the
// document's "adder structure that computes higher and lower-order bits
// simultaneously"; the split point at the middle is its own choice.
//
// Interface: a, b (W bits) in, s = a + b (W+1 bits) out. Combinational.
module parallel_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   s
);

  localparam int unsigned L = W / 2;   // lower-half width
  localparam int unsigned H = W - L;   // higher-half width

  if (L == 0) begin : g_plain
    assign s = {1'b0, a} + {1'b0, b};
  end else begin : g_split
    logic [L:0] lo;       // lower sum with its carry out
    logic [H:0] hi0;      // higher sum, carry-in 0
    logic [H:0] hi1;      // higher sum, carry-in 1
    assign lo  = {1'b0, a[L-1:0]} + {1'b0, b[L-1:0]};
    assign hi0 = {1'b0, a[W-1:L]} + {1'b0, b[W-1:L]};
    assign hi1 = {1'b0, a[W-1:L]} + {1'b0, b[W-1:L]} + {{H{1'b0}}, 1'b1};
    assign s   = {(lo[L] ? hi1 : hi0), lo[L-1:0]};
  end

endmodule
