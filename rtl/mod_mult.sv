// mod_mult: modular multiplication by a constant modulus, r = (a * b) mod P.
//
// a and b are each cut into M-bit sub-vectors a_i, b_j. Every pair gives one
// term a_i * b_j * 2^(M*(i+j)) mod P, a function of the 2M bits of the pair,
// stored as a constant table (lut_term). The NCH*NCH residues are summed by
// the balanced adder_tree and mod_correct brings the sum into [0, P).
//
// Defaults: P = 4051, the largest modulus the document evaluates, with
// clog2(P) = 12-bit operands. M = 3 is this library's choice: it makes every
// table a 6-input function (k = 2m), one 6-input LUT per output bit; for
// 5-input LUTs use M = 2 (4-input tables), since equal-width sub-vectors
// cannot give exactly 5 inputs. The operands may take any value of their
// width, not only values below P.
//
// Interface: a, b (clog2(P) bits) in, r (clog2(P) bits) out. Combinational.
module mod_mult
  import arith_pkg::*;
#(
  parameter int unsigned P = 4051,
  parameter int unsigned M = 3,
  localparam int unsigned NB = $clog2(P)
) (
  input  logic [NB-1:0] a,
  input  logic [NB-1:0] b,
  output logic [NB-1:0] r
);

  localparam int unsigned NCH = (NB + M - 1) / M;
  localparam int unsigned NT  = NCH * NCH;
  localparam int unsigned SW  = NB + $clog2(NT);
  localparam int unsigned QW  = (NT > 1) ? $clog2(NT) : 1;

  logic [NT-1:0][NB-1:0] terms;
  logic [SW-1:0]         total;
  logic [QW-1:0]         q_unused;

  for (genvar i = 0; i < NCH; i++) begin : g_a
    for (genvar j = 0; j < NCH; j++) begin : g_b
      localparam int unsigned KA = chunk_width(NB, M, i);
      localparam int unsigned KB = chunk_width(NB, M, j);
      lut_term #(
        .OP(TERM_MODMUL), .KIN(KA + KB), .KLO(KA), .OW(NB),
        .SHIFT(M * (i + j)), .K(wide_t'(P))
      ) u_term (
        .x({b[M*j +: KB], a[M*i +: KA]}),
        .y(terms[i*NCH + j])
      );
    end
  end

  adder_tree #(.N(NT), .W(NB)) u_sum (.in(terms), .sum(total));

  mod_correct #(.P(P), .NMULT(NT), .SW(SW)) u_corr (
    .s(total), .r(r), .q(q_unused)
  );

endmodule
