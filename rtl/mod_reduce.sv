// mod_reduce: reduction of a wide operand by a constant modulus, r = a mod P.
//
// a is cut into M-bit sub-vectors a_i. Each a_i * 2^(M*i) mod P depends on M
// input bits only and is a constant table (lut_term) of clog2(P)-bit
// residues. The NCH residues are summed by the balanced adder_tree; the sum
// is below NCH*P, and mod_correct brings it into [0, P) by comparison and
// subtraction with multiples of P.
//
// Defaults: a 270-bit operand and P = 241, the pair the document quotes for
// this operation; M = 5 follows its five-variable target.
//
// Interface: a (WA bits) in, r (clog2(P) bits) out. Combinational.
module mod_reduce
  import arith_pkg::*;
#(
  parameter int unsigned WA = 270,
  parameter int unsigned P  = 241,
  parameter int unsigned M  = 5,
  localparam int unsigned PW = $clog2(P)
) (
  input  logic [WA-1:0] a,
  output logic [PW-1:0] r
);

  localparam int unsigned NCH = (WA + M - 1) / M;
  localparam int unsigned SW  = PW + $clog2(NCH);
  localparam int unsigned QW  = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NCH-1:0][PW-1:0] terms;
  logic [SW-1:0]          total;
  logic [QW-1:0]          q_unused;

  for (genvar i = 0; i < NCH; i++) begin : g_chunk
    localparam int unsigned KI = chunk_width(WA, M, i);
    lut_term #(
      .OP(TERM_MODRED), .KIN(KI), .OW(PW), .SHIFT(M * i), .K(wide_t'(P))
    ) u_term (
      .x(a[M*i +: KI]),
      .y(terms[i])
    );
  end

  adder_tree #(.N(NCH), .W(PW)) u_sum (.in(terms), .sum(total));

  mod_correct #(.P(P), .NMULT(NCH), .SW(SW)) u_corr (
    .s(total), .r(r), .q(q_unused)
  );

endmodule
