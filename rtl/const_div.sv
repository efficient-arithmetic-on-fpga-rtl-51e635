// const_div: division by a constant, a / D = {q, r}.
//
// a is cut into M-bit sub-vectors a_i. For each one, two constant tables
// (lut_term) give floor(a_i * 2^(M*i) / D) and a_i * 2^(M*i) mod D. Since
// a = sum a_i * 2^(M*i), the quotient is the sum of the partial quotients
// plus floor(S_r / D), and the residue is S_r mod D, where S_r is the sum of
// the partial residues. Two balanced adder_trees form both sums side by
// side; mod_correct splits S_r (below NCH*D) into its quotient and residue by
// comparison and subtraction, and one parallel_adder adds that small
// quotient to the summed partial quotients.
//
// Defaults: a 64-bit dividend and D = 241, the largest dividend width and
// largest divisor the document evaluates (pairing them is this library's
// choice); M = 5 follows the document's five-variable target.
//
// Interface: a (WA bits) in; q (WA bits) and r (clog2(D) bits) out.
// Combinational.
module const_div
  import arith_pkg::*;
#(
  parameter int unsigned WA = 64,
  parameter int unsigned D  = 241,
  parameter int unsigned M  = 5,
  localparam int unsigned DW = $clog2(D)
) (
  input  logic [WA-1:0] a,
  output logic [WA-1:0] q,
  output logic [DW-1:0] r
);

  localparam int unsigned NCH = (WA + M - 1) / M;
  localparam int unsigned SW  = DW + $clog2(NCH);
  localparam int unsigned QW  = (NCH > 1) ? $clog2(NCH) : 1;

  logic [NCH-1:0][WA-1:0]     qterms;
  logic [NCH-1:0][DW-1:0]     rterms;
  logic [WA+$clog2(NCH)-1:0]  qsum;
  logic [SW-1:0]              rsum;
  logic [QW-1:0]              qcorr;
  logic [WA:0]                qfull;

  for (genvar i = 0; i < NCH; i++) begin : g_chunk
    localparam int unsigned KI = chunk_width(WA, M, i);
    lut_term #(
      .OP(TERM_DIVQ), .KIN(KI), .OW(WA), .SHIFT(M * i), .K(wide_t'(D))
    ) u_qterm (
      .x(a[M*i +: KI]),
      .y(qterms[i])
    );
    lut_term #(
      .OP(TERM_DIVR), .KIN(KI), .OW(DW), .SHIFT(M * i), .K(wide_t'(D))
    ) u_rterm (
      .x(a[M*i +: KI]),
      .y(rterms[i])
    );
  end

  adder_tree #(.N(NCH), .W(WA)) u_qsum (.in(qterms), .sum(qsum));
  adder_tree #(.N(NCH), .W(DW)) u_rsum (.in(rterms), .sum(rsum));

  mod_correct #(.P(D), .NMULT(NCH), .SW(SW)) u_corr (
    .s(rsum), .r(r), .q(qcorr)
  );

  // The true quotient fits in WA bits, so the upper bits of qsum and the
  // carry out of this adder are always zero.
  parallel_adder #(.W(WA)) u_qadd (
    .a(qsum[WA-1:0]),
    .b(WA'(qcorr)),
    .s(qfull)
  );

  assign q = qfull[WA-1:0];

endmodule
