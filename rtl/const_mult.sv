// const_mult: multiplication of a short variable by a long constant, p = a * C.
//
// The variable a is cut into M-bit sub-vectors a_i (least significant first,
// the last one holding the remaining bits). Each product a_i * C * 2^(M*i)
// depends on M input bits only, so it is a constant table (lut_term); the
// tables' outputs are summed by the balanced adder_tree, except the low M
// product bits, which only the first table produces and which are
// concatenated onto the sum (the method's result integration by
// concatenation). With M = 5 every output bit of a table is a 5-input
// function, the size the method aims for so that two such functions share
// one dual-output 6-input LUT. Special-form
// constants such as 2^183 - 1 give tables with long runs of repeated bits,
// which a synthesis tool folds away.
//
// Defaults: C = 2^183 - 1 (WC = 183), one of the special-form constants the
// document evaluates, and a 10-bit variable, the top of its 7-10 bit range.
// M = 5 follows the document's five-variable target; pairing this constant
// with a 10-bit a is this library's choice.
//
// Interface: a (WA bits) in, p (WA+WC bits) out. Combinational, no clock.
module const_mult
  import arith_pkg::*;
#(
  parameter int unsigned   WA = 10,
  parameter int unsigned   WC = 183,
  parameter logic [WC-1:0] C  = {WC{1'b1}},
  parameter int unsigned   M  = 5
) (
  input  logic [WA-1:0]    a,
  output logic [WA+WC-1:0] p
);

  localparam int unsigned NCH = (WA + M - 1) / M;   // number of sub-vectors
  localparam int unsigned PW  = WA + WC;
  localparam int unsigned HW  = PW - M;             // width above the low M bits

  // Term 0 is a_0 * C. Terms i >= 1 are a_i * C * 2^(M*i): their low M bits
  // are zero, so their tables store only the bits above M.
  logic [PW-1:0]              term0;
  logic [NCH-1:0][HW-1:0]     upper;
  logic [HW+$clog2(NCH)-1:0]  total;

  for (genvar i = 0; i < NCH; i++) begin : g_chunk
    localparam int unsigned KI = chunk_width(WA, M, i);
    if (i == 0) begin : g_low
      lut_term #(
        .OP(TERM_CMUL), .KIN(KI), .OW(PW), .SHIFT(0), .K(wide_t'(C))
      ) u_term (
        .x(a[0 +: KI]),
        .y(term0)
      );
      assign upper[0] = term0[PW-1:M];
    end else begin : g_high
      lut_term #(
        .OP(TERM_CMUL), .KIN(KI), .OW(HW), .SHIFT(M * (i - 1)), .K(wide_t'(C))
      ) u_term (
        .x(a[M*i +: KI]),
        .y(upper[i])
      );
    end
  end

  adder_tree #(.N(NCH), .W(HW)) u_sum (.in(upper), .sum(total));

  // Result integration by concatenation: the low M bits of the product are
  // those of term 0 and need no addition. a * C always fits in WA+WC bits,
  // so the tree's extra top bits are zero.
  assign p = {total[HW-1:0], term0[M-1:0]};

endmodule
