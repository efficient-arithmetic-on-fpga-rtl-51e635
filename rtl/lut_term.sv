// lut_term: one term of the decomposition, stored as a constant table.
//
// The table has 2^KIN entries of OW bits, entry e holding
// arith_pkg::term_value(OP, e, KLO, SHIFT, K). The input sub-vector x selects
// an entry, so every output bit is a Boolean function of the KIN input bits
// only: with KIN = 5 each output bit fits one half of a dual-output 6-input
// LUT, with KIN = 6 one whole LUT. That is the "k-input Boolean function
// system" of the method; the synthesis tool performs the actual LUT
// packing (the document's own packing heuristics are not reproduced here).
//
// Interface: x (KIN bits) in, y (OW bits) out. Purely combinational.
// Elaboration stops with an error if an entry does not fit in OW bits.
module lut_term
  import arith_pkg::*;
#(
  parameter term_op_e    OP    = TERM_MODRED,
  parameter int unsigned KIN   = 5,            // table inputs (k)
  parameter int unsigned KLO   = 0,            // TERM_MODMUL: width of the a-part of x
  parameter int unsigned OW    = 8,            // table output width
  parameter int unsigned SHIFT = 0,            // weight 2^SHIFT of the sub-vector
  parameter wide_t       K     = wide_t'(241)  // constant, modulus or divisor
) (
  input  logic [KIN-1:0] x,
  output logic [OW-1:0]  y
);

  logic [OW-1:0] rom [2**KIN];

  for (genvar e = 0; e < 2**KIN; e++) begin : g_entry
    localparam wide_t V = term_value(OP, wide_t'(e), KLO, SHIFT, K);
    if ((V >> OW) != '0) begin : g_overflow
      $error("lut_term: table entry does not fit in OW bits");
    end
    assign rom[e] = V[OW-1:0];
  end

  assign y = rom[x];

endmodule
