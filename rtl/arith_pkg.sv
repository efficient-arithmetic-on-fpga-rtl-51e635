// arith_pkg: types and elaboration-time table generators shared by the
// LUT-decomposed arithmetic operators.
//
// Every operator in this library writes its operation as a sum of small terms
// (Eq. (1) style: AO = sum A_i * B_i * C_i), where A_i and B_i are short
// sub-vectors of the inputs and C_i is a constant known when the circuit is
// built. Each term is therefore a Boolean function of only a few input bits
// and is stored as a constant table (one LUT per output bit on an FPGA).
// term_value() computes one table entry; it is only ever called with
// constant arguments, during elaboration, so it produces no hardware.
//
// The kinds of term (term_op_e) and the 512-bit width of the table
// arithmetic are this library's own choices; 512 bits covers the largest
// products used (a 183-bit constant times a 10-bit operand, and a 270-bit
// operand for reduction).
package arith_pkg;

  localparam int unsigned WIDE = 512;
  typedef logic [WIDE-1:0] wide_t;

  // What one table computes for input x, with s = SHIFT and k = the
  // operator's constant (multiplier, modulus or divisor):
  //   TERM_CMUL   : (x * k) << s                    constant multiplication
  //   TERM_MODRED : (x * 2^s) mod k                 modular reduction
  //   TERM_MODMUL : (a * b * 2^s) mod k, x = {b, a} modular multiplication
  //   TERM_DIVQ   : floor(x * 2^s / k)              quotient part of division
  //   TERM_DIVR   : (x * 2^s) mod k                 residue part of division
  typedef enum logic [2:0] {
    TERM_CMUL   = 3'd0,
    TERM_MODRED = 3'd1,
    TERM_MODMUL = 3'd2,
    TERM_DIVQ   = 3'd3,
    TERM_DIVR   = 3'd4
  } term_op_e;

  // One table entry. klo is the width of the a-part of x for TERM_MODMUL.
  function automatic wide_t term_value(term_op_e op, wide_t x, int unsigned klo,
                                       int unsigned s, wide_t k);
    wide_t a, b, t;
    case (op)
      TERM_CMUL:   t = (x * k) << s;
      TERM_MODRED: t = (x << s) % k;
      TERM_MODMUL: begin
        a = x & ((wide_t'(1) << klo) - wide_t'(1));
        b = x >> klo;
        t = ((a * b) << s) % k;
      end
      TERM_DIVQ:   t = (x << s) / k;
      default:     t = (x << s) % k;
    endcase
    return t;
  endfunction

  // Width of chunk i when an operand of w bits is cut into m-bit chunks,
  // least significant first; the last chunk holds what is left.
  function automatic int unsigned chunk_width(int unsigned w, int unsigned m, int unsigned i);
    int unsigned n;
    n = (w + m - 1) / m;
    return (i == n - 1) ? (w - m * (n - 1)) : m;
  endfunction

endpackage
