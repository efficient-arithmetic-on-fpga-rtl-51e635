// mod_correct: final correction of a sum of residues by comparison and
// subtraction with the modulus.
//
// Input s is known to be below NMULT*P (it is a sum of NMULT values each
// below P). All comparisons s >= j*P and all differences s - j*P, for
// j = 1 .. NMULT-1, are formed in parallel; the largest j whose comparison
// holds gives the quotient q = floor(s/P) and the residue r = s - q*P.
// The document states the comparison/subtraction step; doing all multiples
// in parallel rather than in sequence is this library's choice.
//
// Interface: s (SW bits) in; r (clog2(P) bits, 0 <= r < P) and q out.
// Combinational. Inputs of NMULT*P or more give q = NMULT-1 and an r that is
// not reduced; the operators never produce such sums.
module mod_correct #(
  parameter int unsigned P     = 241,
  parameter int unsigned NMULT = 16,
  parameter int unsigned SW    = $clog2(P) + $clog2(NMULT),
  localparam int unsigned PW   = $clog2(P),
  localparam int unsigned QW   = (NMULT > 1) ? $clog2(NMULT) : 1
) (
  input  logic [SW-1:0] s,
  output logic [PW-1:0] r,
  output logic [QW-1:0] q
);

  logic [NMULT-1:0]  ge;              // ge[j]: s >= j*P
  logic [SW-1:0]     diff [NMULT];    // s - j*P

  assign ge[0]   = 1'b1;
  assign diff[0] = s;

  for (genvar j = 1; j < NMULT; j++) begin : g_mult
    localparam logic [SW+7:0] JP = (SW+8)'(longint'(j) * longint'(P));
    assign ge[j]   = ({8'd0, s} >= JP);
    assign diff[j] = s - JP[SW-1:0];
  end

  always_comb begin
    q = '0;
    r = diff[0][PW-1:0];
    for (int j = 1; j < NMULT; j++) begin
      if (ge[j]) begin
        q = QW'(j);
        r = diff[j][PW-1:0];
      end
    end
  end

endmodule
