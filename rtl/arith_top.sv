// arith_top: the four LUT-decomposed constant-arithmetic operators side by side.
//
// The operators share a method (table terms, a balanced parallel adder tree
// and a final modulus correction) but no signals: each has its own ports,
// prefixed cm_ (constant multiplication), mm_ (modular multiplication),
// mr_ (modular reduction) and dv_ (division by a constant). Everything is
// combinational, as in the document's measurements, which used LUTs only.
// The parameters pass straight to the operators; their defaults are the
// operators' defaults.
module arith_top #(
  parameter int unsigned   CM_WA = 10,
  parameter int unsigned   CM_WC = 183,
  parameter logic [CM_WC-1:0] CM_C = {CM_WC{1'b1}},
  parameter int unsigned   MM_P  = 4051,
  parameter int unsigned   MR_WA = 270,
  parameter int unsigned   MR_P  = 241,
  parameter int unsigned   DV_WA = 64,
  parameter int unsigned   DV_D  = 241
) (
  input  logic [CM_WA-1:0]           cm_a,
  output logic [CM_WA+CM_WC-1:0]     cm_p,
  input  logic [$clog2(MM_P)-1:0]    mm_a,
  input  logic [$clog2(MM_P)-1:0]    mm_b,
  output logic [$clog2(MM_P)-1:0]    mm_r,
  input  logic [MR_WA-1:0]           mr_a,
  output logic [$clog2(MR_P)-1:0]    mr_r,
  input  logic [DV_WA-1:0]           dv_a,
  output logic [DV_WA-1:0]           dv_q,
  output logic [$clog2(DV_D)-1:0]    dv_r
);

  const_mult #(.WA(CM_WA), .WC(CM_WC), .C(CM_C)) u_cmul (.a(cm_a), .p(cm_p));

  mod_mult #(.P(MM_P)) u_mmul (.a(mm_a), .b(mm_b), .r(mm_r));

  mod_reduce #(.WA(MR_WA), .P(MR_P)) u_mred (.a(mr_a), .r(mr_r));

  const_div #(.WA(DV_WA), .D(DV_D)) u_cdiv (.a(dv_a), .q(dv_q), .r(dv_r));

endmodule
