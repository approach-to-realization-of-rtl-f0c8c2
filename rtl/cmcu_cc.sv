// cmcu_cc -- combinational circuit CC: transition address D = F(tau, X).
//
// CC is active when the microinstruction just read is the output of an
// operational linear chain (y0 = 0). It receives the class code tau of that
// chain from the address converter and the logic conditions X, and produces
// the address D of the chain input to jump to. It is realized, as in the
// published matrix scheme, by two matrices:
//   * M1, conjunctive: one product row per transition-table row h,
//     F_h = (tau == K(B_i)) AND (condition X_h);
//     its inputs are {tau, X}, so it holds 2*(L+RB)*H crosspoints;
//   * M2, disjunctive: D_i = OR of the F_h whose target address has bit i set
//     (H*RA crosspoints).
// The personalities are built here from the transition table itself
// (TR_CODE, TR_XCARE/TR_XVAL, TR_ADDR); the defaults are the worked example.
// A class with no rows (the class of the final chain) gives D = 0.
//
// Interface: tau[RB-1:0], x[L-1:0] (x[0] = x1) -> d[RA-1:0], f[H-1:0] (the
// product terms, brought out for observation). Purely combinational.
module cmcu_cc
  import cmcu_pkg::*;
#(
  parameter int unsigned L  = EX_L,
  parameter int unsigned RB = EX_RB,
  parameter int unsigned RA = EX_RA,
  parameter int unsigned H  = EX_H,
  parameter logic [H-1:0][RB-1:0] TR_CODE  = EX_TR_CODE,
  parameter logic [H-1:0][L-1:0]  TR_XCARE = EX_TR_XCARE,
  parameter logic [H-1:0][L-1:0]  TR_XVAL  = EX_TR_XVAL,
  parameter logic [H-1:0][RA-1:0] TR_ADDR  = EX_TR_ADDR
) (
  input  logic [RB-1:0] tau,
  input  logic [L-1:0]  x,
  output logic [RA-1:0] d,
  output logic [H-1:0]  f
);

  typedef logic [H-1:0][RB+L-1:0] m1_sel_t;
  typedef logic [RA-1:0][H-1:0]   m2_sel_t;

  // M1 crosspoints: every tau bit is used; X bits only where the row tests them.
  function automatic m1_sel_t m1_true();
    m1_sel_t s;
    for (int h = 0; h < H; h++) s[h] = {TR_CODE[h], TR_XCARE[h] & TR_XVAL[h]};
    return s;
  endfunction
  function automatic m1_sel_t m1_comp();
    m1_sel_t s;
    for (int h = 0; h < H; h++) s[h] = {~TR_CODE[h], TR_XCARE[h] & ~TR_XVAL[h]};
    return s;
  endfunction
  // M2 crosspoints: output D_i collects the rows whose target has bit i set.
  function automatic m2_sel_t m2_sel();
    m2_sel_t s;
    for (int i = 0; i < RA; i++)
      for (int h = 0; h < H; h++) s[i][h] = TR_ADDR[h][i];
    return s;
  endfunction

  localparam m1_sel_t M1_TRUE = m1_true();
  localparam m1_sel_t M1_COMP = m1_comp();
  localparam m2_sel_t M2_SEL  = m2_sel();

  and_matrix #(.NIN(RB + L), .NTERM(H), .TRUE_SEL(M1_TRUE), .COMP_SEL(M1_COMP))
    u_m1 (.in({tau, x}), .term(f));

  or_matrix #(.NIN(H), .NOUT(RA), .SEL(M2_SEL))
    u_m2 (.in(f), .out(d));

endmodule
