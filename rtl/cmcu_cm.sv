// cmcu_cm -- control memory CM, realized as an address decoder and an OR array.
//
// * M3, conjunctive: inputs {Fetch, T}, one row per address a, row a is
//   Fetch AND (T == a). It holds 2*(RA+1)*2^RA crosspoints. Its 2^RA word
//   lines are also the inputs of the address converter M5.
// * M4, disjunctive: 2^RA word lines against the N+2 bits of a
//   microinstruction ({yE, yN..y1, y0}); a crosspoint is programmed wherever
//   the word at that address has the bit set (2^RA*(N+2) crosspoints).
// The M4 personality is built from WORDS, the control-memory contents; the
// default is the worked example. With Fetch = 0 all word lines are 0 and the
// word read is all zero. This structure follows the published matrix
// realization.
//
// Interface: fetch, addr[RA-1:0] -> line[2^RA-1:0] (one-hot word line or 0),
// word[N+1:0]. Purely combinational.
module cmcu_cm
  import cmcu_pkg::*;
#(
  parameter int unsigned RA = EX_RA,
  parameter int unsigned N  = EX_N,
  parameter logic [2**RA-1:0][N+1:0] WORDS = EX_CM_WORDS
) (
  input  logic               fetch,
  input  logic [RA-1:0]      addr,
  output logic [2**RA-1:0]   line,
  output logic [N+1:0]       word
);

  localparam int unsigned W = 2 ** RA;

  typedef logic [W-1:0][RA:0]  m3_sel_t;
  typedef logic [N+1:0][W-1:0] m4_sel_t;

  // M3: full decoder of the address, every row also needs Fetch = 1.
  function automatic m3_sel_t m3_true();
    m3_sel_t s;
    for (int a = 0; a < W; a++) s[a] = {1'b1, RA'(a)};
    return s;
  endfunction
  function automatic m3_sel_t m3_comp();
    m3_sel_t s;
    for (int a = 0; a < W; a++) s[a] = {1'b0, ~RA'(a)};
    return s;
  endfunction
  // M4: transpose of the memory contents.
  function automatic m4_sel_t m4_sel();
    m4_sel_t s;
    for (int j = 0; j < N + 2; j++)
      for (int a = 0; a < W; a++) s[j][a] = WORDS[a][j];
    return s;
  endfunction

  localparam m3_sel_t M3_TRUE = m3_true();
  localparam m3_sel_t M3_COMP = m3_comp();
  localparam m4_sel_t M4_SEL  = m4_sel();

  and_matrix #(.NIN(RA + 1), .NTERM(W), .TRUE_SEL(M3_TRUE), .COMP_SEL(M3_COMP))
    u_m3 (.in({fetch, addr}), .term(line));

  or_matrix #(.NIN(W), .NOUT(N + 2), .SEL(M4_SEL))
    u_m4 (.in(line), .out(word));

endmodule
