// cmcu_u1 -- compositional microprogram control unit with address converter,
// realized on custom-made AND/OR matrices.
//
// The unit steps through a microprogram stored in the control memory CM.
// Inside an operational linear chain the counter CT simply increments
// (microoperation y0 = 1). At a chain output (y0 = 0) the next address comes
// from the combinational circuit CC, which sees only the logic conditions X
// and the short code tau of the chain's class of pseudoequivalent chains;
// tau is produced from the current address by the address converter AT.
// Blocks and matrices:
//   CC = M1 (AND) + M2 (OR)   transition address D from {tau, X}
//   CT                        address counter, outputs T
//   CM = M3 (AND) + M4 (OR)   decoder gated by Fetch, microinstruction words
//   AT = M5 (OR)              class code tau from the M3 word lines
//   T                         RS flip-flop, Fetch
// Operation: a Start pulse (one clock, synchronous) clears CT and sets Fetch.
// In every cycle with Fetch = 1 the word at address T is read
// combinationally and drives y (y1..yN), y0 and yE in that same cycle; at the
// next edge CT increments (y0 = 1) or loads D (y0 = 0). A word with yE = 1
// clears Fetch at the next edge, after which all outputs are 0 and CT holds.
// A microprogram of P words (the start word at address 0 included) thus
// keeps Fetch high for P cycles.
// The structure and the example microprogram (defaults) follow the published
// unit; the reset input, the synchronous Start and holding CT while Fetch = 0
// are this design's own choices.
//
// Interface: clk, rst_n, start, x[L-1:0] (x[0] = x1) -> y[N-1:0] (y[0] = y1),
// y0, ye, fetch, addr[RA-1:0] (counter T), tau[RB-1:0] (class code).
module cmcu_u1
  import cmcu_pkg::*;
#(
  parameter int unsigned L  = EX_L,
  parameter int unsigned N  = EX_N,
  parameter int unsigned RA = EX_RA,
  parameter int unsigned RB = EX_RB,
  parameter int unsigned H  = EX_H,
  parameter int unsigned G  = EX_G,
  parameter logic [2**RA-1:0][N+1:0] CM_WORDS = EX_CM_WORDS,
  parameter logic [H-1:0][RB-1:0] TR_CODE  = EX_TR_CODE,
  parameter logic [H-1:0][L-1:0]  TR_XCARE = EX_TR_XCARE,
  parameter logic [H-1:0][L-1:0]  TR_XVAL  = EX_TR_XVAL,
  parameter logic [H-1:0][RA-1:0] TR_ADDR  = EX_TR_ADDR,
  parameter logic [G-1:0][RA-1:0] AT_ADDR  = EX_AT_ADDR,
  parameter logic [G-1:0][RB-1:0] AT_CODE  = EX_AT_CODE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [L-1:0]  x,
  output logic [N-1:0]  y,
  output logic          y0,
  output logic          ye,
  output logic          fetch,
  output logic [RA-1:0] addr,
  output logic [RB-1:0] tau
);

  logic [RA-1:0]    phi;
  logic [H-1:0]     f;
  logic [2**RA-1:0] line;
  logic [N+1:0]     word;

  cmcu_cc #(
    .L(L), .RB(RB), .RA(RA), .H(H),
    .TR_CODE(TR_CODE), .TR_XCARE(TR_XCARE), .TR_XVAL(TR_XVAL), .TR_ADDR(TR_ADDR)
  ) u_cc (.tau(tau), .x(x), .d(phi), .f(f));

  cmcu_ct #(.RA(RA)) u_ct (
    .clk(clk), .rst_n(rst_n), .start(start), .en(fetch), .y0(y0), .phi(phi), .addr(addr)
  );

  cmcu_cm #(.RA(RA), .N(N), .WORDS(CM_WORDS)) u_cm (
    .fetch(fetch), .addr(addr), .line(line), .word(word)
  );

  cmcu_at #(.RA(RA), .RB(RB), .G(G), .AT_ADDR(AT_ADDR), .AT_CODE(AT_CODE)) u_at (
    .line(line), .tau(tau)
  );

  cmcu_fetch u_t (.clk(clk), .rst_n(rst_n), .start(start), .ye(ye), .fetch(fetch));

  assign y0 = word[0];
  assign y  = word[N:1];
  assign ye = word[N+1];

  // While a word is fetched exactly one word line is active, and at a chain
  // output at most one transition row may fire (the rows of one class are
  // mutually exclusive conditions). Fetch is 0 during reset, so both hold
  // trivially there.
  a_one_word: assert property (@(posedge clk) fetch |-> $onehot(line));
  a_one_row:  assert property (@(posedge clk) (fetch && !y0) |-> $onehot0(f));

endmodule
