// cmcu_at -- address converter AT (matrix M5): tau = F(T).
//
// Maps the address of an OLC output onto the code K(B_i) of the class of
// pseudoequivalent OLC that chain belongs to:
//   tau_r = OR over g of C_rg * A_g,
// where A_g is the decoded address of output O_g and C_rg = 1 when bit r of
// its class code is 1. The decoded addresses are the word lines of the
// control-memory decoder M3, so M5 is a single disjunctive matrix of
// 2^RA*RB crosspoints, as in the published matrix scheme. Addresses that are
// not chain outputs give tau = 0; CC only uses tau when y0 = 0, i.e. at a
// chain output.
// The personality is built from the converter table (AT_ADDR, AT_CODE);
// the default is the worked example.
//
// Interface: line[2^RA-1:0] (one-hot word lines) -> tau[RB-1:0]. Purely
// combinational.
module cmcu_at
  import cmcu_pkg::*;
#(
  parameter int unsigned RA = EX_RA,
  parameter int unsigned RB = EX_RB,
  parameter int unsigned G  = EX_G,
  parameter logic [G-1:0][RA-1:0] AT_ADDR = EX_AT_ADDR,
  parameter logic [G-1:0][RB-1:0] AT_CODE = EX_AT_CODE
) (
  input  logic [2**RA-1:0] line,
  output logic [RB-1:0]    tau
);

  localparam int unsigned W = 2 ** RA;

  typedef logic [RB-1:0][W-1:0] m5_sel_t;

  function automatic m5_sel_t m5_sel();
    m5_sel_t s = '0;
    for (int g = 0; g < G; g++)
      for (int r = 0; r < RB; r++)
        if (AT_CODE[g][r]) s[r][AT_ADDR[g]] = 1'b1;
    return s;
  endfunction

  localparam m5_sel_t M5_SEL = m5_sel();

  or_matrix #(.NIN(W), .NOUT(RB), .SEL(M5_SEL))
    u_m5 (.in(line), .out(tau));

endmodule
