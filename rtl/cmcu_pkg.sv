// cmcu_pkg -- shared constants, microprogram tables and area formulas for the
// compositional microprogram control unit (CMCU) with address converter.
//
// The unit interprets a linear flow-chart (graph-scheme of algorithm, GSA).
// Its operator vertices are grouped into operational linear chains (OLC),
// chains of vertices executed one after the other; consecutive microinstructions
// of a chain sit at consecutive addresses. Chains whose outputs lead to the
// same transitions form a class of pseudoequivalent OLC; the address converter
// maps the address of a chain output onto the code K(B) of its class, and the
// transition logic then depends on that short class code instead of the whole
// address.
//
// This package holds the worked example programmed into the unit by default:
// the six-vertex GSA with logic conditions x1..x3 and microoperations y1..y4.
//   * EX_CM_WORDS  -- control-memory contents, one word per address.
//   * EX_TR_*      -- transition table: class code, condition, target address.
//   * EX_AT_*      -- address-converter table: OLC output address -> class code.
// Word layout (microinstruction) used throughout: bit 0 = y0 (increment the
// counter), bits 1..N = y1..yN, bit N+1 = yE (end of the microprogram).
// Address bit i is D_i / T_i with D_0 the least significant bit. A class code
// is written tau1 tau2 with tau1 the most significant bit of the vector.
//
// The area functions give the size of each matrix in crosspoints, following
// the published estimate S = S_M1 + ... + S_M5 for the matrix realization.
package cmcu_pkg;

  // ---- Sizes of the worked example ---------------------------------------
  localparam int unsigned EX_L  = 3;  // logic conditions x1..x3
  localparam int unsigned EX_N  = 4;  // microoperations y1..y4
  localparam int unsigned EX_RA = 3;  // address bits, ceil(log2 M), M = 6
  localparam int unsigned EX_RB = 2;  // class-code bits, three classes
  localparam int unsigned EX_H  = 5;  // rows of the transition table
  localparam int unsigned EX_G  = 4;  // OLC outputs (rows of converter table)

  // ---- Control memory (one word per address, {yE, y4..y1, y0}) ------------
  localparam logic [2**EX_RA-1:0][EX_N+1:0] EX_CM_WORDS = {
    6'b000000,   // 111  unused
    6'b111010,   // 110  b6: y1 y3 y4 yE   (output O4)
    6'b001001,   // 101  b5: y0 y3
    6'b000100,   // 100  b4: y2             (output O3)
    6'b010010,   // 011  b3: y1 y4          (output O2)
    6'b001101,   // 010  b2: y0 y2 y3
    6'b001010,   // 001  b1: y1 y3          (output O1)
    6'b000001    // 000  b0: y0, start word
  };

  // ---- Transition table (rows h = 1..5 stored at index h-1) ----------------
  // Condition: x bits selected by XCARE must equal XVAL. x[0] = x1.
  localparam logic [EX_H-1:0][EX_RB-1:0] EX_TR_CODE = {
    2'b01,  // h5  B1: x2 x3      -> 110
    2'b01,  // h4  B1: ~x2        -> 101
    2'b01,  // h3  B1: x2 ~x3     -> 010
    2'b00,  // h2  B0: ~x1        -> 100
    2'b00   // h1  B0: x1         -> 010
  };
  localparam logic [EX_H-1:0][EX_L-1:0] EX_TR_XCARE = {
    3'b110, 3'b010, 3'b110, 3'b001, 3'b001
  };
  localparam logic [EX_H-1:0][EX_L-1:0] EX_TR_XVAL = {
    3'b110, 3'b000, 3'b010, 3'b000, 3'b001
  };
  localparam logic [EX_H-1:0][EX_RA-1:0] EX_TR_ADDR = {
    3'b110, 3'b101, 3'b010, 3'b100, 3'b010
  };

  // ---- Address converter table (rows g = 1..4 stored at index g-1) ---------
  localparam logic [EX_G-1:0][EX_RA-1:0] EX_AT_ADDR = {
    3'b110,  // O4 -> B2
    3'b100,  // O3 -> B1
    3'b011,  // O2 -> B1
    3'b001   // O1 -> B0
  };
  localparam logic [EX_G-1:0][EX_RB-1:0] EX_AT_CODE = {
    2'b10, 2'b01, 2'b01, 2'b00
  };

  // ---- Matrix area estimate (crosspoints) ----------------------------------
  function automatic int unsigned area_m1(int unsigned l, int unsigned rb, int unsigned h);
    return 2 * (l + rb) * h;
  endfunction
  function automatic int unsigned area_m2(int unsigned h, int unsigned ra);
    return h * ra;
  endfunction
  function automatic int unsigned area_m3(int unsigned ra);
    return 2 * (ra + 1) * (2 ** ra);
  endfunction
  function automatic int unsigned area_m4(int unsigned ra, int unsigned n);
    return (2 ** ra) * (n + 2);
  endfunction
  function automatic int unsigned area_m5(int unsigned ra, int unsigned rb);
    return (2 ** ra) * rb;
  endfunction
  function automatic int unsigned area_total(int unsigned l, int unsigned n, int unsigned ra,
                                             int unsigned rb, int unsigned h);
    return area_m1(l, rb, h) + area_m2(h, ra) + area_m3(ra) + area_m4(ra, n) + area_m5(ra, rb);
  endfunction

endpackage
