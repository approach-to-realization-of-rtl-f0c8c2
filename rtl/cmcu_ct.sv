// cmcu_ct -- microinstruction address counter CT.
//
// On each rising clock edge:
//   * start = 1            : CT <- 0 (the start word at address 0);
//   * else if en = 1, y0 = 1: CT <- CT + 1 (next vertex of the same chain);
//   * else if en = 1, y0 = 0: CT <- phi (transition address from CC);
//   * else                  : CT holds.
// The load/increment behaviour and the zero load on Start follow the
// published unit. The enable (driven by Fetch, so the counter stands still
// once the microprogram has ended), the synchronous Start and the
// asynchronous active-low reset to 0 are this design's own choices.
//
// Interface: clk, rst_n, start, en, y0, phi[RA-1:0] -> addr[RA-1:0] (the
// counter outputs T). The address is valid one edge after Start.
module cmcu_ct #(
  parameter int unsigned RA = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          en,
  input  logic          y0,
  input  logic [RA-1:0] phi,
  output logic [RA-1:0] addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr <= '0;
    else if (start)  addr <= '0;
    else if (en)     addr <= y0 ? addr + 1'b1 : phi;
  end

endmodule
