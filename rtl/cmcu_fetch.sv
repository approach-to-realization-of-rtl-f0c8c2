// cmcu_fetch -- flip-flop T that produces the Fetch signal.
//
// A clocked RS flip-flop: Start sets it (Fetch = 1, the microprogram runs),
// the microoperation yE resets it (Fetch = 0, the unit stops). Fetch enables
// the address decoder of the control memory, so with Fetch = 0 no
// microinstruction is read. Set and reset come from the published unit;
// making it synchronous, giving Start priority over yE and adding an
// asynchronous active-low reset to 0 are this design's own choices.
//
// Interface: clk, rst_n, start (S), ye (R) -> fetch. Changes one edge after
// its inputs.
module cmcu_fetch (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic ye,
  output logic fetch
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      fetch <= 1'b0;
    else if (start)  fetch <= 1'b1;
    else if (ye)     fetch <= 1'b0;
  end

endmodule
