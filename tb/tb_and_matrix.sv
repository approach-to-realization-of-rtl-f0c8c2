// tb_and_matrix -- self-checking test of the conjunctive matrix.
// Two instances: the default personality (a 2-to-4 decoder, checked against a
// one-hot table) and a 4-input, 5-row personality with mixed true/complement
// literals and an empty row, checked exhaustively against a literal-by-literal
// reference evaluation.
module tb_and_matrix;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Default: decoder
  logic [1:0] din;
  logic [3:0] dterm;
  and_matrix u_dec (.in(din), .term(dterm));

  // Custom personality
  localparam logic [4:0][3:0] T_SEL = {4'b0000, 4'b1001, 4'b0100, 4'b0011, 4'b1111};
  localparam logic [4:0][3:0] C_SEL = {4'b0000, 4'b0110, 4'b0011, 4'b0100, 4'b0000};
  logic [3:0] cin;
  logic [4:0] cterm;
  and_matrix #(.NIN(4), .NTERM(5), .TRUE_SEL(T_SEL), .COMP_SEL(C_SEL)) u_c (.in(cin), .term(cterm));

  function automatic logic ref_term(logic [3:0] v, logic [3:0] t, logic [3:0] c);
    logic r = 1'b1;
    for (int i = 0; i < 4; i++) begin
      if (t[i] && !v[i]) r = 1'b0;
      if (c[i] && v[i])  r = 1'b0;
    end
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 4; v++) begin
      din = 2'(v);
      #1;
      checks++;
      if (dterm !== 4'(1 << v)) begin
        failures++;
        $display("FAIL decoder in=%0d term=%b", v, dterm);
      end
    end
    for (int v = 0; v < 16; v++) begin
      cin = 4'(v);
      #1;
      for (int h = 0; h < 5; h++) begin
        checks++;
        if (cterm[h] !== ref_term(4'(v), T_SEL[h], C_SEL[h])) begin
          failures++;
          $display("FAIL custom in=%b row=%0d got=%b", cin, h, cterm[h]);
        end
      end
    end
    // hand-worked spot checks: row1 = in0 & in1 & ~in2, row3 = in0 & in3 & ~in1 & ~in2
    cin = 4'b0011; #1; checks++; if (cterm !== 5'b10010) begin failures++; $display("FAIL spot1 %b", cterm); end
    cin = 4'b1001; #1; checks++; if (cterm !== 5'b11000) begin failures++; $display("FAIL spot2 %b", cterm); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
