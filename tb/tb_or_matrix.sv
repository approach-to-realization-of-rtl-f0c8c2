// tb_or_matrix -- self-checking test of the disjunctive matrix.
// The default personality (4-to-2 encoder) is checked on one-hot inputs; a
// 6-line, 3-output personality is checked exhaustively against a reference
// OR over the programmed crosspoints.
module tb_or_matrix;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] ein;
  logic [1:0] eout;
  or_matrix u_enc (.in(ein), .out(eout));

  localparam logic [2:0][5:0] SEL = {6'b100001, 6'b000000, 6'b011010};
  logic [5:0] cin;
  logic [2:0] cout;
  or_matrix #(.NIN(6), .NOUT(3), .SEL(SEL)) u_c (.in(cin), .out(cout));

  initial begin
    for (int i = 0; i < 4; i++) begin
      ein = 4'(1 << i);
      #1;
      checks++;
      if (eout !== 2'(i)) begin
        failures++;
        $display("FAIL encoder line=%0d out=%b", i, eout);
      end
    end
    for (int v = 0; v < 64; v++) begin
      logic [2:0] exp;
      cin = 6'(v);
      #1;
      exp = '0;
      for (int j = 0; j < 3; j++)
        for (int i = 0; i < 6; i++)
          if (SEL[j][i] && cin[i]) exp[j] = 1'b1;
      checks++;
      if (cout !== exp) begin
        failures++;
        $display("FAIL custom in=%b out=%b exp=%b", cin, cout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
