// tb_cmcu_cc -- self-checking test of the transition circuit CC (M1 + M2)
// with the example transition table. All 4 class codes x 8 condition vectors
// are applied; the expected address comes from reading the flow-chart
// directly: after class B0 (chain alpha1) x1 selects b2 (010) else b4 (100);
// after class B1 (chains alpha2, alpha3) ~x2 selects b5 (101), x2 x3 selects
// b6 (110) and x2 ~x3 loops back to b2 (010); class B2 has no transitions.
// Exactly one product term must be active for B0 and B1.
module tb_cmcu_cc;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] tau;
  logic [2:0] x, d;
  logic [4:0] f;
  cmcu_cc dut (.tau(tau), .x(x), .d(d), .f(f));

  function automatic logic [2:0] ref_d(logic [1:0] t, logic [2:0] xv);
    case (t)
      2'b00:   return xv[0] ? 3'b010 : 3'b100;
      2'b01:   return !xv[1] ? 3'b101 : (xv[2] ? 3'b110 : 3'b010);
      default: return 3'b000;
    endcase
  endfunction

  function automatic int ref_row(logic [1:0] t, logic [2:0] xv);
    case (t)
      2'b00:   return xv[0] ? 0 : 1;
      2'b01:   return !xv[1] ? 3 : (xv[2] ? 4 : 2);
      default: return -1;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 4; t++) begin
      for (int v = 0; v < 8; v++) begin
        int row;
        tau = 2'(t);
        x   = 3'(v);
        #1;
        checks++;
        if (d !== ref_d(tau, x)) begin
          failures++;
          $display("FAIL tau=%b x=%b d=%b exp=%b", tau, x, d, ref_d(tau, x));
        end
        row = ref_row(tau, x);
        checks++;
        if ((row < 0 && f !== '0) || (row >= 0 && f !== 5'(1 << row))) begin
          failures++;
          $display("FAIL tau=%b x=%b f=%b exp row %0d", tau, x, f, row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
