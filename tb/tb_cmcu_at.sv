// tb_cmcu_at -- self-checking test of the address converter AT (M5).
// Each one-hot word line is applied; outputs of chains alpha1 (address 1)
// map to class B0 = 00, alpha2 (3) and alpha3 (4) to B1 = 01, alpha4 (6) to
// B2 = 10; every other address and an idle (all-zero) line give 00.
module tb_cmcu_at;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] line;
  logic [1:0] tau;
  cmcu_at dut (.line(line), .tau(tau));

  function automatic logic [1:0] ref_tau(int a);
    case (a)
      3, 4:    return 2'b01;
      6:       return 2'b10;
      default: return 2'b00;
    endcase
  endfunction

  initial begin
    line = '0;
    #1;
    checks++;
    if (tau !== 2'b00) begin failures++; $display("FAIL idle tau=%b", tau); end
    for (int a = 0; a < 8; a++) begin
      line = 8'(1 << a);
      #1;
      checks++;
      if (tau !== ref_tau(a)) begin
        failures++;
        $display("FAIL addr=%0d tau=%b exp=%b", a, tau, ref_tau(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
