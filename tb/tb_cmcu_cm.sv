// tb_cmcu_cm -- self-checking test of the control memory CM (M3 + M4).
// For every address with Fetch = 1 the word is compared with the
// microoperations of the example flow-chart vertex placed there (start word
// y0; b1 y1 y3; b2 y0 y2 y3; b3 y1 y4; b4 y2; b5 y0 y3; b6 y1 y3 y4 yE;
// address 7 unused), and the word line must be one-hot at that address.
// With Fetch = 0 both lines and word must be zero.
module tb_cmcu_cm;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       fetch;
  logic [2:0] addr;
  logic [7:0] line;
  logic [5:0] word;
  cmcu_cm dut (.fetch(fetch), .addr(addr), .line(line), .word(word));

  // Expected microoperation sets; index 0 = y0, 1..4 = y1..y4, 5 = yE.
  function automatic logic [5:0] ops(int a);
    logic [5:0] w = '0;
    case (a)
      0: w[0] = 1;
      1: begin w[1] = 1; w[3] = 1; end
      2: begin w[0] = 1; w[2] = 1; w[3] = 1; end
      3: begin w[1] = 1; w[4] = 1; end
      4: w[2] = 1;
      5: begin w[0] = 1; w[3] = 1; end
      6: begin w[1] = 1; w[3] = 1; w[4] = 1; w[5] = 1; end
      default: ;
    endcase
    return w;
  endfunction

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int a = 0; a < 8; a++) begin
        fetch = f[0];
        addr  = 3'(a);
        #1;
        checks++;
        if (word !== (f ? ops(a) : 6'b0)) begin
          failures++;
          $display("FAIL fetch=%0d addr=%0d word=%b", f, a, word);
        end
        checks++;
        if (line !== (f ? 8'(1 << a) : 8'b0)) begin
          failures++;
          $display("FAIL fetch=%0d addr=%0d line=%b", f, a, line);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
