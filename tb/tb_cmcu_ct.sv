// tb_cmcu_ct -- self-checking test of the address counter CT.
// Random start/en/y0/phi stimulus for 3000 cycles, compared each cycle with a
// reference counter kept in the testbench; also a directed check that the
// counter wraps from 7 to 0 and that reset clears it.
module tb_cmcu_ct;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, start, en, y0;
  logic [2:0] phi, addr;
  logic [2:0] model;
  cmcu_ct #(.RA(3)) dut (.clk(clk), .rst_n(rst_n), .start(start), .en(en), .y0(y0), .phi(phi), .addr(addr));

  initial begin
    rst_n = 1'b0; start = 1'b0; en = 1'b0; y0 = 1'b0; phi = 3'd5;
    #12;
    checks++;
    if (addr !== 3'd0) begin failures++; $display("FAIL reset addr=%0d", addr); end
    @(negedge clk) rst_n = 1'b1;
    model = 3'd0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      start = ($urandom_range(0, 15) == 0);
      en    = ($urandom_range(0, 7) != 0);
      y0    = $urandom_range(0, 1) == 1;
      phi   = 3'($urandom);
      @(posedge clk);
      if (start)   model = 3'd0;
      else if (en) model = y0 ? model + 3'd1 : phi;
      #1;
      checks++;
      if (addr !== model) begin
        failures++;
        $display("FAIL cycle %0d addr=%0d exp=%0d", c, addr, model);
      end
    end
    // wrap-around: load 7, increment once
    @(negedge clk); start = 0; en = 1; y0 = 0; phi = 3'd7;
    @(negedge clk); y0 = 1;
    @(negedge clk); en = 0;
    checks++;
    if (addr !== 3'd0) begin failures++; $display("FAIL wrap addr=%0d", addr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
