// tb_cmcu_fetch -- self-checking test of the Fetch flip-flop T.
// Directed cases (set, hold, reset by yE, Start winning over yE) followed by
// random set/reset stimulus compared with a reference flip-flop.
module tb_cmcu_fetch;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, start, ye, fetch, model;
  cmcu_fetch dut (.clk(clk), .rst_n(rst_n), .start(start), .ye(ye), .fetch(fetch));

  task automatic step(input logic s, input logic r, input logic exp);
    @(negedge clk);
    start = s; ye = r;
    @(posedge clk); #1;
    checks++;
    if (fetch !== exp) begin
      failures++;
      $display("FAIL start=%b ye=%b fetch=%b exp=%b", s, r, fetch, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; ye = 1'b0;
    #12;
    checks++;
    if (fetch !== 1'b0) begin failures++; $display("FAIL reset fetch=%b", fetch); end
    @(negedge clk) rst_n = 1'b1;
    step(1, 0, 1);   // Start sets
    step(0, 0, 1);   // holds
    step(0, 1, 0);   // yE clears
    step(0, 0, 0);   // holds cleared
    step(1, 1, 1);   // Start has priority
    model = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      logic s, r;
      s = ($urandom_range(0, 3) == 0);
      r = ($urandom_range(0, 2) == 0);
      if (s)      model = 1'b1;
      else if (r) model = 1'b0;
      step(s, r, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
