// tb_cmcu_u1 -- end-to-end test of the control unit with its default
// (example) microprogram, all parameters at their defaults.
//
// The reference is the flow-chart itself, walked vertex by vertex:
//   b0 (start word, y0) -> b1 (y1 y3) -> x1 ? b2 : b4
//   b2 (y0 y2 y3) -> b3 (y1 y4) -> [x2 test]
//   b4 (y2)                     -> [x2 test]
//   [x2 test]: ~x2 -> b5;  x2 & x3 -> b6;  x2 & ~x3 -> b2 (loop)
//   b5 (y0 y3) -> b6 (y1 y3 y4 yE) -> end
// Each run pulses Start, then drives random conditions every cycle and
// compares y1..y4, y0, yE and Fetch with the vertex the reference is in. A
// run of P vertices must keep Fetch high for exactly P cycles, after which
// all outputs must stay zero. The test counts how often each mechanism
// occurred (Start load, counter increment, each of the five transitions of
// the transition table, the loop back to b2, each class code at a chain
// output, termination by yE, idle after the end, Start during a run) and
// counts a failure for any that never occurred. It also checks the matrix
// area of the example against the hand-worked figures.
module tb_cmcu_u1;
  import cmcu_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int RUNS = 400;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rst_n, start;
  logic [2:0] x;
  logic [3:0] y;
  logic       y0, ye, fetch;
  logic [2:0] addr;
  logic [1:0] tau;

  cmcu_u1 dut (
    .clk(clk), .rst_n(rst_n), .start(start), .x(x),
    .y(y), .y0(y0), .ye(ye), .fetch(fetch), .addr(addr), .tau(tau)
  );

  // Microoperations of a vertex: {yE, y4, y3, y2, y1, y0}
  function automatic logic [5:0] vertex_ops(int b);
    case (b)
      0: return 6'b000001;
      1: return 6'b001010;
      2: return 6'b001101;
      3: return 6'b010010;
      4: return 6'b000100;
      5: return 6'b001001;
      6: return 6'b111010;
      default: return 6'b000000;
    endcase
  endfunction

  // Class code seen by the transition logic at each chain output
  function automatic logic [1:0] vertex_class(int b);
    case (b)
      1: return 2'b00;
      3, 4: return 2'b01;
      6: return 2'b10;
      default: return 2'b00;
    endcase
  endfunction

  // mechanism counters
  int n_start, n_inc, n_t1, n_t2, n_t3, n_t4, n_t5, n_end, n_idle, n_restart;
  int n_cls [3];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t addr=%0d y=%b y0=%b ye=%b fetch=%b)", what, $time, addr, y, y0, ye, fetch);
    end
  endtask

  // One microprogram run. If abort_at >= 0, Start is pulsed again at that
  // step to check that a restart from the middle of a run works.
  task automatic run(input int abort_at, output int cycles);
    int b, nb, step;
    logic [5:0] w;
    @(negedge clk);
    start = 1'b1;
    x = 3'($urandom);
    @(posedge clk);
    #1;
    start = 1'b0;
    n_start++;
    check("fetch set by start", fetch === 1'b1);
    check("address cleared by start", addr === 3'd0);
    b = 0;
    step = 0;
    cycles = 0;
    while (b >= 0) begin
      @(negedge clk);
      x = 3'($urandom);
      #1;
      w = vertex_ops(b);
      check($sformatf("ops of b%0d", b), {ye, y, y0} === w);
      check("fetch high during run", fetch === 1'b1);
      if (!w[0]) begin
        check($sformatf("class code at output b%0d", b), tau === vertex_class(b));
        n_cls[vertex_class(b)]++;
      end
      cycles++;
      if (step == abort_at) begin
        n_restart++;
        return;
      end
      // reference next vertex
      case (b)
        0: nb = 1;
        1: begin nb = x[0] ? 2 : 4; if (x[0]) n_t1++; else n_t2++; end
        2: nb = 3;
        3, 4: begin
          if (!x[1])    begin nb = 5; n_t4++; end
          else if (x[2]) begin nb = 6; n_t5++; end
          else          begin nb = 2; n_t3++; end
        end
        5: nb = 6;
        default: nb = -1;
      endcase
      if (w[0]) n_inc++;
      @(posedge clk);
      #1;
      if (nb >= 0) check($sformatf("next address after b%0d", b), addr === 3'(nb));
      b = nb;
      step++;
      if (cycles > 500) begin
        check("run too long", 1'b0);
        return;
      end
    end
    n_end++;
    // terminated: outputs idle, fetch low, counter held, for a few cycles
    for (int i = 0; i < 3; i++) begin
      logic [2:0] held;
      held = addr;
      check("fetch cleared by yE", fetch === 1'b0);
      check("outputs idle after end", {ye, y, y0} === 6'b0);
      @(negedge clk);
      x = 3'($urandom);
      @(posedge clk); #1;
      check("counter holds after end", addr === held);
      n_idle++;
    end
  endtask

  initial begin
    int cyc, total;
    rst_n = 1'b0; start = 1'b0; x = '0;
    n_start = 0; n_inc = 0; n_t1 = 0; n_t2 = 0; n_t3 = 0; n_t4 = 0; n_t5 = 0;
    n_end = 0; n_idle = 0; n_restart = 0;
    foreach (n_cls[i]) n_cls[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    check("idle after reset", fetch === 1'b0 && {ye, y, y0} === 6'b0);
    rst_n = 1'b1;

    // A fixed run: x1 = 1, then x2 = 1, x3 = 1 -> b0 b1 b2 b3 b6: 5 cycles
    begin
      @(negedge clk); start = 1'b1; x = 3'b111;
      @(posedge clk); #1; start = 1'b0;
      cyc = 0;
      while (fetch) begin
        @(posedge clk); #1;
        cyc++;
        if (cyc > 50) break;
      end
      check("fixed path b0 b1 b2 b3 b6 takes 5 cycles", cyc == 5);
    end
    // A fixed run: x1 = 0, x2 = 0 -> b0 b1 b4 b5 b6: 5 cycles
    begin
      @(negedge clk); start = 1'b1; x = 3'b000;
      @(posedge clk); #1; start = 1'b0;
      cyc = 0;
      while (fetch) begin
        @(posedge clk); #1;
        cyc++;
        if (cyc > 50) break;
      end
      check("fixed path b0 b1 b4 b5 b6 takes 5 cycles", cyc == 5);
    end

    total = 0;
    for (int r = 0; r < RUNS; r++) begin
      run((r % 25 == 7) ? int'($urandom_range(0, 4)) : -1, cyc);
      total += cyc;
    end

    // matrix area of the example, worked by hand: L=3 N=4 RA=3 RB=2 H=5
    check("area M1", area_m1(3, 2, 5) == 50);
    check("area M2", area_m2(5, 3) == 15);
    check("area M3", area_m3(3) == 64);
    check("area M4", area_m4(3, 4) == 48);
    check("area M5", area_m5(3, 2) == 16);
    check("area total", area_total(3, 4, 3, 2, 5) == 193);

    $display("runs=%0d cycles=%0d start=%0d inc=%0d t1=%0d t2=%0d t3(loop)=%0d t4=%0d t5=%0d",
             RUNS, total, n_start, n_inc, n_t1, n_t2, n_t3, n_t4, n_t5);
    $display("class B0=%0d B1=%0d B2=%0d end=%0d idle=%0d restart=%0d area=%0d",
             n_cls[0], n_cls[1], n_cls[2], n_end, n_idle, n_restart, area_total(3, 4, 3, 2, 5));
    check("mechanism start", n_start > 0);
    check("mechanism increment", n_inc > 0);
    check("mechanism B0 x1", n_t1 > 0);
    check("mechanism B0 ~x1", n_t2 > 0);
    check("mechanism B1 loop x2 ~x3", n_t3 > 0);
    check("mechanism B1 ~x2", n_t4 > 0);
    check("mechanism B1 x2 x3", n_t5 > 0);
    check("mechanism class B0", n_cls[0] > 0);
    check("mechanism class B1", n_cls[1] > 0);
    check("mechanism class B2", n_cls[2] > 0);
    check("mechanism end by yE", n_end > 0);
    check("mechanism idle after end", n_idle > 0);
    check("mechanism restart", n_restart > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
