// tb_freq_divider: self-checking test of the scaling divider.
//
// Runs directed and random (num, den) pairs at the default F_CONST and widths,
// compares quot with (F_CONST * num) / den computed in 64-bit arithmetic,
// checks the NUM_W + 2 cycle latency from start to done, that a start while
// busy is ignored, and that a zero divisor gives an all-ones quotient.
module tb_freq_divider;
  localparam int unsigned CNT_W = 16, TCNT_W = 16, F_CONST = 100_000_000;
  localparam int unsigned NUM_W = $clog2(F_CONST + 1) + CNT_W;

  logic clk = 1'b0;
  logic rst_n, start, busy, done;
  logic [CNT_W-1:0]  num;
  logic [TCNT_W-1:0] den;
  logic [NUM_W-1:0]  quot;
  int   checks = 0, failures = 0;

  freq_divider dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic divide(input logic [CNT_W-1:0] n, input logic [TCNT_W-1:0] d, input bit poke);
    longint unsigned expected;
    int cycles;
    expected = (d == 0) ? {NUM_W{1'b1}} : (longint'(F_CONST) * longint'(n)) / longint'(d);
    num = n; den = d; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 1;
    if (poke) begin
      // A second start while busy must not disturb the division.
      num = ~n; den = d + 1'b1; start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      cycles++;
    end
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles == NUM_W + 2, $sformatf("latency %0d", cycles));
    check(quot == NUM_W'(expected), $sformatf("%0d*%0d/%0d = %0d, expected %0d", F_CONST, n, d, quot, expected));
    @(posedge clk); #1;
    check(!done && !busy && quot == NUM_W'(expected), "idle and result held");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; num = '0; den = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    divide(49, 358, 0);
    divide(1, 1, 0);
    divide('1, 1, 0);
    divide('1, '1, 0);
    divide(0, 77, 0);
    divide(3, 0, 0);
    divide(1234, 4321, 1);
    for (int i = 0; i < 300; i++)
      divide(CNT_W'($urandom), TCNT_W'($urandom_range(1, 65535)), i % 7 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
