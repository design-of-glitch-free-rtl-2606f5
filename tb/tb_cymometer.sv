// tb_cymometer: self-checking test of the frequency detector.
//
// Measures test signals of known period T against a 10 ns (100 MHz) clock.
// For every measurement it checks that the edge count is the number of test
// rising edges in the reference window, that f_out equals
// F_CONST * count / clocks exactly, that f_out is within one clock count of
// the true frequency 1e9 / T Hz, and that f_out updates NUM_W + 3 cycles after
// meas_done. It also checks a strobe hold that stretches the gate, a
// measurement that arrives while the divider is busy (counted but not
// divided), and a saturated measurement (f_ovf).
module tb_cymometer;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CNT_W = 16, TCNT_W = 16, F_CONST = 100_000_000;
  localparam int unsigned NUM_W = $clog2(F_CONST + 1) + CNT_W;
  localparam real TCLK = 10.0;

  logic clk = 1'b0;
  logic rst_n, strobe, ref_sig, sig_utest;
  logic gate, del_ref_sig, meas_done, f_valid, f_ovf;
  logic [CNT_W-1:0]  cnt, lat_cnt_result;
  logic [TCNT_W-1:0] tcnt, lat_tcnt_result;
  logic [NUM_W-1:0]  f_out;
  int   checks = 0, failures = 0;
  real  t_sig = 73.0;
  int   n_meas = 0, n_hold = 0, n_ovf = 0, n_dropped = 0;

  cymometer dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    sig_utest = 1'b0;
    #3.3;
    forever begin
      #(t_sig / 2) sig_utest = 1'b1;
      #(t_sig / 2) sig_utest = 1'b0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  // Opens the reference window for n test periods (plus h1 + h2 periods of
  // strobe hold across its end when h1 > 0) and returns the expected count.
  task automatic window(input real period, input int n, input int h1, input int h2,
                        output int expected);
    t_sig = period;
    repeat (2) @(posedge sig_utest);
    #(period / 2) ref_sig = 1'b1;
    repeat (n) @(posedge sig_utest);
    #(period / 2);
    expected = n;
    if (h1 > 0) begin
      strobe = 1'b0;
      repeat (h1) @(posedge sig_utest);
      #(period / 2) ref_sig = 1'b0;
      repeat (h2) @(posedge sig_utest);
      #(period / 2) strobe = 1'b1;
      expected = n + h1 + h2;
      n_hold++;
    end else begin
      ref_sig = 1'b0;
    end
  endtask

  task automatic measure(input real period, input int n, input int h1, input int h2);
    int expected, lat;
    longint unsigned fexp;
    real ftrue, err;
    window(period, n, h1, h2, expected);
    @(posedge meas_done);
    #1;
    n_meas++;
    check(lat_cnt_result == CNT_W'(expected), $sformatf("count %0d expected %0d", lat_cnt_result, expected));
    fexp = (longint'(F_CONST) * longint'(lat_cnt_result)) / longint'(lat_tcnt_result);
    lat = 0;
    while (f_out != NUM_W'(fexp) || lat == 0) begin
      @(posedge clk); #1;
      lat++;
      if (lat > 200) break;
    end
    check(lat == NUM_W + 3, $sformatf("result latency %0d", lat));
    check(f_out == NUM_W'(fexp), $sformatf("f_out %0d expected %0d", f_out, fexp));
    ftrue = 1.0e9 / period;
    err = (real'(f_out) - ftrue) / ftrue;
    if (err < 0) err = -err;
    check(err <= 1.0 / real'(lat_tcnt_result) + 1.0e-6,
          $sformatf("f_out %0d true %f relative error %f", f_out, ftrue, err));
    check(f_valid && !f_ovf, "valid, no overflow");
  endtask

  initial begin
    int e1, e2;
    longint unsigned f1;
    rst_n = 1'b0; strobe = 1'b1; ref_sig = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!f_valid && f_out == '0, "no result after reset");
    measure(73.0, 49, 0, 0);
    measure(47.3, 200, 0, 0);
    measure(1234.5, 20, 0, 0);
    measure(61.1, 30, 5, 4);
    for (int i = 0; i < 4; i++)
      measure(40.0 + real'($urandom_range(0, 5000)) / 10.0, $urandom_range(5, 100), 0, 0);
    // Two short windows back to back: the second ends while the divider is
    // still busy with the first, so f_out keeps the first result.
    window(50.0, 4, 0, 0, e1);
    @(posedge meas_done); #1;
    f1 = (longint'(F_CONST) * longint'(lat_cnt_result)) / longint'(lat_tcnt_result);
    window(50.0, 2, 0, 0, e2);
    @(posedge meas_done); #1;
    check(lat_cnt_result == CNT_W'(e2), "second short window counted");
    repeat (NUM_W + 10) @(posedge clk);
    #1;
    check(f_out == NUM_W'(f1), "measurement during divide is dropped");
    n_dropped++;
    // Saturation: a 700 us window at 10 ns clock exceeds 2**16 - 1 clocks.
    t_sig = 997.0;
    repeat (2) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b1;
    repeat (700) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b0;
    @(posedge meas_done);
    repeat (NUM_W + 5) @(posedge clk);
    #1;
    check(f_ovf == 1'b1, "overflow reported with result");
    if (f_ovf) n_ovf++;
    check(n_hold > 0 && n_ovf > 0 && n_dropped > 0, "hold, overflow and drop all seen");
    $display("measurements=%0d holds=%0d overflows=%0d dropped=%0d", n_meas, n_hold, n_ovf, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
