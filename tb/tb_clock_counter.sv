// tb_clock_counter: self-checking test of the gated double counter.
//
// A free-running test signal of period T (not a multiple of the 10 ns clock)
// is measured over reference windows whose edges fall in the middle of a
// test period. With the gate opened and closed on test-signal edges, the
// latched edge count must equal the number of test rising edges inside the
// window (extended to the end of any strobe hold), and the clock count must
// equal that many test periods to within one clock. Cases: several periods,
// a strobe hold across the end of the window (gate stretched), a strobe hold
// across the start, and a window long enough to saturate the clock counter.
module tb_clock_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int CNT_W = 16, TCNT_W = 16;
  localparam real TCLK = 10.0;

  logic clk = 1'b0;
  logic rst_n, strobe, ref_sig, sig_utest;
  logic gate, del_ref_sig, ovf, meas_done;
  logic [CNT_W-1:0]  cnt, lat_cnt_result;
  logic [TCNT_W-1:0] tcnt, lat_tcnt_result;
  int   checks = 0, failures = 0;
  real  t_sig = 73.0;
  int   n_meas = 0, n_hold = 0, n_ovf = 0, n_del = 0;

  clock_counter dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    sig_utest = 1'b0;
    #3.3;
    forever begin
      #(t_sig / 2) sig_utest = 1'b1;
      #(t_sig / 2) sig_utest = 1'b0;
    end
  end

  always @(posedge clk) if (meas_done) n_meas++;
  logic del_prev = 1'b0;
  always @(posedge clk) begin
    if (rst_n && del_ref_sig != del_prev) n_del++;
    del_prev <= del_ref_sig;
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

  // One measurement: ref high for n test periods; optionally strobe is
  // dropped h1 periods before ref falls and restored h2 periods after it.
  // hold_start drops strobe across the rise of ref instead.
  task automatic measure(input real period, input int n, input int h1, input int h2,
                         input bit hold_end, input bit hold_start);
    int expected;
    real ts;
    t_sig = period;
    repeat (3) @(posedge sig_utest);
    #(period / 2);
    if (hold_start) strobe = 1'b0;
    ref_sig = 1'b1;
    expected = 0;
    if (hold_start) begin
      repeat (h1) @(posedge sig_utest);
      #(period / 2);
      strobe = 1'b1;
    end
    repeat (n) @(posedge sig_utest);
    #(period / 2);
    expected = n;
    if (hold_end) begin
      strobe = 1'b0;
      repeat (h1) @(posedge sig_utest);
      #(period / 2);
      ref_sig = 1'b0;
      repeat (h2) @(posedge sig_utest);
      #(period / 2);
      strobe = 1'b1;
      expected = n + h1 + h2;
      n_hold++;
    end else begin
      ref_sig = 1'b0;
    end
    @(posedge meas_done);
    #1;
    check(lat_cnt_result == CNT_W'(expected), $sformatf("edge count %0d expected %0d", lat_cnt_result, expected));
    ts = expected * period / TCLK;
    check((real'(lat_tcnt_result) - ts) <= 1.0 && (ts - real'(lat_tcnt_result)) <= 1.0,
          $sformatf("clock count %0d expected %f", lat_tcnt_result, ts));
    check(ovf == 1'b0, "no overflow");
    check(cnt == '0 && tcnt == '0, "counters cleared");
  endtask

  initial begin
    rst_n = 1'b0; strobe = 1'b1; ref_sig = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(gate == 1'b0, "gate closed after reset");
    measure(73.0, 49, 0, 0, 0, 0);
    measure(47.3, 20, 0, 0, 0, 0);
    measure(131.7, 10, 0, 0, 0, 0);
    measure(1000.0, 3, 0, 0, 0, 0);
    measure(61.1, 30, 5, 4, 1, 0);
    measure(88.8, 12, 6, 0, 0, 1);
    for (int i = 0; i < 5; i++)
      measure(40.0 + real'($urandom_range(0, 2000)) / 10.0, $urandom_range(1, 60), 0, 0, 0, 0);
    // Saturation: 700 us window at 10 ns clock exceeds 2**16 - 1 clocks.
    t_sig = 997.0;
    repeat (2) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b1;
    repeat (700) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b0;
    @(posedge meas_done);
    #1;
    check(ovf == 1'b1, "overflow flagged");
    check(lat_tcnt_result == '1, "clock count saturated");
    if (ovf) n_ovf++;
    repeat (2) @(posedge clk);
    check(n_meas == 12, $sformatf("measurement count %0d", n_meas));
    check(n_hold > 0 && n_ovf > 0 && n_del > 0, "hold, overflow and delayed reference all seen");
    $display("measurements=%0d holds=%0d overflows=%0d", n_meas, n_hold, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
