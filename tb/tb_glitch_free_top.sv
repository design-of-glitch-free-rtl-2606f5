// tb_glitch_free_top: end-to-end test of the whole design at its default
// parameters (16-bit counters, 100 MHz F_CONST).
//
// Frequency detector: measures several test signals against the 10 ns clock
// and checks counts, exact f_out and accuracy; exercises a strobe hold that
// stretches the gate, a measurement dropped while the divider is busy, and a
// saturated measurement. Data-Strobe link: the transmitter outputs are looped
// into the receiver; 300 random bits, sent at random rates, must come out in
// order with no errors; then a forced change of both lines must raise the
// receiver's error flag. Each mechanism is counted and must occur.
module tb_glitch_free_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CNT_W = 16, TCNT_W = 16, F_CONST = 100_000_000;
  localparam int unsigned NUM_W = $clog2(F_CONST + 1) + CNT_W;
  localparam real TCLK = 10.0;

  logic clk = 1'b0;
  logic rst_n, cym_strobe, ref_sig, sig_utest;
  logic gate, del_ref_sig, meas_done, f_valid, f_ovf;
  logic [CNT_W-1:0]  cnt, lat_cnt_result;
  logic [TCNT_W-1:0] tcnt, lat_tcnt_result;
  logic [NUM_W-1:0]  f_out;
  logic tx_valid, tx_bit, tx_d, tx_s;
  logic rx_d, rx_s, rx_clk, rx_valid, rx_bit, rx_error;
  logic loopback, force_d, force_s;

  int   checks = 0, failures = 0;
  real  t_sig = 73.0;
  int   n_meas = 0, n_hold = 0, n_ovf = 0, n_dropped = 0;
  int   n_ds_bits = 0, n_ds_err = 0;
  logic sent [$];

  glitch_free_top dut (.*);

  assign rx_d = loopback ? tx_d : force_d;
  assign rx_s = loopback ? tx_s : force_s;

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

  // Data-Strobe receiver monitor.
  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      check(n_ds_bits < sent.size() && rx_bit == sent[n_ds_bits], "received bit");
      n_ds_bits++;
    end
    if (rst_n && rx_error) n_ds_err++;
  end

  task automatic window(input real period, input int n, input int h1, input int h2,
                        output int expected);
    t_sig = period;
    repeat (2) @(posedge sig_utest);
    #(period / 2) ref_sig = 1'b1;
    repeat (n) @(posedge sig_utest);
    #(period / 2);
    expected = n;
    if (h1 > 0) begin
      cym_strobe = 1'b0;
      repeat (h1) @(posedge sig_utest);
      #(period / 2) ref_sig = 1'b0;
      repeat (h2) @(posedge sig_utest);
      #(period / 2) cym_strobe = 1'b1;
      expected = n + h1 + h2;
      n_hold++;
    end else begin
      ref_sig = 1'b0;
    end
  endtask

  task automatic measure(input real period, input int n, input int h1, input int h2);
    int expected;
    longint unsigned fexp;
    real ftrue, err;
    window(period, n, h1, h2, expected);
    @(posedge meas_done);
    #1;
    n_meas++;
    check(lat_cnt_result == CNT_W'(expected), $sformatf("count %0d expected %0d", lat_cnt_result, expected));
    fexp = (longint'(F_CONST) * longint'(lat_cnt_result)) / longint'(lat_tcnt_result);
    repeat (NUM_W + 3) @(posedge clk);
    #1;
    check(f_out == NUM_W'(fexp), $sformatf("f_out %0d expected %0d", f_out, fexp));
    ftrue = 1.0e9 / period;
    err = (real'(f_out) - ftrue) / ftrue;
    if (err < 0) err = -err;
    check(err <= 1.0 / real'(lat_tcnt_result) + 1.0e-6, $sformatf("accuracy %f", err));
    check(f_valid && !f_ovf, "valid, no overflow");
  endtask

  initial begin
    int e1, e2;
    longint unsigned f1;
    rst_n = 1'b0; cym_strobe = 1'b1; ref_sig = 1'b0;
    tx_valid = 1'b0; tx_bit = 1'b0; loopback = 1'b1; force_d = 1'b0; force_s = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Data-Strobe link, run alongside the first measurements.
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          tx_bit = 1'($urandom);
          sent.push_back(tx_bit);
          tx_valid = 1'b1;
          @(posedge clk); #1;
          tx_valid = 1'b0;
          repeat ($urandom_range(1, 4)) @(posedge clk);
          #1;
        end
      end
      begin
        measure(73.0, 49, 0, 0);
        measure(250.0, 40, 0, 0);
        measure(61.1, 30, 5, 4);
      end
    join
    repeat (8) @(posedge clk);
    check(n_ds_bits == 300, $sformatf("all link bits received (%0d)", n_ds_bits));
    check(n_ds_err == 0, "no link errors");
    // Force both lines to change at once.
    force_d = tx_d; force_s = tx_s;
    #1 loopback = 1'b0;
    repeat (4) @(posedge clk);
    #1 force_d = ~force_d; force_s = ~force_s;
    repeat (6) @(posedge clk);
    check(n_ds_err == 1, "link error detected");

    // Measurement dropped while the divider is busy.
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

    // Saturation.
    t_sig = 997.0;
    repeat (2) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b1;
    repeat (700) @(posedge sig_utest);
    #(t_sig / 2) ref_sig = 1'b0;
    @(posedge meas_done);
    repeat (NUM_W + 5) @(posedge clk);
    #1;
    check(f_ovf == 1'b1, "overflow reported");
    if (f_ovf) n_ovf++;

    checks++; if (n_meas == 0)    begin failures++; $display("FAIL no measurement"); end
    checks++; if (n_hold == 0)    begin failures++; $display("FAIL no strobe hold"); end
    checks++; if (n_dropped == 0) begin failures++; $display("FAIL no dropped measurement"); end
    checks++; if (n_ovf == 0)     begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_ds_bits == 0) begin failures++; $display("FAIL no link bits"); end
    checks++; if (n_ds_err == 0)  begin failures++; $display("FAIL no link error"); end
    $display("measurements=%0d holds=%0d dropped=%0d overflows=%0d link_bits=%0d link_errors=%0d",
             n_meas, n_hold, n_dropped, n_ovf, n_ds_bits, n_ds_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
