// tb_ds_decoder: self-checking test of the Data-Strobe receiver.
//
// Encodes 400 random bits with an independent model of the line code and
// drives them, each held for 2 to 5 clk cycles, into the receiver. Checks the
// received bit sequence, the recovered clock level for each bit, the absence
// of errors, and the three-cycle latency. Finally it changes both lines at
// once and checks that ds_error is raised.
module tb_ds_decoder;
  logic clk = 1'b0;
  logic rst_n, d_in, s_in, rclk, bit_valid, bit_out, ds_error;
  int   checks = 0, failures = 0;
  logic sent [$];
  int   rx_n = 0, errors = 0;
  int   tx_time [$];
  int   cycle = 0;

  ds_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
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

  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      check(rx_n < sent.size(), "no extra bits");
      if (rx_n < sent.size()) begin
        check(bit_out == sent[rx_n], "bit value");
        check(rclk == ((rx_n % 2 == 0) ? 1'b1 : 1'b0), "recovered clock level");
        check(cycle - tx_time[rx_n] == 3, "latency 3 cycles");
      end
      rx_n++;
    end
    if (rst_n && ds_error) errors++;
  end

  initial begin
    logic b;
    rst_n = 1'b0; d_in = 1'b0; s_in = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      b = 1'($urandom);
      sent.push_back(b);
      d_in = b;
      s_in = (n % 2 == 0) ? ~b : b;
      tx_time.push_back(cycle + 1);
      repeat ($urandom_range(2, 5)) @(posedge clk);
      #1;
    end
    repeat (6) @(posedge clk);
    check(rx_n == 400, "all bits received");
    check(errors == 0, "no line errors on a valid stream");
    #1 d_in = ~d_in; s_in = ~s_in;
    repeat (6) @(posedge clk);
    check(errors == 1, "both lines changing is flagged");
    $display("received=%0d errors=%0d", rx_n, errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
