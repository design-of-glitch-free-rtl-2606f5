// tb_ds_encoder: self-checking test of the Data-Strobe encoder.
//
// Sends 500 random bits with random idle gaps. For each bit n it checks
// Data = bit, Strobe = ~Data for even n and Strobe = Data for odd n, that
// exactly one line changed from the previous bit, and that the lines hold
// while bit_valid is 0.
module tb_ds_encoder;
  logic clk = 1'b0;
  logic rst_n, bit_valid, bit_in, d_out, s_out;
  int   checks = 0, failures = 0;
  logic prev_d, prev_s;

  ds_encoder dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    rst_n = 1'b0; bit_valid = 1'b0; bit_in = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(d_out == 1'b0 && s_out == 1'b0, "idle after reset");
    prev_d = 1'b0; prev_s = 1'b0;
    for (int n = 0; n < 500; n++) begin
      int gap = $urandom_range(0, 3);
      bit_valid = 1'b0;
      repeat (gap) begin
        @(posedge clk); #1;
        check(d_out == prev_d && s_out == prev_s, "hold while idle");
      end
      bit_valid = 1'b1;
      bit_in    = 1'($urandom);
      @(posedge clk); #1;
      bit_valid = 1'b0;
      check(d_out == bit_in, "data");
      check(s_out == ((n % 2 == 0) ? ~bit_in : bit_in), "strobe rule");
      check(((d_out ^ prev_d) + (s_out ^ prev_s)) == 1, "one line changes");
      check((d_out ^ s_out) == ((n % 2 == 0) ? 1'b1 : 1'b0), "xor is bit clock");
      prev_d = d_out; prev_s = s_out;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
