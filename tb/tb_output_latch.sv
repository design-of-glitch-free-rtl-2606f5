// tb_output_latch: self-checking test of the result latch.
//
// Loads random words at random times and checks that f_out, f_ovf and
// f_valid change only on a load, one cycle later, and hold otherwise.
module tb_output_latch;
  localparam int unsigned W = 43;
  logic clk = 1'b0;
  logic rst_n, load, ovf_in, f_valid, f_ovf;
  logic [W-1:0] d, f_out, exp_out;
  logic exp_ovf, exp_valid;
  int   checks = 0, failures = 0;

  output_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; d = '0; ovf_in = 1'b0;
    exp_out = '0; exp_ovf = 1'b0; exp_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      load   = ($urandom_range(0, 3) == 0);
      d      = {$urandom, $urandom};
      ovf_in = 1'($urandom);
      if (load) begin
        exp_out = d; exp_ovf = ovf_in; exp_valid = 1'b1;
      end
      @(posedge clk); #1;
      checks++;
      if (f_out !== exp_out || f_ovf !== exp_ovf || f_valid !== exp_valid) begin
        failures++;
        $display("FAIL cycle %0d: f_out %h exp %h valid %b ovf %b", i, f_out, exp_out, f_valid, f_ovf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
