// tb_glitch_strobe: self-checking test of the strobe signal module.
//
// Drives random ain..din and strobe for 2000 cycles and compares g1, g2,
// yout and zout with a reference model: the stored bit is set by
// strobe & ain & bin, cleared by strobe & cin & din, held when strobe is 0 or
// both requests are present. Also checks that yout and zout are always
// complementary, and counts how often each case (set, reset, hold by strobe,
// hold by conflict) happened.
module tb_glitch_strobe;
  logic clk = 1'b0;
  logic rst_n, strobe, ain, bin, cin, din;
  logic g1, g2, yout, zout;
  int   checks = 0, failures = 0;
  int   n_set = 0, n_reset = 0, n_hold_strobe = 0, n_conflict = 0;
  logic model;

  glitch_strobe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; strobe = 1'b0; ain = 1'b0; bin = 1'b0; cin = 1'b0; din = 1'b0;
    model = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(yout, 1'b0, "yout after reset");
    check(zout, 1'b1, "zout after reset");
    for (int i = 0; i < 2000; i++) begin
      {strobe, ain, bin, cin, din} = 5'($urandom);
      #1;
      check(g1, ain & bin, "g1");
      check(g2, cin & din, "g2");
      if (strobe && (ain & bin) && !(cin & din))      begin model = 1'b1; n_set++;   end
      else if (strobe && !(ain & bin) && (cin & din)) begin model = 1'b0; n_reset++; end
      else if (!strobe && ((ain & bin) != (cin & din))) n_hold_strobe++;
      else if (strobe && (ain & bin) && (cin & din))    n_conflict++;
      @(posedge clk);
      #1;
      check(yout, model, "yout");
      check(zout, ~model, "zout");
    end
    checks++; if (n_set == 0)         begin failures++; $display("FAIL no set"); end
    checks++; if (n_reset == 0)       begin failures++; $display("FAIL no reset"); end
    checks++; if (n_hold_strobe == 0) begin failures++; $display("FAIL no strobe hold"); end
    checks++; if (n_conflict == 0)    begin failures++; $display("FAIL no conflict"); end
    $display("set=%0d reset=%0d strobe_hold=%0d conflict=%0d", n_set, n_reset, n_hold_strobe, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
