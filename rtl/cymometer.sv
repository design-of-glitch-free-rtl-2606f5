// cymometer: configurable error free frequency detector.
//
// Measures the frequency of sig_utest against the system clock clk. The
// reference signal ref_sig asks for a measurement window (high = measure).
// The clock counter turns that request into a gate that opens and closes on
// rising edges of sig_utest, so the edge count is exact, and counts both the
// edges of sig_utest (cnt) and the clk cycles (tcnt) inside the gate. When
// the gate closes, the divider computes f_out = F_CONST * cnt / tcnt in Hz
// (F_CONST is the clk frequency) and the output latch presents it.
// The strobe input is the strobe control: while it is 0 the gate can neither
// open nor close, so a measurement in progress is stretched, not corrupted,
// and the result still covers whole periods of sig_utest.
//
// Timing: f_out updates NUM_W + 3 cycles after meas_done. A measurement that
// completes while the divider is still busy is not divided; its counts still
// appear on lat_cnt_result/lat_tcnt_result. f_valid stays high after the
// first result; f_ovf marks a result whose counts saturated. cnt and tcnt
// are the running counts of the open gate; del_ref_sig is the synchronized
// reference delayed by one cycle.
// Reset (rst_n low) is synchronous.
//
// From the source design: the chain reference/unknown inputs, clock counter,
// divider with a frequency constant, output latch, F OUT, controlled by
// system clock, reset and strobe control. This design's own choices: the
// gate scheme, the formula, the widths other than tcnt, and all timing.
module cymometer
#(
  parameter int unsigned CNT_W   = glitch_free_pkg::DEF_CNT_W,
  parameter int unsigned TCNT_W  = glitch_free_pkg::DEF_TCNT_W,
  parameter int unsigned F_CONST = glitch_free_pkg::DEF_F_CONST,
  parameter int unsigned NUM_W   = glitch_free_pkg::num_width(F_CONST, CNT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strobe,
  input  logic              ref_sig,
  input  logic              sig_utest,
  output logic              gate,
  output logic              del_ref_sig,
  output logic [CNT_W-1:0]  cnt,
  output logic [TCNT_W-1:0] tcnt,
  output logic [CNT_W-1:0]  lat_cnt_result,
  output logic [TCNT_W-1:0] lat_tcnt_result,
  output logic              meas_done,
  output logic [NUM_W-1:0]  f_out,
  output logic              f_valid,
  output logic              f_ovf
);
  logic              ovf;
  logic              div_busy, div_done;
  logic [NUM_W-1:0]  quot;
  logic              ovf_hold;

  clock_counter #(.CNT_W(CNT_W), .TCNT_W(TCNT_W)) u_counter (
    .clk             (clk),
    .rst_n           (rst_n),
    .strobe          (strobe),
    .ref_sig         (ref_sig),
    .sig_utest       (sig_utest),
    .gate            (gate),
    .del_ref_sig     (del_ref_sig),
    .cnt             (cnt),
    .tcnt            (tcnt),
    .lat_cnt_result  (lat_cnt_result),
    .lat_tcnt_result (lat_tcnt_result),
    .ovf             (ovf),
    .meas_done       (meas_done)
  );

  freq_divider #(.CNT_W(CNT_W), .TCNT_W(TCNT_W), .F_CONST(F_CONST), .NUM_W(NUM_W)) u_divider (
    .clk   (clk),
    .rst_n (rst_n),
    .start (meas_done),
    .num   (lat_cnt_result),
    .den   (lat_tcnt_result),
    .busy  (div_busy),
    .done  (div_done),
    .quot  (quot)
  );

  // Overflow flag of the measurement the divider is working on.
  always_ff @(posedge clk) begin
    if (!rst_n)
      ovf_hold <= 1'b0;
    else if (meas_done && !div_busy)
      ovf_hold <= ovf;
  end

  output_latch #(.W(NUM_W)) u_latch (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (div_done),
    .d       (quot),
    .ovf_in  (ovf_hold),
    .f_out   (f_out),
    .f_valid (f_valid),
    .f_ovf   (f_ovf)
  );
endmodule
