// clock_counter: gated double counter of the frequency detector.
//
// Measures an unknown signal against the system clock over a gate that the
// reference signal asks for. Both inputs are asynchronous and pass through a
// two-flop synchronizer; del_ref_sig is the synchronized reference delayed by
// one more cycle. The gate itself is the yout output of a glitch_strobe
// instance: it is set by a rising edge of the unknown signal while the
// reference is high and reset by a rising edge of the unknown signal while the
// reference is low, and it can only change while strobe is 1. The gate thus
// always opens and closes on edges of the signal under test, so the edge
// count cnt is a whole number of its periods with no +/-1 count error; tcnt
// counts system clock cycles over exactly the same interval.
//
// When the gate closes, cnt and tcnt are copied to lat_cnt_result and
// lat_tcnt_result, meas_done pulses for one cycle, and both counters clear.
// A counter that would pass its maximum stays there and ovf is reported with
// that result. The unknown frequency is F_clk * lat_cnt_result /
// lat_tcnt_result. The unknown signal must stay at least two clk cycles high
// and low. Reset is synchronous (rst_n low).
//
// From the source design: the reference and unknown inputs, the strobe
// control of the gate, the signal names cnt, tcnt, del_ref_sig and
// lat_cnt_result, and a 16-bit tcnt. This design's own choices: the
// edge-synchronized gate, the synchronizers, saturation and meas_done.
module clock_counter
#(
  parameter int unsigned CNT_W  = glitch_free_pkg::DEF_CNT_W,
  parameter int unsigned TCNT_W = glitch_free_pkg::DEF_TCNT_W
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
  output logic              ovf,
  output logic              meas_done
);
  logic [1:0] ref_sync, sig_sync;
  logic       sig_d;
  logic       sig_rise;
  logic       ref_s;
  logic       gate_d;
  logic       gate_n_unused;
  logic       g1_unused, g2_unused;
  logic       ovf_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_sync    <= '0;
      sig_sync    <= '0;
      sig_d       <= 1'b0;
      del_ref_sig <= 1'b0;
    end else begin
      ref_sync    <= {ref_sync[0], ref_sig};
      sig_sync    <= {sig_sync[0], sig_utest};
      sig_d       <= sig_sync[1];
      del_ref_sig <= ref_sync[1];
    end
  end

  always_comb begin
    ref_s    = ref_sync[1];
    sig_rise = sig_sync[1] & ~sig_d;
  end

  glitch_strobe u_gate (
    .clk    (clk),
    .rst_n  (rst_n),
    .strobe (strobe),
    .ain    (ref_s),
    .bin    (sig_rise),
    .cin    (~ref_s),
    .din    (sig_rise),
    .g1     (g1_unused),
    .g2     (g2_unused),
    .yout   (gate),
    .zout   (gate_n_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate_d          <= 1'b0;
      cnt             <= '0;
      tcnt            <= '0;
      ovf_q           <= 1'b0;
      lat_cnt_result  <= '0;
      lat_tcnt_result <= '0;
      ovf             <= 1'b0;
      meas_done       <= 1'b0;
    end else begin
      gate_d    <= gate;
      meas_done <= 1'b0;
      if (gate) begin
        if (sig_rise) begin
          if (cnt == '1) ovf_q <= 1'b1;
          else           cnt   <= cnt + 1'b1;
        end
        if (tcnt == '1) ovf_q <= 1'b1;
        else            tcnt  <= tcnt + 1'b1;
      end else if (gate_d) begin
        lat_cnt_result  <= cnt;
        lat_tcnt_result <= tcnt;
        ovf             <= ovf_q;
        meas_done       <= 1'b1;
        cnt             <= '0;
        tcnt            <= '0;
        ovf_q           <= 1'b0;
      end
    end
  end
endmodule
