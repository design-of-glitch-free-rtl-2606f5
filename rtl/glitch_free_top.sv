// glitch_free_top: strobe-based glitch-free designs, side by side.
//
// Two independent designs share only clk and rst_n:
//  * the configurable error free frequency detector (cymometer), whose gate
//    is the strobe signal module (glitch_strobe) and whose strobe control
//    input is cym_strobe;
//  * a Data-Strobe serial link: ds_encoder drives tx_d/tx_s from tx_valid and
//    tx_bit, and ds_decoder recovers bits from rx_d/rx_s. Connect tx_d/tx_s
//    to rx_d/rx_s (directly or through a channel) for a link.
// All ports are plain signals; see each block for timing. Reset is
// synchronous, active low.
module glitch_free_top
#(
  parameter int unsigned CNT_W   = glitch_free_pkg::DEF_CNT_W,
  parameter int unsigned TCNT_W  = glitch_free_pkg::DEF_TCNT_W,
  parameter int unsigned F_CONST = glitch_free_pkg::DEF_F_CONST,
  parameter int unsigned NUM_W   = glitch_free_pkg::num_width(F_CONST, CNT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // frequency detector
  input  logic              cym_strobe,
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
  output logic              f_ovf,
  // Data-Strobe transmitter
  input  logic              tx_valid,
  input  logic              tx_bit,
  output logic              tx_d,
  output logic              tx_s,
  // Data-Strobe receiver
  input  logic              rx_d,
  input  logic              rx_s,
  output logic              rx_clk,
  output logic              rx_valid,
  output logic              rx_bit,
  output logic              rx_error
);
  cymometer #(.CNT_W(CNT_W), .TCNT_W(TCNT_W), .F_CONST(F_CONST), .NUM_W(NUM_W)) u_cym (
    .clk             (clk),
    .rst_n           (rst_n),
    .strobe          (cym_strobe),
    .ref_sig         (ref_sig),
    .sig_utest       (sig_utest),
    .gate            (gate),
    .del_ref_sig     (del_ref_sig),
    .cnt             (cnt),
    .tcnt            (tcnt),
    .lat_cnt_result  (lat_cnt_result),
    .lat_tcnt_result (lat_tcnt_result),
    .meas_done       (meas_done),
    .f_out           (f_out),
    .f_valid         (f_valid),
    .f_ovf           (f_ovf)
  );

  ds_encoder u_ds_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .bit_valid (tx_valid),
    .bit_in    (tx_bit),
    .d_out     (tx_d),
    .s_out     (tx_s)
  );

  ds_decoder u_ds_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .d_in      (rx_d),
    .s_in      (rx_s),
    .rclk      (rx_clk),
    .bit_valid (rx_valid),
    .bit_out   (rx_bit),
    .ds_error  (rx_error)
  );
endmodule
