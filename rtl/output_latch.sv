// output_latch: result latch of the frequency detector.
//
// Holds the frequency word on f_out between measurements, so f_out changes
// only once per measurement, on the clock edge after the divider reports done,
// and never shows a half-computed value. f_valid rises with the first result
// after reset and stays high; f_ovf marks a result whose counts saturated.
// One cycle latency from load to f_out. Reset (synchronous, rst_n low)
// clears f_out, f_valid and f_ovf.
//
// From the source design: an output latch between the divider and F OUT.
// This design's own choices: the load strobe, f_valid and f_ovf.
module output_latch #(
  parameter int unsigned W = 43
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         ovf_in,
  output logic [W-1:0] f_out,
  output logic         f_valid,
  output logic         f_ovf
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_out   <= '0;
      f_valid <= 1'b0;
      f_ovf   <= 1'b0;
    end else if (load) begin
      f_out   <= d;
      f_valid <= 1'b1;
      f_ovf   <= ovf_in;
    end
  end
endmodule
