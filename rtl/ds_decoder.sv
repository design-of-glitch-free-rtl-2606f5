// ds_decoder: Data-Strobe receiver with clock recovery.
//
// Recovers the bit clock of a Data-Strobe link as Data XOR Strobe and takes a
// bit each time that recovered clock changes level. The two lines arrive
// asynchronously and are brought into the clk domain by a two-flop
// synchronizer each; the system clock must sample each bit at least twice
// (a bit lasting two or more clk cycles).
//
// Outputs: bit_valid pulses for one cycle with the received bit on bit_out;
// rclk is the recovered clock (1 during even bits); ds_error pulses when Data
// and Strobe changed between the same two samples, which the line code never
// does. Latency from a line change to bit_valid is three clk cycles. Reset is
// synchronous (rst_n low) to the idle state Data = Strobe = 0.
//
// From the source design: the recovered clock is Data XOR Strobe, and only
// one of the two lines changes per bit. This design's own choices: the
// oversampling receiver, the synchronizer depth and the error flag.
module ds_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic d_in,
  input  logic s_in,
  output logic rclk,
  output logic bit_valid,
  output logic bit_out,
  output logic ds_error
);
  logic [1:0] d_sync, s_sync;
  logic       d_prev, s_prev;
  logic       d_chg, s_chg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_sync <= '0;
      s_sync <= '0;
      d_prev <= 1'b0;
      s_prev <= 1'b0;
    end else begin
      d_sync <= {d_sync[0], d_in};
      s_sync <= {s_sync[0], s_in};
      d_prev <= d_sync[1];
      s_prev <= s_sync[1];
    end
  end

  always_comb begin
    d_chg = d_sync[1] ^ d_prev;
    s_chg = s_sync[1] ^ s_prev;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      ds_error  <= 1'b0;
      rclk      <= 1'b0;
    end else begin
      bit_valid <= d_chg ^ s_chg;
      ds_error  <= d_chg & s_chg;
      rclk      <= d_sync[1] ^ s_sync[1];
      if (d_chg ^ s_chg)
        bit_out <= d_sync[1];
    end
  end
endmodule
