// ds_encoder: Data-Strobe line encoder.
//
// Sends a serial bit stream on two lines, Data and Strobe. For bit number n
// (counting from 0 after reset) Strobe is the inverse of Data when n is even
// and equal to Data when n is odd. From one bit to the next exactly one of the
// two lines changes, never both, so Data XOR Strobe toggles once per bit and
// is the bit clock the receiver recovers.
//
// Interface: on a rising clk edge with bit_valid = 1 the bit bit_in is put on
// d_out/s_out (one cycle latency); with bit_valid = 0 both lines hold. After
// reset (synchronous, rst_n low) both lines are 0, the state that precedes an
// even bit, and the next bit is bit 0.
//
// From the source design: the even/odd rule that defines Strobe. This
// design's own choices: the bit_valid handshake and the reset state.
module ds_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_valid,
  input  logic bit_in,
  output logic d_out,
  output logic s_out
);
  logic odd_q;   // 1 when the next bit to send has an odd number

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_out <= 1'b0;
      s_out <= 1'b0;
      odd_q <= 1'b0;
    end else if (bit_valid) begin
      d_out <= bit_in;
      s_out <= odd_q ? bit_in : ~bit_in;
      odd_q <= ~odd_q;
    end
  end

  // Line code rule: from one bit to the next exactly one line changes.
  a_one_line_changes: assert property (
    @(posedge clk) disable iff (!rst_n) $past(bit_valid) && $past(rst_n) |->
      ($changed(d_out) != $changed(s_out))
  );
endmodule
