// glitch_strobe: strobe signal module.
//
// Two input gates combine the data inputs: g1 = ain & bin asks to set the
// output pair, g2 = cin & din asks to reset it. The pair yout/zout is a
// cross-coupled set/reset element: yout is the stored state and zout its
// complement. The pair may change only on a rising clk edge while strobe is 1;
// while strobe is 0 it holds, whatever the gate inputs do. Because yout and
// zout come from one stored bit and update on one clock edge, they can never
// show a transient state in which the two disagree, which is the glitch-free,
// no-delay-mismatch property the strobe is meant to give.
//
// Timing: one cycle from a sampled (strobe & g1) or (strobe & g2) to the
// outputs. g1 and g2 are combinational and brought out for observation.
// Set and reset both requested at once (the forbidden input of a set/reset
// latch) holds the previous state; reset (rst_n low, synchronous) gives
// yout = 0, zout = 1.
//
// From the source design: the four-gate structure (G1, G2, a cross-coupled
// output pair yout/zout) and the rule that strobe = 1 lets the gates act and
// strobe = 0 blocks them. This design's own choices: the set/reset reading of
// the gate types, the clocked update, the hold on a simultaneous request and
// the reset value.
module glitch_strobe (
  input  logic clk,
  input  logic rst_n,
  input  logic strobe,
  input  logic ain,
  input  logic bin,
  input  logic cin,
  input  logic din,
  output logic g1,
  output logic g2,
  output logic yout,
  output logic zout
);
  logic state_q;

  always_comb begin
    g1 = ain & bin;
    g2 = cin & din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      state_q <= 1'b0;
    else if (strobe && (g1 != g2))
      state_q <= g1;
  end

  assign yout = state_q;
  assign zout = ~state_q;

  // The pair never changes while strobe is low.
  a_hold_without_strobe: assert property (
    @(posedge clk) disable iff (!rst_n) !strobe |=> $stable(yout)
  );
endmodule
