// freq_divider: scaling divider of the frequency detector.
//
// Computes quot = (F_CONST * num) / den, the unknown frequency in Hz, from the
// edge count num and the clock count den of one gate interval. F_CONST is the
// system clock frequency. The product is formed by a constant multiplier and
// then divided by a restoring divider that produces one quotient bit per
// cycle, most significant first.
//
// Interface: a one-cycle start pulse, with num and den valid, begins a
// division (ignored while busy); done pulses for one cycle NUM_W + 2 cycles
// after the edge that samples start, with quot valid, and quot holds until
// the next done. A zero divisor gives an all-ones quotient. Reset is synchronous (rst_n low).
//
// From the source design: a divider stage fed by the counter and a
// frequency constant. This design's own choices: the formula, the
// sequential restoring algorithm and the start/done handshake.
module freq_divider
#(
  parameter int unsigned CNT_W   = glitch_free_pkg::DEF_CNT_W,
  parameter int unsigned TCNT_W  = glitch_free_pkg::DEF_TCNT_W,
  parameter int unsigned F_CONST = glitch_free_pkg::DEF_F_CONST,
  parameter int unsigned NUM_W   = glitch_free_pkg::num_width(F_CONST, CNT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  num,
  input  logic [TCNT_W-1:0] den,
  output logic              busy,
  output logic              done,
  output logic [NUM_W-1:0]  quot
);
  localparam int unsigned STEP_W = $clog2(NUM_W + 1);

  logic [NUM_W-1:0]  dividend_q;   // remaining dividend bits, MSB first
  logic [NUM_W-1:0]  quot_q;
  logic [TCNT_W-1:0] rem_q;        // partial remainder, always below den
  logic [TCNT_W-1:0] den_q;
  logic [STEP_W-1:0] step_q;
  logic [TCNT_W:0]   rem_shift;
  logic              fits;

  always_comb begin
    rem_shift = {rem_q[TCNT_W-1:0], dividend_q[NUM_W-1]};
    fits      = rem_shift >= {1'b0, den_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      quot       <= '0;
      dividend_q <= '0;
      quot_q     <= '0;
      rem_q      <= '0;
      den_q      <= '0;
      step_q     <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dividend_q <= NUM_W'(F_CONST) * NUM_W'(num);
          den_q      <= den;
          rem_q      <= '0;
          quot_q     <= '0;
          step_q     <= STEP_W'(NUM_W);
          busy       <= 1'b1;
        end
      end else if (step_q != '0) begin
        rem_q      <= fits ? TCNT_W'(rem_shift - {1'b0, den_q}) : rem_shift[TCNT_W-1:0];
        quot_q     <= {quot_q[NUM_W-2:0], fits};
        dividend_q <= dividend_q << 1;
        step_q     <= step_q - 1'b1;
      end else begin
        quot <= quot_q;
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end
endmodule
