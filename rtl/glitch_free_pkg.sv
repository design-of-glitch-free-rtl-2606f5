// glitch_free_pkg: constants shared by the frequency detector blocks.
//
// DEF_CNT_W and DEF_TCNT_W are the widths of the two gate counters. The clock-count
// width of 16 bits matches the four hex digits shown for the time counter in
// the detector's simulation trace; the edge-count width is this design's
// choice (same width). DEF_F_CONST is the system clock frequency in Hz that the
// divider scales by; its value is this design's choice (100 MHz).
package glitch_free_pkg;
  localparam int unsigned DEF_CNT_W   = 16;
  localparam int unsigned DEF_TCNT_W = 16;
  localparam int unsigned DEF_F_CONST = 100_000_000;

  // Number of bits needed to hold F_CONST * (2**CNT_W - 1).
  function automatic int unsigned num_width(int unsigned f_const, int unsigned cnt_w);
    return $clog2(f_const + 1) + cnt_w;
  endfunction
endpackage
