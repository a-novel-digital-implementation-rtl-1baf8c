// Shared types and constants of the three-phase AC voltage controller.
//
// The controller drives three triacs between a three-phase supply and an
// induction motor. The current waveform puts the controller in one of three
// modes of operation, named after how many lines conduct during a supply
// cycle: 0/2 (spells of zero and of two conducting lines), 0/2/3 and 2/3.
// Each mode has its own PI controller; mode_t names the modes and also
// serves as the select code of the control multiplexer.
//
// The helper functions turn the clock and line frequencies into the
// saw-tooth maximum C_max = f_clk / (2 * f_line) and an angle in degrees
// into saw-tooth counts, C = C_max * angle / 180, rounded to nearest.
// C_max is truncated, which gives the 416666 quoted for 50 MHz and 60 Hz.
package acvc_pkg;

  typedef enum logic [1:0] {
    MODE_0_2   = 2'd0,
    MODE_0_2_3 = 2'd1,
    MODE_2_3   = 2'd2
  } mode_t;

  localparam int NUM_PHASES = 3;

  // Saw-tooth maximum value, eq. C_max = f_c / (2 F).
  function automatic int unsigned cmax_of(input int unsigned clk_hz,
                                          input int unsigned line_hz);
    return int'(64'(clk_hz) / (64'(line_hz) * 2));
  endfunction

  // Saw-tooth value of an angle in degrees, C = C_max * angle / 180, rounded.
  function automatic int unsigned deg_to_count(input int unsigned cmax,
                                               input int unsigned deg);
    return int'((64'(cmax) * 64'(deg) + 64'd90) / 64'd180);
  endfunction

  // Mode look-up table: the three flags say whether a spell with no line
  // conducting, with two lines, or with all three lines was seen during the
  // last supply cycle.
  function automatic mode_t mode_lut(input logic seen0, input logic seen2,
                                     input logic seen3);
    if (seen0 && seen3)      return MODE_0_2_3;
    else if (seen0)          return MODE_0_2;
    else if (seen2 || seen3) return MODE_2_3;
    else                     return MODE_0_2;
  endfunction

endpackage
