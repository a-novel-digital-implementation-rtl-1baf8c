// Sine-wave half-cycle counter: the digital saw-tooth of one phase.
//
// A free-running counter that adds one every clock and returns to zero either
// when it reaches C_max or when the phase's zero-crossing pulse arrives. With
// C_max = f_clk / (2 f_line) the saw-tooth spans one half cycle of the phase
// voltage, so its value is the instantaneous phase angle:
// angle = 180 deg * saw / C_max. At 50 MHz and 60 Hz, C_max = 416666 and one
// count is 0.000432 deg. The zero-crossing reset keeps the ramp aligned with
// the voltage; the C_max reset keeps it running if a crossing is missed.
//
// Timing: saw is 0 in the cycle after a zc pulse (or after saw == CMAX) and
// then counts up by one per cycle. at_max is high while saw == CMAX.
module half_cycle_counter #(
  parameter int unsigned CMAX = 416666,
  localparam int         W    = $clog2(CMAX + 1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         zc,      // zero-crossing pulse of this phase
  output logic [W-1:0] saw,     // saw-tooth value, 0 .. CMAX
  output logic         at_max   // saw-tooth is at its maximum
);
  assign at_max = (saw == W'(CMAX));

  always_ff @(posedge clk) begin
    if (rst || zc || at_max) saw <= '0;
    else                     saw <= saw + 1'b1;
  end
endmodule
