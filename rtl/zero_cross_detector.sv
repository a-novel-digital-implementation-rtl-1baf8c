// Zero-crossing detector for one phase voltage.
//
// An external comparator turns the phase voltage into a square wave, high in
// the positive half cycle and low in the negative one. This block emits a
// pulse one clock cycle wide at every edge of that square wave, i.e. twice
// per supply period, to resynchronise the phase's saw-tooth counter.
//
// Structure (as in the source design): a single-bit register samples the
// comparator level; its input and output are XORed, so the XOR is high for
// exactly the one cycle in which the level has changed; an AND with the
// inverted reset blocks pulses while reset is asserted. The register itself
// has no reset: it keeps sampling so that no false pulse follows reset.
//
// Own choice: the comparator output is asynchronous to the clock, so it first
// passes through a SYNC_STAGES-deep synchroniser (0 gives the bare circuit).
//
// Timing: zc_pulse is high in the cycle after the edge has crossed the
// synchroniser. phase_pos is the synchronised level (1 = positive half
// cycle); zc_pulse & phase_pos marks the start of the positive half cycle.
module zero_cross_detector #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic comp_in,    // comparator output, asynchronous
  output logic zc_pulse,   // one-cycle pulse at each zero crossing
  output logic phase_pos   // synchronised comparator level
);
  logic level, level_q;

  bit_sync #(.STAGES(SYNC_STAGES)) u_sync (
    .clk (clk),
    .rst (rst),
    .d   (comp_in),
    .q   (level)
  );

  always_ff @(posedge clk) level_q <= level;

  assign zc_pulse  = (level ^ level_q) & ~rst;
  assign phase_pos = level;
endmodule
