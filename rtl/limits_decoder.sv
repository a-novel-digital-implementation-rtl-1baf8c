// Limits decoder: finds the mode of operation from the line currents.
//
// Per phase, two external comparators report a positive and a negative
// current; their OR says the line conducts. The decode logic classifies each
// clock cycle by how many lines conduct: none (NOR of the three), all three
// (AND), or otherwise two (a three-wire load cannot carry current in one
// line only). Three single-bit registers remember which of these spells
// occurred since the last cycle boundary. At each boundary - one complete
// supply cycle, marked by cycle_start - a three-input look-up table maps
// the flags to the mode, the mode register (the control-multiplexer select)
// is updated and the flags are cleared. The sample taken in the boundary
// cycle still counts towards the cycle that ends there. The table:
//   zero and three-line spells seen -> 0/2/3
//   zero spells, no three-line ones -> 0/2   (also: no current at all)
//   no zero spells                  -> 2/3
//
// Own choices: the comparator bits pass through a SYNC_STAGES synchroniser;
// the first boundary after reset only clears the flags (the partial cycle
// before it is not decoded); mode resets to 0/2, and mode_valid stays low
// until the first complete cycle has been decoded.
//
// Timing: mode changes in the cycle after cycle_start, when mode_update
// pulses.
module limits_decoder
  import acvc_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cycle_start,        // one pulse per supply cycle
  input  logic [NUM_PHASES-1:0] i_pos,              // current > 0 comparators
  input  logic [NUM_PHASES-1:0] i_neg,              // current < 0 comparators
  output mode_t                 mode,               // decoded mode
  output logic                  mode_update,        // mode register loaded
  output logic                  mode_valid,         // a mode has been decoded
  output logic [2:0]            seen                // {three, two, zero} flags
);
  logic [NUM_PHASES-1:0] pos_s, neg_s, cond;
  logic                  st_zero, st_three, st_two;
  logic                  seen0, seen2, seen3, primed;

  for (genvar p = 0; p < NUM_PHASES; p++) begin : g_phase
    bit_sync #(.STAGES(SYNC_STAGES)) u_sync_pos (
      .clk(clk), .rst(rst), .d(i_pos[p]), .q(pos_s[p]));
    bit_sync #(.STAGES(SYNC_STAGES)) u_sync_neg (
      .clk(clk), .rst(rst), .d(i_neg[p]), .q(neg_s[p]));
    assign cond[p] = pos_s[p] | neg_s[p];
  end

  assign st_zero  = ~|cond;
  assign st_three = &cond;
  assign st_two   = ~st_zero & ~st_three;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen0       <= 1'b0;
      seen2       <= 1'b0;
      seen3       <= 1'b0;
      primed      <= 1'b0;
      mode        <= MODE_0_2;
      mode_update <= 1'b0;
      mode_valid  <= 1'b0;
    end else begin
      mode_update <= 1'b0;
      if (cycle_start) begin
        if (primed) begin
          mode        <= mode_lut(seen0 | st_zero, seen2 | st_two, seen3 | st_three);
          mode_update <= 1'b1;
          mode_valid  <= 1'b1;
        end
        primed <= 1'b1;
        seen0  <= 1'b0;
        seen2  <= 1'b0;
        seen3  <= 1'b0;
      end else begin
        seen0 <= seen0 | st_zero;
        seen2 <= seen2 | st_two;
        seen3 <= seen3 | st_three;
      end
    end
  end

  assign seen = {seen3, seen2, seen0};
endmodule
