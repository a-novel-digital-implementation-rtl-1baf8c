// Angle detection and pulse-duration counter for one triac.
//
// The phase's saw-tooth is compared with C_theta, the saw-tooth value of the
// requested firing angle. On a match the pulse register (initially 0) sets
// and drives the triac gate. The pulse register enables a counter (a register
// plus an adder) that counts clock cycles; when the count reaches the pulse
// width dC_theta = DC, counter and pulse register clear together. A zero
// crossing also clears both, so a pulse never spills into the next half
// cycle. Since a triac conducts both ways, there is one pulse per half cycle.
//
// Own choices: the pulse is exactly DC clock cycles long (the counter holds
// 0 .. DC-1 while the gate is high); C_theta is taken from c_theta_in at
// every zero crossing of this phase (and during reset), so a new firing
// angle never changes a half cycle already in progress.
//
// Timing: gate rises in the cycle after saw == C_theta, i.e. at saw =
// C_theta + 1, and falls DC cycles later. end_by_count / end_by_zc are
// one-cycle flags saying how a pulse ended.
module angle_pulse_counter #(
  parameter int unsigned CMAX = 416666,
  parameter int unsigned DC   = 23148,   // pulse width in clock cycles
  localparam int         W    = $clog2(CMAX + 1),
  localparam int         CNTW = $clog2(DC + 1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         zc,           // zero-crossing pulse of this phase
  input  logic [W-1:0] saw,          // saw-tooth of this phase
  input  logic [W-1:0] c_theta_in,   // firing angle in saw-tooth counts
  output logic         gate,         // triac gate pulse
  output logic         end_by_count, // pulse ended after DC cycles
  output logic         end_by_zc     // pulse cut short by a zero crossing
);
  logic [W-1:0]    c_theta;
  logic [CNTW-1:0] width_cnt;
  logic            width_done;

  assign width_done = gate && (width_cnt == CNTW'(DC - 1));

  // Firing angle in force for the current half cycle.
  always_ff @(posedge clk) begin
    if (rst || zc) c_theta <= c_theta_in;
  end

  // Pulse register and pulse-width counter.
  always_ff @(posedge clk) begin
    if (rst || zc || width_done) begin
      gate      <= 1'b0;
      width_cnt <= '0;
    end else if (gate) begin
      width_cnt <= width_cnt + 1'b1;
    end else if (saw == c_theta) begin
      gate      <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      end_by_count <= 1'b0;
      end_by_zc    <= 1'b0;
    end else begin
      end_by_count <= width_done;
      end_by_zc    <= gate && zc && !width_done;
    end
  end

  initial assert (DC >= 1) else $fatal(1, "pulse width DC must be at least 1");
endmodule
