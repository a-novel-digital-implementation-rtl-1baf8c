// Firing-angle control: turns the selected PI output into the firing angle.
//
// The PI output is scaled by an arithmetic right shift of SCALE_SHIFT bits,
// giving saw-tooth counts (C = C_max * angle / 180). The result is clipped:
// above C_HI the maximum allowable value is passed, below C_LO the minimum
// one, otherwise the value itself. The clipped value waits in a holding
// register and becomes the firing angle in force at the next half-cycle
// boundary (update pulse, a zero crossing), so the angle changes at most once
// per half cycle of the supply.
//
// Own choices: the shift as the scaling, the reset angle C_INIT, and the
// clip_hi / clip_lo flags, registered with the holding value.
//
// Timing: the holding register loads in the cycle after u_valid; c_theta
// loads in the cycle after update.
module firing_angle_control #(
  parameter int unsigned U_W         = 40,
  parameter int unsigned SCALE_SHIFT = 8,
  parameter int unsigned CW          = 19,
  parameter int unsigned C_LO        = 0,
  parameter int unsigned C_HI        = 277777,
  parameter int unsigned C_INIT      = 277777
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [U_W-1:0] u,
  input  logic                  u_valid,
  input  logic                  update,     // half-cycle boundary
  output logic [CW-1:0]         c_theta,    // firing angle in saw-tooth counts
  output logic                  clip_hi,    // last value was clipped at C_HI
  output logic                  clip_lo     // last value was clipped at C_LO
);
  logic signed [U_W-1:0] scaled;
  logic [CW-1:0]         pending;

  assign scaled = u >>> SCALE_SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= CW'(C_INIT);
      clip_hi <= 1'b0;
      clip_lo <= 1'b0;
    end else if (u_valid) begin
      if (scaled > $signed(U_W'(C_HI))) begin
        pending <= CW'(C_HI);
        clip_hi <= 1'b1;
        clip_lo <= 1'b0;
      end else if (scaled < $signed(U_W'(C_LO))) begin
        pending <= CW'(C_LO);
        clip_hi <= 1'b0;
        clip_lo <= 1'b1;
      end else begin
        pending <= CW'(scaled);
        clip_hi <= 1'b0;
        clip_lo <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)         c_theta <= CW'(C_INIT);
    else if (update) c_theta <= pending;
  end

  initial assert (C_LO <= C_INIT && C_INIT <= C_HI && C_HI < (1 << CW))
    else $fatal(1, "firing-angle limits out of order or too wide");
endmodule
