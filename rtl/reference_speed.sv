// Reference speed, set online with two push-buttons.
//
// Each press of btn_up raises the reference by STEP and each press of btn_dn
// lowers it by STEP, within 0 .. REF_MAX (a step that would cross a limit
// stops at the limit). Pressing both at once changes nothing.
//
// Own choices: the buttons are synchronised (two flip-flops) and a press is
// the rising edge of the synchronised level; contact bounce is assumed to be
// filtered outside. Speeds are unsigned S_W-bit numbers in the units of the
// speed ADC; the reference resets to REF_INIT.
//
// Timing: ref_speed changes three cycles after the button's rising edge
// (two synchroniser stages and the edge register).
module reference_speed #(
  parameter int unsigned S_W      = 14,
  parameter int unsigned STEP     = 64,
  parameter int unsigned REF_MAX  = 16383,
  parameter int unsigned REF_INIT = 8192
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           btn_up,
  input  logic           btn_dn,
  output logic [S_W-1:0] ref_speed
);
  logic up_s, dn_s, up_q, dn_q, up_press, dn_press;

  bit_sync #(.STAGES(2)) u_sync_up (.clk(clk), .rst(rst), .d(btn_up), .q(up_s));
  bit_sync #(.STAGES(2)) u_sync_dn (.clk(clk), .rst(rst), .d(btn_dn), .q(dn_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      up_q <= 1'b0;
      dn_q <= 1'b0;
    end else begin
      up_q <= up_s;
      dn_q <= dn_s;
    end
  end

  assign up_press = up_s & ~up_q;
  assign dn_press = dn_s & ~dn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ref_speed <= S_W'(REF_INIT);
    end else if (up_press && !dn_press) begin
      if (32'(ref_speed) + STEP > REF_MAX) ref_speed <= S_W'(REF_MAX);
      else                                 ref_speed <= ref_speed + S_W'(STEP);
    end else if (dn_press && !up_press) begin
      if (32'(ref_speed) < STEP) ref_speed <= '0;
      else                       ref_speed <= ref_speed - S_W'(STEP);
    end
  end

  initial assert (REF_INIT <= REF_MAX && REF_MAX < (1 << S_W))
    else $fatal(1, "reference limits do not fit S_W bits");
endmodule
