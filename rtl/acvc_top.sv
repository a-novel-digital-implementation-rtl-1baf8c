// Digital firing and speed controller for a three-phase AC voltage
// controller (three triacs in the lines of an induction motor).
//
// Firing path, per phase: zero_cross_detector turns the phase's comparator
// square wave into a pulse at each zero crossing; half_cycle_counter runs a
// saw-tooth 0 .. C_max over each half cycle, so its value is the phase angle;
// angle_pulse_counter fires the triac when the saw-tooth equals C_theta, the
// firing angle in saw-tooth counts, for a pulse of PULSE_DEG degrees.
//
// Speed loop: reference_speed (push-buttons) and the speed ADC sample give
// the error in speed_error. Three pi_controller instances, one per mode of
// operation (0/2, 0/2/3, 2/3) with their own gains, all process every error
// sample. limits_decoder classifies each supply cycle by the current
// comparators and control_mux forwards the output of that mode's PI.
// firing_angle_control scales and clips it and updates C_theta every half
// cycle (each zero crossing of phase A); limits_decoder's cycle boundary is
// the start of phase A's positive half cycle. Until the first complete
// cycle has been decoded, controller outputs are not passed on, so the
// firing angle keeps its initial value. The speed rises with the firing
// angle in modes 0/2 and 0/2/3 and falls with it in mode 2/3, which is why
// the default 2/3 gains have the opposite sign.
//
// Parameters follow the source design where it gives numbers (50 MHz clock,
// 60 Hz supply, C_max = 416666, 18x18 multipliers); pulse width, angle
// limits, word widths and all PI gains are this design's own choices.
// Off-chip parts (comparators, current sensors, speed ADC and its interface,
// triacs) are outside: their signals are ports. The speed sample arrives
// as a parallel word with a valid strobe.
module acvc_top
  import acvc_pkg::*;
#(
  parameter int unsigned          CLK_HZ         = 50_000_000,
  parameter int unsigned          LINE_HZ        = 60,
  parameter int unsigned          PULSE_DEG      = 10,
  parameter int unsigned          ALPHA_MIN_DEG  = 0,
  parameter int unsigned          ALPHA_MAX_DEG  = 120,
  parameter int unsigned          ALPHA_INIT_DEG = 120,
  parameter int unsigned          SYNC_STAGES    = 2,
  parameter int unsigned          S_W            = 14,
  parameter int unsigned          E_W            = 18,
  parameter int unsigned          K_W            = 18,
  parameter int unsigned          U_W            = 40,
  parameter int unsigned          SCALE_SHIFT    = 8,
  parameter int unsigned          REF_STEP       = 64,
  parameter int unsigned          REF_INIT       = 8192,
  parameter logic signed [K_W-1:0] K1_0_2        = 2560,
  parameter logic signed [K_W-1:0] K2_0_2        = -2304,
  parameter logic signed [K_W-1:0] K1_0_2_3      = 2560,
  parameter logic signed [K_W-1:0] K2_0_2_3      = -2304,
  parameter logic signed [K_W-1:0] K1_2_3        = -2560,
  parameter logic signed [K_W-1:0] K2_2_3        = 2304,
  localparam int unsigned         CMAX   = cmax_of(CLK_HZ, LINE_HZ),
  localparam int unsigned         CW     = $clog2(CMAX + 1),
  localparam int unsigned         DC     = deg_to_count(CMAX, PULSE_DEG),
  localparam int unsigned         C_LO   = deg_to_count(CMAX, ALPHA_MIN_DEG),
  localparam int unsigned         C_HI   = deg_to_count(CMAX, ALPHA_MAX_DEG),
  localparam int unsigned         C_INIT = deg_to_count(CMAX, ALPHA_INIT_DEG)
) (
  input  logic                  clk,
  input  logic                  rst,
  // analog front ends
  input  logic [NUM_PHASES-1:0] zc_comp,     // phase voltage > 0 comparators
  input  logic [NUM_PHASES-1:0] i_pos,       // line current > 0 comparators
  input  logic [NUM_PHASES-1:0] i_neg,       // line current < 0 comparators
  // speed measurement and operator
  input  logic                  adc_valid,
  input  logic [S_W-1:0]        adc_speed,
  input  logic                  btn_up,
  input  logic                  btn_dn,
  // triac gates
  output logic [NUM_PHASES-1:0] gate,
  // status
  output mode_t                 mode,
  output logic                  mode_update,
  output logic [CW-1:0]         c_theta,
  output logic                  clip_hi,
  output logic                  clip_lo,
  output logic [S_W-1:0]        ref_speed,
  output logic [S_W-1:0]        sensed_speed,
  output logic signed [E_W-1:0] speed_err,
  output logic signed [U_W-1:0] u_sel,
  output logic [2:0]            mode_seen,   // {3, 2, 0}-line spells this cycle
  output logic [NUM_PHASES-1:0] phase_pos,   // synchronised voltage polarity
  output logic [NUM_PHASES-1:0] saw_wrap,    // saw-tooth reached C_max
  output logic [NUM_PHASES-1:0] pulse_done,  // gate pulse ended after its width
  output logic [NUM_PHASES-1:0] pulse_cut    // gate pulse cut by a crossing
);
  localparam logic signed [U_W-1:0] U_INIT = U_W'(C_INIT) <<< SCALE_SHIFT;

  logic [NUM_PHASES-1:0] zc;
  logic [CW-1:0]         saw [NUM_PHASES];

  // ---------------------------------------------------------------- firing
  for (genvar p = 0; p < NUM_PHASES; p++) begin : g_phase
    zero_cross_detector #(.SYNC_STAGES(SYNC_STAGES)) u_zcd (
      .clk(clk), .rst(rst), .comp_in(zc_comp[p]),
      .zc_pulse(zc[p]), .phase_pos(phase_pos[p]));

    half_cycle_counter #(.CMAX(CMAX)) u_saw (
      .clk(clk), .rst(rst), .zc(zc[p]), .saw(saw[p]), .at_max(saw_wrap[p]));

    angle_pulse_counter #(.CMAX(CMAX), .DC(DC)) u_fire (
      .clk(clk), .rst(rst), .zc(zc[p]), .saw(saw[p]), .c_theta_in(c_theta),
      .gate(gate[p]), .end_by_count(pulse_done[p]), .end_by_zc(pulse_cut[p]));
  end

  // ----------------------------------------------------------- speed loop
  logic                  e_valid;
  logic signed [U_W-1:0] u_0_2, u_0_2_3, u_2_3;
  logic                  v_0_2, v_0_2_3, v_2_3, u_sel_valid, mode_valid;

  reference_speed #(.S_W(S_W), .STEP(REF_STEP), .REF_MAX((1 << S_W) - 1),
                    .REF_INIT(REF_INIT)) u_ref (
    .clk(clk), .rst(rst), .btn_up(btn_up), .btn_dn(btn_dn), .ref_speed(ref_speed));

  speed_error #(.S_W(S_W), .E_W(E_W)) u_err (
    .clk(clk), .rst(rst), .adc_valid(adc_valid), .adc_speed(adc_speed),
    .ref_speed(ref_speed), .sensed(sensed_speed), .e(speed_err), .e_valid(e_valid));

  pi_controller #(.E_W(E_W), .K_W(K_W), .U_W(U_W), .K1(K1_0_2), .K2(K2_0_2),
                  .U_INIT(U_INIT)) u_pi_0_2 (
    .clk(clk), .rst(rst), .e_valid(e_valid), .e(speed_err), .u(u_0_2), .u_valid(v_0_2));

  pi_controller #(.E_W(E_W), .K_W(K_W), .U_W(U_W), .K1(K1_0_2_3), .K2(K2_0_2_3),
                  .U_INIT(U_INIT)) u_pi_0_2_3 (
    .clk(clk), .rst(rst), .e_valid(e_valid), .e(speed_err), .u(u_0_2_3), .u_valid(v_0_2_3));

  pi_controller #(.E_W(E_W), .K_W(K_W), .U_W(U_W), .K1(K1_2_3), .K2(K2_2_3),
                  .U_INIT(U_INIT)) u_pi_2_3 (
    .clk(clk), .rst(rst), .e_valid(e_valid), .e(speed_err), .u(u_2_3), .u_valid(v_2_3));

  limits_decoder #(.SYNC_STAGES(SYNC_STAGES)) u_limits (
    .clk(clk), .rst(rst), .cycle_start(zc[0] & phase_pos[0]),
    .i_pos(i_pos), .i_neg(i_neg), .mode(mode), .mode_update(mode_update), .mode_valid(mode_valid),
    .seen(mode_seen));

  control_mux #(.U_W(U_W)) u_mux (
    .clk(clk), .rst(rst), .mode(mode), .u_0_2(u_0_2), .u_0_2_3(u_0_2_3),
    .u_2_3(u_2_3), .u_valid(v_0_2 & mode_valid), .u_sel(u_sel), .u_sel_valid(u_sel_valid));

  firing_angle_control #(.U_W(U_W), .SCALE_SHIFT(SCALE_SHIFT), .CW(CW),
                         .C_LO(C_LO), .C_HI(C_HI), .C_INIT(C_INIT)) u_fac (
    .clk(clk), .rst(rst), .u(u_sel), .u_valid(u_sel_valid), .update(zc[0]),
    .c_theta(c_theta), .clip_hi(clip_hi), .clip_lo(clip_lo));

  // All three controllers share one sequencer timing.
  assert property (@(posedge clk) disable iff (rst) v_0_2 == v_0_2_3 && v_0_2 == v_2_3);
endmodule
