// Closed-loop testbench: speed regulation in mode 2/3 under load changes.
//
// The top is built for a 72 kHz clock (C_max = 600 counts, 0.3 deg each),
// starts at a 90 deg firing angle and uses small mode-2/3 gains suited to
// the plant below. The plant is a deliberately crude motor model living only
// in this testbench, not a model of any particular machine:
//   * mode by firing angle: below 60 deg 0/2/3, 60 .. 110 deg 2/3, above
//     110 deg 0/2 (current-comparator patterns as in the end-to-end test);
//   * steady-state speed S0 - G * (C - C60) * (1 + load), i.e. falling with
//     the firing angle as in mode 2/3, lower under load;
//   * a first-order lag: each speed sample moves 1/8 of the way to it.
// The firing angle the plant sees is the one the gates actually use: the
// testbench measures it from the delay between the phase-A comparator edge
// and the phase-A gate pulse.
//
// Scenario: load 0.2, then a step to 0.8, then the reference is raised with
// the increase button, then lowered with the decrease button. After each
// event the speed must settle within TOL of the reference, the decoded mode
// must stay 2/3 and the firing angle must stay inside the 2/3 band.
module tb_acvc_speed_loop;
  import acvc_pkg::*;

  localparam int unsigned CLK_HZ = 72_000;
  localparam int P      = 1200;            // clock cycles per supply period
  localparam int CMAX   = 600;
  localparam int C60    = 200, C110 = 367; // band of mode 2/3 in counts
  localparam int S0     = 9500;
  localparam int G      = 10;
  localparam int TOL    = 40;
  localparam int SAMPLE = 100;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] zc_comp = '0, i_pos = '0, i_neg = '0;
  logic adc_valid = 1'b0, btn_up = 1'b0, btn_dn = 1'b0;
  logic [13:0] adc_speed = '0;
  logic [2:0] gate;
  mode_t mode;
  logic mode_update, clip_hi, clip_lo;
  logic [9:0] c_theta;
  logic [13:0] ref_speed, sensed_speed;
  logic signed [17:0] speed_err;
  logic signed [39:0] u_sel;
  logic [2:0] mode_seen, phase_pos, saw_wrap, pulse_done, pulse_cut;

  acvc_top #(.CLK_HZ(CLK_HZ), .ALPHA_INIT_DEG(90),
             .K1_2_3(-18'sd3), .K2_2_3(18'sd2)) dut (.*);

  int checks = 0, failures = 0;
  real speed = 8000.0, load = 0.2;
  int  c_fire = 300;                 // firing angle seen at the phase-A gate
  int  n_settled = 0, n_mode_23 = 0, n_up = 0, n_dn = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t (speed=%0.1f ref=%0d C=%0d mode=%0d)", what, $time,
                 speed, ref_speed, c_fire, mode);
    end
  endtask

  function automatic int plant_mode(input int c);
    if (c < C60) return 1;           // 0/2/3
    if (c > C110) return 0;          // 0/2
    return 2;                        // 2/3
  endfunction

  function automatic int spell(input int pat, input int s);
    case (pat)
      0:       return (s % 2 == 0) ? 0 : 2;
      1:       return (s % 3 == 0) ? 0 : (s % 3 == 1) ? 2 : 3;
      default: return (s % 2 == 0) ? 2 : 3;
    endcase
  endfunction

  task automatic drive_currents(input int n);
    logic [2:0] on, pol;
    pol = 3'($urandom);
    case (n)
      0:       on = 3'b000;
      2:       on = ~(3'b001 << $urandom_range(0, 2));
      default: on = 3'b111;
    endcase
    i_pos = on & pol;
    i_neg = on & ~pol;
  endtask

  // firing angle actually applied: gate rise = comparator edge + C + 3
  longint cyc = 0, t_a = 0;
  logic comp_a = 1'b0, gate_a = 1'b0;
  always @(posedge clk) begin
    if (gate[0] && !gate_a && !rst) c_fire = int'(cyc - 1 - t_a) - 3;
    gate_a = gate[0];
    if (zc_comp[0] != comp_a) begin
      t_a = cyc;
      comp_a = zc_comp[0];
    end
    cyc++;
  end

  // run n supply cycles; returns whether the last quarter was settled
  task automatic run(input int n, input string phase);
    automatic real worst = 0.0;
    automatic int pat = plant_mode(c_fire);
    for (int c = 0; c < n; c++) begin
      pat = plant_mode(c_fire);
      for (int t = 0; t < P; t++) begin
        zc_comp[0] = (t < P / 2);
        zc_comp[1] = (((t + P - P / 3) % P) < P / 2);
        zc_comp[2] = (((t + P - 2 * P / 3) % P) < P / 2);
        if (t >= 1 && (t - 1) % (P / 12) == 0 && (t - 1) / (P / 12) < 12)
          drive_currents(spell(pat, (t - 1) / (P / 12)));
        adc_valid = (t % SAMPLE == 0);
        if (adc_valid) begin
          automatic real ss = real'(S0) - real'(G) * real'(c_fire - C60) * (1.0 + load);
          speed = speed + (ss - speed) / 8.0;
          adc_speed = 14'($rtoi(speed < 0.0 ? 0.0 : speed));
        end
        if (mode_update) begin
          if (mode == MODE_2_3) n_mode_23++;
          check(mode == MODE_2_3, {phase, ": mode stays 2/3"});
        end
        if (c >= n * 3 / 4) begin
          automatic real d = speed - real'(ref_speed);
          if (d < 0) d = -d;
          if (d > worst) worst = d;
        end
        @(negedge clk);
      end
    end
    check(worst < real'(TOL), $sformatf("%s: settled within %0d (worst %0.1f)", phase, TOL, worst));
    check(c_fire >= C60 && c_fire <= C110, {phase, ": angle inside the 2/3 band"});
    if (worst < real'(TOL)) n_settled++;
    $display("%s: speed %0.1f ref %0d angle %0d counts, worst error %0.1f",
             phase, speed, ref_speed, c_fire, worst);
  endtask

  task automatic press(input bit up, input int times);
    repeat (times) begin
      btn_up = up;
      btn_dn = !up;
      repeat (10) @(negedge clk);
      btn_up = 1'b0;
      btn_dn = 1'b0;
      repeat (10) @(negedge clk);
      if (up) n_up++; else n_dn++;
    end
  endtask

  initial begin
    // start near the initial operating point so the first decode is 2/3
    speed = real'(S0) - real'(G) * real'(300 - C60) * 1.2;
    drive_currents(2);
    repeat (5) @(negedge clk);
    rst = 1'b0;
    run(60, "light load");
    load = 0.8;
    run(60, "heavy load");
    press(1'b1, 4);                  // +256
    run(60, "higher reference");
    press(1'b0, 8);                  // -512
    run(60, "lower reference");
    check(int'(ref_speed) == 8192 - 256, "reference after the button presses");
    check(n_settled == 4, "settled after every event");
    check(n_mode_23 > 200, "mode 2/3 held throughout");
    check(n_up == 4 && n_dn == 8, "button presses made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
