// End-to-end checks of acvc_top, shared by tb_acvc_top (reduced clock) and
// tb_acvc_top_full (every parameter at its default). The including module
// defines CLK_HZ (the clock the top is built for), SAMPLE_CYC (clock cycles
// between speed samples) and E_UNIT (error scale so that the controllers
// cover the firing range in a few supply cycles), then instantiates the top
// as `dut` with .* connections.
//
// Plant model (testbench only): three comparator square waves 120 deg apart;
// line-current comparator patterns that follow a script of modes, one mode
// per supply cycle, with spells of zero, two and three conducting lines;
// a speed sensor that reads reference - E_UNIT * offset, with the offset
// scripted per supply cycle; button presses in the last cycles. The supply
// period is shortened (cycles 4-7) so that a firing pulse is cut by the next
// zero crossing, and lengthened (cycles 8-13) so the saw-tooth wraps at C_max.
//
// Checked against the testbench's own models:
//   gate pulses start C + 3 clock edges after the comparator edge (two
//   synchroniser stages, the detector, then the saw-tooth match), with C the
//   firing angle in force at that crossing, and last DC cycles unless a
//   crossing ends them;
//   the decoded mode after each cycle boundary is the script's mode;
//   the three PI controllers (modelled in 64-bit integers) and the mux,
//   which passes nothing on before the first mode has been decoded;
//   the scaled, clipped firing angle taken over at each phase-A crossing;
//   the reference speed after button presses.
// Each mechanism must occur at least once.

  import acvc_pkg::*;

  localparam int unsigned LINE_HZ_TB = 60;
  localparam int unsigned CMAX_TB    = cmax_of(CLK_HZ, LINE_HZ_TB);
  localparam int          CW_TB      = $clog2(CMAX_TB + 1);
  localparam int          DC_TB      = int'(deg_to_count(CMAX_TB, 10));
  localparam longint      C_HI_TB    = longint'(deg_to_count(CMAX_TB, 120));
  localparam longint      C_LO_TB    = 0;
  localparam int          P_NOM      = int'(CLK_HZ / LINE_HZ_TB);
  localparam int          NCYC       = 16;
  localparam int          S_W_TB     = 14;

  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] zc_comp = '0, i_pos = '0, i_neg = '0;
  logic adc_valid = 1'b0, btn_up = 1'b0, btn_dn = 1'b0;
  logic [S_W_TB-1:0] adc_speed = '0;
  logic [2:0] gate;
  mode_t mode;
  logic mode_update, clip_hi, clip_lo;
  logic [CW_TB-1:0] c_theta;
  logic [S_W_TB-1:0] ref_speed, sensed_speed;
  logic signed [17:0] speed_err;
  logic signed [39:0] u_sel;
  logic [2:0] mode_seen, phase_pos, saw_wrap, pulse_done, pulse_cut;

  int checks = 0, failures = 0;
  int cur_cycle = 0;
  int pat_of_cycle [NCYC];

  // mechanism counters
  int n_zc = 0, n_wrap = 0, n_pulse = 0, n_end_count = 0, n_end_zc = 0;
  int n_mode [3] = '{0, 0, 0};
  int n_mode_switch = 0, n_clip_hi = 0, n_clip_lo = 0, n_in_range = 0;
  int n_up = 0, n_dn = 0, n_pi = 0, n_angle_update = 0, n_done_flag = 0, n_cut_flag = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- script
  // mode pattern: 0 = 0/2, 1 = 0/2/3, 2 = 2/3
  function automatic int script_pat(input int c);
    if (c < 4)       return 2;
    else if (c < 8)  return 1;
    else if (c < 14) return 0;
    else             return 2;
  endfunction

  function automatic int script_off(input int c);   // speed below reference
    if (c < 4)       return 10;
    else if (c < 8)  return 5;
    else if (c < 14) return -15;
    else             return 0;
  endfunction

  function automatic int script_period(input int c);
    if (c >= 4 && c < 8)  return P_NOM * 7 / 10;
    if (c >= 8 && c < 14) return P_NOM * 101 / 100;
    return P_NOM;
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

  // ------------------------------------------------------------- stimulus
  int ref_model;
  initial begin
    automatic longint gt = 0;
    ref_model = 8192;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      automatic int P = script_period(c);
      automatic int spl = P / 12;
      cur_cycle = c;
      pat_of_cycle[c] = script_pat(c);
      for (int t = 0; t < P; t++) begin
        zc_comp[0] = (t < P / 2);
        zc_comp[1] = (((t + P - P / 3) % P) < P / 2);
        zc_comp[2] = (((t + P - 2 * P / 3) % P) < P / 2);
        if (t >= 1 && (t - 1) % spl == 0 && (t - 1) / spl < 12)
          drive_currents(spell(pat_of_cycle[c], (t - 1) / spl));
        adc_valid = (gt % longint'(SAMPLE_CYC) == 0);
        if (adc_valid) begin
          automatic int s = int'(ref_speed) - E_UNIT * script_off(c);
          adc_speed = S_W_TB'(s < 0 ? 0 : s > 16383 ? 16383 : s);
        end
        // buttons: two presses up in cycle 14, one down in cycle 15
        btn_up = (c == 14) && ((t > 10 && t < 40) || (t > 100 && t < 130));
        btn_dn = (c == 15) && (t > 10 && t < 40);
        @(negedge clk);
        gt++;
      end
    end
    repeat (20) @(negedge clk);
    check(int'(ref_speed) == 8192 + 64, "reference after two ups and one down");
    $display("zc=%0d wrap=%0d pulses=%0d end_count=%0d end_zc=%0d",
             n_zc, n_wrap, n_pulse, n_end_count, n_end_zc);
    $display("modes 0/2=%0d 0/2/3=%0d 2/3=%0d switches=%0d", n_mode[0], n_mode[1],
             n_mode[2], n_mode_switch);
    $display("clip_hi=%0d clip_lo=%0d in_range=%0d up=%0d dn=%0d pi=%0d angle_updates=%0d",
             n_clip_hi, n_clip_lo, n_in_range, n_up, n_dn, n_pi, n_angle_update);
    check(n_done_flag == n_end_count && n_cut_flag == n_end_zc,
          "pulse-end flags agree with the measured pulse widths");
    check(n_sel_seen > 0 && n_sel_seen == n_sel_exp,
          "controller outputs passed on only after the first decoded mode");
    check(n_zc > 0, "zero crossings seen");
    check(n_wrap > 0, "saw-tooth wrapped at C_max");
    check(n_end_count > 0, "pulse ended by width counter");
    check(n_end_zc > 0, "pulse cut by zero crossing");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes decoded");
    check(n_mode_switch >= 3, "mode switches");
    check(n_clip_hi > 0, "firing angle clipped at maximum");
    check(n_clip_lo > 0, "firing angle clipped at minimum");
    check(n_in_range > 0, "firing angle inside limits");
    check(n_up == 2 && n_dn == 1, "button presses");
    check(n_pi > 0, "PI updates");
    check(n_angle_update > 0, "firing-angle updates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // -------------------------------------------------------------- monitor
  // Runs on the rising edge, before the design's registers update: every
  // design signal read here holds the value of the cycle that ends.
  longint cyc = 0;
  longint t_edge [3], t_edge_prev [3], t_rise [3];
  logic [2:0] comp_seen = '0, gate_q = '0, synced = '0;
  longint c_lat [3];
  longint pi_u [3];
  longint e_prev_m = 0;
  longint q_u [$][3];
  int     mux_mode;
  longint u_sel_exp = 0, pending_exp;
  bit     chk_angle = 0;
  longint angle_exp = 0;
  mode_t  mode_q = MODE_0_2;
  bit     mode_known = 1'b0;
  int     n_sel_exp = 0, n_sel_seen = 0;
  int     ref_q = 8192;

  function automatic longint clipc(input longint v);
    return v > C_HI_TB ? C_HI_TB : v < C_LO_TB ? C_LO_TB : v;
  endfunction

  function automatic longint floor256(input longint v);
    return v >>> 8;
  endfunction

  initial begin
    for (int p = 0; p < 3; p++) begin
      pi_u[p] = longint'(C_HI_TB) <<< 8;
      t_edge[p] = 0;
      t_edge_prev[p] = 0;
      t_rise[p] = 0;
      c_lat[p] = C_HI_TB;
    end
    pending_exp = C_HI_TB;
  end

  always @(posedge clk) begin
    if (!rst) begin
      // ---- firing path, per phase
      for (int p = 0; p < 3; p++) begin
        if (gate[p] && !gate_q[p]) begin          // rose at edge cyc-1
          n_pulse++;
          t_rise[p] = cyc - 1;
          // after its first crossing a phase fires at C + 3, or, if the
          // saw-tooth wrapped at C_max before the next crossing, once more
          // C_max + 1 counts later (which may coincide with the next edge)
          if (synced[p])
            check(cyc - 1 - t_edge[p] == c_lat[p] + 3 ||
                  cyc - 1 - t_edge[p] == c_lat[p] + 3 + longint'(CMAX_TB) + 1 ||
                  cyc - 1 - t_edge_prev[p] == c_lat[p] + 3 + longint'(CMAX_TB) + 1,
                  $sformatf("phase %0d gate delay %0d, angle %0d", p, cyc - 1 - t_edge[p], c_lat[p]));
        end
        if (!gate[p] && gate_q[p]) begin          // fell at edge cyc-1
          if (cyc - 1 - t_rise[p] == longint'(DC_TB)) n_end_count++;
          else begin
            n_end_zc++;
            check(cyc - 1 - t_rise[p] < longint'(DC_TB) && t_edge[p] == cyc - 3,
                  $sformatf("phase %0d short pulse only at a crossing", p));
          end
        end
        if (zc_comp[p] != comp_seen[p]) begin
          t_edge_prev[p] = t_edge[p];
          t_edge[p] = cyc;
          comp_seen[p] = zc_comp[p];
        end
        if (dut.zc[p]) begin
          n_zc++;
          synced[p] = 1'b1;
          c_lat[p] = longint'(c_theta);
        end
        if (saw_wrap[p]) n_wrap++;
        if (pulse_done[p]) n_done_flag++;
        if (pulse_cut[p]) n_cut_flag++;
      end
      gate_q = gate;

      // ---- mode decoding
      if (mode_update) begin
        check(int'(mode) == pat_of_cycle[cur_cycle - 1],
              $sformatf("mode %0d after cycle %0d", mode, cur_cycle - 1));
        n_mode[int'(mode)]++;
        if (mode != mode_q) n_mode_switch++;
        mode_q = mode;
        mode_known = 1'b1;
      end

      // ---- firing angle taken over at phase-A crossings
      if (chk_angle) begin
        check(longint'(c_theta) == angle_exp, "firing angle after phase-A crossing");
        chk_angle = 0;
      end
      if (dut.zc[0]) begin
        angle_exp = pending_exp;
        chk_angle = 1;
        n_angle_update++;
      end

      // ---- speed loop
      if (adc_valid) begin
        automatic longint e = longint'(ref_speed) - longint'(adc_speed);
        pi_u[0] += 2560 * e - 2304 * e_prev_m;
        pi_u[1] += 2560 * e - 2304 * e_prev_m;
        pi_u[2] += -2560 * e + 2304 * e_prev_m;
        e_prev_m = e;
        q_u.push_back(pi_u);
        n_pi++;
      end
      // controller outputs reach the mux only once a mode has been decoded
      if (dut.v_0_2) begin
        mux_mode = int'(mode);
        if (q_u.size() > 0) begin
          if (mode_known) u_sel_exp = q_u.pop_front()[mux_mode];
          else void'(q_u.pop_front());
        end else check(1'b0, "controller output without a sample");
        n_sel_exp += int'(mode_known);
      end
      if (dut.u_sel_valid) begin
        automatic longint sc = floor256(longint'(u_sel));
        n_sel_seen++;
        check(longint'(u_sel) == u_sel_exp, "selected controller output");
        pending_exp = clipc(sc);
        if (sc > C_HI_TB) n_clip_hi++;
        else if (sc < C_LO_TB) n_clip_lo++;
        else n_in_range++;
      end

      // ---- reference speed
      if (int'(ref_speed) != ref_q) begin
        if (int'(ref_speed) == ref_q + 64) n_up++;
        else if (int'(ref_speed) == ref_q - 64) n_dn++;
        else check(1'b0, "reference moves in steps of 64");
        ref_q = int'(ref_speed);
      end
    end
    cyc++;
  end

  initial begin
    repeat (NCYC * P_NOM * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
