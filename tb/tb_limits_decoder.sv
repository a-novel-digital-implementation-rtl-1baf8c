// Testbench for limits_decoder.
//
// The testbench plays one supply cycle of L clock cycles at a time, made of
// 12 spells in which zero, two or three lines conduct. Each cycle follows
// one of five patterns: 0/2, 0/2/3, 2/3, no current at all, and all three
// lines conducting throughout, in random order. Conducting lines get the
// positive or the negative comparator at random. The cycle boundary pulse
// is placed so that, behind the two-stage synchroniser, the boundary sample
// is the last one of the pattern before, and the decoder sees exactly one
// pattern per cycle. After each boundary
// the mode must be the one of the pattern just played, worked out by the
// testbench's own table.
module tb_limits_decoder;
  import acvc_pkg::*;
  localparam int L = 120;
  logic clk = 1'b0, rst = 1'b1, cycle_start = 1'b0;
  logic [2:0] i_pos = '0, i_neg = '0;
  mode_t mode;
  logic mode_update, mode_valid;
  logic [2:0] seen;
  int checks = 0, failures = 0;
  int n_mode [3] = '{0, 0, 0};

  limits_decoder #(.SYNC_STAGES(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (mode=%0d)", what, $time, mode);
    end
  endtask

  // conducting-line count of spell s in pattern pat
  function automatic int spell(input int pat, input int s);
    case (pat)
      0: return (s % 2 == 0) ? 0 : 2;              // 0/2
      1: return (s % 3 == 0) ? 0 : (s % 3 == 1) ? 2 : 3;  // 0/2/3
      2: return (s % 2 == 0) ? 2 : 3;              // 2/3
      3: return 0;                                 // no current
      default: return 3;                           // all lines on
    endcase
  endfunction

  function automatic int expected(input int pat);
    case (pat)
      0, 3:    return 0;   // MODE_0_2
      1:       return 1;   // MODE_0_2_3
      default: return 2;   // MODE_2_3
    endcase
  endfunction

  task automatic drive(input int n);
    logic [2:0] on, pol;
    pol = 3'($urandom);
    case (n)
      0: on = 3'b000;
      2: begin
        automatic int off = int'($urandom_range(0, 2));
        on = ~(3'b001 << off);
      end
      default: on = 3'b111;
    endcase
    i_pos = on & pol;
    i_neg = on & ~pol;
  endtask

  initial begin
    automatic int prev = -1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 60; c++) begin
      automatic int pat = (c < 5) ? c : int'($urandom_range(0, 4));
      for (int k = 0; k < L; k++) begin
        if (k % (L / 12) == 0) drive(spell(pat, k / (L / 12)));
        cycle_start = (k == 1);
        @(negedge clk);
        cycle_start = 1'b0;
        if (k == 1 && prev >= 0) begin
          check(mode_update == 1'b1, "mode updated at boundary");
          check(int'(mode) == expected(prev), $sformatf("mode of pattern %0d", prev));
          n_mode[int'(mode)]++;
        end
        if (k == 2 && prev < 0) check(mode_update == 1'b0, "first boundary only primes");
        if (k == 2) check(mode_valid == (prev >= 0), "mode valid from the first decoded cycle");
        if (k > 2) check(mode_update == 1'b0, "no update inside a cycle");
      end
      prev = pat;
    end
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "all three modes decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
