// Testbench for angle_pulse_counter.
//
// The testbench plays the saw-tooth itself: it counts 0 .. HALF-1 and raises
// the zero-crossing pulse in the last cycle of each half cycle, with HALF
// varying a little. Over many half cycles with random firing angles (changed
// at random moments, so also in mid half cycle) it checks every cycle that
// the gate is high exactly while the saw-tooth is in C+1 .. C+DC, with C the
// angle presented at the last crossing, and that the width counter ends a
// pulse after DC cycles or the crossing cuts it short.
module tb_angle_pulse_counter;
  localparam int unsigned CMAX = 200;
  localparam int unsigned DC   = 12;
  localparam int W = $clog2(CMAX + 1);
  logic clk = 1'b0, rst = 1'b1, zc = 1'b0;
  logic [W-1:0] saw = '0, c_theta_in = W'(50);
  logic gate, end_by_count, end_by_zc;
  int checks = 0, failures = 0;
  int n_count = 0, n_zc = 0, n_pulses = 0, width = 0;
  int unsigned c_act;

  angle_pulse_counter #(.CMAX(CMAX), .DC(DC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (saw=%0d C=%0d gate=%0d)", what, $time, saw, c_act, gate);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    c_act = 50;
    saw = '0;
    for (int h = 0; h < 300; h++) begin
      automatic int half = int'(CMAX) - 4 + int'($urandom_range(0, 4));
      for (int s = 0; s < half; s++) begin
        saw = W'(s);
        zc  = (s == half - 1);
        if ($urandom_range(0, 150) == 0) c_theta_in = W'($urandom_range(0, CMAX));
        @(posedge clk);
        #1;
        // state after this edge
        if (zc) begin
          check(gate == 1'b0, "gate cleared by crossing");
          c_act = 32'(c_theta_in);
        end else begin
          check(gate == (s >= int'(c_act) && s < int'(c_act + DC)), "gate window");
        end
        if (gate) width++;
        @(negedge clk);
        if (end_by_count) begin
          n_count++;
          check(width == int'(DC), "full pulse width");
          width = 0;
        end
        if (end_by_zc) begin
          n_zc++;
          check(width < int'(DC) && width > 0, "pulse cut by crossing");
          width = 0;
        end
      end
    end
    check(n_count > 50, "pulses ended by the width counter");
    check(n_zc > 0, "pulses cut by a crossing");
    $display("ended by count %0d, by crossing %0d", n_count, n_zc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
