// Testbench for zero_cross_detector.
//
// Drives the comparator input with a square wave of randomly varying half
// periods (changed on the falling clock edge, like an asynchronous signal)
// and checks every cycle that zc_pulse equals the XOR of the input as sampled
// on the two previous clock edges delayed by the two-stage synchroniser, that
// phase_pos follows the input, that no pulse appears during reset, and that
// each half period gives exactly one pulse.
module tb_zero_cross_detector;
  logic clk = 1'b0, rst = 1'b1, comp_in = 1'b0;
  logic zc_pulse, phase_pos;
  int   checks = 0, failures = 0;
  logic hist [0:3];          // comp_in at the last four rising edges
  int   pulses = 0, toggles = 0;

  zero_cross_detector #(.SYNC_STAGES(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    hist[3] <= hist[2];
    hist[2] <= hist[1];
    hist[1] <= hist[0];
    hist[0] <= comp_in;
  end

  initial begin
    for (int i = 0; i < 4; i++) hist[i] = 1'b0;
    repeat (3) @(negedge clk);
    check(zc_pulse == 1'b0, "no pulse in reset");
    comp_in = 1'b1;                    // edge during reset: must be swallowed
    repeat (4) @(negedge clk);
    check(zc_pulse == 1'b0, "no pulse in reset after edge");
    rst = 1'b0;
    repeat (4) @(negedge clk);
    for (int h = 0; h < 60; h++) begin
      automatic int len = 4 + int'($urandom_range(0, 40));
      comp_in = ~comp_in;
      toggles++;
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        // after the edge that took hist[0], level = hist[1], level_q = hist[2]
        check(zc_pulse == (hist[1] ^ hist[2]), "pulse = edge of synchronised input");
        check(phase_pos == hist[1], "phase_pos level");
        if (zc_pulse) pulses++;
      end
    end
    repeat (5) @(negedge clk) if (zc_pulse) pulses++;
    check(pulses == toggles, $sformatf("one pulse per crossing (%0d vs %0d)", pulses, toggles));
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
