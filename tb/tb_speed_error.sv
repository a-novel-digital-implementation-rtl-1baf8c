// Testbench for speed_error.
//
// Random sensed and reference speeds, including the extremes, are applied
// with random sample strobes. One cycle after each strobe e must equal
// reference - sensed as a signed number and e_valid must be high; between
// strobes e and the sensed-speed register must hold.
module tb_speed_error;
  localparam int S_W = 14, E_W = 18;
  logic clk = 1'b0, rst = 1'b1, adc_valid = 1'b0;
  logic [S_W-1:0] adc_speed = '0, ref_speed = '0, sensed;
  logic signed [E_W-1:0] e;
  logic e_valid;
  int checks = 0, failures = 0, want = 0, want_s = 0, n_neg = 0, n_pos = 0;

  speed_error #(.S_W(S_W), .E_W(E_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (e=%0d want=%0d)", what, $time, e, want);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      automatic int s = (i == 0) ? 16383 : int'($urandom_range(0, 16383));
      automatic int r = (i == 0) ? 0 : (i == 1) ? 16383 : int'($urandom_range(0, 16383));
      automatic bit v = (i < 2) || ($urandom_range(0, 2) != 0);
      adc_speed = S_W'(s);
      ref_speed = S_W'(r);
      adc_valid = v;
      if (v) begin
        want = r - s;
        want_s = s;
      end
      @(negedge clk);
      check(e_valid == v, "e_valid one cycle after the sample");
      check(int'(e) == want, "error value");
      check(int'(sensed) == want_s, "sensed speed register");
      if (v && want < 0) n_neg++;
      if (v && want > 0) n_pos++;
    end
    check(n_neg > 0 && n_pos > 0, "both signs of error");
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
