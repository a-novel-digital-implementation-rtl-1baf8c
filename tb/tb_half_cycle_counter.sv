// Testbench for half_cycle_counter.
//
// With C_max = 100 it checks the ramp after a zero-crossing pulse (value n
// after n cycles), the return to zero at C_max when no crossing arrives (a
// period of C_max + 1 cycles), the restart at a crossing that comes early,
// and C_max computed from 50 MHz / 60 Hz by the package function.
module tb_half_cycle_counter;
  import acvc_pkg::*;
  localparam int unsigned CMAX = 100;
  localparam int W = $clog2(CMAX + 1);
  logic clk = 1'b0, rst = 1'b1, zc = 1'b0;
  logic [W-1:0] saw;
  logic at_max;
  int checks = 0, failures = 0;

  half_cycle_counter #(.CMAX(CMAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (saw=%0d)", what, $time, saw);
    end
  endtask

  initial begin
    check(cmax_of(50_000_000, 60) == 416666, "C_max of 50 MHz / 60 Hz");
    check(deg_to_count(416666, 180) == 416666, "180 deg is C_max");
    check(deg_to_count(416666, 90) == 208333, "90 deg");
    repeat (3) @(negedge clk);
    check(saw == 0, "zero in reset");
    rst = 1'b0;
    // free run: 0,1,...,CMAX,0,1,...
    for (int n = 0; n < 3 * (CMAX + 1); n++) begin
      @(negedge clk);
      check(saw == W'((n + 1) % (CMAX + 1)), "free-running ramp");
      check(at_max == (saw == W'(CMAX)), "at_max flag");
    end
    // early zero crossings at random positions
    for (int k = 0; k < 20; k++) begin
      automatic int len = int'($urandom_range(1, CMAX - 1));
      zc = 1'b1;
      @(negedge clk);
      zc = 1'b0;
      check(saw == 0, "reset by zero crossing");
      for (int n = 1; n <= len; n++) begin
        @(negedge clk);
        check(saw == W'(n), "ramp after crossing");
      end
    end
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
