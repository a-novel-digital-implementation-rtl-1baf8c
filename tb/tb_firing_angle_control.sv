// Testbench for firing_angle_control.
//
// With a 24-bit input, a 4-bit scaling shift and limits 100 .. 700 counts,
// random controller outputs (inside, above and below the range, negative
// ones included) are presented. The testbench computes floor(u / 16),
// clips it itself and checks the holding value through c_theta: c_theta
// must keep its old value until the next update pulse and take the clipped
// value right after it. The clip flags are checked and both must occur.
module tb_firing_angle_control;
  localparam int U_W = 24, SH = 4, CW = 10, LO = 100, HI = 700, INIT = 500;
  logic clk = 1'b0, rst = 1'b1, u_valid = 1'b0, update = 1'b0;
  logic signed [U_W-1:0] u = '0;
  logic [CW-1:0] c_theta;
  logic clip_hi, clip_lo;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0, n_in = 0;
  int cur, want, sc;

  firing_angle_control #(.U_W(U_W), .SCALE_SHIFT(SH), .CW(CW), .C_LO(LO),
                         .C_HI(HI), .C_INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (c_theta=%0d want=%0d)", what, $time, c_theta, want);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(c_theta == CW'(INIT), "reset angle");
    rst = 1'b0;
    cur = INIT;
    for (int i = 0; i < 300; i++) begin
      automatic int r = int'($urandom_range(0, 4));
      // value in counts, before scaling
      sc = (r == 0) ? int'($urandom_range(0, 3000)) - 1500 :
           (r == 1) ? -int'($urandom_range(1, 5000)) :
                      int'($urandom_range(0, 900));
      u = U_W'(sc * 16 + int'($urandom_range(0, 15)));
      want = (sc > HI) ? HI : (sc < LO) ? LO : sc;
      u_valid = 1'b1;
      @(negedge clk);
      u_valid = 1'b0;
      check(clip_hi == (sc > HI), "clip_hi flag");
      check(clip_lo == (sc < LO), "clip_lo flag");
      if (sc > HI) n_hi++; else if (sc < LO) n_lo++; else n_in++;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(int'(c_theta) == cur, "angle held until the half-cycle update");
      end
      update = 1'b1;
      @(negedge clk);
      update = 1'b0;
      check(int'(c_theta) == want, "angle after update");
      cur = want;
    end
    check(n_hi > 0 && n_lo > 0 && n_in > 0, "clipping both ways and pass-through");
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
