// Testbench for reference_speed.
//
// With a step of 1000 and a ceiling of 10000, it presses the increase and
// decrease buttons in random order with random hold times, and checks that
// each press moves the reference by one step (three cycles after the press),
// that holding a button gives only one step, that both buttons together do
// nothing, and that the reference stops at 0 and at the ceiling.
module tb_reference_speed;
  localparam int S_W = 14, STEP = 1000, MAX = 10000, INIT = 5000;
  logic clk = 1'b0, rst = 1'b1, btn_up = 1'b0, btn_dn = 1'b0;
  logic [S_W-1:0] ref_speed;
  int checks = 0, failures = 0, model, n_top = 0, n_bot = 0;

  reference_speed #(.S_W(S_W), .STEP(STEP), .REF_MAX(MAX), .REF_INIT(INIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (ref=%0d model=%0d)", what, $time, ref_speed, model);
    end
  endtask

  task automatic press(input bit up, input bit dn, input int hold);
    btn_up = up;
    btn_dn = dn;
    repeat (2) @(negedge clk);
    check(int'(ref_speed) == model, "no change before synchroniser");
    @(negedge clk);
    if (up && !dn) model = (model + STEP > MAX) ? MAX : model + STEP;
    if (dn && !up) model = (model < STEP) ? 0 : model - STEP;
    check(int'(ref_speed) == model, "one step per press");
    repeat (hold) begin
      @(negedge clk);
      check(int'(ref_speed) == model, "holding gives no further step");
    end
    btn_up = 1'b0;
    btn_dn = 1'b0;
    repeat (4) @(negedge clk);
    if (model == MAX) n_top++;
    if (model == 0) n_bot++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    model = INIT;
    check(int'(ref_speed) == INIT, "reset value");
    for (int i = 0; i < 8; i++) press(1'b1, 1'b0, 2);       // to the ceiling
    for (int i = 0; i < 12; i++) press(1'b0, 1'b1, 1);      // to zero
    for (int i = 0; i < 150; i++) begin
      automatic int r = int'($urandom_range(0, 4));
      press(r < 2 || r == 4, r >= 2, int'($urandom_range(0, 5)));
    end
    check(n_top > 0 && n_bot > 0, "both limits reached");
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
