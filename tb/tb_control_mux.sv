// Testbench for control_mux.
//
// Presents random outputs of the three PI controllers with random modes and
// valid strobes, and checks that one cycle after each strobe u_sel holds the
// output of the controller belonging to the mode, that u_sel_valid repeats
// the strobe, and that u_sel holds its value between strobes.
module tb_control_mux;
  import acvc_pkg::*;
  localparam int U_W = 40;
  logic clk = 1'b0, rst = 1'b1, u_valid = 1'b0;
  mode_t mode = MODE_0_2;
  logic signed [U_W-1:0] u_0_2 = '0, u_0_2_3 = '0, u_2_3 = '0, u_sel, held;
  logic u_sel_valid;
  logic signed [U_W-1:0] want;
  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};

  control_mux #(.U_W(U_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(u_sel == '0 && !u_sel_valid, "reset state");
    rst = 1'b0;
    held = '0;
    for (int i = 0; i < 500; i++) begin
      automatic int m = int'($urandom_range(0, 2));
      mode    = mode_t'(m);
      u_0_2   = {8'($urandom), $urandom};
      u_0_2_3 = {8'($urandom), $urandom};
      u_2_3   = {8'($urandom), $urandom};
      u_valid = ($urandom_range(0, 2) != 0);
      want    = (m == 0) ? u_0_2 : (m == 1) ? u_0_2_3 : u_2_3;
      @(negedge clk);
      check(u_sel_valid == u_valid, "valid follows one cycle later");
      if (u_valid) begin
        check(u_sel == want, $sformatf("selected output for mode %0d", m));
        held = u_sel;
        n_sel[m]++;
      end else begin
        check(u_sel == held, "holds without strobe");
      end
    end
    check(n_sel[0] > 0 && n_sel[1] > 0 && n_sel[2] > 0, "each input selected");
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
