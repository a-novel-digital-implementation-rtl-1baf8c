// Testbench for pi_controller.
//
// Instance a uses the default widths with k1 = 37, k2 = -29 and sees 400
// random error samples, some back to back, some far apart. A reference model
// in 64-bit integers runs u(n) = u(n-1) + k1 e(n) + k2 e(n-1); every u_valid
// must come exactly three cycles after the sample's e_valid and carry the
// model's value. Instance b has a 20-bit output and large gains so that it
// saturates; the model clamps the same way.
module tb_pi_controller;
  localparam int E_W = 18, K_W = 18;
  logic clk = 1'b0, rst = 1'b1, e_valid = 1'b0;
  logic signed [E_W-1:0] e = '0;
  logic signed [39:0] u_a;
  logic signed [19:0] u_b;
  logic v_a, v_b;
  int checks = 0, failures = 0, n_sat = 0;
  longint cyc = 0;
  longint mod_a = 7, mod_b = 0, e_prev = 0;
  longint t_q[$];

  pi_controller #(.E_W(E_W), .K_W(K_W), .U_W(40), .K1(18'sd37), .K2(-18'sd29),
                  .U_INIT(40'sd7)) dut_a (
    .clk(clk), .rst(rst), .e_valid(e_valid), .e(e), .u(u_a), .u_valid(v_a));
  pi_controller #(.E_W(E_W), .K_W(K_W), .U_W(20), .K1(18'sd60000), .K2(-18'sd20000)) dut_b (
    .clk(clk), .rst(rst), .e_valid(e_valid), .e(e), .u(u_b), .u_valid(v_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && e_valid) begin
      mod_a = mod_a + 37 * longint'(e) - 29 * e_prev;
      mod_b = mod_b + 60000 * longint'(e) - 20000 * e_prev;
      if (mod_b > 524287) begin mod_b = 524287; n_sat++; end
      if (mod_b < -524288) begin mod_b = -524288; n_sat++; end
      e_prev = longint'(e);
      t_q.push_back(cyc + 1);   // cycle count after the sampling edge
    end
  end

  // the model value for sample k is queued with it
  longint ua_q[$], ub_q[$];
  always @(posedge clk) if (!rst && e_valid) begin
    #0;
    ua_q.push_back(mod_a);
    ub_q.push_back(mod_b);
  end

  always @(negedge clk) if (!rst) begin
    check(v_a == v_b, "both instances in step");
    if (v_a) begin
      if (t_q.size() == 0) check(1'b0, "u_valid without sample");
      else begin
        automatic longint t0 = t_q.pop_front();
        check(cyc - t0 == 3, $sformatf("latency %0d cycles", cyc - t0));
        check(longint'(u_a) == ua_q.pop_front(), "u(n) of instance a");
        check(longint'(u_b) == ub_q.pop_front(), "saturated u(n) of instance b");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    check(u_a == 40'sd7, "reset value U_INIT");
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      e       = E_W'($signed($urandom_range(0, 2 * 131071)) - 131071);
      if (i % 7 == 0) e = E_W'(i < 200 ? 131071 : -131072);
      e_valid = 1'b1;
      @(negedge clk);
      e_valid = 1'b0;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    check(t_q.size() == 0, "every sample produced an output");
    check(n_sat > 0, "saturation exercised");
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
