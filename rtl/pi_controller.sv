// Pipelined digital PI controller in incremental form.
//
// The continuous law u = kp e + ki * integral(e) is discretised with
// trapezoidal integration into the recursion
//     u(n) = u(n-1) + k1 e(n) + k2 e(n-1),
//     k1 = kp + T ki / 2,   k2 = -kp + T ki / 2,
// with T the sampling period, so only u(n-1), e(n) and e(n-1) are stored.
// The datapath is two 18x18 multiplications and the additions, with a
// pipeline register after each level:
//   edge 0: e(n) captured, e(n-1) kept          (on e_valid)
//   edge 1: products k1 e(n) and k2 e(n-1)
//   edge 2: their sum
//   edge 3: u(n) = u(n-1) + sum                 (u_valid high after it)
// A valid bit travelling down a three-stage shift register is the sequencer
// that enables the u(n) register three cycles after e_valid. Samples may
// arrive on consecutive cycles.
//
// Own choices: k1 and k2 are signed K_W-bit fixed-point numbers; their
// scaling is left to the consumer of u (the firing-angle block shifts u right).
// u saturates at the limits of its U_W-bit range instead of wrapping, and
// resets to U_INIT, with e(n-1) reset to 0.
module pi_controller #(
  parameter int unsigned           E_W    = 18,
  parameter int unsigned           K_W    = 18,
  parameter int unsigned           U_W    = 40,
  parameter logic signed [K_W-1:0] K1     = 2560,
  parameter logic signed [K_W-1:0] K2     = -2304,
  parameter logic signed [U_W-1:0] U_INIT = '0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  e_valid,  // new error sample
  input  logic signed [E_W-1:0] e,        // error e(n)
  output logic signed [U_W-1:0] u,        // controller output u(n)
  output logic                  u_valid   // u updated in the previous edge
);
  localparam int P_W = E_W + K_W;
  localparam int S_W = P_W + 1;
  localparam logic signed [U_W-1:0] U_MAX = {1'b0, {(U_W-1){1'b1}}};
  localparam logic signed [U_W-1:0] U_MIN = {1'b1, {(U_W-1){1'b0}}};

  logic signed [E_W-1:0] e_n, e_n1;
  logic signed [P_W-1:0] p1, p2;
  logic signed [S_W-1:0] sum;
  logic [2:0]            vld;     // sequencer
  logic signed [U_W+S_W:0] u_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      e_n  <= '0;
      e_n1 <= '0;
      p1   <= '0;
      p2   <= '0;
      sum  <= '0;
      vld  <= '0;
    end else begin
      vld <= {vld[1:0], e_valid};
      if (e_valid) begin
        e_n  <= e;
        e_n1 <= e_n;
      end
      p1  <= K1 * e_n;
      p2  <= K2 * e_n1;
      sum <= S_W'(p1) + S_W'(p2);
    end
  end

  assign u_next = (U_W+S_W+1)'(u) + (U_W+S_W+1)'(sum);

  always_ff @(posedge clk) begin
    if (rst) begin
      u       <= U_INIT;
      u_valid <= 1'b0;
    end else begin
      u_valid <= vld[2];
      if (vld[2]) begin
        if (u_next > (U_W+S_W+1)'(U_MAX))      u <= U_MAX;
        else if (u_next < (U_W+S_W+1)'(U_MIN)) u <= U_MIN;
        else                                   u <= U_W'(u_next);
      end
    end
  end
endmodule
