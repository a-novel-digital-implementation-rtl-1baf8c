// Control multiplexer: passes on the output of the PI controller that
// belongs to the decoded mode of operation.
//
// All three PI controllers see the same error samples and update together;
// the mux registers the one chosen by mode (MODE_0_2 -> u_0_2, MODE_0_2_3 ->
// u_0_2_3, MODE_2_3 -> u_2_3) whenever they report a new output, and repeats
// their valid strobe one cycle later. The select itself comes from the
// limits decoder and changes once per supply cycle.
module control_mux
  import acvc_pkg::*;
#(
  parameter int unsigned U_W = 40
) (
  input  logic                  clk,
  input  logic                  rst,
  input  mode_t                 mode,
  input  logic signed [U_W-1:0] u_0_2,
  input  logic signed [U_W-1:0] u_0_2_3,
  input  logic signed [U_W-1:0] u_2_3,
  input  logic                  u_valid,
  output logic signed [U_W-1:0] u_sel,
  output logic                  u_sel_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      u_sel       <= '0;
      u_sel_valid <= 1'b0;
    end else begin
      u_sel_valid <= u_valid;
      if (u_valid) begin
        unique case (mode)
          MODE_0_2:   u_sel <= u_0_2;
          MODE_0_2_3: u_sel <= u_0_2_3;
          default:    u_sel <= u_2_3;
        endcase
      end
    end
  end
endmodule
