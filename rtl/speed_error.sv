// Sensed-speed register and error subtractor.
//
// When the speed ADC delivers a sample (adc_valid), the sensed speed is
// registered and the error e = reference - sensed is formed as a signed
// E_W-bit number for the PI controllers, with e_valid marking the new sample.
// The sample rate of the ADC is therefore the sampling rate of the PI loop.
//
// Own choices: speeds are unsigned S_W bits; E_W must exceed S_W so the
// difference never overflows; the error is registered with the sample.
//
// Timing: e and e_valid appear in the cycle after adc_valid.
module speed_error #(
  parameter int unsigned S_W = 14,
  parameter int unsigned E_W = 18
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  adc_valid,
  input  logic [S_W-1:0]        adc_speed,   // sensed speed
  input  logic [S_W-1:0]        ref_speed,   // reference speed
  output logic [S_W-1:0]        sensed,      // last sensed speed
  output logic signed [E_W-1:0] e,
  output logic                  e_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      sensed  <= '0;
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= adc_valid;
      if (adc_valid) begin
        sensed <= adc_speed;
        e      <= E_W'(signed'({1'b0, ref_speed})) - E_W'(signed'({1'b0, adc_speed}));
      end
    end
  end

  initial assert (E_W > S_W) else $fatal(1, "E_W must be wider than S_W");
endmodule
