// Synchroniser for one asynchronous input bit.
//
// A chain of STAGES flip-flops, all reset to RESET_VAL, shifting towards the
// most significant bit. With STAGES = 0 the input is passed on unregistered.
// Latency is STAGES clock cycles.
module bit_sync #(
  parameter int unsigned STAGES    = 2,
  parameter bit          RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  if (STAGES == 0) begin : g_none
    assign q = d;
  end else begin : g_chain
    logic [STAGES:0] chain;
    assign chain[0] = d;
    always_ff @(posedge clk) begin
      if (rst) chain[STAGES:1] <= {STAGES{RESET_VAL}};
      else     chain[STAGES:1] <= chain[STAGES-1:0];
    end
    assign q = chain[STAGES];
  end
endmodule
