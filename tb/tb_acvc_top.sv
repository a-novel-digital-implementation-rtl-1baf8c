// End-to-end testbench of acvc_top at a reduced clock rate.
//
// The top is built for a 72 kHz clock on the 60 Hz supply, which makes the
// saw-tooth span 0 .. 600 counts per half cycle (0.3 deg per count) and a
// firing pulse 33 counts long; everything else keeps its default. The plant
// model, the script and the checks are in acvc_top_harness.svh.
module tb_acvc_top;
  localparam int unsigned CLK_HZ     = 72_000;
  localparam int          SAMPLE_CYC = 100;
  localparam int          E_UNIT     = 1;

  `include "acvc_top_harness.svh"

  acvc_top #(.CLK_HZ(CLK_HZ)) dut (.*);
endmodule
