// End-to-end testbench of acvc_top with every parameter at its default:
// 50 MHz clock, 60 Hz supply, saw-tooth maximum 416666. It runs the same
// 16-supply-cycle script as tb_acvc_top (about 13 million clock cycles),
// with a speed sample every 4000 clock cycles and errors 40 times larger so
// the controllers sweep the wider count range. The plant model and the
// checks are in acvc_top_harness.svh.
module tb_acvc_top_full;
  localparam int unsigned CLK_HZ     = 50_000_000;
  localparam int          SAMPLE_CYC = 4000;
  localparam int          E_UNIT     = 40;

  `include "acvc_top_harness.svh"

  acvc_top dut (.*);
endmodule
