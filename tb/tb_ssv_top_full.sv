// End-to-end test of the scheduler core with every parameter at its
// default: 64 streams shared by up to 32 virtual schedulers. The test
// itself is in ssv_e2e_body.svh.
module tb_ssv_top_full;
  import ssv_pkg::*;
  import ssv_tb_pkg::*;

  localparam int N = 64, V = 32, M = 6, WQD = 4, IFD = 4;

`include "ssv_e2e_body.svh"

  ssv_top dut (.*);
endmodule
