// End-to-end test of the scheduler core at a reduced size: 16 streams
// shared by up to 4 virtual schedulers (one of the evaluated SSV4
// configurations). The test itself is in ssv_e2e_body.svh.
module tb_ssv_top;
  import ssv_pkg::*;
  import ssv_tb_pkg::*;

  localparam int N = 16, V = 4, M = 4, WQD = 4, IFD = 4;

`include "ssv_e2e_body.svh"

  ssv_top #(.N_STREAMS(N), .N_VPID(V), .IN_FIFO_DEPTH(IFD), .WQ_DEPTH(WQD)) dut (.*);
endmodule
