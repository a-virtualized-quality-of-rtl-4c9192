// One end-to-end run of the scheduler core at a chosen size, for the
// configuration sweep in tb_ssv_workloads. Runs the test of
// ssv_e2e_body.svh and reports through `done_o`, `checks_o`, `failures_o`.
module ssv_e2e_env
  import ssv_pkg::*;
  import ssv_tb_pkg::*;
#(
  parameter int N = 16,
  parameter int V = 4
) (
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int M = $clog2(N), WQD = 4, IFD = 4;

  logic done = 1'b0;
  assign done_o = done;

`define SSV_E2E_SUBTEST
`include "ssv_e2e_body.svh"
`undef SSV_E2E_SUBTEST

  assign checks_o   = checks;
  assign failures_o = failures;

  ssv_top #(.N_STREAMS(N), .N_VPID(V), .IN_FIFO_DEPTH(IFD), .WQ_DEPTH(WQD)) dut (.*);
endmodule
