// Configuration sweep: the end-to-end test on the other evaluated sizes of
// the scheduler, all at once: 32 and 64 streams with 4 VPIDs, and 128
// streams with 32 VPIDs. (16 streams with 4 VPIDs is tb_ssv_top, 64
// streams with 32 VPIDs is tb_ssv_top_full.) Each run checks its round
// period of log2(N)+V cycles and every winner against the reference model.
module tb_ssv_workloads;
  logic done [3];
  int   c [3], f [3];
  int   checks, failures;

  ssv_e2e_env #(.N(32),  .V(4))  u_ssv4_32   (.done_o(done[0]), .checks_o(c[0]), .failures_o(f[0]));
  ssv_e2e_env #(.N(64),  .V(4))  u_ssv4_64   (.done_o(done[1]), .checks_o(c[1]), .failures_o(f[1]));
  ssv_e2e_env #(.N(128), .V(32)) u_ssv32_128 (.done_o(done[2]), .checks_o(c[2]), .failures_o(f[2]));

  initial begin
    #1;
    wait (done[0] && done[1] && done[2]);
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end
endmodule
