// Self-checking test of the winner multiplexer: random line contents with
// VPIDs in ascending groups; for every VPID the output must be the lowest
// even line carrying it, and `found` must be low for an absent VPID.
module tb_winner_mux;
  import ssv_pkg::*;
  localparam int N = 16;
  entry_t lines [N];
  entry_t win;
  logic [4:0] sel;
  logic found;
  int checks = 0, failures = 0;

  winner_mux #(.N(N)) dut (.lines(lines), .sel(sel), .win(win), .found(found));

  initial begin
    for (int t = 0; t < 300; t++) begin
      int vp;
      vp = 0;
      for (int i = 0; i < N; i += 2) begin
        if ($urandom_range(0, 2) == 0) vp += $urandom_range(1, 2);
        for (int k = 0; k < 2; k++) begin
          lines[i+k] = '0;
          lines[i+k].vpid = 5'(vp);
          lines[i+k].valid = 1'($urandom);
          lines[i+k].arrival = 16'($urandom);
          lines[i+k].idx = 10'(i+k);
        end
      end
      for (int s = 0; s < 32; s++) begin
        int exp_i;
        exp_i = -1;
        for (int i = 0; i < N; i += 2)
          if (exp_i < 0 && lines[i].vpid == 5'(s)) exp_i = i;
        sel = 5'(s);
        #1;
        checks++;
        if (found !== (exp_i >= 0) || (exp_i >= 0 && win !== lines[exp_i])) begin
          failures++;
          $display("FAIL vpid %0d: found=%0b idx=%0d expected %0d", s, found, win.idx, exp_i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
