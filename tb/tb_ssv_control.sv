// Self-checking test of the control unit at the default size (64 streams,
// 32 VPIDs). Checks the round structure (6 shuffle-exchange cycles, the
// first with `net_load`, then 32 update cycles with sel_vpid = 0..31, i.e.
// one round every 38 cycles back to back), the update broadcast, the
// current-time step, pause at the end of a round, command hold-off while
// running and on a full input FIFO, the stall on a full winner queue, the
// UNLOAD and READ_WIN responses and the reset command.
module tb_ssv_control;
  import ssv_pkg::*;

  localparam int N = 64, V = 32, M = 6, ROUND = M + V;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0; cmd_op_t cmd_op = CMD_NOP;
  logic cmd_ready, resp_valid; logic [31:0] resp_data;
  logic sched_clr, rbb_wr_en, arr_push; logic [1:0] rbb_wr_sel;
  logic arr_full_sel = 0; logic [31:0] unload_word = 32'hCAFE_0001;
  logic net_step, net_load; logic [4:0] sel_vpid;
  logic win_found = 1, win_valid = 1; logic [9:0] win_idx = 10'd17;
  logic upd_en; logic [9:0] upd_idx; logic [15:0] now;
  logic wq_push, wq_pop, wq_empty_sel = 0, wq_block = 0;
  pkt_id_t wq_head_sel = 32'h8123_4567;
  logic running, ev_round_done, ev_stall;
  int checks = 0, failures = 0, cycles = 0;

  ssv_control #(.N(N), .V(V)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycles); end
  endtask

  // issue a command for one cycle; returns whether it was accepted
  task automatic cmd(input cmd_op_t op, output bit acc);
    @(negedge clk); cmd_valid = 1; cmd_op = op;
    #1 acc = cmd_ready;
    @(negedge clk); cmd_valid = 0; cmd_op = CMD_NOP;
  endtask

  // record one round starting at a net_load cycle
  int load_cycles[$];
  int stall_cnt = 0;
  always @(posedge clk) begin
    if (net_load) load_cycles.push_back(cycles);
    if (ev_stall) stall_cnt++;
  end

  // per-cycle structure check while running
  int phase = -1;
  bit clr_seen = 0;
  always @(posedge clk) if (sched_clr) clr_seen <= 1;
  always @(negedge clk) if (rst_n) begin
    if (clr_seen) begin
      phase = -1;
      clr_seen = 0;
    end
    if (net_load) phase = 0;
    if (phase >= 0) begin
      if (phase < M) begin
        chk(net_step && !upd_en, "shuffle cycle");
      end else begin
        chk(!net_step && sel_vpid == 5'(phase - M), "update cycle vpid");
        chk(upd_en == (win_found && win_valid) && upd_idx == win_idx && wq_push == upd_en, "update broadcast");
        chk(ev_round_done == (phase == ROUND - 1), "round done flag");
      end
      phase = (phase == ROUND - 1) ? -1 : phase + 1;
    end else begin
      chk(!net_step && !upd_en, "idle");
    end
  end

  initial begin
    bit acc;
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // loads accepted while idle
    @(negedge clk); cmd_valid = 1; cmd_op = CMD_LOAD_W1; #1;
    chk(cmd_ready && rbb_wr_en && rbb_wr_sel == 2'd1, "load accepted when idle");
    @(negedge clk); cmd_op = CMD_CLEAR_RBB; #1;
    chk(cmd_ready && rbb_wr_en && rbb_wr_sel == 2'd3, "clear accepted when idle");
    @(negedge clk); cmd_op = CMD_UNLOAD; #1;
    chk(cmd_ready && !rbb_wr_en, "unload accepted");
    @(negedge clk); cmd_valid = 0; #1;
    chk(resp_valid && resp_data == 32'hCAFE_0001, "unload response");
    // start: rounds back to back, one every M+V cycles
    t0 = cycles;
    cmd(CMD_START, acc);
    chk(acc && running, "start");
    repeat (4 * ROUND) @(negedge clk);
    chk(load_cycles.size() >= 4, "rounds ran");
    for (int i = 1; i < load_cycles.size(); i++)
      chk(load_cycles[i] - load_cycles[i-1] == ROUND, "round period = log2(N)+V");
    chk(now >= 16'd3, "time advances per round");
    // load held off while running
    @(negedge clk); cmd_valid = 1; cmd_op = CMD_LOAD_W0; #1;
    chk(!cmd_ready && !rbb_wr_en, "load held off while running");
    cmd_op = CMD_PUSH_ARR; #1;
    chk(cmd_ready && arr_push, "arrival accepted while running");
    arr_full_sel = 1; #1;
    chk(!cmd_ready && !arr_push, "arrival held off on full FIFO");
    arr_full_sel = 0;
    cmd_op = CMD_READ_WIN; #1;
    chk(cmd_ready && wq_pop, "read winner");
    @(negedge clk); cmd_valid = 0; #1;
    chk(resp_valid && resp_data == 32'h8123_4567, "winner response");
    wq_empty_sel = 1;
    cmd(CMD_READ_WIN, acc);
    #1 chk(resp_valid && resp_data == 32'd0, "empty winner queue response");
    wq_empty_sel = 0;
    // stall: no new round while a winner queue could overflow
    wq_block = 1;
    wait (ev_round_done); @(negedge clk);
    begin
      int n0;
      n0 = load_cycles.size();
      repeat (3 * ROUND) @(negedge clk);
      if (!(load_cycles.size() == n0 && stall_cnt > ROUND)) $display("n0=%0d size=%0d stall=%0d", n0, load_cycles.size(), stall_cnt);
      chk(load_cycles.size() == n0 && stall_cnt > ROUND, "stalled on full winner queue");
      wq_block = 0;
      repeat (2) @(negedge clk);
      chk(load_cycles.size() == n0 + 1, "resumed after stall");
    end
    // pause mid-round: round completes, then idle
    repeat (10) @(negedge clk);
    cmd(CMD_PAUSE, acc);
    chk(acc && !running, "pause");
    begin
      int n0;
      n0 = load_cycles.size();
      repeat (2 * ROUND) @(negedge clk);
      chk(load_cycles.size() == n0 && phase == -1, "paused after round end");
    end
    win_valid = 0;   // VPIDs without a valid winner: no broadcast
    cmd(CMD_START, acc);
    repeat (ROUND + 2) @(negedge clk);
    cmd(CMD_RESET, acc);
    #1 chk(now == 16'd0 && !running, "reset");
    repeat (ROUND) @(negedge clk);
    chk(phase == -1, "idle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
