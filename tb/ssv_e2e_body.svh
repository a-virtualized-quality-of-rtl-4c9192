// End-to-end test body shared by tb_ssv_top (reduced size), tb_ssv_top_full
// (default size) and ssv_e2e_env (the configuration sweep). The including
// module defines N, V, M, WQD, IFD and instantiates ssv_top as `dut` on the
// signals declared here. With SSV_E2E_SUBTEST defined the body raises
// `done` instead of printing the result and finishing.
//
// The test plays the host: it resets the scheduler, splits the RBBs into
// random buddy groups (aligned powers of two, VPIDs ascending), loads the
// stream states and queues packet arrival times. A reference model of the
// streams runs alongside: per round it picks each VPID's winner with
// ref_cmp and applies the window, deadline and drop rules.
//   Phase A: single rounds (START then PAUSE); after each round every
//            winner queue is drained and compared with the model, a random
//            RBB is read back, new arrivals are queued and now and then a
//            stream is deleted.
//   Phase B: free running without reading winners until the winner queues
//            fill and the scheduler stalls; checks the round period
//            log2(N)+V and that loads are held off while running; then
//            pause, drain and compare every queue with the model.
// Counted mechanisms (each must occur): decisions, deadline misses, window
// restores, streams running empty, input FIFO refills, stalls, command
// hold-offs, empty winner-queue reads, stream deletes, pauses, VPID groups.

  logic              clk = 0, rst_n = 0;
  logic              cmd_valid = 0;
  cmd_op_t           cmd_op = CMD_NOP;
  logic [IDX_W-1:0]  cmd_addr = '0;
  logic [BUS_W-1:0]  cmd_data = '0;
  logic              cmd_ready, resp_valid;
  logic [BUS_W-1:0]  resp_data;
  logic              running;
  logic [DL_W-1:0]   now;
  logic [V-1:0]      winner_avail;
  logic              ev_round_done, ev_stall, ev_win, ev_miss;

  int checks = 0, failures = 0, cycles = 0;

  // reference model of the streams
  bit  m_valid [N];
  int  m_arr [N], m_x [N], m_y [N], m_x0 [N], m_y0 [N], m_dl [N], m_per [N], m_vp [N], m_sid [N];
  int  m_fifo [N][$];
  int  m_now = 0;
  int  grp_base [$], grp_size [$];
  int  stamp = 1;
  int  exp_q [V][$];           // expected winner identifiers per VPID

  // mechanism counters
  int n_dec = 0, n_miss = 0, n_restore = 0, n_empty = 0, n_refill = 0;
  int n_stall = 0, n_holdoff = 0, n_empty_read = 0, n_delete = 0, n_pause = 0;
  int hw_wins = 0, hw_misses = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (ev_stall) n_stall++;
    if (ev_win)   hw_wins++;
    if (ev_miss)  hw_misses++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  bit last_resp_valid;
  logic [31:0] last_resp;

  task automatic do_cmd(input cmd_op_t op, input int addr, input logic [31:0] data);
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_addr = IDX_W'(addr); cmd_data = data;
    #1;
    while (!cmd_ready) begin
      n_holdoff++;
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    cmd_valid = 0; cmd_op = CMD_NOP;
    last_resp_valid = resp_valid;
    last_resp = resp_data;
  endtask

  // ---------------- model ----------------
  function automatic entry_t m_entry(int i);
    entry_t e;
    e.valid = m_valid[i]; e.vpid = VPID_W'(m_vp[i]); e.deadline = DL_W'(m_dl[i]);
    e.x = WC_W'(m_x[i]); e.y = WC_W'(m_y[i]); e.arrival = ARR_W'(m_arr[i]);
    e.sid = SID_W'(m_sid[i]); e.idx = IDX_W'(i);
    return e;
  endfunction

  function automatic void m_next_packet(int i);
    if (m_fifo[i].size() != 0) begin
      m_arr[i] = m_fifo[i].pop_front();
      n_refill++;
    end else begin
      m_valid[i] = 0;
      n_empty++;
    end
  endfunction

  function automatic void m_restore(int i);
    m_x[i] = m_x0[i]; m_y[i] = m_y0[i]; n_restore++;
  endfunction

  // one scheduling round of the model
  function automatic void m_round();
    for (int g = 0; g < grp_base.size(); g++) begin
      int w;
      w = -1;
      for (int i = grp_base[g]; i < grp_base[g] + grp_size[g]; i++)
        if (m_valid[i] && (w < 0 || ref_cmp(m_entry(i), m_entry(w)) > 0)) w = i;
      if (w < 0) continue;
      exp_q[m_vp[w]].push_back({1'b1, 5'(m_vp[w]), 10'(m_sid[w]), 16'(m_arr[w])});
      n_dec++;
      for (int i = grp_base[g]; i < grp_base[g] + grp_size[g]; i++) begin
        if (!m_valid[i]) continue;
        if (i == w) begin
          if (m_y[i] > m_x[i]) m_y[i]--;
          else if (m_x[i] > 0) begin m_x[i]--; m_y[i]--; end
          if (m_y[i] == 0) m_restore(i);
          m_dl[i] += m_per[i];
          m_next_packet(i);
        end else if (m_dl[i] < m_now) begin
          n_miss++;
          if (m_x[i] > 0) begin
            m_x[i]--; m_y[i]--;
            if (m_y[i] == 0) m_restore(i);
          end else m_restore(i);
          m_dl[i] += m_per[i];
          m_next_packet(i);
        end
      end
    end
    m_now++;
  endfunction

  task automatic push_arrival(int i);
    if (m_fifo[i].size() >= IFD) return;
    do_cmd(CMD_PUSH_ARR, i, 32'(stamp));
    if (!m_valid[i] && m_fifo[i].size() == 0) begin
      m_valid[i] = 1; m_arr[i] = stamp;
    end else m_fifo[i].push_back(stamp);
    stamp++;
  endtask

  // drain every winner queue and compare with the model's expectation
  task automatic drain_and_compare();
    for (int j = 0; j < V; j++) begin
      forever begin
        do_cmd(CMD_READ_WIN, j, 0);
        chk(last_resp_valid, "read response");
        if (!last_resp[31]) begin
          n_empty_read++;
          break;
        end
        chk(exp_q[j].size() != 0, $sformatf("unexpected winner for VPID %0d", j));
        if (exp_q[j].size() != 0) begin
          logic [31:0] e;
          e = exp_q[j].pop_front();
          chk(last_resp == e, $sformatf("VPID %0d winner %h expected %h", j, last_resp, e));
        end
      end
      chk(exp_q[j].size() == 0, $sformatf("VPID %0d: %0d winners missing", j, exp_q[j].size()));
      exp_q[j].delete();
    end
  endtask

  task automatic check_unload(int i);
    do_cmd(CMD_UNLOAD, i, 0);
    chk(last_resp_valid && last_resp == {m_valid[i], 5'(m_vp[i]), 10'(m_sid[i]), m_valid[i] ? 16'(m_arr[i]) : last_resp[15:0]},
        $sformatf("unload word0 of RBB %0d", i));
    do_cmd(CMD_UNLOAD, i, 1);
    chk(last_resp == {8'(m_x[i]), 8'(m_y[i]), 16'(m_dl[i])}, $sformatf("unload word1 of RBB %0d", i));
  endtask

  task automatic wait_idle();
    // a pause takes effect at the end of the running round
    repeat (M + V + 2) @(negedge clk);
  endtask

  // ---------------- test ----------------
  initial begin
    int bases[$], sizes[$], vp, rounds_b, t_last, period_ok;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_cmd(CMD_RESET, 0, 0);

    // buddy split into at most V aligned groups of size >= 2
    bases = {0}; sizes = {N};
    while (bases.size() != 0) begin
      int b, s;
      b = bases.pop_front(); s = sizes.pop_front();
      if (s > 2 && grp_base.size() + bases.size() + 2 <= V &&
          (s > N/4 || $urandom_range(0, 9) < 9)) begin
        bases.push_front(b + s/2); sizes.push_front(s/2);
        bases.push_front(b);       sizes.push_front(s/2);
      end else begin
        grp_base.push_back(b); grp_size.push_back(s);
      end
    end
    vp = 0;
    for (int g = 0; g < grp_base.size(); g++) begin
      for (int i = grp_base[g]; i < grp_base[g] + grp_size[g]; i++) m_vp[i] = vp;
      vp++;
    end
    $display("%0d streams, %0d VPIDs: %0d virtual schedulers", N, V, grp_base.size());
    chk(grp_base.size() >= 2, "at least two virtual schedulers");

    // load stream states
    for (int i = 0; i < N; i++) begin
      m_valid[i] = ($urandom_range(0, 7) != 0);
      m_arr[i]   = stamp++;
      m_sid[i]   = $urandom_range(0, 1023);
      m_y0[i]    = $urandom_range(1, 6);
      m_x0[i]    = $urandom_range(0, m_y0[i]);
      m_x[i] = m_x0[i]; m_y[i] = m_y0[i];
      m_dl[i]    = $urandom_range(1, 12);
      m_per[i]   = $urandom_range(1, 6);
      m_fifo[i].delete();
      do_cmd(CMD_LOAD_W0, i, {m_valid[i], 5'(m_vp[i]), 10'(m_sid[i]), 16'(m_arr[i])});
      do_cmd(CMD_LOAD_W1, i, {8'(m_x[i]), 8'(m_y[i]), 16'(m_dl[i])});
      do_cmd(CMD_LOAD_W2, i, 32'(m_per[i]));
    end
    for (int i = 0; i < N; i++) begin
      int k;
      k = $urandom_range(0, IFD);
      if (i % 2 == 0) k = 0;   // half the streams hold a single packet
      repeat (k) push_arrival(i);
    end
    check_unload(0);

    // Phase A: one round at a time
    for (int r = 0; r < 12; r++) begin
      do_cmd(CMD_START, 0, 0);
      do_cmd(CMD_PAUSE, 0, 0);
      n_pause++;
      wait_idle();
      chk(now == 16'(m_now + 1), "time advanced by one round");
      m_round();
      drain_and_compare();
      check_unload($urandom_range(0, N - 1));
      for (int k = 0; k < N / 2; k++) push_arrival($urandom_range(0, N - 1));
      if (r == 5) begin
        int i;
        i = $urandom_range(0, N - 1);
        do_cmd(CMD_CLEAR_RBB, i, 0);
        m_valid[i] = 0; m_fifo[i].delete();
        n_delete++;
        push_arrival(i);   // the stream is given a packet again
      end
    end

    // Phase B: free running until the winner queues stall the scheduler
    for (int i = 0; i < N; i++) repeat (IFD) push_arrival(i);
    do_cmd(CMD_START, 0, 0);
    rounds_b = 0; t_last = -1; period_ok = 1;
    while (n_stall == 0 && rounds_b < 4 * WQD) begin
      @(posedge clk);
      if (ev_round_done) begin
        if (t_last >= 0 && cycles - t_last != M + V) period_ok = 0;
        t_last = cycles;
        rounds_b++;
      end
    end
    repeat (4) @(posedge clk);
    chk(period_ok == 1 && rounds_b >= 2, $sformatf("round period %0d cycles", M + V));
    chk(n_stall > 0, "winner queues stalled the scheduler");
    // a load is held off while running
    @(negedge clk); cmd_valid = 1; cmd_op = CMD_LOAD_W2; cmd_addr = '0; #1;
    if (!cmd_ready) n_holdoff++;
    chk(!cmd_ready, "load held off while running");
    @(negedge clk); cmd_valid = 0; cmd_op = CMD_NOP;
    do_cmd(CMD_PAUSE, 0, 0);
    n_pause++;
    wait_idle();
    chk(now == 16'(m_now + rounds_b), "time advanced once per free-running round");
    repeat (rounds_b) m_round();
    drain_and_compare();
    chk(hw_wins == n_dec, $sformatf("decisions: %0d in hardware, %0d in the model", hw_wins, n_dec));
    // ev_miss flags cycles with at least one drop; several RBBs may drop at once
    chk(hw_misses <= n_miss && (hw_misses > 0) == (n_miss > 0),
        $sformatf("miss cycles: %0d in hardware, %0d drops in the model", hw_misses, n_miss));

    $display("decisions=%0d misses=%0d restores=%0d empty=%0d refills=%0d stalls=%0d holdoffs=%0d empty_reads=%0d deletes=%0d pauses=%0d groups=%0d",
             n_dec, n_miss, n_restore, n_empty, n_refill, n_stall, n_holdoff, n_empty_read, n_delete, n_pause, grp_base.size());
    chk(n_dec > 0, "decisions happened");
    chk(n_miss > 0, "deadline misses happened");
    chk(n_restore > 0, "window restores happened");
    chk(n_empty > 0, "streams ran empty");
    chk(n_refill > 0, "input FIFO refills happened");
    chk(n_holdoff > 0, "command hold-off happened");
    chk(n_empty_read > 0, "empty winner queue reads happened");
    chk(n_delete > 0, "stream delete happened");
    chk(n_pause > 0, "pauses happened");
`ifdef SSV_E2E_SUBTEST
    done = 1'b1;
`else
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
`endif
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
`ifdef SSV_E2E_SUBTEST
    done = 1'b1;
`else
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
`endif
  end
