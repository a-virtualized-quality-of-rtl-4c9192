// ShareStreams-V physical scheduler core.
//
// A hardware DWCS (Dynamic Window-Constrained Scheduling) packet scheduler
// for N_STREAMS streams that is shared by up to N_VPID virtual schedulers.
// Every stream lives in a register base block (RBB) tagged with the VPID of
// the virtual scheduler that owns it. The host gives each virtual scheduler
// a power-of-two, aligned group of RBBs, VPIDs ascending with the RBB index.
// A recirculating shuffle-exchange network of N_STREAMS/2 decision blocks,
// whose first priority rule is "lowest VPID first", then finds the winner of
// every virtual scheduler at once in log2(N_STREAMS) cycles; the groups
// never influence each other. N_VPID priority-update cycles follow, one per
// VPID: the winner multiplexer picks that VPID's winner, the RBBs of the
// VPID update their window constraints and deadlines, and the winner's
// 32-bit packet identifier enters that VPID's winner queue.
// Latency: log2(N_STREAMS) + N_VPID cycles per round; throughput:
// N_VPID / (log2(N_STREAMS) + N_VPID) decisions per cycle when every VPID
// is in use (38 cycles, 32 decisions at the default size).
//
// Interface: a 32-bit host command bus (ssv_pkg::cmd_op_t, see
// ssv_control) with a ready handshake and a one-cycle response, plus status
// outputs: the run flag, the current time, a not-empty flag per winner
// queue, and single-cycle event flags for a finished round, a stalled round
// start, a serviced winner and a dropped (deadline-missed) packet.
// The block structure follows the design; the bus protocol, FIFO depths
// and stall on a full winner queue are this design's choices. Elaboration
// fails unless N_STREAMS is a power of two and N_VPID <= N_STREAMS/2, <= 32.
module ssv_top
  import ssv_pkg::*;
#(
  parameter int N_STREAMS     = 64,
  parameter int N_VPID        = 32,
  parameter int IN_FIFO_DEPTH = 4,
  parameter int WQ_DEPTH      = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  cmd_op_t           cmd_op,
  input  logic [IDX_W-1:0]  cmd_addr,
  input  logic [BUS_W-1:0]  cmd_data,
  output logic              cmd_ready,
  output logic              resp_valid,
  output logic [BUS_W-1:0]  resp_data,
  output logic              running,
  output logic [DL_W-1:0]   now,
  output logic [N_VPID-1:0] winner_avail,
  output logic              ev_round_done,
  output logic              ev_stall,
  output logic              ev_win,
  output logic              ev_miss
);

  localparam int N  = N_STREAMS;
  localparam int V  = N_VPID;
  localparam int AW = $clog2(N);
  localparam int VW = (V > 1) ? $clog2(V) : 1;
  localparam int WQ_CW = $clog2(WQ_DEPTH) + 1;

  // control outputs
  logic              sched_clr, rbb_wr_en, arr_push, net_step, net_load;
  logic [1:0]        rbb_wr_sel;
  logic [VPID_W-1:0] sel_vpid;
  logic              upd_en, wq_push, wq_pop, wq_block;
  logic [IDX_W-1:0]  upd_idx;

  // RBB side
  entry_t            rbb_ent  [N];
  entry_t            net_out  [N];
  logic [BUS_W-1:0]  rbb_word [N][3];
  logic [N-1:0]      arr_full, rbb_win, rbb_miss;
  logic [AW-1:0]     addr_rbb;
  logic [BUS_W-1:0]  unload_word;

  // winner side
  entry_t            win;
  logic              win_found;
  pkt_id_t           wq_head [V];
  logic [V-1:0]      wq_empty, wq_full, wq_push_v, wq_pop_v, wq_blk;
  logic [WQ_CW-1:0]  wq_count [V];
  logic [VW-1:0]     addr_vpid;
  pkt_id_t           win_id;

  // Configuration limits: a power-of-two stream count, at least two streams
  // per virtual scheduler, and VPIDs that fit the 5-bit field.
  if ((1 << AW) != N || V > N / 2 || V > (1 << VPID_W) || N > (1 << IDX_W)) begin : g_bad_config
    $error("ssv_top: N_STREAMS must be a power of two and N_VPID <= N_STREAMS/2, <= 32");
  end

  assign addr_rbb  = cmd_addr[AW-1:0];
  assign addr_vpid = cmd_addr[VW-1:0];

  for (genvar i = 0; i < N; i++) begin : g_rbb
    logic [BUS_W-1:0] w0, w1, w2;
    rbb #(.IDX(i), .FIFO_DEPTH(IN_FIFO_DEPTH)) u_rbb (
      .clk      (clk),
      .rst_n    (rst_n),
      .clr      (sched_clr),
      .wr_en    (rbb_wr_en && addr_rbb == AW'(i)),
      .wr_sel   (rbb_wr_sel),
      .wr_data  (cmd_data),
      .arr_push (arr_push && addr_rbb == AW'(i)),
      .arr_data (cmd_data[ARR_W-1:0]),
      .arr_full (arr_full[i]),
      .upd_en   (upd_en),
      .upd_vpid (sel_vpid),
      .upd_idx  (upd_idx),
      .now      (now),
      .ent      (rbb_ent[i]),
      .word0    (w0),
      .word1    (w1),
      .word2    (w2),
      .ev_win   (rbb_win[i]),
      .ev_miss  (rbb_miss[i])
    );
    assign rbb_word[i][0] = w0;
    assign rbb_word[i][1] = w1;
    assign rbb_word[i][2] = w2;
  end

  always_comb begin
    unload_word = (cmd_data[1:0] == 2'd3) ? '0 : rbb_word[addr_rbb][cmd_data[1:0]];
  end

  shuffle_exchange_net #(.N(N)) u_net (
    .clk    (clk),
    .rst_n  (rst_n),
    .step   (net_step),
    .load   (net_load),
    .in_ent (rbb_ent),
    .out    (net_out)
  );

  winner_mux #(.N(N)) u_wmux (
    .lines (net_out),
    .sel   (sel_vpid),
    .win   (win),
    .found (win_found)
  );

  assign win_id = '{valid: 1'b1, vpid: win.vpid, sid: win.sid, arrival: win.arrival};

  for (genvar j = 0; j < V; j++) begin : g_wq
    logic [BUS_W-1:0] q;
    assign wq_push_v[j] = wq_push && sel_vpid == VPID_W'(j);
    assign wq_pop_v[j]  = wq_pop && addr_vpid == VW'(j);
    sync_fifo #(.WIDTH(BUS_W), .DEPTH(WQ_DEPTH)) u_wq (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (sched_clr),
      .push    (wq_push_v[j]),
      .wr_data (win_id),
      .pop     (wq_pop_v[j]),
      .rd_data (q),
      .empty   (wq_empty[j]),
      .full    (wq_full[j]),
      .count   (wq_count[j])
    );
    assign wq_head[j] = q;
    // Could this queue overflow if another round started now?
    assign wq_blk[j] = wq_full[j] ||
                       (wq_push_v[j] && !wq_pop_v[j] && wq_count[j] == WQ_CW'(WQ_DEPTH-1));
  end

  assign wq_block     = |wq_blk;
  assign winner_avail = ~wq_empty;

  ssv_control #(.N(N), .V(V)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cmd_valid     (cmd_valid),
    .cmd_op        (cmd_op),
    .cmd_ready     (cmd_ready),
    .resp_valid    (resp_valid),
    .resp_data     (resp_data),
    .sched_clr     (sched_clr),
    .rbb_wr_en     (rbb_wr_en),
    .rbb_wr_sel    (rbb_wr_sel),
    .arr_push      (arr_push),
    .arr_full_sel  (arr_full[addr_rbb]),
    .unload_word   (unload_word),
    .net_step      (net_step),
    .net_load      (net_load),
    .sel_vpid      (sel_vpid),
    .win_found     (win_found),
    .win_valid     (win.valid),
    .win_idx       (win.idx),
    .upd_en        (upd_en),
    .upd_idx       (upd_idx),
    .now           (now),
    .wq_push       (wq_push),
    .wq_pop        (wq_pop),
    .wq_empty_sel  (wq_empty[addr_vpid]),
    .wq_head_sel   (wq_head[addr_vpid]),
    .wq_block      (wq_block),
    .running       (running),
    .ev_round_done (ev_round_done),
    .ev_stall      (ev_stall)
  );

  assign ev_win  = |rbb_win;
  assign ev_miss = |rbb_miss;

  // A winner never enters a full queue: a round only starts with room.
  a_wq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (wq_push_v & wq_full & ~wq_pop_v) == '0);

  // Exactly the winning RBB is serviced in each update.
  a_one_winner: assert property (@(posedge clk) disable iff (!rst_n)
    upd_en |-> $onehot(rbb_win));

endmodule
