// ShareStreams-V control unit.
//
// Decodes the host commands of the 32-bit local bus and runs the scheduling
// rounds. One round is log2(N) shuffle-exchange cycles (the first one reads
// the register base blocks into the network) followed by V priority-update
// cycles, one per VPID: in update cycle j the winner multiplexer is pointed
// at VPID j, and if that VPID has a valid winner it is broadcast to all RBBs
// and pushed into the winner queue of VPID j. A round therefore takes
// log2(N) + V cycles and yields up to V decisions, back to back while the
// scheduler runs. The current time `now` advances by one at the end of every
// round.
//
// Host commands (ssv_pkg::cmd_op_t) are taken when `cmd_valid && cmd_ready`.
// START and PAUSE set or clear the run flag; a pause takes effect at the end
// of the current round. RESET clears the scheduler state. Loading, deleting
// and unloading RBBs is held off (`cmd_ready` low) until the scheduler is
// idle, i.e. paused. An arrival time for an RBB whose input FIFO is full is
// held off too. UNLOAD and READ_WIN answer one cycle later on
// `resp_valid/resp_data`; READ_WIN of an empty queue answers with the valid
// bit clear. A new round is not begun while any winner queue could overflow
// (`wq_block`); those cycles are a stall.
// The commands and the round structure are the design's; the encoding,
// handshake, back-pressure and stall are this design's choices.
module ssv_control
  import ssv_pkg::*;
#(
  parameter int N = 64,
  parameter int V = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // host command bus
  input  logic              cmd_valid,
  input  cmd_op_t           cmd_op,
  output logic              cmd_ready,
  output logic              resp_valid,
  output logic [BUS_W-1:0]  resp_data,
  // register base blocks
  output logic              sched_clr,
  output logic              rbb_wr_en,
  output logic [1:0]        rbb_wr_sel,
  output logic              arr_push,
  input  logic              arr_full_sel,   // input FIFO of the addressed RBB is full
  input  logic [BUS_W-1:0]  unload_word,    // addressed word of the addressed RBB
  // decision network and winner multiplexer
  output logic              net_step,
  output logic              net_load,
  output logic [VPID_W-1:0] sel_vpid,
  input  logic              win_found,
  input  logic              win_valid,
  input  logic [IDX_W-1:0]  win_idx,
  // priority update broadcast
  output logic              upd_en,
  output logic [IDX_W-1:0]  upd_idx,
  output logic [DL_W-1:0]   now,
  // winner queues
  output logic              wq_push,        // push win into queue sel_vpid
  output logic              wq_pop,         // pop the queue addressed by the command
  input  logic              wq_empty_sel,   // that queue is empty
  input  pkt_id_t           wq_head_sel,    // head of that queue
  input  logic              wq_block,       // some queue could overflow
  // status
  output logic              running,
  output logic              ev_round_done,
  output logic              ev_stall
);

  localparam int M  = $clog2(N);
  localparam int SW = (M > 1) ? $clog2(M) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SHUF, S_UPD} state_t;

  state_t            state;
  logic              run;
  logic [SW-1:0]     stage;
  logic [VPID_W-1:0] vcnt;
  logic              last_upd, want_round, host_ok, idle;

  assign idle      = (state == S_IDLE);
  assign running   = run;
  assign last_upd  = (state == S_UPD) && (vcnt == VPID_W'(V-1));
  assign want_round = run && (idle || last_upd);

  // command acceptance
  always_comb begin
    host_ok = 1'b1;
    unique case (cmd_op)
      CMD_LOAD_W0, CMD_LOAD_W1, CMD_LOAD_W2, CMD_CLEAR_RBB, CMD_UNLOAD:
        host_ok = idle && !run;
      CMD_PUSH_ARR: host_ok = !arr_full_sel;
      default:      host_ok = 1'b1;
    endcase
  end
  assign cmd_ready = host_ok;

  logic take;
  assign take = cmd_valid && cmd_ready;

  assign sched_clr  = take && (cmd_op == CMD_RESET);
  assign rbb_wr_en  = take && (cmd_op inside {CMD_LOAD_W0, CMD_LOAD_W1, CMD_LOAD_W2, CMD_CLEAR_RBB});
  always_comb begin
    unique case (cmd_op)
      CMD_LOAD_W0: rbb_wr_sel = 2'd0;
      CMD_LOAD_W1: rbb_wr_sel = 2'd1;
      CMD_LOAD_W2: rbb_wr_sel = 2'd2;
      default:     rbb_wr_sel = 2'd3;
    endcase
  end
  assign arr_push   = take && (cmd_op == CMD_PUSH_ARR);
  assign wq_pop     = take && (cmd_op == CMD_READ_WIN);

  // datapath control
  assign net_step  = (state == S_SHUF);
  assign net_load  = (state == S_SHUF) && (stage == '0);
  assign sel_vpid  = vcnt;
  assign upd_en    = (state == S_UPD) && win_found && win_valid;
  assign upd_idx   = win_idx;
  assign wq_push   = upd_en;
  assign ev_round_done = last_upd;
  assign ev_stall  = want_round && wq_block && !sched_clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      run   <= 1'b0;
      stage <= '0;
      vcnt  <= '0;
      now   <= '0;
    end else if (sched_clr) begin
      state <= S_IDLE;
      run   <= 1'b0;
      stage <= '0;
      vcnt  <= '0;
      now   <= '0;
    end else begin
      if (take && cmd_op == CMD_START) run <= 1'b1;
      if (take && cmd_op == CMD_PAUSE) run <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (want_round && !wq_block) begin
            state <= S_SHUF;
            stage <= '0;
          end
        end
        S_SHUF: begin
          if (stage == SW'(M-1)) begin
            state <= S_UPD;
            vcnt  <= '0;
          end else begin
            stage <= stage + 1'b1;
          end
        end
        default: begin // S_UPD
          if (last_upd) begin
            now <= now + 1'b1;
            if (want_round && !wq_block) begin
              state <= S_SHUF;
              stage <= '0;
            end else begin
              state <= S_IDLE;
            end
          end else begin
            vcnt <= vcnt + 1'b1;
          end
        end
      endcase
    end
  end

  // responses
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      resp_valid <= take && (cmd_op inside {CMD_UNLOAD, CMD_READ_WIN});
      if (take && cmd_op == CMD_UNLOAD)
        resp_data <= unload_word;
      else if (take && cmd_op == CMD_READ_WIN)
        resp_data <= wq_empty_sel ? '0 : wq_head_sel;
    end
  end

endmodule
