// Register base block (RBB): the state of one packet stream.
//
// Holds the attributes of the packet at the head of the stream (valid bit,
// arrival time, stream ID, VPID, current window constraint X/Y, deadline,
// request period) and an input FIFO of the arrival times of the packets
// queued behind it. Its `ent` output is read into the decision network at
// the start of every scheduling round.
//
// Priority update: in each update cycle the control broadcasts the winner
// of one VPID (`upd_en`, `upd_vpid`, `upd_idx`). An RBB of that VPID holding
// a valid packet then
//   - if it is the winner: relaxes its window (Y-1 while Y>X, else X-1 and
//     Y-1), advances its deadline by the request period and takes the next
//     packet from its input FIFO;
//   - else, if its deadline is earlier than the current time `now`: the
//     packet missed its deadline and is dropped; X-1 and Y-1 while X>0,
//     deadline advances by the period, the next packet is taken.
// When Y reaches 0, or a stream misses with X already 0, the window is
// restored to the constraint the host loaded. An empty RBB takes a packet as
// soon as one is in its FIFO.
// The registers, the deadline/current-time comparator and the two window
// update paths are the design's. The update equations follow the published
// DWCS rules in simplified form, and the copy of the loaded X/Y used to
// restore the window, the FIFO depth and the host word layout are this
// design's own choices (see ssv_pkg).
//
// Host writes (`wr_en`, `wr_sel`): 0 = {valid, vpid, sid, arrival},
// 1 = {x, y, deadline} (also sets the restore copy), 2 = request period,
// 3 = delete the stream (valid cleared, FIFO emptied). Host writes win over
// an update in the same cycle; the control issues them only while paused.
module rbb
  import ssv_pkg::*;
#(
  parameter int IDX        = 0,
  parameter int FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,          // scheduler reset command
  // host writes
  input  logic              wr_en,
  input  logic [1:0]        wr_sel,
  input  logic [BUS_W-1:0]  wr_data,
  // packet arrival times
  input  logic              arr_push,
  input  logic [ARR_W-1:0]  arr_data,
  output logic              arr_full,
  // priority update broadcast
  input  logic              upd_en,
  input  logic [VPID_W-1:0] upd_vpid,
  input  logic [IDX_W-1:0]  upd_idx,
  input  logic [DL_W-1:0]   now,
  // state
  output entry_t            ent,
  output logic [BUS_W-1:0]  word0,
  output logic [BUS_W-1:0]  word1,
  output logic [BUS_W-1:0]  word2,
  output logic              ev_win,       // this cycle: serviced as winner
  output logic              ev_miss       // this cycle: packet dropped on a miss
);

  logic              valid;
  logic [ARR_W-1:0]  arrival;
  logic [SID_W-1:0]  sid;
  logic [VPID_W-1:0] vpid;
  logic [WC_W-1:0]   x, y, x0, y0;
  logic [DL_W-1:0]   deadline;
  logic [PER_W-1:0]  period;

  logic              hit, consume, refill;
  logic [WC_W-1:0]   x_nx, y_nx;
  logic [ARR_W-1:0]  fifo_q;
  logic              fifo_empty;
  logic              host_clear;

  assign host_clear = wr_en && (wr_sel == 2'd3);
  assign hit     = upd_en && valid && (vpid == upd_vpid) && !wr_en;
  assign ev_win  = hit && (upd_idx == IDX_W'(IDX));
  assign ev_miss = hit && !ev_win && earlier16(deadline, now);
  assign consume = ev_win || ev_miss;
  assign refill  = (consume || !valid) && !fifo_empty && !wr_en;

  // Window constraint update multiplexers.
  always_comb begin
    x_nx = x;
    y_nx = y;
    if (ev_win) begin
      if (y > x) begin
        y_nx = y - 1'b1;
      end else if (x != '0) begin
        x_nx = x - 1'b1;
        y_nx = y - 1'b1;
      end
      if (y_nx == '0) begin
        x_nx = x0;
        y_nx = y0;
      end
    end else if (ev_miss) begin
      if (x != '0) begin
        x_nx = x - 1'b1;
        y_nx = y - 1'b1;
        if (y_nx == '0) begin
          x_nx = x0;
          y_nx = y0;
        end
      end else begin
        x_nx = x0;
        y_nx = y0;
      end
    end
  end

  sync_fifo #(.WIDTH(ARR_W), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (clr || host_clear),
    .push    (arr_push),
    .wr_data (arr_data),
    .pop     (refill),
    .rd_data (fifo_q),
    .empty   (fifo_empty),
    .full    (arr_full),
    .count   ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= 1'b0;
      arrival  <= '0;
      sid      <= '0;
      vpid     <= '0;
      x        <= '0;
      y        <= '0;
      x0       <= '0;
      y0       <= '0;
      deadline <= '0;
      period   <= '0;
    end else if (clr) begin
      valid    <= 1'b0;
      arrival  <= '0;
      sid      <= '0;
      vpid     <= '0;
      x        <= '0;
      y        <= '0;
      x0       <= '0;
      y0       <= '0;
      deadline <= '0;
      period   <= '0;
    end else if (wr_en) begin
      unique case (wr_sel)
        2'd0: {valid, vpid, sid, arrival} <= wr_data;
        2'd1: begin
          {x, y, deadline} <= wr_data;
          x0 <= wr_data[31:24];
          y0 <= wr_data[23:16];
        end
        2'd2: period <= wr_data[PER_W-1:0];
        default: valid <= 1'b0;
      endcase
    end else begin
      x <= x_nx;
      y <= y_nx;
      if (consume) deadline <= deadline + period;
      if (refill) begin
        valid   <= 1'b1;
        arrival <= fifo_q;
      end else if (consume) begin
        valid   <= 1'b0;
      end
    end
  end

  always_comb begin
    ent.valid    = valid;
    ent.vpid     = vpid;
    ent.deadline = deadline;
    ent.x        = x;
    ent.y        = y;
    ent.arrival  = arrival;
    ent.sid      = sid;
    ent.idx      = IDX_W'(IDX);
  end

  assign word0 = {valid, vpid, sid, arrival};
  assign word1 = {x, y, deadline};
  assign word2 = {{(BUS_W-PER_W){1'b0}}, period};

endmodule
