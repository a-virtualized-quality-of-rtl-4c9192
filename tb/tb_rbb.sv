// Self-checking test of the register base block. A directed sequence with
// hand-worked values walks the window constraint X/Y = 2/4, request period
// 10, through winner updates (Y-1, then X-1/Y-1, then window restore),
// deadline misses (drop, X-1/Y-1, restore at X = 0), updates for another
// VPID or with the deadline still ahead (no change), the input FIFO refill,
// the stream going empty, a host delete and the host read-back words.
module tb_rbb;
  import ssv_pkg::*;

  localparam int MY_IDX = 5;
  logic clk = 0, rst_n = 0, clr = 0;
  logic wr_en = 0; logic [1:0] wr_sel = 0; logic [31:0] wr_data = 0;
  logic arr_push = 0; logic [15:0] arr_data = 0; logic arr_full;
  logic upd_en = 0; logic [4:0] upd_vpid = 0; logic [9:0] upd_idx = 0; logic [15:0] now = 0;
  entry_t ent; logic [31:0] word0, word1, word2; logic ev_win, ev_miss;
  int checks = 0, failures = 0, cycles = 0;

  rbb #(.IDX(MY_IDX), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic host_wr(input int sel, input logic [31:0] d);
    @(negedge clk); wr_en = 1; wr_sel = 2'(sel); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic push_arr(input int a);
    @(negedge clk); arr_push = 1; arr_data = 16'(a);
    @(negedge clk); arr_push = 0;
  endtask

  // one priority-update cycle
  task automatic upd(input int vp, input int widx, input int t, input bit exp_win, input bit exp_miss);
    @(negedge clk); upd_en = 1; upd_vpid = 5'(vp); upd_idx = 10'(widx); now = 16'(t);
    #1;
    checks++;
    if (ev_win !== exp_win || ev_miss !== exp_miss) begin
      failures++;
      $display("FAIL events win=%0b miss=%0b expected %0b %0b", ev_win, ev_miss, exp_win, exp_miss);
    end
    @(negedge clk); upd_en = 0;
  endtask

  task automatic expect_state(input string what, input bit v, input int arr, input int x, input int y, input int dl);
    #1;
    checks++;
    if (ent.valid !== v || (v && ent.arrival != 16'(arr)) || ent.x != 8'(x) || ent.y != 8'(y) || ent.deadline != 16'(dl)) begin
      failures++;
      $display("FAIL %s: v=%0b arr=%0d x=%0d y=%0d dl=%0d, expected v=%0b arr=%0d x=%0d y=%0d dl=%0d",
               what, ent.valid, ent.arrival, ent.x, ent.y, ent.deadline, v, arr, x, y, dl);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load: valid, VPID 3, stream ID 77, arrival 100; X=2 Y=4 deadline 5; period 10
    host_wr(0, {1'b1, 5'd3, 10'd77, 16'd100});
    host_wr(1, {8'd2, 8'd4, 16'd5});
    host_wr(2, 32'd10);
    checks++;
    if (word0 !== {1'b1, 5'd3, 10'd77, 16'd100} || word1 !== {8'd2, 8'd4, 16'd5} || word2 !== 32'd10
        || ent.idx != 10'(MY_IDX) || ent.sid != 10'd77 || ent.vpid != 5'd3) begin
      failures++; $display("FAIL readback");
    end
    expect_state("loaded", 1, 100, 2, 4, 5);
    for (int i = 0; i < 6; i++) push_arr(101 + i);
    checks++;
    if (!arr_full) begin failures++; $display("FAIL fifo should be full"); end

    upd(3, MY_IDX, 0, 1, 0);  expect_state("win1", 1, 101, 2, 3, 15);
    upd(3, MY_IDX, 0, 1, 0);  expect_state("win2", 1, 102, 2, 2, 25);
    upd(3, MY_IDX, 0, 1, 0);  expect_state("win3", 1, 103, 1, 1, 35);
    upd(3, MY_IDX, 0, 1, 0);  expect_state("win4 restore", 1, 104, 2, 4, 45);
    // other VPID: nothing; same VPID, other winner, deadline ahead: nothing
    upd(4, MY_IDX, 99, 0, 0); expect_state("other vpid", 1, 104, 2, 4, 45);
    upd(3, 9, 40, 0, 0);      expect_state("no miss", 1, 104, 2, 4, 45);
    // misses: deadline 45 < now 50
    upd(3, 9, 50, 0, 1);      expect_state("miss1", 0, 0, 1, 3, 55);
    // FIFO is now empty (held 4 of the 6 pushes): stream went empty
    push_arr(200);
    @(negedge clk);
    expect_state("refill", 1, 200, 1, 3, 55);
    upd(3, 9, 60, 0, 1);      expect_state("miss2", 0, 0, 0, 2, 65);
    push_arr(201);
    @(negedge clk);
    upd(3, 9, 70, 0, 1);      expect_state("miss3 restore", 0, 0, 2, 4, 75);
    // an empty stream is not updated
    upd(3, MY_IDX, 99, 0, 0); expect_state("empty", 0, 0, 2, 4, 75);
    // delete stream: valid cleared and queued arrivals dropped
    push_arr(300);
    push_arr(301);
    host_wr(3, 0);
    @(negedge clk);
    expect_state("deleted", 0, 0, 2, 4, 75);
    // scheduler reset
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    expect_state("clr", 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
