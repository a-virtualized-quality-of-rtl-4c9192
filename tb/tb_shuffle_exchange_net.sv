// Self-checking test of the recirculating shuffle-exchange network.
// The RBB contents are random and split into random buddy partitions
// (aligned power-of-two groups, VPIDs ascending). After log2(N) steps each
// partition's lowest line must hold a packet that no other packet of the
// partition beats (ref_cmp), every line must still carry its partition's
// VPID, and no packet may be lost or duplicated. The eight-stream example
// with virtual schedulers A (4 streams), B (2) and C (2) is run on its own:
// the winners must appear on lines 0, 4 and 6.
module tb_shuffle_exchange_net;
  import ssv_pkg::*;
  import ssv_tb_pkg::*;

  localparam int N = 16;
  localparam int M = $clog2(N);
  localparam int N8 = 8;

  logic clk = 0, rst_n = 0, step = 0, load = 0;
  entry_t in_ent [N], out [N];
  entry_t in8 [N8], out8 [N8];
  int part_base [N], part_size [N], part_vp [N];
  int checks = 0, failures = 0, cycles = 0;

  shuffle_exchange_net #(.N(N))  dut   (.clk(clk), .rst_n(rst_n), .step(step), .load(load), .in_ent(in_ent), .out(out));
  shuffle_exchange_net #(.N(N8)) dut8  (.clk(clk), .rst_n(rst_n), .step(step), .load(load), .in_ent(in8),    .out(out8));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic run_net(input int stages);
    @(negedge clk); step = 1; load = 1;
    @(negedge clk); load = 0;
    repeat (stages - 1) @(negedge clk);
    step = 0;
  endtask

  // random buddy split of [0, N) into aligned power-of-two groups
  task automatic make_partitions();
    int bases[$], sizes[$], vp;
    bases = {0}; sizes = {N}; vp = $urandom_range(0, 3);
    while (bases.size() != 0) begin
      int b, s;
      b = bases.pop_front(); s = sizes.pop_front();
      if (s > 2 && $urandom_range(0, 9) < 6) begin
        bases.push_front(b + s/2); sizes.push_front(s/2);
        bases.push_front(b);       sizes.push_front(s/2);
      end else begin
        for (int i = b; i < b + s; i++) begin
          part_base[i] = b; part_size[i] = s; part_vp[i] = vp;
        end
        vp += $urandom_range(1, 2);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N8; i++) in8[i] = rand_entry(0, i, 3);
    // eight-stream example: A A A A B B C C
    for (int i = 0; i < N8; i++) begin
      in8[i] = rand_entry(i < 4 ? 1 : (i < 6 ? 2 : 3), i, 3);
      in8[i].valid = 1'b1;
    end
    for (int i = 0; i < N; i++) in_ent[i] = rand_entry(0, i, 3);
    run_net(3);
    // N=8 instance got 3 stages: check
    @(negedge clk);
    for (int b = 0; b < N8; b++) begin
      int s;
      if (!(b == 0 || b == 4 || b == 6)) continue;
      s = (b == 0) ? 4 : 2;
      for (int i = b; i < b + s; i++) begin
        checks++;
        if (ref_cmp(in8[i], out8[b]) > 0 || out8[i].vpid != in8[b].vpid) begin
          failures++;
          $display("FAIL eight-stream example: partition at %0d line %0d", b, i);
        end
      end
    end

    for (int t = 0; t < 400; t++) begin
      make_partitions();
      for (int i = 0; i < N; i++) in_ent[i] = rand_entry(part_vp[i], i, 3);
      run_net(M);
      @(negedge clk);
      begin
        int seen [N];
        for (int i = 0; i < N; i++) seen[i] = 0;
        for (int i = 0; i < N; i++) seen[out[i].idx]++;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (seen[i] != 1 || out[i] !== in_ent[out[i].idx]) begin
            failures++;
            $display("FAIL trial %0d: packet %0d seen %0d times", t, i, seen[i]);
          end
          checks++;
          if (out[i].vpid != 5'(part_vp[i])) begin
            failures++;
            $display("FAIL trial %0d: line %0d carries VPID %0d, partition VPID %0d", t, i, out[i].vpid, part_vp[i]);
          end
          checks++;
          if (ref_cmp(in_ent[i], out[part_base[i]]) > 0) begin
            failures++;
            $display("FAIL trial %0d: packet %0d beats the winner on line %0d (partition size %0d)",
                     t, i, part_base[i], part_size[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
