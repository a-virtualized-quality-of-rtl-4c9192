// Self-checking test of the synchronous FIFO: random push, pop and clear
// against a SystemVerilog queue, checking data order, empty, full and count.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, cycles = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == D) || count != model.size()) begin
        failures++;
        $display("FAIL flags: size=%0d count=%0d empty=%0b full=%0b", model.size(), count, empty, full);
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data !== model[0]) begin
          failures++;
          $display("FAIL data %h expected %h", rd_data, model[0]);
        end
      end
      push    = ($urandom_range(0, 2) != 0);
      pop     = ($urandom_range(0, 2) == 0);
      clr     = ($urandom_range(0, 200) == 0);
      wr_data = W'($urandom);
      @(posedge clk);
      if (clr) model.delete();
      else begin
        // a push into a full FIFO is dropped, even with a pop the same cycle
        automatic bit was_full = (model.size() == D);
        if (pop && model.size() != 0) void'(model.pop_front());
        if (push && !was_full) model.push_back(wr_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;
  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
