// Self-checking test of the decision block: directed cases for every
// priority rule, then random pairs drawn from narrow ranges so that ties on
// the leading rules are frequent. Each result is compared with ref_cmp.
module tb_decision_block;
  import ssv_pkg::*;
  import ssv_tb_pkg::*;

  entry_t a, b, win, lose;
  logic   a_wins;
  int     checks = 0, failures = 0;

  decision_block dut (.a(a), .b(b), .win(win), .lose(lose), .a_wins(a_wins));

  task automatic check_pair(input string what);
    int r;
    logic exp_a;
    #1;
    r = ref_cmp(a, b);
    exp_a = (r >= 0);
    checks++;
    if (a_wins !== exp_a || win !== (exp_a ? a : b) || lose !== (exp_a ? b : a)) begin
      failures++;
      $display("FAIL %s: a_wins=%0b expected %0b", what, a_wins, exp_a);
    end
  endtask

  function automatic entry_t mk(int vp, bit v, int dl, int x, int y, int arr);
    entry_t e;
    e = '0;
    e.vpid = VPID_W'(vp); e.valid = v; e.deadline = DL_W'(dl);
    e.x = WC_W'(x); e.y = WC_W'(y); e.arrival = ARR_W'(arr);
    return e;
  endfunction

  initial begin
    // rule 1: lower VPID wins even against an earlier deadline
    a = mk(3, 1, 10, 1, 2, 5);  b = mk(2, 1, 50, 1, 2, 5);  check_pair("vpid");
    if (a_wins !== 1'b0) failures++;
    checks++;
    // rule 2: valid beats empty
    a = mk(1, 0, 10, 1, 2, 5);  b = mk(1, 1, 90, 1, 2, 9);  check_pair("valid");
    // rule 3: earliest deadline
    a = mk(1, 1, 40, 0, 9, 5);  b = mk(1, 1, 30, 5, 6, 1);  check_pair("deadline");
    // rule 4: lowest X/Y (1/4 < 1/3)
    a = mk(1, 1, 30, 1, 3, 1);  b = mk(1, 1, 30, 1, 4, 9);  check_pair("ratio");
    if (a_wins !== 1'b0) failures++;
    checks++;
    // rule 5: both zero, highest Y
    a = mk(1, 1, 30, 0, 3, 1);  b = mk(1, 1, 30, 0, 7, 9);  check_pair("zeroY");
    if (a_wins !== 1'b0) failures++;
    checks++;
    // rule 6: equal non-zero ratio 2/4 = 1/2, lowest X
    a = mk(1, 1, 30, 2, 4, 1);  b = mk(1, 1, 30, 1, 2, 9);  check_pair("lowX");
    if (a_wins !== 1'b0) failures++;
    checks++;
    // rule 7: first come first serve
    a = mk(1, 1, 30, 1, 2, 8);  b = mk(1, 1, 30, 1, 2, 3);  check_pair("fcfs");
    if (a_wins !== 1'b0) failures++;
    checks++;
    // random pairs
    for (int i = 0; i < 20000; i++) begin
      a = rand_entry($urandom_range(0, 2), 0, 3);
      b = rand_entry($urandom_range(0, 2), 1, 3);
      check_pair("random");
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
