// Reference helpers shared by the ShareStreams-V testbenches.
//
// ref_cmp orders two stream head packets by the scheduler's priority rules,
// written independently of the RTL: window constraints are compared as real
// quotients, time stamps as plain integers (the tests keep them far from
// 16-bit wrap-around). It returns 1 if a has priority, -1 if b has, and 0 if
// the rules cannot separate them.
package ssv_tb_pkg;
  import ssv_pkg::*;

  function automatic int ref_cmp(input entry_t a, input entry_t b);
    real ra, rb;
    if (a.vpid != b.vpid) return (a.vpid < b.vpid) ? 1 : -1;
    if (a.valid != b.valid) return a.valid ? 1 : -1;
    if (!a.valid) return 0;
    if (a.deadline != b.deadline) return (int'(a.deadline) < int'(b.deadline)) ? 1 : -1;
    ra = real'(a.x) / real'(a.y);
    rb = real'(b.x) / real'(b.y);
    if (ra != rb) return (ra < rb) ? 1 : -1;
    if (a.x == 0 && b.x == 0) begin
      if (a.y != b.y) return (a.y > b.y) ? 1 : -1;
    end else if (a.x != b.x) begin
      return (a.x < b.x) ? 1 : -1;
    end
    if (a.arrival != b.arrival) return (int'(a.arrival) < int'(b.arrival)) ? 1 : -1;
    return 0;
  endfunction

  function automatic entry_t rand_entry(input int vp, input int idx, input int spread);
    entry_t e;
    e.valid    = ($urandom_range(0, 5) != 0);
    e.vpid     = VPID_W'(vp);
    e.deadline = DL_W'($urandom_range(100, 100 + spread));
    e.y        = WC_W'($urandom_range(1, spread + 1));
    e.x        = WC_W'($urandom_range(0, int'(e.y)));
    e.arrival  = ARR_W'($urandom_range(0, 2 * spread + 2));
    e.sid      = SID_W'($urandom_range(0, 1023));
    e.idx      = IDX_W'(idx);
    return e;
  endfunction

endpackage
