// Decision block (DB): pair-wise comparison of two stream head packets.
//
// Combinational. The packet with higher priority leaves on `win`, the other
// on `lose`. The rules are applied in order, the first that separates the
// two decides:
//   1. lowest VPID first (keeps virtual schedulers apart in the network)
//   2. valid packet before an empty stream
//   3. earliest deadline first
//   4. equal deadlines: lowest window constraint X/Y first
//   5. equal deadlines, both constraints zero: highest denominator Y first
//   6. equal deadlines, equal non-zero constraints: lowest numerator X first
//   7. otherwise first-come-first-serve on the packet arrival time.
// Rules and their order are the design's (ShareStreams-V priority table).
// Own choices: X/Y is compared by cross-multiplication (Xa*Yb vs Xb*Ya),
// deadlines and arrival times are compared modulo 2^16, two empty streams of
// the same VPID and exact ties both leave `a` as winner.
module decision_block
  import ssv_pkg::*;
(
  input  entry_t a,
  input  entry_t b,
  output entry_t win,
  output entry_t lose,
  output logic   a_wins
);

  logic [2*WC_W-1:0] xa_yb, xb_ya;

  always_comb begin
    xa_yb = a.x * b.y;
    xb_ya = b.x * a.y;
    if (a.vpid != b.vpid)
      a_wins = (a.vpid < b.vpid);
    else if (a.valid != b.valid)
      a_wins = a.valid;
    else if (!a.valid)
      a_wins = 1'b1;
    else if (a.deadline != b.deadline)
      a_wins = earlier16(a.deadline, b.deadline);
    else if (xa_yb != xb_ya)
      a_wins = (xa_yb < xb_ya);
    else if (a.x == '0 && b.x == '0 && a.y != b.y)
      a_wins = (a.y > b.y);
    else if (a.x != b.x)
      a_wins = (a.x < b.x);
    else
      a_wins = !earlier16(b.arrival, a.arrival);
    win  = a_wins ? a : b;
    lose = a_wins ? b : a;
  end

endmodule
