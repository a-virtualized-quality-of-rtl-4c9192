// Winner multiplexer.
//
// After the decision network has settled, the winner of every virtual
// scheduler sits on the upper (winner) output of a decision block: line 2i
// for some i. In priority-update cycle j the control asks for VPID `sel`;
// this block picks, among the N/2 winner outputs, the lowest one whose VPID
// equals `sel` (the first line of that VPID's partition) and returns it.
// `found` is low when no line carries that VPID. Combinational.
// The design gives this multiplexer (one input per possible VPID, N/2 at
// most) but not its select logic; the search by VPID is this design's choice.
module winner_mux
  import ssv_pkg::*;
#(
  parameter int N = 64
) (
  input  entry_t            lines [N],
  input  logic [VPID_W-1:0] sel,
  output entry_t            win,
  output logic              found
);

  always_comb begin
    win   = '0;
    found = 1'b0;
    for (int i = N/2 - 1; i >= 0; i--) begin
      if (lines[2*i].vpid == sel) begin
        win   = lines[2*i];
        found = 1'b1;
      end
    end
  end

endmodule
