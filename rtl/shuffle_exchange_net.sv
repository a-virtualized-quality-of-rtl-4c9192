// Recirculating shuffle-exchange decision network.
//
// N lines, N/2 decision blocks, one latch per line. Each enabled cycle is
// one stage of an omega network: the lines are routed by the perfect shuffle
// (line p moves to the line whose index is p rotated left by one bit), then
// decision block i compares lines 2i and 2i+1 and latches its winner on
// line 2i and its loser on line 2i+1. In the first stage (`load`) the input
// multiplexers take the register base blocks, afterwards the latched lines
// are fed back. After log2(N) stages every group of 2^s lines that the host
// gave one VPID (aligned, VPIDs ascending with the line index) holds that
// VPID's winner on its lowest line, because a comparison between two VPIDs
// always passes the lower VPID to the upper output.
// The structure (multiplexers, decision blocks, latches, feedback through
// the shuffle) is the design's. Applying the shuffle also in the first stage
// follows the eight-stream partitioning example of the design; see README.
// Timing: `out` is valid log2(N) enabled cycles after the `load` cycle.
module shuffle_exchange_net
  import ssv_pkg::*;
#(
  parameter int N = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   step,         // perform one stage this cycle
  input  logic   load,         // with step: first stage, read the RBBs
  input  entry_t in_ent [N],
  output entry_t out    [N]
);

  localparam int M = $clog2(N);

  entry_t src [N];
  entry_t shf [N];
  entry_t nxt [N];

  function automatic int rotl(input int p);
    if (M <= 1) return p;
    return ((p << 1) | (p >> (M-1))) & (N-1);
  endfunction

  always_comb begin
    for (int p = 0; p < N; p++) src[p] = load ? in_ent[p] : out[p];
    for (int p = 0; p < N; p++) shf[rotl(p)] = src[p];
  end

  for (genvar i = 0; i < N/2; i++) begin : g_db
    logic a_wins_unused;
    decision_block u_db (
      .a      (shf[2*i]),
      .b      (shf[2*i+1]),
      .win    (nxt[2*i]),
      .lose   (nxt[2*i+1]),
      .a_wins (a_wins_unused)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) out[p] <= '0;
    end else if (step) begin
      for (int p = 0; p < N; p++) out[p] <= nxt[p];
    end
  end

endmodule
