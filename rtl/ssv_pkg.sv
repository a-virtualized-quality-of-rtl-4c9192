// ShareStreams-V shared types and constants.
//
// Field widths follow the stream state table of the design: valid 1 bit,
// packet arrival time 16, stream ID 10, VPID 5, window numerator X 8,
// window denominator Y 8, deadline 16, request period 16. The 32-bit packet
// identifier {valid, vpid, stream id, arrival time} is what the host reads
// for a winner; its bit order is this design's choice. The RBB index carried
// through the network (IDX_W bits) and the host command encoding are also
// this design's own.
package ssv_pkg;

  localparam int ARR_W  = 16;
  localparam int SID_W  = 10;
  localparam int VPID_W = 5;
  localparam int WC_W   = 8;
  localparam int DL_W   = 16;
  localparam int PER_W  = 16;
  localparam int IDX_W  = 10;   // physical RBB index, up to 1024 streams
  localparam int BUS_W  = 32;

  // Packet identifier as sent to the host: exactly one 32-bit bus word.
  typedef struct packed {
    logic              valid;
    logic [VPID_W-1:0] vpid;
    logic [SID_W-1:0]  sid;
    logic [ARR_W-1:0]  arrival;
  } pkt_id_t;

  // What travels through the decision network: the priority attributes of
  // the packet at the head of one stream plus where it came from.
  typedef struct packed {
    logic              valid;
    logic [VPID_W-1:0] vpid;
    logic [DL_W-1:0]   deadline;
    logic [WC_W-1:0]   x;
    logic [WC_W-1:0]   y;
    logic [ARR_W-1:0]  arrival;
    logic [SID_W-1:0]  sid;
    logic [IDX_W-1:0]  idx;
  } entry_t;

  // Host command opcodes on the 32-bit local bus.
  typedef enum logic [3:0] {
    CMD_NOP        = 4'd0,
    CMD_RESET      = 4'd1,  // reset scheduler state
    CMD_START      = 4'd2,  // begin scheduling rounds
    CMD_PAUSE      = 4'd3,  // stop after the current round
    CMD_LOAD_W0    = 4'd4,  // RBB word 0: {valid, vpid, sid, arrival}
    CMD_LOAD_W1    = 4'd5,  // RBB word 1: {x, y, deadline}
    CMD_LOAD_W2    = 4'd6,  // RBB word 2: {16'b0, request period}
    CMD_CLEAR_RBB  = 4'd7,  // delete stream: clear valid and input FIFO
    CMD_UNLOAD     = 4'd8,  // read RBB word data[1:0]
    CMD_PUSH_ARR   = 4'd9,  // data[15:0] into input FIFO of RBB addr
    CMD_READ_WIN   = 4'd10  // pop the winner queue of VPID addr
  } cmd_op_t;

  // Modular "a is earlier than b" for 16-bit time stamps.
  function automatic logic earlier16(input logic [15:0] a, input logic [15:0] b);
    logic signed [15:0] d;
    d = a - b;
    return d < 0;
  endfunction

  function automatic entry_t empty_entry();
    entry_t e;
    e = '0;
    return e;
  endfunction

endpackage
