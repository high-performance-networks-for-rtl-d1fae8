// noc_pkg: types and constants shared by the dataflow network.
//
// A message is one 160-bit word that crosses a link in a single cycle: a
// 128-bit data field plus a 32-bit header. The header holds the destination
// and source cluster coordinates, the dimension-reversal count used by the
// adaptive router, the "deterministic from here on" flag, the operand side
// (right-hand operands are evicted first when breaking deadlock), the message
// kind (ordinary operand, on its way to memory, or returning from memory), the
// virtual channel the message is to be written into at the receiver, and an
// operand tag. The 160-bit width and 128-bit data bus follow the design; the
// split of the header is this implementation's choice.
//
// Every input port holds four virtual channels: one deterministic and one
// adaptive channel for operands (the two-channel configuration), plus two
// channels reserved for traffic to and from memory (deadlock breaking).
package noc_pkg;

  localparam int unsigned DATA_W  = 128;
  localparam int unsigned COORD_W = 3;   // up to 8 x 8 clusters
  localparam int unsigned DR_W    = 3;   // dimension-reversal counter
  localparam int unsigned TAG_W   = 11;  // fills the header to 32 bits

  typedef enum logic [1:0] {
    K_DATA    = 2'd0,  // operand between clusters
    K_TOMEM   = 2'd1,  // evicted operand on its way to memory
    K_FROMMEM = 2'd2   // operand returned by memory to its cluster
  } kind_e;

  // Virtual channel classes of every input port.
  localparam int unsigned NVC = 4;
  localparam logic [1:0] VC_DET     = 2'd0;  // dimension-order (deterministic)
  localparam logic [1:0] VC_ADAPT   = 2'd1;  // adaptive
  localparam logic [1:0] VC_TOMEM   = 2'd2;  // reserved: to memory
  localparam logic [1:0] VC_FROMMEM = 2'd3;  // reserved: from memory

  // Switch ports. N is towards y-1, S towards y+1, E towards x+1, W towards x-1.
  localparam int unsigned NPORT = 6;
  localparam logic [2:0] P_N   = 3'd0;
  localparam logic [2:0] P_E   = 3'd1;
  localparam logic [2:0] P_S   = 3'd2;
  localparam logic [2:0] P_W   = 3'd3;
  localparam logic [2:0] P_LOC = 3'd4;  // cluster: injection in, input queue out
  localparam logic [2:0] P_MEM = 3'd5;  // memory channels: evictions / L2

  typedef struct packed {
    kind_e               kind;
    logic [1:0]          vc;      // channel to write at the receiving port
    logic                det;     // routed by dimension order from now on
    logic                right;   // right-hand operand
    logic [DR_W-1:0]     dr;      // dimension reversals so far
    logic [COORD_W-1:0]  dst_x;
    logic [COORD_W-1:0]  dst_y;
    logic [COORD_W-1:0]  src_x;
    logic [COORD_W-1:0]  src_y;
    logic [TAG_W-1:0]    tag;
    logic [DATA_W-1:0]   data;
  } msg_t;

  localparam int unsigned MSG_W = $bits(msg_t);  // 160

  // Forward wires of one lane of a link.
  typedef struct packed {
    logic valid;
    msg_t msg;
  } flit_t;

  // Backward wires of one lane: the answer, one cycle after the message.
  typedef struct packed {
    logic acc;
    logic rej;
  } rsp_t;

  // What a receiving port tells its upstream neighbour about its adaptive
  // channel, for the queuing function of the adaptive router.
  typedef struct packed {
    logic            space;   // adaptive channel has a free entry
    logic            empty;   // adaptive channel holds nothing
    logic [DR_W-1:0] min_dr;  // lowest dimension-reversal count queued
  } adapt_status_t;

  // Port that leads back the way a message came in (N <-> S, E <-> W).
  function automatic logic [2:0] opposite(input logic [2:0] p);
    case (p)
      P_N:     return P_S;
      P_S:     return P_N;
      P_E:     return P_W;
      P_W:     return P_E;
      default: return p;
    endcase
  endfunction

endpackage
