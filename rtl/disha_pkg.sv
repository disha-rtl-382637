// disha_pkg: shared types and constants of the Disha deadlock-recovery router.
//
// A flit is a head bit, a tail bit and a DATA_W-bit data field. In a head flit
// the data field carries the destination: dst_x in bits [3:0], dst_y in bits
// [7:4]; the remaining bits are free for the message. A channel between two
// routers carries, from sender to receiver, Req (flit valid), Status (the flit
// belongs in the receiver's Deadlock Buffer rather than its input buffer) and
// the flit; from receiver to sender it carries Send (ready). A flit moves in a
// cycle in which Req and Send are both high. The Token wire of the channel is
// carried separately, since only channels on the token ring have one.
//
// Port numbering follows the crossbar drawing of the router: inputs X+, X-,
// Y+, Y-, Deadlock Buffer, Node (six) and outputs X+, X-, Y+, Y-, Node (five).
// An input named X+ is the channel arriving from the neighbour at x+1; an
// output named X+ is the channel leaving towards x+1.
package disha_pkg;

  localparam int DATA_W  = 16;          // flit data field width (chosen)
  localparam int COORD_W = 4;           // coordinate width: networks up to 16x16
  localparam int N_NET   = 4;           // network directions X+, X-, Y+, Y-
  localparam int N_IN    = 6;           // crossbar inputs
  localparam int N_OUT   = 5;           // crossbar outputs

  // crossbar input indices
  localparam int IN_XP   = 0;
  localparam int IN_XM   = 1;
  localparam int IN_YP   = 2;
  localparam int IN_YM   = 3;
  localparam int IN_DB   = 4;
  localparam int IN_NODE = 5;

  // crossbar output indices
  localparam int OUT_XP   = 0;
  localparam int OUT_XM   = 1;
  localparam int OUT_YP   = 2;
  localparam int OUT_YM   = 3;
  localparam int OUT_NODE = 4;

  typedef logic [2:0] src_idx_t;        // index of a crossbar input
  typedef logic [2:0] out_idx_t;        // index of a crossbar output
  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  typedef struct packed {
    logic  req;     // flit on the channel is valid
    logic  status;  // flit is for the Deadlock Buffer
    flit_t flit;
  } chan_fwd_t;

  function automatic coord_t head_dst_x(flit_t f);
    return f.data[COORD_W-1:0];
  endfunction

  function automatic coord_t head_dst_y(flit_t f);
    return f.data[2*COORD_W-1:COORD_W];
  endfunction

endpackage
