// noc_pkg: types and constants shared by the adaptive network-on-chip (AdNoC)
// blocks.
//
// A link carries one flit per cycle: a 2-bit flit type and an 8-bit payload.
// The 2-bit type, the compare of the type with "00" to spot a header, the
// 8-bit datapath and the 2-bit mesh coordinates follow the wXY routing
// micro-architecture; the split of the header into two flits and the field
// positions inside them are this design's own choice, because a single 8-bit
// flit cannot hold destination, source, transaction ID and bandwidth.
//
//   HEAD  (type 00): [7] monitoring packet, [6:4] transaction ID,
//                    [3:2] destination X, [1:0] destination Y
//   HEAD2 (type 11): [7:4] required bandwidth R, [3:2] source X, [1:0] source Y
//   BODY  (type 01): payload
//   TAIL  (type 10): payload; ends the packet (monitoring packets put the
//                    transaction ID of the event in [2:0])
//
// A packet is HEAD, HEAD2, zero or more BODY, TAIL.
package noc_pkg;

  localparam int unsigned COORD_W = 2;   // coordinate width (Fig. 1: LX/DX/LY/DY are 2 bit)
  localparam int unsigned DATA_W  = 8;   // flit payload width (Fig. 1: 8 bit crossbar ports)
  localparam int unsigned TID_W   = 3;   // transaction ID width
  localparam int unsigned REQ_W   = 4;   // required-bandwidth field width in HEAD2
  localparam int unsigned NPORTS  = 5;   // N, E, S, W and the local PE port
  localparam int unsigned PORT_W  = 3;

  typedef enum logic [1:0] {
    FT_HEAD  = 2'b00,
    FT_BODY  = 2'b01,
    FT_TAIL  = 2'b10,
    FT_HEAD2 = 2'b11
  } flit_type_e;

  typedef struct packed {
    flit_type_e        ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Port numbering. Y grows towards the south, X towards the east.
  typedef enum logic [PORT_W-1:0] {
    P_N = 3'd0,
    P_E = 3'd1,
    P_S = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } coord_t;

  // Header information the input decoder extracts.
  typedef struct packed {
    logic             mon;   // monitoring packet (higher priority)
    logic [TID_W-1:0] tid;
    coord_t           dst;
    logic [REQ_W-1:0] req;   // required bandwidth
    coord_t           src;
  } hdr_t;

  function automatic flit_t make_head(logic mon, logic [TID_W-1:0] tid, coord_t dst);
    flit_t f;
    f.ftype = FT_HEAD;
    f.data  = {mon, tid, dst.x, dst.y};
    return f;
  endfunction

  function automatic flit_t make_head2(logic [REQ_W-1:0] req, coord_t src);
    flit_t f;
    f.ftype = FT_HEAD2;
    f.data  = {req, src.x, src.y};
    return f;
  endfunction

endpackage
