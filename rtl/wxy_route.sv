// wxy_route: weighted-XY (wXY) route computation with bandwidth bookkeeping.
//
// For a header with destination (DX,DY) at the router at (LX,LY) it computes
// dX and dY, a weight for each of the four mesh directions (East, West from
// dX; North, South from dY) and picks the direction with the largest weight
// through a two-level maximum: East against West, North against South, then
// the X winner against the Y winner. Only productive directions (those that
// bring the packet closer) take part, so the packet may move in X or in Y,
// whichever has more bandwidth left; a destination equal to the local
// coordinate selects the PE port. Ties go to West/East before North/South and
// to the first operand of each compare.
//
// The available bandwidth A of each output port is T minus the sum of the
// required bandwidths of the connections routed to it. A connection adds its
// R when it is assigned (rsv_*), and gives it back when its tail leaves the
// router (one release per VCB, rel_*). The structure (subtractors, W0..W3,
// comparators Comp2..Comp4, muxes Mux2..Mux4, a 4-bit path word) follows the
// wXY micro-architecture; the reservation counters are this design's way of
// producing A. The 4-bit path is one-hot over N,E,S,W and all zero for the PE.
//
// route/path are combinational in dst/req; the counters update on the clock.
module wxy_route
  import noc_pkg::*;
#(
  parameter int unsigned BW_W    = 8,
  parameter int unsigned TOTAL_BW = 64,   // T: bandwidth units of one link
  parameter int unsigned NUM_VCB = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  coord_t                       local_xy,
  input  coord_t                       dst,
  input  logic [REQ_W-1:0]             req,
  output port_e                        route,
  output logic [3:0]                   path,
  output logic [NPORTS-1:0][BW_W-1:0]  avail,
  // reservation of the connection being assigned
  input  logic                         rsv_valid,
  input  port_e                        rsv_port,
  input  logic [REQ_W-1:0]             rsv_req,
  // release when a VCB has sent its tail
  input  logic [NUM_VCB-1:0]           rel_valid,
  input  port_e [NUM_VCB-1:0]          rel_port,
  input  logic [NUM_VCB-1:0][REQ_W-1:0] rel_req
);
  localparam int unsigned RSV_W = BW_W + 2;
  localparam int unsigned W_W   = 32;

  logic [NPORTS-1:0][RSV_W-1:0] reserved;

  // Available bandwidth per output port
  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      avail[p] = (RSV_W'(TOTAL_BW) > reserved[p]) ? BW_W'(RSV_W'(TOTAL_BW) - reserved[p]) : '0;
  end

  // Sub1 / Sub2: distances in each direction
  logic [COORD_W-1:0] d_e, d_w, d_n, d_s;
  always_comb begin
    d_e = (dst.x > local_xy.x) ? dst.x - local_xy.x : '0;
    d_w = (dst.x < local_xy.x) ? local_xy.x - dst.x : '0;
    d_s = (dst.y > local_xy.y) ? dst.y - local_xy.y : '0;
    d_n = (dst.y < local_xy.y) ? local_xy.y - dst.y : '0;
  end

  // W0..W3
  logic [W_W-1:0] w0, w1, w2, w3;
  wxy_weight #(.BW_W(BW_W), .D_W(COORD_W), .W_W(W_W)) u_w0 (
    .avail(avail[P_E]), .req(BW_W'(req)), .total(BW_W'(TOTAL_BW)), .distance(d_e), .weight(w0));
  wxy_weight #(.BW_W(BW_W), .D_W(COORD_W), .W_W(W_W)) u_w1 (
    .avail(avail[P_W]), .req(BW_W'(req)), .total(BW_W'(TOTAL_BW)), .distance(d_w), .weight(w1));
  wxy_weight #(.BW_W(BW_W), .D_W(COORD_W), .W_W(W_W)) u_w2 (
    .avail(avail[P_N]), .req(BW_W'(req)), .total(BW_W'(TOTAL_BW)), .distance(d_n), .weight(w2));
  wxy_weight #(.BW_W(BW_W), .D_W(COORD_W), .W_W(W_W)) u_w3 (
    .avail(avail[P_S]), .req(BW_W'(req)), .total(BW_W'(TOTAL_BW)), .distance(d_s), .weight(w3));

  // Max function
  logic           x_ok, y_ok;
  port_e          x_dir, y_dir;
  logic [W_W-1:0] x_w, y_w;
  always_comb begin
    x_ok  = (d_e != 0) || (d_w != 0);
    y_ok  = (d_n != 0) || (d_s != 0);
    // Comp2 / Mux2
    if (d_e != 0) begin x_dir = P_E; x_w = w0; end
    else          begin x_dir = P_W; x_w = w1; end
    // Comp3 / Mux3
    if (d_n != 0) begin y_dir = P_N; y_w = w2; end
    else          begin y_dir = P_S; y_w = w3; end
    // Comp4 / Mux4
    if (!x_ok && !y_ok)     route = P_L;
    else if (!y_ok)         route = x_dir;
    else if (!x_ok)         route = y_dir;
    else if (x_w >= y_w)    route = x_dir;
    else                    route = y_dir;
    path = (route == P_L) ? 4'b0000 : 4'b0001 << route;
  end

  // Bandwidth reservation counters
  logic [NPORTS-1:0][RSV_W-1:0] reserved_nxt;
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      reserved_nxt[p] = reserved[p];
      if (rsv_valid && rsv_port == port_e'(p)) reserved_nxt[p] = reserved_nxt[p] + RSV_W'(rsv_req);
      for (int v = 0; v < NUM_VCB; v++)
        if (rel_valid[v] && rel_port[v] == port_e'(p)) reserved_nxt[p] = reserved_nxt[p] - RSV_W'(rel_req[v]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reserved <= '0;
    else        reserved <= reserved_nxt;
  end
endmodule
