// adnoc_tile: one network tile: the adaptive router and its monitoring
// component.
//
// The router part of the monitor (event counters) watches the router's VCB
// assignment; its reports go to the NI part (send counters, resend or
// re-mapping decision). When the transaction came from another tile the NI
// part has a monitoring packet sent there through the regular network; the
// PE-port adapter merges those packets into the router's local input ahead
// of the PE's own traffic and pulls arriving monitoring packets out of the
// ejected stream. The processing element and the rest of the network
// interface (packet buffer, retransmission, cluster agent) are outside the
// tile: the PE link and the resend / remap / clear signals are its ports.
//
// Links: mesh ports are indexed N, E, S, W (0..3); every link is
// valid/flit forward and nack backward, as in the router.
module adnoc_tile
  import noc_pkg::*;
#(
  parameter int unsigned X          = 0,
  parameter int unsigned Y          = 0,
  parameter int unsigned NUM_VCB    = 3,
  parameter int unsigned VCB_DEPTH  = 4,
  parameter int unsigned TOTAL_BW   = 64,
  parameter int unsigned EVT_THRESH = 32,
  parameter int unsigned RESEND_TH  = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // mesh links N, E, S, W
  input  logic  [3:0]      link_in_valid,
  input  flit_t [3:0]      link_in_flit,
  output logic  [3:0]      link_in_nack,
  output logic  [3:0]      link_out_valid,
  output flit_t [3:0]      link_out_flit,
  input  logic  [3:0]      link_out_nack,
  // processing element
  input  logic             pe_in_valid,
  input  flit_t            pe_in_flit,
  output logic             pe_in_nack,
  output logic             pe_out_valid,
  output flit_t            pe_out_flit,
  input  logic             pe_out_nack,
  // monitor decisions
  output logic             resend_valid,
  output logic [TID_W-1:0] resend_tid,
  output logic             remap_valid,
  output logic [TID_W-1:0] remap_tid,
  input  logic             clr_valid,
  input  logic [TID_W-1:0] clr_tid
);
  localparam coord_t OWN = '{x: COORD_W'(X), y: COORD_W'(Y)};

  logic  [NPORTS-1:0] r_in_valid, r_in_nack, r_out_valid, r_out_nack;
  flit_t [NPORTS-1:0] r_in_flit, r_out_flit;
  hdr_t  [NPORTS-1:0] port_hdr;
  logic  [NPORTS-1:0] txn_start, stall;
  logic  [NPORTS-1:0][7:0] avail;

  assign r_in_valid[3:0]  = link_in_valid;
  assign r_in_flit[3:0]   = link_in_flit;
  assign link_in_nack     = r_in_nack[3:0];
  assign link_out_valid   = r_out_valid[3:0];
  assign link_out_flit    = r_out_flit[3:0];
  assign r_out_nack[3:0]  = link_out_nack;

  adnoc_router #(.NUM_VCB(NUM_VCB), .VCB_DEPTH(VCB_DEPTH), .BW_W(8), .TOTAL_BW(TOTAL_BW)) u_router (
    .clk, .rst_n, .local_xy (OWN),
    .in_valid (r_in_valid), .in_flit (r_in_flit), .in_nack (r_in_nack),
    .out_valid (r_out_valid), .out_flit (r_out_flit), .out_nack (r_out_nack),
    .port_hdr, .txn_start, .stall, .avail);

  logic             evt_valid, evt_ready;
  logic [TID_W-1:0] evt_tid;
  coord_t           evt_src;
  logic [NPORTS-1:0][7:0] evt_count;

  event_monitor #(.THRESH(EVT_THRESH), .CNT_W(8)) u_evmon (
    .clk, .rst_n, .port_hdr, .txn_start, .stall,
    .evt_valid, .evt_tid, .evt_src, .evt_ready, .evt_count);

  logic             rem_evt_valid, rem_evt_ready, mon_req_valid, mon_req_ready;
  logic [TID_W-1:0] rem_evt_tid, mon_req_tid;
  coord_t           mon_req_dst;

  ni_monitor #(.RESEND_TH(RESEND_TH)) u_nimon (
    .clk, .rst_n, .own_xy (OWN),
    .loc_evt_valid (evt_valid), .loc_evt_tid (evt_tid), .loc_evt_src (evt_src),
    .loc_evt_ready (evt_ready),
    .rem_evt_valid, .rem_evt_tid, .rem_evt_ready,
    .mon_req_valid, .mon_req_dst, .mon_req_tid, .mon_req_ready,
    .resend_valid, .resend_tid, .remap_valid, .remap_tid, .clr_valid, .clr_tid);

  mon_ni_port u_port (
    .clk, .rst_n, .own_xy (OWN),
    .pe_in_valid, .pe_in_flit, .pe_in_nack,
    .r_in_valid (r_in_valid[P_L]), .r_in_flit (r_in_flit[P_L]), .r_in_nack (r_in_nack[P_L]),
    .mon_req_valid, .mon_req_dst, .mon_req_tid, .mon_req_ready,
    .r_out_valid (r_out_valid[P_L]), .r_out_flit (r_out_flit[P_L]), .r_out_nack (r_out_nack[P_L]),
    .pe_out_valid, .pe_out_flit, .pe_out_nack,
    .rem_evt_valid, .rem_evt_tid, .rem_evt_ready);
endmodule
