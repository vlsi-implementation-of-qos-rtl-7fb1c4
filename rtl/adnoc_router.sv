// adnoc_router: five-port adaptive router with weighted-XY routing and an
// on-demand virtual channel buffer pool.
//
// Flits enter through an input decoder per port (N, E, S, W, PE), which
// extracts the header and asks for a VCB. The virtual channel arbiter takes
// the output port chosen by the weighted-XY route computation, lends the
// connection a VCB from the shared pool and then steers the port's flits
// into it. The space-division crossbar sends each VCB's flits to its output
// port, one packet per port at a time. Bandwidth reserved on an output port
// at routing time is released when the tail leaves.
//
// Block structure and data flow follow the AdNoC router figure (input
// decoder -> VCA -> VCB1..VCB3 -> SDM, with the weighted-XY unit beside them).
// The monitor taps (header of the transaction on each port, start of a
// transaction, refused-flit/waiting-header cycles) feed the router part of
// the monitoring component.
//
// Link protocol on every port: valid/flit forward, nack backward; a flit is
// transferred in a cycle with valid high and nack low. Latency through an
// idle router: the two header flits are taken in two cycles, the VCB is
// assigned in the next, the header is written into the VCB over two cycles
// and leaves one cycle after each write.
module adnoc_router
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCB  = 3,    // size of the VCB pool
  parameter int unsigned VCB_DEPTH = 4,   // flits per VCB
  parameter int unsigned BW_W     = 8,
  parameter int unsigned TOTAL_BW = 64    // bandwidth units of one output link
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  coord_t               local_xy,
  input  logic  [NPORTS-1:0]   in_valid,
  input  flit_t [NPORTS-1:0]   in_flit,
  output logic  [NPORTS-1:0]   in_nack,
  output logic  [NPORTS-1:0]   out_valid,
  output flit_t [NPORTS-1:0]   out_flit,
  input  logic  [NPORTS-1:0]   out_nack,
  // monitor taps
  output hdr_t  [NPORTS-1:0]   port_hdr,
  output logic  [NPORTS-1:0]   txn_start,
  output logic  [NPORTS-1:0]   stall,
  output logic  [NPORTS-1:0][BW_W-1:0] avail
);
  logic  [NPORTS-1:0] alloc_req, alloc_gnt, push_valid, push_nack, tail_done;
  flit_t [NPORTS-1:0] push_flit;

  for (genvar p = 0; p < NPORTS; p++) begin : g_id
    input_decoder u_id (
      .clk, .rst_n,
      .in_valid (in_valid[p]), .in_flit (in_flit[p]), .in_nack (in_nack[p]),
      .alloc_req(alloc_req[p]), .hdr (port_hdr[p]), .alloc_gnt (alloc_gnt[p]),
      .push_valid(push_valid[p]), .push_flit (push_flit[p]), .push_nack (push_nack[p]),
      .txn_start(txn_start[p]), .tail_done (tail_done[p]));
  end

  coord_t                        sel_dst;
  logic  [REQ_W-1:0]             sel_req, rsv_req;
  port_e                         route, rsv_port;
  logic  [3:0]                   path;
  logic                          rsv_valid;
  logic  [NUM_VCB-1:0]           vcb_push, vcb_full, vcb_empty, vcb_pop, vcb_done;
  logic  [NUM_VCB-1:0]           vcb_busy, vcb_mon;
  flit_t [NUM_VCB-1:0]           vcb_wdata, vcb_head;
  port_e [NUM_VCB-1:0]           vcb_port;
  logic  [NUM_VCB-1:0][REQ_W-1:0] vcb_req;

  vc_arbiter #(.NUM_VCB(NUM_VCB)) u_vca (
    .clk, .rst_n,
    .alloc_req, .hdr (port_hdr), .alloc_gnt, .push_valid, .push_flit, .push_nack, .tail_done,
    .sel_dst, .sel_req, .route, .rsv_valid, .rsv_port, .rsv_req,
    .vcb_push, .vcb_wdata, .vcb_full, .vcb_done, .vcb_busy, .vcb_port, .vcb_mon, .vcb_req,
    .stall);

  wxy_route #(.BW_W(BW_W), .TOTAL_BW(TOTAL_BW), .NUM_VCB(NUM_VCB)) u_wxy (
    .clk, .rst_n, .local_xy, .dst (sel_dst), .req (sel_req), .route, .path, .avail,
    .rsv_valid, .rsv_port, .rsv_req,
    .rel_valid (vcb_done), .rel_port (vcb_port), .rel_req (vcb_req));

  for (genvar v = 0; v < NUM_VCB; v++) begin : g_vcb
    logic [$clog2(VCB_DEPTH+1)-1:0] cnt;
    vcb_fifo #(.WIDTH(FLIT_W), .DEPTH(VCB_DEPTH)) u_vcb (
      .clk, .rst_n,
      .push (vcb_push[v]), .wr_data (vcb_wdata[v]),
      .pop (vcb_pop[v]), .rd_data (vcb_head[v]),
      .full (vcb_full[v]), .empty (vcb_empty[v]), .count (cnt));
  end

  sdm_crossbar #(.NUM_VCB(NUM_VCB)) u_sdm (
    .clk, .rst_n,
    .vcb_busy, .vcb_port, .vcb_mon, .vcb_empty, .vcb_head, .vcb_pop, .vcb_done,
    .out_valid, .out_flit, .out_nack);
endmodule
