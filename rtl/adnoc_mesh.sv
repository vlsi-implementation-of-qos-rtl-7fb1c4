// adnoc_mesh: the adaptive network-on-chip (AdNoC), a COLS x ROWS mesh of
// tiles, each a weighted-XY router with an on-demand VCB pool and a
// monitoring component.
//
// Tile (x, y) sits at column x and row y; its PE link and monitor signals
// are element y*COLS + x of the port arrays. East links run to x+1, South
// links to y+1. Inputs at the mesh edge are tied idle. The default 4 x 4 size
// is the largest mesh the 2-bit coordinates of the routing unit can
// address; it is this design's choice of configuration.
//
// Per PE link: valid/flit into the network with nack back, and valid/flit
// out of the network with nack from the PE. A flit moves in a cycle with
// valid high and nack low; a refused flit is offered again.
module adnoc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS       = 4,
  parameter int unsigned ROWS       = 4,
  parameter int unsigned NUM_VCB    = 3,
  parameter int unsigned VCB_DEPTH  = 4,
  parameter int unsigned TOTAL_BW   = 64,
  parameter int unsigned EVT_THRESH = 32,
  parameter int unsigned RESEND_TH  = 3,
  localparam int unsigned NT        = COLS * ROWS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic  [NT-1:0]            pe_in_valid,
  input  flit_t [NT-1:0]            pe_in_flit,
  output logic  [NT-1:0]            pe_in_nack,
  output logic  [NT-1:0]            pe_out_valid,
  output flit_t [NT-1:0]            pe_out_flit,
  input  logic  [NT-1:0]            pe_out_nack,
  output logic  [NT-1:0]            resend_valid,
  output logic  [NT-1:0][TID_W-1:0] resend_tid,
  output logic  [NT-1:0]            remap_valid,
  output logic  [NT-1:0][TID_W-1:0] remap_tid,
  input  logic  [NT-1:0]            clr_valid,
  input  logic  [NT-1:0][TID_W-1:0] clr_tid
);
  localparam int DN = 0, DE = 1, DS = 2, DW = 3;   // mesh port order of a tile

  // per tile, per direction N, E, S, W
  logic  [NT-1:0][3:0] in_valid, in_nack, out_valid, out_nack;
  flit_t [NT-1:0][3:0] in_flit, out_flit;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int T = y * COLS + x;
      // North neighbour (y-1) sends through its South port
      if (y > 0) begin : g_n
        assign in_valid[T][DN]         = out_valid[T-COLS][DS];
        assign in_flit[T][DN]          = out_flit[T-COLS][DS];
        assign out_nack[T-COLS][DS]    = in_nack[T][DN];
      end else begin : g_n_edge
        assign in_valid[T][DN]         = 1'b0;
        assign in_flit[T][DN]          = '0;
      end
      if (y < ROWS - 1) begin : g_s
        assign in_valid[T][DS]         = out_valid[T+COLS][DN];
        assign in_flit[T][DS]          = out_flit[T+COLS][DN];
        assign out_nack[T+COLS][DN]    = in_nack[T][DS];
      end else begin : g_s_edge
        assign in_valid[T][DS]         = 1'b0;
        assign in_flit[T][DS]          = '0;
      end
      if (x > 0) begin : g_w
        assign in_valid[T][DW]         = out_valid[T-1][DE];
        assign in_flit[T][DW]          = out_flit[T-1][DE];
        assign out_nack[T-1][DE]       = in_nack[T][DW];
      end else begin : g_w_edge
        assign in_valid[T][DW]         = 1'b0;
        assign in_flit[T][DW]          = '0;
      end
      if (x < COLS - 1) begin : g_e
        assign in_valid[T][DE]         = out_valid[T+1][DW];
        assign in_flit[T][DE]          = out_flit[T+1][DW];
        assign out_nack[T+1][DW]       = in_nack[T][DE];
      end else begin : g_e_edge
        assign in_valid[T][DE]         = 1'b0;
        assign in_flit[T][DE]          = '0;
      end
      // edge outputs are never routed to; refuse nothing
      if (y == 0)        begin : g_n_out assign out_nack[T][DN] = 1'b0; end
      if (y == ROWS - 1) begin : g_s_out assign out_nack[T][DS] = 1'b0; end
      if (x == 0)        begin : g_w_out assign out_nack[T][DW] = 1'b0; end
      if (x == COLS - 1) begin : g_e_out assign out_nack[T][DE] = 1'b0; end

      adnoc_tile #(
        .X(x), .Y(y), .NUM_VCB(NUM_VCB), .VCB_DEPTH(VCB_DEPTH), .TOTAL_BW(TOTAL_BW),
        .EVT_THRESH(EVT_THRESH), .RESEND_TH(RESEND_TH)
      ) u_tile (
        .clk, .rst_n,
        .link_in_valid (in_valid[T]), .link_in_flit (in_flit[T]), .link_in_nack (in_nack[T]),
        .link_out_valid (out_valid[T]), .link_out_flit (out_flit[T]), .link_out_nack (out_nack[T]),
        .pe_in_valid (pe_in_valid[T]), .pe_in_flit (pe_in_flit[T]), .pe_in_nack (pe_in_nack[T]),
        .pe_out_valid (pe_out_valid[T]), .pe_out_flit (pe_out_flit[T]), .pe_out_nack (pe_out_nack[T]),
        .resend_valid (resend_valid[T]), .resend_tid (resend_tid[T]),
        .remap_valid (remap_valid[T]), .remap_tid (remap_tid[T]),
        .clr_valid (clr_valid[T]), .clr_tid (clr_tid[T]));
    end
  end
endmodule
