// vc_arbiter: virtual channel arbiter (VCA) with on-demand VCB assignment.
//
// The VCBs form one pool shared by all output ports. When an input decoder
// has a complete header, the arbiter picks one waiting input port per cycle
// (monitoring packets first, otherwise round robin), asks the wXY route
// computation for the output port, takes the lowest-numbered free VCB and
// records the assignment: VCB -> (input port, output port, bandwidth,
// monitoring flag), and input port -> VCB (the pointer the router keeps to
// remember the current assignment). The chosen output's bandwidth is
// reserved in the same cycle. From then on every flit of that input port is
// written into its VCB; when the VCB is full the flit is refused (push_nack).
// The VCB returns to the pool when the crossbar has sent its tail
// (vcb_done), and the reserved bandwidth is released then.
//
// A header that finds no free VCB waits. Each cycle in which an input port
// has a flit refused or a header waiting is reported on stall[] to the
// monitor. Pool sharing, buffer pointers and the full signal follow the
// document; the allocation order and priorities are this design's choices.
//
// Timing: alloc_gnt and push_nack are combinational from registered state;
// the assignment takes effect on the next clock edge.
module vc_arbiter
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCB = 3
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // input decoders
  input  logic  [NPORTS-1:0]                alloc_req,
  input  hdr_t  [NPORTS-1:0]                hdr,
  output logic  [NPORTS-1:0]                alloc_gnt,
  input  logic  [NPORTS-1:0]                push_valid,
  input  flit_t [NPORTS-1:0]                push_flit,
  output logic  [NPORTS-1:0]                push_nack,
  input  logic  [NPORTS-1:0]                tail_done,
  // route computation
  output coord_t                            sel_dst,
  output logic  [REQ_W-1:0]                 sel_req,
  input  port_e                             route,
  output logic                              rsv_valid,
  output port_e                             rsv_port,
  output logic  [REQ_W-1:0]                 rsv_req,
  // VCB pool
  output logic  [NUM_VCB-1:0]               vcb_push,
  output flit_t [NUM_VCB-1:0]               vcb_wdata,
  input  logic  [NUM_VCB-1:0]               vcb_full,
  input  logic  [NUM_VCB-1:0]               vcb_done,
  output logic  [NUM_VCB-1:0]               vcb_busy,
  output port_e [NUM_VCB-1:0]               vcb_port,
  output logic  [NUM_VCB-1:0]               vcb_mon,
  output logic  [NUM_VCB-1:0][REQ_W-1:0]    vcb_req,
  // monitor
  output logic  [NPORTS-1:0]                stall
);
  localparam int unsigned VW = (NUM_VCB > 1) ? $clog2(NUM_VCB) : 1;

  logic [NPORTS-1:0]         in_has;     // input port owns a VCB
  logic [NPORTS-1:0][VW-1:0] in_vcb;     // pointer: which VCB
  logic [PORT_W-1:0]         rr;         // round-robin start

  // free VCB
  // choose one requesting port: monitoring first, then round robin
  logic              sel_ok;
  logic [PORT_W-1:0] sel;
  always_comb begin
    sel_ok = 1'b0;
    sel    = '0;
    for (int k = NPORTS - 1; k >= 0; k--) begin
      if (alloc_req[(int'(rr) + k) % NPORTS]) begin
        sel_ok = 1'b1; sel = PORT_W'((int'(rr) + k) % NPORTS);
      end
    end
    for (int k = NPORTS - 1; k >= 0; k--) begin
      if (alloc_req[(int'(rr) + k) % NPORTS] && hdr[(int'(rr) + k) % NPORTS].mon) begin
        sel_ok = 1'b1; sel = PORT_W'((int'(rr) + k) % NPORTS);
      end
    end
  end

  // Admission: a header for the PE port may take the last free VCB, a
  // monitoring packet bound for another router needs two free VCBs and a
  // regular packet bound for another router three (limits capped at the pool
  // size). Traffic for this tile can thus always drain, and monitoring
  // packets, which travel against the data they report on, always find room.
  logic          free_ok;
  logic [VW-1:0] free_idx;
  logic [VW:0]   free_cnt, need;
  always_comb begin
    free_idx = '0;
    free_cnt = '0;
    for (int v = NUM_VCB - 1; v >= 0; v--)
      if (!vcb_busy[v]) begin
        free_idx = VW'(v);
        free_cnt = free_cnt + 1'b1;
      end
    need = (route == P_L) ? 1 : hdr[sel].mon ? 2 : 3;
    if (need > (VW+1)'(NUM_VCB)) need = (VW+1)'(NUM_VCB);
    free_ok = (free_cnt >= need);
  end

  always_comb begin
    sel_dst   = hdr[sel].dst;
    sel_req   = hdr[sel].req;
    alloc_gnt = '0;
    rsv_valid = sel_ok && free_ok;
    rsv_port  = route;
    rsv_req   = hdr[sel].req;
    if (sel_ok && free_ok) alloc_gnt[sel] = 1'b1;
  end

  // steering of flits into the owned VCB
  always_comb begin
    vcb_push  = '0;
    vcb_wdata = '0;
    push_nack = '0;
    stall     = '0;
    for (int p = 0; p < NPORTS; p++) begin
      if (push_valid[p]) begin
        if (in_has[p] && !vcb_full[in_vcb[p]]) begin
          vcb_push[in_vcb[p]]  = 1'b1;
          vcb_wdata[in_vcb[p]] = push_flit[p];
        end else begin
          push_nack[p] = 1'b1;
          stall[p]     = 1'b1;
        end
      end
      if (alloc_req[p] && !alloc_gnt[p]) stall[p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_has   <= '0;
      in_vcb   <= '0;
      rr       <= '0;
      vcb_busy <= '0;
      vcb_port <= {NUM_VCB{P_N}};
      vcb_mon  <= '0;
      vcb_req  <= '0;
    end else begin
      for (int v = 0; v < NUM_VCB; v++)
        if (vcb_done[v]) vcb_busy[v] <= 1'b0;
      for (int p = 0; p < NPORTS; p++)
        if (tail_done[p]) in_has[p] <= 1'b0;
      if (sel_ok && free_ok) begin
        vcb_busy[free_idx] <= 1'b1;
        vcb_port[free_idx] <= route;
        vcb_mon[free_idx]  <= hdr[sel].mon;
        vcb_req[free_idx]  <= hdr[sel].req;
        in_has[sel]        <= 1'b1;
        in_vcb[sel]        <= free_idx;
        rr                 <= (sel == PORT_W'(NPORTS - 1)) ? '0 : sel + 1'b1;
      end
    end
  end

  a_onehot_gnt: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(alloc_gnt));
  a_push_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                 (|vcb_push) |-> (|(vcb_push & vcb_busy)));
endmodule
