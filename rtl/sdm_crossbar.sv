// sdm_crossbar: space-division multiplexer (SDM) between the VCB pool and the
// router's output ports.
//
// Each VCB is tied to one output port by the arbiter. For every output port
// the crossbar picks one VCB that is assigned to it and holds flits, and then
// stays locked to that VCB until the packet's tail has left, so packets are
// never interleaved on a link (wormhole switching). Among several candidates
// a VCB carrying a monitoring packet wins, otherwise a rotating pointer per
// output port decides. Different output ports are served by different VCBs
// in the same cycle, which is the space division. A sent tail frees the VCB
// (vcb_done) and releases its bandwidth.
//
// The crossbar between a pool of FIFOs and the output ports follows the
// document; it also names a time-division mode, which is not built here.
// Locking, monitoring priority and the rotating pointer are this design's
// choices.
//
// Timing: out_valid/out_flit are combinational from registered state; a flit
// leaves (and its VCB is popped) in a cycle where out_valid is high and
// out_nack is low.
module sdm_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned NUM_VCB = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic  [NUM_VCB-1:0] vcb_busy,
  input  port_e [NUM_VCB-1:0] vcb_port,
  input  logic  [NUM_VCB-1:0] vcb_mon,
  input  logic  [NUM_VCB-1:0] vcb_empty,
  input  flit_t [NUM_VCB-1:0] vcb_head,
  output logic  [NUM_VCB-1:0] vcb_pop,
  output logic  [NUM_VCB-1:0] vcb_done,
  output logic  [NPORTS-1:0]  out_valid,
  output flit_t [NPORTS-1:0]  out_flit,
  input  logic  [NPORTS-1:0]  out_nack
);
  localparam int unsigned VW = (NUM_VCB > 1) ? $clog2(NUM_VCB) : 1;

  logic [NPORTS-1:0]         locked;
  logic [NPORTS-1:0][VW-1:0] lock_v;
  logic [NPORTS-1:0][VW-1:0] rr;

  logic [NPORTS-1:0]         cur_ok;
  logic [NPORTS-1:0][VW-1:0] cur_v;

  // VCB v may start a packet on output o (only monitoring ones if mon_only)
  function automatic logic cand(int o, int v, logic mon_only);
    return vcb_busy[v] && vcb_port[v] == port_e'(o) && !vcb_empty[v] && (vcb_mon[v] || !mon_only);
  endfunction

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      cur_ok[o] = 1'b0;
      cur_v[o]  = '0;
      if (locked[o]) begin
        cur_ok[o] = 1'b1;
        cur_v[o]  = lock_v[o];
      end else begin
        // round robin among regular candidates, then monitoring ones override
        for (int k = NUM_VCB - 1; k >= 0; k--) begin
          if (cand(o, (int'(rr[o]) + k) % NUM_VCB, 1'b0)) begin
            cur_ok[o] = 1'b1; cur_v[o] = VW'((int'(rr[o]) + k) % NUM_VCB);
          end
        end
        for (int k = NUM_VCB - 1; k >= 0; k--) begin
          if (cand(o, (int'(rr[o]) + k) % NUM_VCB, 1'b1)) begin
            cur_ok[o] = 1'b1; cur_v[o] = VW'((int'(rr[o]) + k) % NUM_VCB);
          end
        end
      end
    end
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = cur_ok[o] && !vcb_empty[cur_v[o]];
      out_flit[o]  = vcb_head[cur_v[o]];
    end
  end

  always_comb begin
    vcb_pop  = '0;
    vcb_done = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_nack[o]) begin
        vcb_pop[cur_v[o]] = 1'b1;
        if (vcb_head[cur_v[o]].ftype == FT_TAIL) vcb_done[cur_v[o]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= '0;
      lock_v <= '0;
      rr     <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_valid[o] && !out_nack[o]) begin
          if (out_flit[o].ftype == FT_TAIL) begin
            locked[o] <= 1'b0;
            rr[o]     <= (cur_v[o] == VW'(NUM_VCB - 1)) ? '0 : cur_v[o] + 1'b1;
          end else begin
            locked[o] <= 1'b1;
            lock_v[o] <= cur_v[o];
          end
        end
      end
    end
  end

  a_no_double_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                    (|vcb_pop) |-> (|(vcb_pop & ~vcb_empty)));
endmodule
