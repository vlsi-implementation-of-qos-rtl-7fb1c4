// event_monitor: router part of the monitoring component (event counters).
//
// It watches the five transactions that can be set up in the router at a
// time, one per input port. The event is a cycle in which a transaction is
// held up at VCB assignment: a flit refused because its VCB is full, or a
// complete header still waiting for a free VCB. Each port has an event
// counter, cleared when a new transaction starts on that port. When a
// counter reaches THRESH the transaction (its ID and source address) is
// reported once to the NI part of the monitor. Several reports may be
// pending; they are handed out one per cycle, lowest port first, over a
// valid/ready pair. Monitoring packets themselves raise no events.
//
// The counters and the threshold follow the monitoring scheme (an event
// occurs at VCB assignment, the monitor counts it, at a threshold it informs
// the NI); what counts as an event and the threshold value are this design's
// choices.
module event_monitor
  import noc_pkg::*;
#(
  parameter int unsigned THRESH = 8,
  parameter int unsigned CNT_W  = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  hdr_t  [NPORTS-1:0]      port_hdr,
  input  logic  [NPORTS-1:0]      txn_start,
  input  logic  [NPORTS-1:0]      stall,
  output logic                    evt_valid,
  output logic  [TID_W-1:0]       evt_tid,
  output coord_t                  evt_src,
  input  logic                    evt_ready,
  output logic  [NPORTS-1:0][CNT_W-1:0] evt_count
);
  logic   [NPORTS-1:0]            fired, pending;
  logic   [NPORTS-1:0][TID_W-1:0] p_tid;
  coord_t [NPORTS-1:0]            p_src;

  logic              out_sel_ok;
  logic [PORT_W-1:0] out_sel;
  always_comb begin
    out_sel_ok = 1'b0;
    out_sel    = '0;
    for (int p = NPORTS - 1; p >= 0; p--)
      if (pending[p]) begin out_sel_ok = 1'b1; out_sel = PORT_W'(p); end
    evt_valid = out_sel_ok;
    evt_tid   = p_tid[out_sel];
    evt_src   = p_src[out_sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      evt_count <= '0;
      fired     <= '0;
      pending   <= '0;
      p_tid     <= '0;
      p_src     <= '0;
    end else begin
      if (evt_valid && evt_ready) pending[out_sel] <= 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        if (txn_start[p]) begin
          evt_count[p] <= '0;
          fired[p]     <= 1'b0;
        end else if (stall[p] && !fired[p] && !port_hdr[p].mon) begin
          evt_count[p] <= evt_count[p] + 1'b1;
          if (evt_count[p] == CNT_W'(THRESH - 1)) begin
            fired[p]   <= 1'b1;
            pending[p] <= 1'b1;
            p_tid[p]   <= port_hdr[p].tid;
            p_src[p]   <= port_hdr[p].src;
          end
        end
      end
    end
  end
endmodule
