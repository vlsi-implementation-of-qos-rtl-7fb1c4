// mon_ni_port: lets the monitoring component use the regular network through
// the tile's PE port.
//
// Injection: a monitoring packet requested by the NI part of the monitor is
// three flits, HEAD (monitoring bit set, transaction ID, destination = the
// transaction's source), HEAD2 (bandwidth MON_REQ_BW, source = this tile) and
// TAIL (transaction ID in [2:0]). It is merged into the router's local input
// at a packet boundary and takes precedence over the PE's own packets: while
// it is being sent the PE sees nack. Ejection: packets leaving the router
// towards the PE whose HEAD has the monitoring bit are consumed here; their
// TAIL hands the transaction ID to the monitor as a remote event. Everything
// else passes to the PE unchanged.
//
// Sharing the regular network and giving monitoring packets precedence come
// from the document; the packet format and the boundary rule are this
// design's. Monitoring packets are never dropped: when the monitor cannot
// take the event the tail is held with nack.
//
// Timing: one idle cycle to take a request, then one flit per accepted cycle.
module mon_ni_port
  import noc_pkg::*;
#(
  parameter int unsigned MON_REQ_BW = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           own_xy,
  // PE side, towards the router
  input  logic             pe_in_valid,
  input  flit_t            pe_in_flit,
  output logic             pe_in_nack,
  // router local input
  output logic             r_in_valid,
  output flit_t            r_in_flit,
  input  logic             r_in_nack,
  // monitoring packet request
  input  logic             mon_req_valid,
  input  coord_t           mon_req_dst,
  input  logic [TID_W-1:0] mon_req_tid,
  output logic             mon_req_ready,
  // router local output
  input  logic             r_out_valid,
  input  flit_t            r_out_flit,
  output logic             r_out_nack,
  // PE side, from the router
  output logic             pe_out_valid,
  output flit_t            pe_out_flit,
  input  logic             pe_out_nack,
  // received monitoring events
  output logic             rem_evt_valid,
  output logic [TID_W-1:0] rem_evt_tid,
  input  logic             rem_evt_ready
);
  // ---------------- injection ----------------
  logic             pe_mid;       // PE packet in progress
  logic [1:0]       inj_idx;      // 0 idle, 1..3 flit to send
  coord_t           inj_dst;
  logic [TID_W-1:0] inj_tid;
  logic             grab;
  flit_t            mon_flit;

  always_comb begin
    unique case (inj_idx)
      2'd1:    mon_flit = make_head(1'b1, inj_tid, inj_dst);
      2'd2:    mon_flit = make_head2(REQ_W'(MON_REQ_BW), own_xy);
      default: mon_flit = '{ftype: FT_TAIL, data: DATA_W'(inj_tid)};
    endcase
  end

  always_comb begin
    grab          = (inj_idx == 2'd0) && !pe_mid && mon_req_valid;
    mon_req_ready = grab;
    if (inj_idx != 2'd0) begin
      r_in_valid = 1'b1;
      r_in_flit  = mon_flit;
      pe_in_nack = pe_in_valid;
    end else if (grab) begin
      r_in_valid = 1'b0;
      r_in_flit  = pe_in_flit;
      pe_in_nack = pe_in_valid;
    end else begin
      r_in_valid = pe_in_valid;
      r_in_flit  = pe_in_flit;
      pe_in_nack = r_in_nack;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_mid  <= 1'b0;
      inj_idx <= '0;
      inj_dst <= '0;
      inj_tid <= '0;
    end else begin
      if (grab) begin
        inj_idx <= 2'd1;
        inj_dst <= mon_req_dst;
        inj_tid <= mon_req_tid;
      end else if (inj_idx != 2'd0 && !r_in_nack) begin
        inj_idx <= (inj_idx == 2'd3) ? 2'd0 : inj_idx + 2'd1;
      end
      if (inj_idx == 2'd0 && !grab && pe_in_valid && !r_in_nack) begin
        if (pe_in_flit.ftype == FT_HEAD)      pe_mid <= 1'b1;
        else if (pe_in_flit.ftype == FT_TAIL) pe_mid <= 1'b0;
      end
    end
  end

  // ---------------- ejection ----------------
  logic e_mon;                     // packet being ejected is a monitoring packet
  logic cur_mon;

  always_comb begin
    cur_mon       = (r_out_flit.ftype == FT_HEAD) ? r_out_flit.data[7] : e_mon;
    rem_evt_valid = 1'b0;
    rem_evt_tid   = r_out_flit.data[TID_W-1:0];
    pe_out_valid  = 1'b0;
    pe_out_flit   = r_out_flit;
    r_out_nack    = 1'b0;
    if (r_out_valid) begin
      if (cur_mon) begin
        if (r_out_flit.ftype == FT_TAIL) begin
          rem_evt_valid = 1'b1;
          r_out_nack    = !rem_evt_ready;
        end
      end else begin
        pe_out_valid = 1'b1;
        r_out_nack   = pe_out_nack;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e_mon <= 1'b0;
    else if (r_out_valid && !r_out_nack && r_out_flit.ftype == FT_HEAD) e_mon <= r_out_flit.data[7];
  end
endmodule
