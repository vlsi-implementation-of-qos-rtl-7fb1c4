// ni_monitor: network-interface part of the monitoring component.
//
// Events arrive from the local router's event counters (transaction ID and
// source) and from monitoring packets that other tiles sent here (ID only:
// the transaction is one of this tile's own). Each input is buffered in a
// small FIFO so that one monitoring component can serve the whole tile.
// For every event the transaction source is compared with this tile's
// address:
//   * not the sender: a monitoring packet is requested towards the source
//     (mon_req_*), carrying the transaction ID; requests are queued in a
//     FIFO so that a PE port busy with a stalled packet does not hold up
//     the monitor;
//   * the sender: the connection is closed and the transaction's send counter
//     is read from a lookup table indexed by transaction ID. Below the resend
//     threshold the NI is told to resend (resend_*) and the counter is
//     incremented; otherwise a (re-)mapping request goes to the cluster agent
//     (remap_*) and the counter restarts at zero.
// The lookup table takes one cycle to read and one to write, during which no
// new event is taken. clr_* clears a counter when the NI finishes a
// transaction.
//
// The decision sequence, the counter, the threshold compare, the lookup-table
// delay and the input FIFOs follow the document. The threshold value, FIFO
// depth, the request queue, counter reset rules and the order in which the two FIFOs are served
// (alternating) are this design's choices.
module ni_monitor
  import noc_pkg::*;
#(
  parameter int unsigned RESEND_TH  = 3,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned SCNT_W     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  coord_t            own_xy,
  // events from the local router
  input  logic              loc_evt_valid,
  input  logic [TID_W-1:0]  loc_evt_tid,
  input  coord_t            loc_evt_src,
  output logic              loc_evt_ready,
  // events carried by received monitoring packets
  input  logic              rem_evt_valid,
  input  logic [TID_W-1:0]  rem_evt_tid,
  output logic              rem_evt_ready,
  // monitoring packet request to the NI
  output logic              mon_req_valid,
  output coord_t            mon_req_dst,
  output logic [TID_W-1:0]  mon_req_tid,
  input  logic              mon_req_ready,
  // decisions for the NI / cluster agent
  output logic              resend_valid,
  output logic [TID_W-1:0]  resend_tid,
  output logic              remap_valid,
  output logic [TID_W-1:0]  remap_tid,
  input  logic              clr_valid,
  input  logic [TID_W-1:0]  clr_tid
);
  localparam int unsigned LW = TID_W + $bits(coord_t);
  localparam int unsigned DW = $clog2(FIFO_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_READ, S_DECIDE} state_e;
  state_e state;

  logic [LW-1:0]    loc_q;
  logic [TID_W-1:0] rem_q;
  logic             loc_full, loc_empty, rem_full, rem_empty, loc_pop, rem_pop;
  logic [DW-1:0]    loc_cnt, rem_cnt;

  vcb_fifo #(.WIDTH(LW), .DEPTH(FIFO_DEPTH)) u_loc_fifo (
    .clk, .rst_n, .push (loc_evt_valid), .wr_data ({loc_evt_tid, loc_evt_src}),
    .pop (loc_pop), .rd_data (loc_q), .full (loc_full), .empty (loc_empty), .count (loc_cnt));
  vcb_fifo #(.WIDTH(TID_W), .DEPTH(FIFO_DEPTH)) u_rem_fifo (
    .clk, .rst_n, .push (rem_evt_valid), .wr_data (rem_evt_tid),
    .pop (rem_pop), .rd_data (rem_q), .full (rem_full), .empty (rem_empty), .count (rem_cnt));

  assign loc_evt_ready = !loc_full;
  assign rem_evt_ready = !rem_full;

  logic                   take_rem;   // serve the remote FIFO this time
  logic                   last_rem;
  logic [TID_W-1:0]       cur_tid;
  coord_t                 cur_src;
  logic [SCNT_W-1:0]      send_cnt [1 << TID_W];
  logic [SCNT_W-1:0]      lut_q;

  // requests for monitoring packets wait here for the PE port, so that the
  // monitor keeps serving events while the PE port is busy
  logic [LW-1:0] mreq_q;
  logic          mreq_push, mreq_full, mreq_empty;
  logic [DW-1:0] mreq_cnt;
  vcb_fifo #(.WIDTH(LW), .DEPTH(FIFO_DEPTH)) u_mreq_fifo (
    .clk, .rst_n, .push (mreq_push), .wr_data ({cur_tid, cur_src}),
    .pop (mon_req_valid && mon_req_ready), .rd_data (mreq_q),
    .full (mreq_full), .empty (mreq_empty), .count (mreq_cnt));

  always_comb begin
    take_rem  = !rem_empty && (loc_empty || !last_rem);
    loc_pop   = (state == S_IDLE) && !take_rem && !loc_empty;
    rem_pop   = (state == S_IDLE) && take_rem;
    mreq_push = (state == S_SEND) && !mreq_full;
  end

  assign mon_req_valid = !mreq_empty;
  assign mon_req_tid   = mreq_q[LW-1 -: TID_W];
  assign mon_req_dst   = coord_t'(mreq_q[$bits(coord_t)-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      last_rem     <= 1'b0;
      cur_tid      <= '0;
      cur_src      <= '0;
      lut_q        <= '0;
      resend_valid <= 1'b0;
      resend_tid   <= '0;
      remap_valid  <= 1'b0;
      remap_tid    <= '0;
    end else begin
      resend_valid <= 1'b0;
      remap_valid  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (rem_pop) begin
            last_rem <= 1'b1;
            cur_tid  <= rem_q;
            cur_src  <= own_xy;
            state    <= S_READ;
          end else if (loc_pop) begin
            last_rem <= 1'b0;
            cur_tid  <= loc_q[LW-1 -: TID_W];
            cur_src  <= coord_t'(loc_q[$bits(coord_t)-1:0]);
            state    <= (coord_t'(loc_q[$bits(coord_t)-1:0]) == own_xy) ? S_READ : S_SEND;
          end
        end
        S_SEND:  if (!mreq_full) state <= S_IDLE;
        S_READ: begin
          lut_q <= send_cnt[cur_tid];
          state <= S_DECIDE;
        end
        S_DECIDE: begin
          if (lut_q < SCNT_W'(RESEND_TH)) begin
            resend_valid <= 1'b1;
            resend_tid   <= cur_tid;
          end else begin
            remap_valid <= 1'b1;
            remap_tid   <= cur_tid;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // send-counter lookup table
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < (1 << TID_W); i++) send_cnt[i] <= '0;
    end else begin
      if (clr_valid) send_cnt[clr_tid] <= '0;
      if (state == S_DECIDE)
        send_cnt[cur_tid] <= (lut_q < SCNT_W'(RESEND_TH)) ? lut_q + 1'b1 : '0;
    end
  end
endmodule
