// input_decoder: input decoder (ID) of one router input port.
//
// Every flit entering the router passes here first. The decoder takes the
// header flits of a packet, extracts the transaction ID, the destination, the
// required connection bandwidth and the source, and hands them to the route
// computation and the virtual channel arbiter (alloc_req/hdr). Once the
// arbiter has assigned a VCB (alloc_gnt), the decoder writes the two held
// header flits into it and then lets body and tail flits flow straight
// through until the tail.
//
// Link protocol (this design's reading of the NACK lines of the router
// figure): the sender holds in_valid/in_flit until a cycle in which in_nack
// is low; a flit presented while in_nack is high is refused and must be
// offered again. in_nack depends combinationally on in_valid and on the
// arbiter's registered full flags only.
//
// Holding the whole header before routing is this design's choice, needed
// because the header occupies two 8-bit flits. A flit other than HEAD
// arriving when a HEAD is expected is discarded.
module input_decoder
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // upstream link
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_nack,
  // to the arbiter / route computation
  output logic  alloc_req,
  output hdr_t  hdr,
  input  logic  alloc_gnt,
  output logic  push_valid,
  output flit_t push_flit,
  input  logic  push_nack,
  // to the monitor
  output logic  txn_start,    // header complete: a new transaction on this port
  output logic  tail_done     // tail written into the VCB
);
  typedef enum logic [2:0] {S_HEAD, S_HEAD2, S_ALLOC, S_PUSH0, S_PUSH1, S_BODY} state_e;
  state_e state;
  flit_t  h0, h1;

  always_comb begin
    hdr.mon = h0.data[7];
    hdr.tid = h0.data[6:4];
    hdr.dst = coord_t'(h0.data[3:0]);
    hdr.req = h1.data[7:4];
    hdr.src = coord_t'(h1.data[3:0]);
  end

  always_comb begin
    alloc_req  = (state == S_ALLOC);
    push_valid = 1'b0;
    push_flit  = in_flit;
    in_nack    = 1'b0;
    unique case (state)
      S_HEAD, S_HEAD2: in_nack = 1'b0;
      S_ALLOC:         in_nack = in_valid;
      S_PUSH0: begin push_valid = 1'b1; push_flit = h0; in_nack = in_valid; end
      S_PUSH1: begin push_valid = 1'b1; push_flit = h1; in_nack = in_valid; end
      S_BODY:  begin push_valid = in_valid; in_nack = in_valid && push_nack; end
      default: in_nack = in_valid;
    endcase
  end

  assign txn_start = (state == S_HEAD2) && in_valid && in_flit.ftype == FT_HEAD2;
  assign tail_done = (state == S_BODY) && in_valid && !push_nack && in_flit.ftype == FT_TAIL;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HEAD;
      h0    <= '0;
      h1    <= '0;
    end else begin
      unique case (state)
        S_HEAD:  if (in_valid && in_flit.ftype == FT_HEAD) begin h0 <= in_flit; state <= S_HEAD2; end
        S_HEAD2: if (in_valid) begin
                   if (in_flit.ftype == FT_HEAD2) begin h1 <= in_flit; state <= S_ALLOC; end
                   else if (in_flit.ftype == FT_HEAD) h0 <= in_flit;
                 end
        S_ALLOC: if (alloc_gnt) state <= S_PUSH0;
        S_PUSH0: if (!push_nack) state <= S_PUSH1;
        S_PUSH1: if (!push_nack) state <= S_BODY;
        S_BODY:  if (tail_done) state <= S_HEAD;
        default: state <= S_HEAD;
      endcase
    end
  end

  // The arbiter grants only a port that asks.
  a_gnt_needs_req: assert property (@(posedge clk) disable iff (!rst_n) alloc_gnt |-> alloc_req);
endmodule
