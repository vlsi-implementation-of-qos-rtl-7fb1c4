// tb_input_decoder: sends packets through one input decoder while a model
// arbiter grants after random delays and refuses pushes at random. Checks
// that the extracted header matches what was sent, that the flits written
// towards the VCB are exactly the packet's flits in order, that nothing is
// requested before the header is complete, that a stray non-head flit is
// dropped, and the one-flit-per-cycle forwarding once granted.
module tb_input_decoder;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_nack, alloc_req, alloc_gnt, push_valid, push_nack, txn_start, tail_done;
  flit_t in_flit, push_flit;
  hdr_t hdr;
  int checks = 0, failures = 0;
  flit_t sent[$], got[$];
  int n_start = 0, n_tail = 0, refuse_pct = 30;

  always #5 clk = ~clk;

  input_decoder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model arbiter
  int wait_cnt;
  always @(negedge clk) begin
    alloc_gnt = 0;
    push_nack = ($urandom_range(0, 99) < refuse_pct);
    if (alloc_req) begin
      if (wait_cnt == 0) alloc_gnt = 1;
      else wait_cnt--;
    end else wait_cnt = $urandom_range(0, 4);
  end

  always @(posedge clk) if (rst_n) begin
    if (push_valid && !push_nack) got.push_back(push_flit);
    if (txn_start) n_start++;
    if (tail_done) n_tail++;
  end

  task automatic send(flit_t f);
    @(negedge clk);
    in_valid = 1; in_flit = f;
    #1;
    while (in_nack) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    in_valid = 0;
  endtask

  task automatic packet(int len, logic [2:0] tid, coord_t d, logic [3:0] r, coord_t s);
    flit_t f;
    f = make_head(1'b0, tid, d);           send(f); sent.push_back(f);
    f = make_head2(r, s);                  send(f); sent.push_back(f);
    // header must be complete before the request
    @(negedge clk); #2;
    checks++;
    if (!alloc_req && !(push_valid)) ; // request may already be granted
    for (int i = 0; i < len; i++) begin
      f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
      f.data  = 8'($urandom);
      if (i == 0) begin
        // header fields while the packet is in flight
        if (hdr.tid != tid || hdr.dst != d || hdr.req != r || hdr.src != s || hdr.mon) begin
          failures++; $display("FAIL header fields");
        end
      end
      send(f); sent.push_back(f);
    end
  endtask

  initial begin
    in_valid = 0; in_flit = '0; alloc_gnt = 0; push_nack = 0; wait_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // a stray body flit while a head is expected is dropped
    send('{ftype: FT_BODY, data: 8'hAA});
    checks++;
    if (alloc_req) begin failures++; $display("FAIL request after stray flit"); end
    for (int p = 0; p < 20; p++)
      packet($urandom_range(1, 6), 3'(p), coord_t'(4'($urandom)), 4'($urandom), coord_t'(4'($urandom)));
    // throughput: no refusals, flits back to back
    refuse_pct = 0;
    begin
      flit_t f;
      int t0, t1;
      f = make_head(1'b0, 3'd5, '{x: 2'd3, y: 2'd0}); send(f); sent.push_back(f);
      f = make_head2(4'd2, '{x: 2'd0, y: 2'd0});      send(f); sent.push_back(f);
      wait (got.size() == sent.size());
      @(negedge clk);
      t0 = $time;
      for (int i = 0; i < 8; i++) begin
        f.ftype = (i == 7) ? FT_TAIL : FT_BODY; f.data = 8'(i);
        send(f); sent.push_back(f);
      end
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 > 9) begin failures++; $display("FAIL 8 body flits took %0d cycles", (t1 - t0) / 10); end
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL forwarded %0d flits, sent %0d", got.size(), sent.size());
    end else
      for (int i = 0; i < sent.size(); i++) begin
        checks++;
        if (got[i] != sent[i]) begin failures++; $display("FAIL flit %0d %h != %h", i, got[i], sent[i]); end
      end
    checks++;
    if (n_start != 21 || n_tail != 21) begin failures++; $display("FAIL starts %0d tails %0d", n_start, n_tail); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
