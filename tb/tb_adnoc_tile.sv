// tb_adnoc_tile: tile (1,1) with its East link blocked. A packet from the
// tile's own PE stalls, its event counter reaches the threshold and the NI
// part asks for a resend. A packet from tile (0,1) stalls waiting for a VCB and
// the tile queues a monitoring packet for (0,1); it goes out West as soon as
// the PE port is free again. A monitoring packet
// arriving from the East for this tile is consumed and turns into a resend
// request, without reaching the PE. Once East is free, both stalled packets
// leave intact.
module tb_adnoc_tile;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] link_in_valid, link_in_nack, link_out_valid, link_out_nack;
  flit_t [3:0] link_in_flit, link_out_flit;
  logic pe_in_valid, pe_in_nack, pe_out_valid, pe_out_nack;
  flit_t pe_in_flit, pe_out_flit;
  logic resend_valid, remap_valid, clr_valid;
  logic [TID_W-1:0] resend_tid, remap_tid, clr_tid;
  int checks = 0, failures = 0;
  flit_t east_rx[$], west_rx[$], pe_rx[$];
  logic [TID_W-1:0] resends[$];

  always #5 clk = ~clk;

  adnoc_tile #(.X(1), .Y(1)) dut (.*);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (link_out_valid[1] && !link_out_nack[1]) east_rx.push_back(link_out_flit[1]);
    if (link_out_valid[3] && !link_out_nack[3]) west_rx.push_back(link_out_flit[3]);
    if (pe_out_valid && !pe_out_nack) pe_rx.push_back(pe_out_flit);
    if (resend_valid) resends.push_back(resend_tid);
    ck(!remap_valid, "no remap");
  end

  // flits offered on a link, held while refused
  task automatic drive_link(int l, flit_t pk[$]);
    foreach (pk[i]) begin
      @(negedge clk);
      link_in_valid[l] = 1; link_in_flit[l] = pk[i];
      #1;
      while (link_in_nack[l]) begin @(negedge clk); #1; end
      @(posedge clk); #1;
      link_in_valid[l] = 0;
    end
  endtask

  task automatic drive_pe(flit_t pk[$]);
    foreach (pk[i]) begin
      @(negedge clk);
      pe_in_valid = 1; pe_in_flit = pk[i];
      #1;
      while (pe_in_nack) begin @(negedge clk); #1; end
      @(posedge clk); #1;
      pe_in_valid = 0;
    end
  endtask

  function automatic void mk(ref flit_t pk[$], input logic mon, int tid, coord_t d, coord_t s, int len);
    pk.delete();
    pk.push_back(make_head(mon, 3'(tid), d));
    pk.push_back(make_head2(4'd2, s));
    for (int i = 0; i < len; i++)
      pk.push_back('{ftype: (i == len - 1) ? FT_TAIL : FT_BODY, data: mon ? 8'(tid) : 8'($urandom)});
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t a[$], b[$], m[$];
    link_in_valid = 0; link_in_flit = '0; link_out_nack = 4'b0010;
    pe_in_valid = 0; pe_in_flit = '0; pe_out_nack = 0; clr_valid = 0; clr_tid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mk(a, 0, 1, '{x: 2'd3, y: 2'd1}, '{x: 2'd1, y: 2'd1}, 8);   // own PE, tid 1
    mk(b, 0, 2, '{x: 2'd3, y: 2'd1}, '{x: 2'd0, y: 2'd1}, 8);   // from (0,1), tid 2
    mk(m, 1, 5, '{x: 2'd1, y: 2'd1}, '{x: 2'd3, y: 2'd1}, 1);   // monitoring packet for us
    fork
      drive_pe(a);
      drive_link(3, b);
      begin
        repeat (80) @(posedge clk);
        ck(resends.size() == 1 && resends[0] == 3'd1, "resend for own stalled transaction");
        ck(west_rx.size() == 0 && dut.mon_req_valid, "monitoring packet queued behind the stalled PE packet");
        drive_link(1, m);
        repeat (20) @(posedge clk);
        ck(resends.size() == 2 && resends[1] == 3'd5, "remote event turned into resend");
        ck(pe_rx.size() == 0, "monitoring packet kept from the PE");
        link_out_nack = 0;
      end
    join
    repeat (30) @(posedge clk);
    ck(west_rx.size() == 3, "monitoring packet sent West");
    if (west_rx.size() == 3) begin
      ck(west_rx[0] == make_head(1'b1, 3'd2, '{x: 2'd0, y: 2'd1}), "monitoring HEAD");
      ck(west_rx[1].ftype == FT_HEAD2 && west_rx[1].data[3:0] == 4'b0101, "monitoring HEAD2 source");
      ck(west_rx[2].ftype == FT_TAIL && west_rx[2].data[2:0] == 3'd2, "monitoring TAIL tid");
    end
    ck(east_rx.size() == a.size() + b.size(), "both packets leave East");
    if (east_rx.size() == a.size() + b.size()) begin
      flit_t first[$], second[$];
      first = (east_rx[1] == a[1]) ? a : b;
      second = (east_rx[1] == a[1]) ? b : a;
      foreach (first[i]) ck(east_rx[i] == first[i], "first packet intact");
      foreach (second[i]) ck(east_rx[first.size() + i] == second[i], "second packet intact");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
