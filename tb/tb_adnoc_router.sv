// tb_adnoc_router: router at (1,1). Directed parts: latency of a header
// through an idle router (taken at one edge, on the output four edges later), the adaptive
// choice of the South port when bandwidth on East is already reserved, and
// the VCB admission rule while the pool is nearly used up. Random part: packets from all five inputs to random
// destinations with random refusals on all outputs; every packet must leave
// whole, in order, once, on a direction that brings it closer.
module tb_adnoc_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t local_xy;
  logic [NPORTS-1:0] in_valid, in_nack, out_valid, out_nack, txn_start, stall;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  hdr_t [NPORTS-1:0] port_hdr;
  logic [NPORTS-1:0][7:0] avail;
  int checks = 0, failures = 0;
  int nack_pct = 20;
  logic [NPORTS-1:0] block_out;

  always #5 clk = ~clk;

  adnoc_router dut (.*);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // packets are identified by tid (3 bits) and source y/x fields; the
  // testbench uses src = {input port, seq} and keeps a table by that key
  flit_t sent_pkt[int][$];
  int    sent_dst[int];
  flit_t rx[NPORTS][$];
  int    delivered = 0, stall_cycles = 0;
  port_e last_port[int];

  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++) out_nack[o] = block_out[o] || ($urandom_range(0, 99) < nack_pct);

  always @(posedge clk) if (rst_n) begin
    if (|stall) stall_cycles++;
    for (int o = 0; o < NPORTS; o++)
      if (out_valid[o] && !out_nack[o]) begin
        rx[o].push_back(out_flit[o]);
        if (out_flit[o].ftype == FT_TAIL) begin
          int key;
          // HEAD, HEAD2 key
          key = int'({rx[o][0].data[6:4], rx[o][1].data[3:0]});
          if (!sent_pkt.exists(key)) begin
            failures++; $display("FAIL unknown packet on port %0d", o);
          end else begin
            coord_t d;
            logic ok_dir;
            d = coord_t'(rx[o][0].data[3:0]);
            ok_dir = (o == P_L) ? (d == local_xy) :
                     (o == P_E) ? (d.x > local_xy.x) : (o == P_W) ? (d.x < local_xy.x) :
                     (o == P_N) ? (d.y < local_xy.y) : (d.y > local_xy.y);
            checks++;
            if (!ok_dir) begin failures++; $display("FAIL packet %0d on port %0d", key, o); end
            checks++;
            if (rx[o].size() != sent_pkt[key].size()) begin
              failures++; $display("FAIL packet %0d length %0d vs %0d", key, rx[o].size(), sent_pkt[key].size());
            end else
              for (int i = 0; i < rx[o].size(); i++)
                if (rx[o][i] != sent_pkt[key][i]) begin
                  failures++; $display("FAIL packet %0d flit %0d", key, i);
                end
            last_port[key] = port_e'(o);
            sent_pkt.delete(key);
            delivered++;
          end
          rx[o].delete();
        end
      end
  end

  task automatic send_flit(int p, flit_t f);
    in_valid[p] = 1; in_flit[p] = f;
    #1;
    while (in_nack[p]) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    in_valid[p] = 0;
    @(negedge clk);
  endtask

  // key = {tid, src}; src carries the input port and a sequence bit
  task automatic send_packet(int p, int tid, coord_t src, coord_t d, int r, int len, logic mon = 1'b0);
    flit_t pk[$];
    int key;
    key = int'({3'(tid), src});
    pk.push_back(make_head(mon, 3'(tid), d));
    pk.push_back(make_head2(4'(r), src));
    for (int i = 0; i < len; i++) pk.push_back('{ftype: (i == len - 1) ? FT_TAIL : FT_BODY, data: 8'($urandom)});
    sent_pkt[key] = pk;
    foreach (pk[i]) send_flit(p, pk[i]);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    local_xy = '{x: 2'd1, y: 2'd1};
    in_valid = 0; in_flit = '0; block_out = 0; out_nack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. latency on an idle router, no refusals
    nack_pct = 0;
    @(negedge clk);
    begin
      time t0;
      t0 = $time;
      fork
        send_packet(P_W, 1, '{x: 2'd0, y: 2'd0}, '{x: 2'd3, y: 2'd1}, 2, 2);
        begin
          wait (out_valid[P_E]);
          // offered just before edge 1, departs at edge 5
          ck(($time - t0) / 10 == 3, $sformatf("header on the output 4 cycles after being taken (%0d)", ($time - t0) / 10 + 1));
        end
      join
    end
    repeat (10) @(posedge clk);
    ck(delivered == 1 && last_port[int'({3'd1, 4'd0})] == P_E, "first packet east");
    $display("part 2");
    // 2. adaptive choice: East blocked with 15 units reserved; a monitoring
    // packet (which needs only two free VCBs) for (2,2) then goes South
    block_out[P_E] = 1;
    send_packet(P_W, 2, '{x: 2'd0, y: 2'd1}, '{x: 2'd3, y: 2'd1}, 15, 2);
    repeat (3) @(posedge clk);
    ck(avail[P_E] == 8'd49, "15 units reserved on East");
    send_packet(P_N, 3, '{x: 2'd1, y: 2'd0}, '{x: 2'd2, y: 2'd2}, 15, 2, 1'b1);
    repeat (10) @(posedge clk);
    ck(last_port.exists(int'({3'd3, 4'b0100})) && last_port[int'({3'd3, 4'b0100})] == P_S, "adaptive: South chosen");
    $display("part 3");
    // 3. admission: a second monitoring packet for East is stuck behind the
    // first packet; a packet for the PE still gets the last VCB; a regular
    // packet for another router must wait until the pool is free
    send_packet(P_N, 4, '{x: 2'd1, y: 2'd0}, '{x: 2'd3, y: 2'd1}, 1, 1, 1'b1);
    send_packet(P_S, 5, '{x: 2'd1, y: 2'd2}, '{x: 2'd1, y: 2'd1}, 1, 1);
    repeat (10) @(posedge clk);
    ck(last_port.exists(int'({3'd5, 4'b0110})) && last_port[int'({3'd5, 4'b0110})] == P_L, "PE packet delivered");
    fork
      send_packet(P_L, 6, '{x: 2'd1, y: 2'd1}, '{x: 2'd1, y: 2'd2}, 1, 1);
      begin
        repeat (6) @(posedge clk);
        ck(stall[P_L] && dut.u_vca.vcb_busy != 3'b000, "regular header waits for the pool");
        block_out[P_E] = 0;
      end
    join
    repeat (30) @(posedge clk);
    ck(sent_pkt.size() == 0, "blocked packets delivered");
    $display("part 4");
    // 4. random traffic on all inputs
    nack_pct = 25;
    for (int p = 0; p < NPORTS; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < 12; k++) begin
          coord_t d;
          d = coord_t'(4'($urandom));
          // no U-turns: a packet never goes back where it came from
          if (pp == P_N) d.y = (d.y == 0) ? 2'd1 : d.y;
          if (pp == P_S) d.y = (d.y == 3) ? 2'd1 : d.y;
          if (pp == P_W) d.x = (d.x == 0) ? 2'd1 : d.x;
          if (pp == P_E) d.x = (d.x == 3) ? 2'd1 : d.x;
          send_packet(pp, k % 8, coord_t'({1'b1, 3'(pp)} ^ 4'(k / 8) << 3), d, $urandom_range(0, 9), $urandom_range(1, 6));
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      join_none
    end
    wait fork;
    repeat (200) @(posedge clk);
    ck(sent_pkt.size() == 0, $sformatf("all random packets delivered (%0d left)", sent_pkt.size()));
    ck(stall_cycles > 0, "stalls happened");
    ck(avail == {NPORTS{8'd64}}, "all bandwidth released");
    $display("delivered %0d, stall cycles %0d", delivered, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
