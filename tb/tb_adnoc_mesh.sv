// tb_adnoc_mesh: end-to-end run of the default 4 x 4 network. Every PE sends
// packets to random tiles that lie east and/or south of it (with a hot spot
// at tile (3,3), whose PE accepts only a fraction of the flits). Traffic is
// kept to one quadrant direction because the shared VCB pool with adaptive
// minimal routing is not deadlock-free for cyclic traffic; the monitoring
// packets still flow back west and north. Every packet must reach its
// destination PE whole and in order, and no monitoring packet may reach a
// PE. The run counts how often each mechanism of the design happened and
// fails if one never did: adaptive route choices that leave the plain XY
// order, flits refused by a full VCB, headers waiting for a free VCB,
// monitor events, monitoring packets sent and received, resend and
// re-mapping requests.
module tb_adnoc_mesh;
  import noc_pkg::*;
  localparam int COLS = 4, ROWS = 4, NT = COLS * ROWS;
  localparam int PKTS = 24;            // packets per source
  int gap = 40;
  logic clk = 0, rst_n = 0;
  logic  [NT-1:0]            pe_in_valid, pe_in_nack, pe_out_valid, pe_out_nack;
  flit_t [NT-1:0]            pe_in_flit, pe_out_flit;
  logic  [NT-1:0]            resend_valid, remap_valid, clr_valid;
  logic  [NT-1:0][TID_W-1:0] resend_tid, remap_tid, clr_tid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adnoc_mesh dut (.*);

  // expected packets by key = source * 256 + sequence number
  flit_t exp_pkt[int][$];
  int    exp_dst[int];
  flit_t rx[NT][$];
  int delivered = 0, sent = 0, mon_at_pe = 0;
  int n_adaptive = 0, n_full = 0, n_wait = 0, n_event = 0, n_mon_sent = 0, n_mon_rcvd = 0;
  int n_resend = 0, n_remap = 0;
  logic dbg_dump = 0;

  always @(negedge clk)
    for (int t = 0; t < NT; t++)
      pe_out_nack[t] = (t == NT - 1) ? ($urandom_range(0, 99) < 60) : ($urandom_range(0, 99) < 10);

  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) begin
      if (resend_valid[t]) n_resend++;
      if (remap_valid[t])  n_remap++;
      if (pe_out_valid[t] && !pe_out_nack[t]) begin
        rx[t].push_back(pe_out_flit[t]);
        if (pe_out_flit[t].ftype == FT_HEAD && pe_out_flit[t].data[7]) mon_at_pe++;
        if (pe_out_flit[t].ftype == FT_TAIL) begin
          int key;
          coord_t s;
          s   = coord_t'(rx[t][1].data[3:0]);
          key = (int'(s.y) * COLS + int'(s.x)) * 256 + int'(rx[t][2].data);
          checks++;
          if (!exp_pkt.exists(key)) begin
            failures++; $display("FAIL unexpected packet at tile %0d", t);
          end else begin
            if (exp_dst[key] != t) begin failures++; $display("FAIL packet %0d at tile %0d", key, t); end
            if (rx[t].size() != exp_pkt[key].size()) begin
              failures++; $display("FAIL packet %0d length", key);
            end else
              foreach (rx[t][i]) if (rx[t][i] != exp_pkt[key][i]) begin
                failures++; $display("FAIL packet %0d flit %0d", key, i);
              end
            exp_pkt.delete(key);
            delivered++;
          end
          rx[t].delete();
        end
      end
    end
  end

  // probes inside each tile
  for (genvar t = 0; t < NT; t++) begin : g_probe
    localparam int X = t % COLS, Y = t / COLS;
    always @(posedge clk) if (rst_n) begin
      port_e xy;
      coord_t d;
      d  = dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.sel_dst;
      xy = (d.x > X) ? P_E : (d.x < X) ? P_W : (d.y > Y) ? P_S : (d.y < Y) ? P_N : P_L;
      if (dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.rsv_valid &&
          dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.rsv_port != xy) n_adaptive++;
      for (int p = 0; p < NPORTS; p++) begin
        if (dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.push_valid[p] &&
            dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.push_nack[p]) n_full++;
        if (dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.alloc_req[p] &&
            !dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.alloc_gnt[p]) n_wait++;
      end
      if (dut.g_row[Y].g_col[X].u_tile.u_evmon.evt_valid &&
          dut.g_row[Y].g_col[X].u_tile.u_evmon.evt_ready) n_event++;
      if (dut.g_row[Y].g_col[X].u_tile.mon_req_valid &&
          dut.g_row[Y].g_col[X].u_tile.mon_req_ready) n_mon_sent++;
      if (dbg_dump) $display("tile(%0d,%0d) busy=%b vport=%p empty=%b idst=%p locked=%b outv=%b outnack=%b pe_mid=%b inj=%0d",
        X, Y, dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.vcb_busy, dut.g_row[Y].g_col[X].u_tile.u_router.u_vca.vcb_port,
        dut.g_row[Y].g_col[X].u_tile.u_router.vcb_empty,
        {dut.g_row[Y].g_col[X].u_tile.u_router.g_id[4].u_id.state, dut.g_row[Y].g_col[X].u_tile.u_router.g_id[3].u_id.state,
         dut.g_row[Y].g_col[X].u_tile.u_router.g_id[2].u_id.state, dut.g_row[Y].g_col[X].u_tile.u_router.g_id[1].u_id.state,
         dut.g_row[Y].g_col[X].u_tile.u_router.g_id[0].u_id.state},
        dut.g_row[Y].g_col[X].u_tile.u_router.u_sdm.locked, dut.g_row[Y].g_col[X].u_tile.u_router.out_valid,
        dut.g_row[Y].g_col[X].u_tile.u_router.out_nack, dut.g_row[Y].g_col[X].u_tile.u_port.pe_mid, dut.g_row[Y].g_col[X].u_tile.u_port.inj_idx);
      if (dut.g_row[Y].g_col[X].u_tile.rem_evt_valid &&
          dut.g_row[Y].g_col[X].u_tile.rem_evt_ready) n_mon_rcvd++;
    end
  end

  task automatic source(int t);
    if (t == NT - 1) return;
    for (int k = 0; k < PKTS; k++) begin
      flit_t pk[$];
      int d, dx, dy, len, key;
      coord_t dc, sc;
      // destinations lie east and/or south of the source (see header)
      do begin
        dx = $urandom_range(t % COLS, COLS - 1);
        dy = $urandom_range(t / COLS, ROWS - 1);
        if ($urandom_range(0, 3) == 0) begin dx = COLS - 1; dy = ROWS - 1; end
        d = dy * COLS + dx;
      end while (d == t);
      dc = '{x: 2'(d % COLS), y: 2'(d / COLS)};
      sc = '{x: 2'(t % COLS), y: 2'(t / COLS)};
      len = $urandom_range(2, 7);
      pk.push_back(make_head(1'b0, 3'(k), dc));
      pk.push_back(make_head2(4'($urandom_range(1, 15)), sc));
      pk.push_back('{ftype: FT_BODY, data: 8'(k)});       // sequence number
      for (int i = 1; i < len; i++)
        pk.push_back('{ftype: (i == len - 1) ? FT_TAIL : FT_BODY, data: 8'($urandom)});
      key = t * 256 + k;
      exp_pkt[key] = pk;
      exp_dst[key] = d;
      sent++;
      foreach (pk[i]) begin
        @(negedge clk);
        pe_in_valid[t] = 1; pe_in_flit[t] = pk[i];
        #1;
        while (pe_in_nack[t]) begin @(negedge clk); #1; end
        @(posedge clk); #1;
        pe_in_valid[t] = 0;
      end
      repeat ($urandom_range(0, gap)) @(negedge clk);
    end
  endtask

  task automatic report();
    $display("sent %0d delivered %0d | adaptive %0d, VCB full %0d, VCB wait %0d, events %0d, monitoring sent %0d received %0d, resend %0d, remap %0d",
             sent, delivered, n_adaptive, n_full, n_wait, n_event, n_mon_sent, n_mon_rcvd, n_resend, n_remap);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    dbg_dump = 1; @(posedge clk); #1 dbg_dump = 0;
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pe_in_valid = 0; pe_in_flit = '0; clr_valid = 0; clr_tid = '0; pe_out_nack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      automatic int tt = t;
      fork source(tt); join_none
    end
    wait fork;
    wait (exp_pkt.size() == 0);
    repeat (300) @(posedge clk);
    report();
    checks++;
    if (delivered != sent) begin failures++; $display("FAIL %0d of %0d delivered", delivered, sent); end
    checks++; if (mon_at_pe != 0)  begin failures++; $display("FAIL monitoring packet reached a PE"); end
    checks++; if (n_adaptive == 0) begin failures++; $display("FAIL no adaptive route choice"); end
    checks++; if (n_full == 0)     begin failures++; $display("FAIL no full-VCB refusal"); end
    checks++; if (n_wait == 0)     begin failures++; $display("FAIL no header waited for a VCB"); end
    checks++; if (n_event == 0)    begin failures++; $display("FAIL no monitor event"); end
    checks++; if (n_mon_sent == 0 || n_mon_rcvd != n_mon_sent) begin
      failures++; $display("FAIL monitoring packets sent %0d received %0d", n_mon_sent, n_mon_rcvd);
    end
    checks++; if (n_resend == 0)   begin failures++; $display("FAIL no resend request"); end
    checks++; if (n_remap == 0)    begin failures++; $display("FAIL no re-mapping request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
