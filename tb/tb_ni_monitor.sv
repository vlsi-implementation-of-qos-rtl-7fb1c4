// tb_ni_monitor: NI part of the monitor at tile (1,2). A local event for a
// transaction from another tile asks for a monitoring packet to that tile;
// events for the tile's own transaction give RESEND_TH resend requests, each
// raising the send counter, and then a re-mapping request; remote events act
// the same; clearing a counter restarts the sequence. Also checks the
// one-cycle lookup-table read and write: from leaving the FIFO to the
// decision takes three cycles.
module tb_ni_monitor;
  import noc_pkg::*;
  localparam int TH = 3;
  logic clk = 0, rst_n = 0;
  coord_t own_xy;
  logic loc_evt_valid, loc_evt_ready, rem_evt_valid, rem_evt_ready;
  logic [TID_W-1:0] loc_evt_tid, rem_evt_tid, mon_req_tid, resend_tid, remap_tid, clr_tid;
  coord_t loc_evt_src, mon_req_dst;
  logic mon_req_valid, mon_req_ready, resend_valid, remap_valid, clr_valid;
  int checks = 0, failures = 0;
  int n_resend = 0, n_remap = 0, n_mon = 0;
  logic [TID_W-1:0] l_tid;
  coord_t l_dst;
  time t_dec;

  always #5 clk = ~clk;

  ni_monitor #(.RESEND_TH(TH), .FIFO_DEPTH(4), .SCNT_W(4)) dut (.*);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (resend_valid) begin n_resend++; l_tid = resend_tid; t_dec = $time; end
    if (remap_valid)  begin n_remap++;  l_tid = remap_tid;  t_dec = $time; end
    if (mon_req_valid && mon_req_ready) begin n_mon++; l_tid = mon_req_tid; l_dst = mon_req_dst; end
  end

  task automatic loc_event(int tid, coord_t src);
    @(negedge clk);
    loc_evt_valid = 1; loc_evt_tid = 3'(tid); loc_evt_src = src;
    @(negedge clk);
    loc_evt_valid = 0;
  endtask

  task automatic rem_event(int tid);
    @(negedge clk);
    rem_evt_valid = 1; rem_evt_tid = 3'(tid);
    @(negedge clk);
    rem_evt_valid = 0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_in;
    own_xy = '{x: 2'd1, y: 2'd2};
    loc_evt_valid = 0; rem_evt_valid = 0; loc_evt_tid = 0; rem_evt_tid = 0; loc_evt_src = '0;
    mon_req_ready = 0; clr_valid = 0; clr_tid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // remote source: monitoring packet request, held until accepted
    loc_event(4, '{x: 2'd3, y: 2'd0});
    repeat (4) @(posedge clk);
    ck(mon_req_valid && mon_req_dst == '{x: 2'd3, y: 2'd0} && mon_req_tid == 3'd4, "monitoring packet requested");
    @(negedge clk); mon_req_ready = 1;
    @(negedge clk); mon_req_ready = 0;
    ck(n_mon == 1 && !mon_req_valid && n_resend == 0, "one request, no resend");
    // own transaction 5: TH resends then a remap
    for (int i = 0; i < TH; i++) begin
      @(negedge clk);
      loc_evt_valid = 1; loc_evt_tid = 3'd5; loc_evt_src = own_xy;
      t_in = $time;
      @(negedge clk);
      loc_evt_valid = 0;
      repeat (6) @(posedge clk);
      ck(n_resend == i + 1 && l_tid == 3'd5 && n_remap == 0, "resend below threshold");
      ck(dut.send_cnt[5] == 4'(i + 1), "send counter incremented");
      ck((t_dec - t_in) / 10 == 4, "event to decision in 4 cycles");
    end
    rem_event(5);
    repeat (6) @(posedge clk);
    ck(n_remap == 1 && n_resend == TH && l_tid == 3'd5, "remap at threshold (remote event)");
    ck(dut.send_cnt[5] == 0, "counter restarted after remap");
    // clear and resend again; a burst of 4 events in consecutive cycles
    rem_event(6); rem_event(6);
    repeat (10) @(posedge clk);
    ck(dut.send_cnt[6] == 4'd2, "two resends counted");
    @(negedge clk); clr_valid = 1; clr_tid = 3'd6; @(negedge clk); clr_valid = 0;
    repeat (8) @(posedge clk);
    ck(n_resend == TH + 2 && dut.send_cnt[6] == 0, "cleared counter");
    @(negedge clk);
    loc_evt_valid = 1; loc_evt_src = own_xy; loc_evt_tid = 3'd1;
    rem_evt_valid = 1; rem_evt_tid = 3'd2;
    @(negedge clk);
    loc_evt_tid = 3'd3; rem_evt_tid = 3'd3;
    @(negedge clk);
    loc_evt_valid = 0; rem_evt_valid = 0;
    repeat (20) @(posedge clk);
    ck(n_resend == TH + 6 && n_remap == 1, "all buffered events served");
    ck(dut.send_cnt[3] == 4'd2 && dut.send_cnt[1] == 4'd1 && dut.send_cnt[2] == 4'd1, "counters after burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
