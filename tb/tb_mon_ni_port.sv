// tb_mon_ni_port: injection and extraction of monitoring packets at the PE
// port of tile (2,1). A monitoring request arriving while the PE is in the
// middle of a packet waits for its tail, then the three monitoring flits go
// to the router (with random refusals) ahead of the PE's next packet. On the
// way out, regular packets reach the PE unchanged while monitoring packets
// are consumed and their transaction ID handed to the monitor, held back
// while the monitor cannot take it.
module tb_mon_ni_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t own_xy;
  logic pe_in_valid, pe_in_nack, r_in_valid, r_in_nack, mon_req_valid, mon_req_ready;
  flit_t pe_in_flit, r_in_flit, r_out_flit, pe_out_flit;
  coord_t mon_req_dst;
  logic [TID_W-1:0] mon_req_tid, rem_evt_tid;
  logic r_out_valid, r_out_nack, pe_out_valid, pe_out_nack, rem_evt_valid, rem_evt_ready;
  int checks = 0, failures = 0;
  flit_t to_router[$], exp_router[$], to_pe[$], exp_pe[$];
  logic [TID_W-1:0] evts[$];

  always #5 clk = ~clk;

  mon_ni_port #(.MON_REQ_BW(1)) dut (.*);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(negedge clk) r_in_nack = ($urandom_range(0, 99) < 30);

  always @(posedge clk) if (rst_n) begin
    if (r_in_valid && !r_in_nack) to_router.push_back(r_in_flit);
    if (pe_out_valid && !pe_out_nack) to_pe.push_back(pe_out_flit);
    if (rem_evt_valid && rem_evt_ready) evts.push_back(rem_evt_tid);
  end

  task automatic pe_send(flit_t f);
    @(negedge clk);
    pe_in_valid = 1; pe_in_flit = f;
    #1;
    while (pe_in_nack) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    pe_in_valid = 0;
  endtask

  task automatic rt_send(flit_t f);
    @(negedge clk);
    r_out_valid = 1; r_out_flit = f;
    #1;
    while (r_out_nack) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    r_out_valid = 0;
  endtask

  function automatic flit_t body(logic [7:0] d, logic tail);
    flit_t f;
    f.ftype = tail ? FT_TAIL : FT_BODY; f.data = d;
    return f;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t f;
    own_xy = '{x: 2'd2, y: 2'd1};
    pe_in_valid = 0; pe_in_flit = '0; mon_req_valid = 0; mon_req_dst = '0; mon_req_tid = 0;
    r_out_valid = 0; r_out_flit = '0; pe_out_nack = 0; rem_evt_ready = 1; r_in_nack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // PE starts a packet
    f = make_head(1'b0, 3'd1, '{x: 2'd0, y: 2'd0}); pe_send(f); exp_router.push_back(f);
    f = make_head2(4'd3, own_xy);                    pe_send(f); exp_router.push_back(f);
    // monitoring request mid-packet
    @(negedge clk);
    mon_req_valid = 1; mon_req_dst = '{x: 2'd3, y: 2'd3}; mon_req_tid = 3'd6;
    repeat (3) @(posedge clk);
    ck(!mon_req_ready, "request waits for the PE packet");
    f = body(8'h12, 0); pe_send(f); exp_router.push_back(f);
    f = body(8'h34, 1); pe_send(f); exp_router.push_back(f);
    @(negedge clk); #1;
    while (!mon_req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    mon_req_valid = 0;
    exp_router.push_back(make_head(1'b1, 3'd6, '{x: 2'd3, y: 2'd3}));
    exp_router.push_back(make_head2(4'd1, own_xy));
    exp_router.push_back('{ftype: FT_TAIL, data: 8'd6});
    // PE's next packet offered at once: must follow the monitoring packet
    f = make_head(1'b0, 3'd2, '{x: 2'd1, y: 2'd1}); pe_send(f); exp_router.push_back(f);
    f = make_head2(4'd1, own_xy);                    pe_send(f); exp_router.push_back(f);
    f = body(8'h56, 1);                              pe_send(f); exp_router.push_back(f);
    repeat (3) @(posedge clk);
    ck(to_router.size() == exp_router.size(), "flit count into router");
    for (int i = 0; i < exp_router.size() && i < to_router.size(); i++)
      ck(to_router[i] == exp_router[i], $sformatf("router flit %0d", i));
    // ejection: regular, monitoring (monitor busy for a while), regular
    f = make_head(1'b0, 3'd3, own_xy); rt_send(f); exp_pe.push_back(f);
    f = make_head2(4'd2, '{x: 2'd0, y: 2'd3}); rt_send(f); exp_pe.push_back(f);
    f = body(8'h9A, 1); rt_send(f); exp_pe.push_back(f);
    rem_evt_ready = 0;
    fork
      begin
        rt_send(make_head(1'b1, 3'd4, own_xy));
        rt_send(make_head2(4'd1, '{x: 2'd0, y: 2'd0}));
        rt_send('{ftype: FT_TAIL, data: 8'd4});
      end
      begin
        repeat (8) @(posedge clk);
        ck(evts.size() == 0 && r_out_valid && r_out_nack, "tail held while monitor is busy");
        @(negedge clk); rem_evt_ready = 1;
      end
    join
    pe_out_nack = 1;
    fork
      begin
        f = make_head(1'b0, 3'd7, own_xy); rt_send(f); exp_pe.push_back(f);
        f = make_head2(4'd2, '{x: 2'd1, y: 2'd3}); rt_send(f); exp_pe.push_back(f);
        f = body(8'hBC, 1); rt_send(f); exp_pe.push_back(f);
      end
      begin repeat (5) @(posedge clk); @(negedge clk); pe_out_nack = 0; end
    join
    repeat (3) @(posedge clk);
    ck(evts.size() == 1 && evts[0] == 3'd4, "monitoring event extracted");
    ck(to_pe.size() == exp_pe.size(), "flit count to PE");
    for (int i = 0; i < exp_pe.size() && i < to_pe.size(); i++)
      ck(to_pe[i] == exp_pe[i], $sformatf("PE flit %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
