// tb_vc_arbiter: on-demand VCB assignment. Checks one grant per cycle,
// monitoring headers first, lowest free VCB, the admission rule (one free
// VCB for the PE port, two for a monitoring packet, three for a regular
// packet to another router), the recorded output port and bandwidth, the reservation sent to the route unit, steering of each port's
// flits into its own VCB, refusal and stall report when the VCB is full or
// no VCB is free, and return of a VCB to the pool when its tail has left.
module tb_vc_arbiter;
  import noc_pkg::*;
  localparam int V = 3;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] alloc_req, alloc_gnt, push_valid, push_nack, tail_done, stall;
  hdr_t [NPORTS-1:0] hdr;
  flit_t [NPORTS-1:0] push_flit;
  coord_t sel_dst;
  logic [REQ_W-1:0] sel_req, rsv_req;
  port_e route, rsv_port;
  logic rsv_valid;
  logic [V-1:0] vcb_push, vcb_full, vcb_done, vcb_busy, vcb_mon;
  flit_t [V-1:0] vcb_wdata;
  port_e [V-1:0] vcb_port;
  logic [V-1:0][REQ_W-1:0] vcb_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vc_arbiter #(.NUM_VCB(V)) dut (.*);

  // model route unit: destination row 3 means the PE port, otherwise the
  // destination column selects the port
  assign route = (sel_dst.y == 2'd3) ? P_L : port_e'(sel_dst.x);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic hdr_t mk(int dx, int dy, int r, logic mon);
    hdr_t h;
    h = '0; h.dst.x = 2'(dx); h.dst.y = 2'(dy); h.req = 4'(r); h.mon = mon; h.tid = 3'(dx);
    return h;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_req = 0; hdr = '0; push_valid = 0; push_flit = '0; tail_done = 0;
    vcb_full = 0; vcb_done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // A: regular packet for South with the whole pool free
    @(negedge clk);
    alloc_req = 5'b00010; hdr[1] = mk(2, 0, 5, 0);
    #1;
    ck(alloc_gnt == 5'b00010 && rsv_valid && rsv_port == P_S && rsv_req == 4'd5, "regular packet, pool free");
    @(negedge clk);
    alloc_req = 0;
    ck(vcb_busy == 3'b001 && vcb_port[0] == P_S && vcb_req[0] == 4'd5 && !vcb_mon[0], "VCB0 assigned to port 1");
    // B: regular (port 2, West) and monitoring (port 3, East) with two free
    alloc_req = 5'b01100; hdr[2] = mk(3, 0, 6, 0); hdr[3] = mk(1, 0, 7, 1);
    #1;
    ck(alloc_gnt == 5'b01000 && rsv_port == P_E && rsv_req == 4'd7, "monitoring packet granted");
    ck(stall == 5'b00100, "regular header waits");
    @(negedge clk);
    alloc_req[3] = 0;
    ck(vcb_busy == 3'b011 && vcb_port[1] == P_E && vcb_mon[1], "VCB1 assigned to port 3");
    #1;
    ck(alloc_gnt == 0 && stall[2], "regular network packet needs three free VCBs");
    // C: a packet for the PE takes the last VCB
    alloc_req[4] = 1; hdr[4] = mk(0, 3, 1, 0);
    #1;
    ck(alloc_gnt == 5'b10000 && route == P_L, "PE-bound packet takes the last VCB");
    @(negedge clk);
    alloc_req[4] = 0;
    ck(vcb_busy == 3'b111 && vcb_port[2] == P_L, "pool exhausted");
    // steering: ports 1, 3, 4 push one flit each
    push_valid = 5'b11010;
    push_flit[1] = '{ftype: FT_BODY, data: 8'h11};
    push_flit[3] = '{ftype: FT_BODY, data: 8'h33};
    push_flit[4] = '{ftype: FT_BODY, data: 8'h44};
    #1;
    ck(vcb_push == 3'b111 && push_nack == 0, "three pushes");
    ck(vcb_wdata[0].data == 8'h11 && vcb_wdata[1].data == 8'h33 && vcb_wdata[2].data == 8'h44, "each port into its VCB");
    // VCB1 full: port 3 refused
    vcb_full = 3'b010;
    #1;
    ck(push_nack == 5'b01000 && vcb_push == 3'b101 && stall[3], "full VCB refuses");
    vcb_full = 0;
    // port 3 finishes: tail written, then VCB1 drains
    @(negedge clk);
    push_valid = 0;
    tail_done = 5'b01000;
    @(negedge clk);
    tail_done = 0;
    push_valid = 5'b01000;
    #1;
    ck(push_nack[3], "port without VCB refused");
    push_valid = 0;
    vcb_done = 3'b011;
    @(negedge clk);
    vcb_done = 0;
    #1;
    ck(alloc_gnt == 0 && vcb_busy == 3'b100, "two free: regular packet still waits");
    vcb_done = 3'b100;
    @(negedge clk);
    vcb_done = 0;
    #1;
    ck(alloc_gnt == 5'b00100 && rsv_port == P_W, "pool free again: regular packet granted");
    @(negedge clk);
    alloc_req = 0;
    ck(vcb_busy == 3'b001 && vcb_port[0] == P_W, "VCB0 reused for port 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
