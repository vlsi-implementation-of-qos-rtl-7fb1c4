// tb_wxy_route: route selection of the weighted-XY unit at router (1,1).
// Checks the PE port for a local destination, the only productive direction
// for destinations in line, the tie rule (X first), the switch to the Y
// direction when bandwidth reserved on the X link lowers its weight, the
// fall back when a link lacks the required bandwidth, and that releases
// restore the available bandwidth.
module tb_wxy_route;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  coord_t local_xy, dst;
  logic [REQ_W-1:0] req, rsv_req;
  port_e route, rsv_port;
  logic [3:0] path;
  logic [NPORTS-1:0][7:0] avail;
  logic rsv_valid;
  logic [2:0] rel_valid;
  port_e [2:0] rel_port;
  logic [2:0][REQ_W-1:0] rel_req;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wxy_route #(.BW_W(8), .TOTAL_BW(64), .NUM_VCB(3)) dut (.*);

  task automatic expect_route(int dx, int dy, int r, port_e exp, string what);
    dst = '{x: 2'(dx), y: 2'(dy)}; req = 4'(r);
    #1;
    checks++;
    if (route != exp || path != ((exp == P_L) ? 4'b0 : 4'b1 << exp)) begin
      failures++;
      $display("FAIL %s: dst=(%0d,%0d) route=%0d path=%b expected %0d", what, dx, dy, route, path, exp);
    end
  endtask

  task automatic reserve(port_e p, int r);
    @(negedge clk);
    rsv_valid = 1; rsv_port = p; rsv_req = 4'(r);
    @(negedge clk);
    rsv_valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    local_xy = '{x: 2'd1, y: 2'd1};
    dst = '0; req = 0; rsv_valid = 0; rsv_port = P_N; rsv_req = 0;
    rel_valid = 0; rel_port = '{P_N, P_N, P_N}; rel_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_route(1, 1, 2, P_L, "local");
    expect_route(3, 1, 2, P_E, "east only");
    expect_route(0, 1, 2, P_W, "west only");
    expect_route(1, 0, 2, P_N, "north only");
    expect_route(1, 3, 2, P_S, "south only");
    // dX = 1, dY = 1, both links free: tie -> X
    expect_route(2, 2, 2, P_E, "tie goes to X");
    // dX = 2 beats dY = 1 when both free
    expect_route(3, 2, 2, P_E, "larger distance");
    // reserve 40 units on East: WE = 24*1+64 = 88, WS = 64*1+64 = 128 -> South
    reserve(P_E, 15); reserve(P_E, 15); reserve(P_E, 10);
    checks++;
    if (avail[P_E] != 8'd24) begin failures++; $display("FAIL avail E=%0d", avail[P_E]); end
    expect_route(2, 2, 2, P_S, "less bandwidth east");
    // dX = 2: WE = 24*2+64 = 112 < WS = 128 -> still South
    expect_route(3, 2, 2, P_S, "east still lighter");
    // fill East: 24 -> 4 left; R = 8 > A: WE = 4, WN = 64+64 -> North
    reserve(P_E, 15); reserve(P_E, 5);
    expect_route(3, 0, 8, P_N, "east lacks bandwidth");
    // also fill North: 64 -> 0; WN = 0 < WE = 4 -> East (best effort)
    reserve(P_N, 15); reserve(P_N, 15); reserve(P_N, 15); reserve(P_N, 15); reserve(P_N, 4);
    checks++;
    if (avail[P_N] != 8'd0) begin failures++; $display("FAIL avail N=%0d", avail[P_N]); end
    expect_route(3, 0, 8, P_E, "both lack, more left east");
    // release 15 on East from two VCBs in one cycle
    @(negedge clk);
    rel_valid = 3'b011; rel_port = '{P_N, P_E, P_E}; rel_req = '{4'd0, 4'd15, 4'd15};
    @(negedge clk);
    rel_valid = 0;
    checks++;
    if (avail[P_E] != 8'd34) begin failures++; $display("FAIL avail E after release=%0d", avail[P_E]); end
    expect_route(3, 2, 2, P_E, "east back: 34*2+64 > 64+64");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
