// tb_wxy_weight: checks the direction weight against W = A*d + T when A >= R
// and W = A otherwise, over random and corner operands.
module tb_wxy_weight;
  logic [7:0]  a, r, t;
  logic [1:0]  d;
  logic [31:0] w;
  int checks = 0, failures = 0;

  wxy_weight #(.BW_W(8), .D_W(2), .W_W(32)) dut (.avail(a), .req(r), .total(t), .distance(d), .weight(w));

  task automatic check(logic [7:0] aa, logic [7:0] rr, logic [7:0] tt, logic [1:0] dd);
    logic [31:0] exp;
    a = aa; r = rr; t = tt; d = dd;
    #1;
    exp = (aa >= rr) ? (32'(aa) * 32'(dd) + 32'(tt)) : 32'(aa);
    checks++;
    if (w !== exp) begin
      failures++;
      $display("FAIL A=%0d R=%0d T=%0d d=%0d W=%0d expected %0d", aa, rr, tt, dd, w, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'd64, 8'd4, 8'd64, 2'd3);   // 64*3+64
    check(8'd3, 8'd4, 8'd64, 2'd3);    // not enough bandwidth: A
    check(8'd4, 8'd4, 8'd64, 2'd0);    // equal: enough
    check(8'd255, 8'd0, 8'd255, 2'd3);
    for (int i = 0; i < 2000; i++)
      check(8'($urandom), 8'($urandom_range(0, 80)), 8'($urandom), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
