// tb_vcb_fifo: random pushes and pops against a queue model; checks data
// order, full/empty/count, and that pushes while full and pops while empty
// are ignored.
module tb_vcb_fifo;
  localparam int W = 10, D = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full_push = 0;

  always #5 clk = ~clk;

  vcb_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare state with the model
      checks++;
      if (count != 3'(q.size()) || empty != (q.size() == 0) || full != (q.size() == D) ||
          (q.size() > 0 && rd_data != q[0])) begin
        failures++;
        $display("FAIL cycle %0d: count=%0d model=%0d", i, count, q.size());
      end
      push    = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 35));
      pop     = ($urandom_range(0, 99) < 50);
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge
  always @(posedge clk) if (rst_n) begin
    logic was_full, was_empty;
    was_full  = (q.size() == D);
    was_empty = (q.size() == 0);
    if (pop && !was_empty) void'(q.pop_front());
    if (push && !was_full) q.push_back(wr_data);
    if (push && was_full) n_full_push++;
  end

  final if (n_full_push == 0) $display("note: no push while full");
endmodule
