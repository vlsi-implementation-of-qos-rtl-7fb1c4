// tb_event_monitor: stall cycles on a port raise one report exactly when the
// count reaches the threshold, carrying the transaction's ID and source; a
// new transaction clears the count; monitoring packets raise nothing; two
// ports firing together are reported one after the other.
module tb_event_monitor;
  import noc_pkg::*;
  localparam int TH = 8;
  logic clk = 0, rst_n = 0;
  hdr_t [NPORTS-1:0] port_hdr;
  logic [NPORTS-1:0] txn_start, stall;
  logic evt_valid, evt_ready;
  logic [TID_W-1:0] evt_tid;
  coord_t evt_src;
  logic [NPORTS-1:0][7:0] evt_count;
  int checks = 0, failures = 0;
  int n_evt = 0;
  logic [TID_W-1:0] last_tid;
  coord_t last_src;

  always #5 clk = ~clk;

  event_monitor #(.THRESH(TH), .CNT_W(8)) dut (.*);

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) if (rst_n && evt_valid && evt_ready) begin
    n_evt++; last_tid = evt_tid; last_src = evt_src;
  end

  task automatic stall_cycles(int p, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); stall[p] = 1;
    end
    @(negedge clk); stall[p] = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_hdr = '0; txn_start = 0; stall = 0; evt_ready = 1;
    for (int p = 0; p < NPORTS; p++) begin
      port_hdr[p].tid = 3'(p + 1); port_hdr[p].src = coord_t'(4'(p * 3));
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    stall_cycles(2, TH - 1);
    repeat (2) @(posedge clk);
    ck(n_evt == 0, "no report below threshold");
    stall_cycles(2, 1);
    repeat (2) @(posedge clk);
    ck(n_evt == 1 && last_tid == 3'd3 && last_src == coord_t'(4'd6), "report at threshold");
    stall_cycles(2, 20);
    repeat (2) @(posedge clk);
    ck(n_evt == 1, "reported once per transaction");
    // new transaction on port 2 clears the count
    @(negedge clk); txn_start[2] = 1; @(negedge clk); txn_start[2] = 0;
    stall_cycles(2, TH - 1);
    repeat (2) @(posedge clk);
    ck(n_evt == 1 && evt_count[2] == 8'(TH - 1), "count restarted");
    // monitoring packets raise nothing
    port_hdr[0].mon = 1;
    stall_cycles(0, 3 * TH);
    repeat (2) @(posedge clk);
    ck(n_evt == 1, "monitoring packet ignored");
    // ports 1 and 4 fire in the same cycle, ready held low for a while
    evt_ready = 0;
    for (int i = 0; i < TH; i++) begin @(negedge clk); stall[1] = 1; stall[4] = 1; end
    @(negedge clk); stall = 0;
    repeat (3) @(posedge clk);
    ck(evt_valid && evt_tid == 3'd2, "lower port first");
    @(negedge clk); evt_ready = 1;
    @(posedge clk); #1;
    ck(n_evt == 2 && last_tid == 3'd2, "first report taken");
    @(posedge clk); #1;
    ck(n_evt == 3 && last_tid == 3'd5, "second report taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
