// tb_sdm_crossbar: VCBs modelled as queues that fill slowly while the
// outputs refuse flits at random. Checks that every packet leaves on the
// output its VCB is tied to, whole, in order and never interleaved with
// another packet, that a VCB is released with its tail, that two outputs
// are served in the same cycle, and that a monitoring packet overtakes a
// waiting regular one.
module tb_sdm_crossbar;
  import noc_pkg::*;
  localparam int V = 3;
  logic clk = 0, rst_n = 0;
  logic [V-1:0] vcb_busy, vcb_mon, vcb_empty, vcb_pop, vcb_done;
  port_e [V-1:0] vcb_port;
  flit_t [V-1:0] vcb_head;
  logic [NPORTS-1:0] out_valid, out_nack;
  flit_t [NPORTS-1:0] out_flit;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sdm_crossbar #(.NUM_VCB(V)) dut (.*);

  flit_t q[V][$];        // flits present in each VCB
  flit_t todo[V][$];     // flits still to arrive
  flit_t exp_pkt[NPORTS][$];
  int    cur_src[NPORTS];
  int    pkts_done = 0, dual = 0, nack_pct = 30;

  always_comb
    for (int v = 0; v < V; v++) begin
      vcb_empty[v] = (q[v].size() == 0);
      vcb_head[v]  = (q[v].size() != 0) ? q[v][0] : '0;
    end

  task automatic ck(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // outputs: each flit carries its VCB number in data[7:6]
  always @(posedge clk) if (rst_n) begin
    int nsent;
    nsent = 0;
    for (int o = 0; o < NPORTS; o++)
      if (out_valid[o] && !out_nack[o]) begin
        int v;
        nsent++;
        v = int'(out_flit[o].data[7:6]);
        if (out_flit[o].ftype == FT_HEAD) cur_src[o] = v;
        ck(vcb_port[v] == port_e'(o), "flit on the VCB's port");
        ck(v == cur_src[o], "no interleaving");
        ck(out_flit[o] == q[v][0], "flit order");
      end
    if (nsent > 1) dual++;
    for (int v = 0; v < V; v++) begin
      if (vcb_pop[v]) begin
        if (q[v][0].ftype == FT_TAIL) begin
          ck(vcb_done[v], "done with tail");
          pkts_done++;
        end
        void'(q[v].pop_front());
      end
      if (vcb_done[v]) vcb_busy[v] <= 1'b0;
      if (todo[v].size() != 0 && $urandom_range(0, 1)) q[v].push_back(todo[v].pop_front());
    end
  end

  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++) out_nack[o] = ($urandom_range(0, 99) < nack_pct);

  task automatic load(int v, port_e p, logic mon, int len);
    flit_t f;
    vcb_port[v] = p; vcb_mon[v] = mon; vcb_busy[v] = 1'b1;
    f.ftype = FT_HEAD;  f.data = {2'(v), 6'($urandom)}; todo[v].push_back(f);
    f.ftype = FT_HEAD2; f.data = {2'(v), 6'($urandom)}; todo[v].push_back(f);
    for (int i = 0; i < len; i++) begin
      f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY; f.data = {2'(v), 6'($urandom)};
      todo[v].push_back(f);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int loaded;
    vcb_busy = 0; vcb_mon = 0; vcb_port = '{P_N, P_N, P_N}; out_nack = 0;
    for (int o = 0; o < NPORTS; o++) cur_src[o] = -1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: VCB0 regular and VCB1 monitoring, both for East, both full
    nack_pct = 100;
    @(negedge clk);
    load(0, P_E, 1'b0, 2); load(1, P_E, 1'b1, 2);
    repeat (8) @(posedge clk);
    @(negedge clk);
    #1;
    ck(out_valid[P_E] && out_flit[P_E].data[7:6] == 2'd1, "monitoring packet first");
    nack_pct = 30;
    wait (vcb_busy == 0);
    // random rounds
    loaded = 2;
    while (loaded < 60) begin
      @(negedge clk);
      for (int v = 0; v < V; v++)
        if (!vcb_busy[v] && q[v].size() == 0 && todo[v].size() == 0 && $urandom_range(0, 3) == 0) begin
          load(v, port_e'($urandom_range(0, 4)), 1'($urandom_range(0, 4) == 0), $urandom_range(1, 5));
          loaded++;
        end
    end
    wait (vcb_busy == 0);
    repeat (3) @(posedge clk);
    ck(pkts_done == loaded, "all packets sent");
    ck(dual > 0, "two outputs served in one cycle");
    $display("packets %0d, cycles with parallel outputs %0d", pkts_done, dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
