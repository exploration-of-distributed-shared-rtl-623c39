// tb_noc_mesh: the 15-node mesh of the three-memory map. Every node
// injects random packets (3-15 flits) to random other nodes while every
// local output stalls at random. The second byte of a packet names its
// source. Checks: each packet reaches its destination node intact, packets
// of one source-destination pair keep their order, none is lost, nothing
// reaches an empty grid position; the zero-load latency between the two
// farthest nodes is reported and bounded by 3 cycles per router on the path
// plus the packet length.
module tb_noc_mesh;
  import dsm_pkg::*;
  localparam int N_SM = 3;
  logic clk = 0, rst_n = 0;
  flit_t [NUM_NODES-1:0] in_flit, out_flit;
  logic  [NUM_NODES-1:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  typedef logic [7:0] pkt_t[$];
  pkt_t exp_q [NUM_NODES][NUM_NODES][$];
  pkt_t cur [NUM_NODES];
  int sent = 0, recv = 0;
  bit stall = 0;
  always #5 clk = ~clk;

  noc_mesh #(.N_SM(N_SM)) dut (
    .clk, .rst_n,
    .loc_in_flit(in_flit), .loc_in_valid(in_valid), .loc_in_ready(in_ready),
    .loc_out_flit(out_flit), .loc_out_valid(out_valid), .loc_out_ready(out_ready));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NUM_NODES; o++) if (out_valid[o] && out_ready[o]) begin
      check(node_present(N_SM, o), "delivery at an empty position");
      if (out_flit[o].head) begin
        check(cur[o].size() == 0, "interleaved packets");
        cur[o] = {};
      end
      cur[o].push_back(out_flit[o].data);
      if (out_flit[o].tail) begin
        int s;
        s = cur[o][1];
        check(cur[o][0] == o, "arrived at its destination");
        check(s < NUM_NODES && exp_q[s][o].size() > 0, "packet expected");
        if (s < NUM_NODES && exp_q[s][o].size() > 0)
          check(exp_q[s][o].pop_front() == cur[o], $sformatf("contents %0d->%0d", s, o));
        cur[o] = {};
        recv++;
      end
    end
  end

  always @(negedge clk)
    for (int o = 0; o < NUM_NODES; o++) out_ready[o] = stall ? (($urandom % 3) != 0) : 1'b1;

  task automatic send_pkt(int i, pkt_t p);
    for (int b = 0; b < p.size(); b++) begin
      @(negedge clk);
      in_flit[i] = '{head: b == 0, tail: b == p.size() - 1, data: p[b]};
      in_valid[i] = 1;
      @(posedge clk);
      while (!in_ready[i]) @(posedge clk);
    end
    @(negedge clk);
    in_valid[i] = 0;
  endtask

  task automatic inject(int i, int n);
    for (int k = 0; k < n; k++) begin
      pkt_t p;
      int d, len;
      do d = $urandom % NUM_NODES; while (!node_present(N_SM, d) || d == i);
      len = 3 + $urandom % 13;
      p.push_back(8'(d));
      p.push_back(8'(i));
      for (int b = 2; b < len; b++) p.push_back(8'($urandom));
      exp_q[i][d].push_back(p);
      sent++;
      send_pkt(i, p);
      repeat ($urandom % 6) @(posedge clk);
    end
  endtask

  initial begin
    in_flit = '0; in_valid = '0;
    for (int o = 0; o < NUM_NODES; o++) cur[o] = {};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // zero-load latency, node 0 (top left) to node 14 (bottom row): 6 routers
    begin
      pkt_t p;
      int t0;
      p = '{8'd14, 8'd0, 8'h55};
      exp_q[0][14].push_back(p);
      sent++;
      fork send_pkt(0, p); join_none
      @(posedge clk); t0 = $time;
      wait (recv == 1);
      $display("zero-load latency 0 -> 14: %0d cycles", ($time - t0) / 10);
      check(($time - t0) / 10 <= 6 * 4 + 3, "zero-load latency bound");
    end
    stall = 1;
    for (int n = 0; n < NUM_NODES; n++)
      if (node_present(N_SM, n)) fork automatic int nn = n; inject(nn, 40); join_none
    wait fork;
    repeat (2000) @(posedge clk);
    check(recv == sent, $sformatf("all packets delivered %0d/%0d", recv, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
