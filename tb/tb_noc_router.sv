// tb_noc_router: one 5-port router whose table sends destination d to port
// d % 5. Every input injects random packets (3-15 flits) to random
// destinations while every output stalls at random. Checks: each packet
// leaves on the port its table entry names, its flits are not interleaved
// with another packet's (wormhole), contents and per input/output order
// are kept, no packet is lost; and a lone flit crosses the router in
// 3 cycles (input queue, crossbar, output queue).
module tb_noc_router;
  import dsm_pkg::*;
  localparam int P = 5, D = 10;
  function automatic logic [3*D-1:0] tbl();
    logic [3*D-1:0] t;
    for (int d = 0; d < D; d++) t[3*d +: 3] = 3'(d % P);
    return t;
  endfunction

  logic clk = 0, rst_n = 0;
  flit_t [P-1:0] in_flit, out_flit;
  logic [P-1:0] in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  typedef logic [7:0] pkt_t[$];
  pkt_t exp_q [P][P][$];   // [input][output] queue of packets
  pkt_t cur [P];          // packet being received at each output
  int sent = 0, recv = 0;
  bit stall_outputs = 1;
  always #5 clk = ~clk;

  noc_router #(.P(P), .DESTS(D), .ROUTE_TABLE(tbl())) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitors
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < P; o++) if (out_valid[o] && out_ready[o]) begin
      if (out_flit[o].head) begin
        check(cur[o].size() == 0, "head while a packet is open (interleaving)");
        cur[o] = {};
      end
      cur[o].push_back(out_flit[o].data);
      if (out_flit[o].tail) begin
        int i;
        pkt_t e;
        i = cur[o][1];
        check(cur[o][0] % P == o, "left on the routed port");
        check(i < P && exp_q[i][o].size() > 0, "packet expected");
        if (i < P && exp_q[i][o].size() > 0) begin
          e = exp_q[i][o].pop_front();
          check(e == cur[o], $sformatf("packet contents in %0d out %0d", i, o));
        end
        cur[o] = {};
        recv++;
      end
    end
  end

  always @(negedge clk)
    for (int o = 0; o < P; o++) out_ready[o] = stall_outputs ? (($urandom % 3) != 0) : 1'b1;

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
      int len = 3 + $urandom % 13;
      p.push_back(8'($urandom % D));
      p.push_back(8'(i));
      for (int b = 2; b < len; b++) p.push_back(8'($urandom));
      exp_q[i][p[0] % P].push_back(p);
      sent++;
      send_pkt(i, p);
      repeat ($urandom % 4) @(posedge clk);
    end
  endtask

  initial begin
    in_flit = '0; in_valid = '0;
    for (int o = 0; o < P; o++) cur[o] = {};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency of a lone packet with free outputs
    stall_outputs = 0;
    begin
      int t0, t1;
      pkt_t p;
      p = '{8'd3, 8'd1, 8'hAA};
      exp_q[1][3].push_back(p);
      sent++;
      fork send_pkt(1, p); join_none
      @(posedge clk); t0 = $time;
      wait (recv == 1);
      t1 = $time;
      // head written at t0; the tail is two flits behind; each flit needs
      // the input queue, the crossbar and the output queue, plus one cycle
      // for routing and the grant of the head
      check((t1 - t0) / 10 <= 2 + 4, $sformatf("lone packet latency %0d cycles", (t1 - t0) / 10));
    end
    stall_outputs = 1;
    fork
      inject(0, 60); inject(1, 60); inject(2, 60); inject(3, 60); inject(4, 60);
    join
    repeat (500) @(posedge clk);
    check(recv == sent, $sformatf("all packets delivered %0d/%0d", recv, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
