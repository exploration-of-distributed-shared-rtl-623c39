// tb_comm_coproc: the coprocessor of one PE with the network replaced by
// the testbench, which plays the HwMMU (node 0) and the memory modules
// (nodes 5, 6, 9 in the three-memory map). Checks: a load that misses the
// SD-TLB asks the HwMMU, then reads the right module at local page * 4096 +
// offset and returns the data; a second access to the page hits; a store
// carries its data; primitives are forwarded with their arguments and
// their results returned; an invalidation is acknowledged at once when
// idle but only after the memory reply when an access is in flight, and
// forces a new miss; an unknown page and a refused access end with err.
module tb_comm_coproc;
  import dsm_pkg::*;
  logic clk = 0, rst_n = 0;
  cpu_req_t cpu_req;
  cpu_rsp_t cpu_rsp;
  logic cpu_req_valid, cpu_req_ready, cpu_rsp_valid;
  msg_t tx_msg, rx_msg;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  logic [31:0] tlb_hits, tlb_misses, tlb_invals;
  int checks = 0, failures = 0;
  cpu_rsp_t last_rsp;
  bit got_rsp = 0;
  always #5 clk = ~clk;

  comm_coproc #(.N_SM(3)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (cpu_rsp_valid) begin last_rsp = cpu_rsp; got_rsp = 1; end

  task automatic issue(cpu_op_e op, logic [31:0] mem, logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    cpu_req = '{op: op, mem: mem, addr: addr, data: data};
    cpu_req_valid = 1;
    got_rsp = 0;
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    @(negedge clk);
    cpu_req_valid = 0;
  endtask

  task automatic take(output msg_t m);
    tx_ready = 1;
    @(posedge clk);
    while (!tx_valid) @(posedge clk);
    m = tx_msg;
    @(negedge clk);
    tx_ready = 0;
  endtask

  task automatic give(op_e op, logic [31:0] a, logic [31:0] b, node_t src);
    @(negedge clk);
    rx_msg = '0; rx_msg.op = op; rx_msg.a = a; rx_msg.b = b; rx_msg.src = src; rx_msg.dst = 8'd2;
    rx_valid = 1;
    @(posedge clk);
    @(negedge clk);
    rx_valid = 0;
  endtask

  task automatic wait_rsp();
    while (!got_rsp) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t m;
    cpu_req = '0; cpu_req_valid = 0; tx_ready = 0; rx_valid = 0; rx_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. load, TLB miss, fill, read
    issue(CPU_LOAD, 0, 32'h1004, 0);
    take(m);
    check(m.op == OP_TLB_MISS && m.dst == 0 && m.a == 1, "miss sent to HwMMU");
    give(OP_TLB_FILL, 1, {1'b1, 31'({3'd2, 8'd5})}, 0);
    take(m);
    check(m.op == OP_SM_RD && m.dst == 9 && m.a == 5 * 4096 + 4, $sformatf("read to module 2 (%0d, %h)", m.dst, m.a));
    give(OP_SM_RDATA, 32'hDEAD_BEEF, 0, 9);
    wait_rsp();
    check(!last_rsp.err && last_rsp.data == 32'hDEAD_BEEF, "load data");

    // 2. store to the same page hits
    issue(CPU_STORE, 0, 32'h1008, 32'h1234_5678);
    take(m);
    check(m.op == OP_SM_WR && m.dst == 9 && m.a == 5 * 4096 + 8 && m.b == 32'h1234_5678, "store");
    give(OP_SM_WACK, 0, 0, 9);
    wait_rsp();
    check(!last_rsp.err && tlb_hits == 1 && tlb_misses == 1, "hit counted");

    // 3. primitives
    issue(CPU_MALLOC, 32'hFFFF_FFFF, 0, 100);
    take(m);
    check(m.op == OP_MALLOC && m.dst == 0 && m.a == 32'hFFFF_FFFF && m.b == 100, "malloc forwarded");
    give(OP_MMU_RSP, 32'h3000, 0, 0);
    wait_rsp();
    check(!last_rsp.err && last_rsp.data == 32'h3000, "malloc result");
    issue(CPU_MOVE, 1, 32'h3000, 2);
    take(m);
    check(m.op == OP_MOVE && m.a == 1 && m.b == 32'h3000 && m.c == 2, "move forwarded");
    give(OP_MMU_RSP, 32'hFFFF_FFFF, 0, 0);
    wait_rsp();
    check(last_rsp.err, "failed primitive reported");

    // 4. invalidation while idle: ack at once, next access misses
    give(OP_TLB_INV, 1, 0, 0);
    take(m);
    check(m.op == OP_INV_ACK && m.dst == 0, "invalidation acknowledged");
    issue(CPU_LOAD, 0, 32'h1000, 0);
    take(m);
    check(m.op == OP_TLB_MISS && m.a == 1, "miss after invalidation");
    give(OP_TLB_FILL, 1, {1'b1, 31'({3'd0, 8'd3})}, 0);
    take(m);
    check(m.op == OP_SM_RD && m.dst == 5 && m.a == 3 * 4096, "read to module 0");

    // 5. invalidation during the access: ack only after the reply
    give(OP_TLB_INV, 1, 0, 0);
    repeat (5) @(posedge clk);
    check(!tx_valid, "no ack while access in flight");
    give(OP_SM_RDATA, 32'h77, 0, 5);
    take(m);
    check(m.op == OP_INV_ACK, "ack after the reply");
    wait_rsp();
    check(last_rsp.data == 32'h77 && tlb_invals == 2, "load data, invalidations counted");

    // 6. unknown page and refused access
    issue(CPU_LOAD, 0, 32'h7000, 0);
    take(m);
    give(OP_TLB_FILL, 7, 0, 0);
    wait_rsp();
    check(last_rsp.err, "unallocated page -> err");
    issue(CPU_STORE, 0, 32'h1000, 1);
    take(m);
    give(OP_TLB_FILL, 1, {1'b1, 31'({3'd1, 8'd0})}, 0);
    take(m);
    check(m.dst == 6, "module 1 node");
    give(OP_SM_ERR, 0, 0, 6);
    wait_rsp();
    check(last_rsp.err, "sleeping module -> err");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
