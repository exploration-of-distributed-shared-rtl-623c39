// tb_hwmmu: the HwMMU with the network replaced by the testbench, which
// models the three memory modules (nodes 5, 6, 9; 3, 3 and 2 pages of 16
// words) and the eight PEs (which acknowledge invalidations). Checks:
// round-robin and explicit placement, INVALID when a module is full, wake
// saved use and sleep when a module empties, translations returned on TLB
// misses, COPY data and new address, MOVE invalidating every PE, keeping the
// address and data and delaying a TLB miss that arrives during the move,
// FREE of whole blocks, and the service time of MMU_MALLOC and MMU_FREE
// (from the command leaving the queue to the reply) against half of the
// software routine's lower bound (220 and 96 cycles).
module tb_hwmmu;
  import dsm_pkg::*;
  localparam int N_SM = 3, TP = 8, PB = 64, PW = PB / 4;
  logic clk = 0, rst_n = 0;
  msg_t rx_msg, tx_msg;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [N_SM-1:0] mst_active;
  logic [N_SM-1:0][15:0] mst_count;
  logic [31:0] busy_cycles, words_copied;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hwmmu #(.N_SM(N_SM), .TOTAL_PAGES(TP), .PAGE_BYTES(PB)) dut (.*);

  // ---- models
  int    sm_nodes [3] = '{5, 6, 9};
  int    pe_nodes [8] = '{1, 2, 4, 7, 8, 10, 13, 14};
  bit    awake [3];
  logic [31:0] mem [3][3*PW];
  int    inv_count [8];
  int    wakes = 0, sleeps = 0;
  msg_t  inq[$];        // messages to the HwMMU
  msg_t  rsp[$];        // MMU_RSP / TLB_FILL seen, in order

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sm_of(int node);
    for (int m = 0; m < 3; m++) if (sm_nodes[m] == node) return m;
    return -1;
  endfunction
  function automatic int pe_of(int node);
    for (int k = 0; k < 8; k++) if (pe_nodes[k] == node) return k;
    return -1;
  endfunction

  function automatic msg_t mk(int src, op_e op, logic [31:0] a, logic [31:0] b, logic [31:0] c);
    msg_t m = '0;
    m.src = node_t'(src); m.dst = 8'd0; m.op = op; m.a = a; m.b = b; m.c = c;
    return m;
  endfunction

  // outputs of the HwMMU
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    int m, k;
    m = sm_of(tx_msg.dst);
    k = pe_of(tx_msg.dst);
    if (m >= 0) begin
      case (tx_msg.op)
        OP_SM_WAKE:  begin awake[m] = 1; wakes++; end
        OP_SM_SLEEP: begin awake[m] = 0; sleeps++; end
        OP_SM_RD: begin
          check(awake[m], "read of a sleeping module");
          inq.push_back(mk(tx_msg.dst, OP_SM_RDATA, mem[m][tx_msg.a / 4], 0, 0));
        end
        OP_SM_WR: begin
          check(awake[m], "write to a sleeping module");
          mem[m][tx_msg.a / 4] = tx_msg.b;
          inq.push_back(mk(tx_msg.dst, OP_SM_WACK, 0, 0, 0));
        end
        default: check(0, "unexpected message to a module");
      endcase
    end else if (tx_msg.op == OP_TLB_INV) begin
      check(k >= 0, "invalidation to a PE node");
      if (k >= 0) inv_count[k]++;
      inq.push_back(mk(tx_msg.dst, OP_INV_ACK, 0, 0, 0));
    end else begin
      rsp.push_back(tx_msg);
    end
  end
  always @(negedge clk) tx_ready = ($urandom % 4) != 0;

  // inputs of the HwMMU
  initial begin
    rx_valid = 0; rx_msg = '0;
    forever begin
      @(negedge clk);
      if (!rx_valid && inq.size() > 0) begin rx_msg = inq.pop_front(); rx_valid = 1; end
      @(posedge clk);
      if (rx_valid && rx_ready) begin @(negedge clk); rx_valid = 0; end
    end
  end

  task automatic cmd(int pe, op_e op, logic [31:0] a, logic [31:0] b, logic [31:0] c, output msg_t r);
    inq.push_back(mk(pe_nodes[pe], op, a, b, c));
    while (rsp.size() == 0) @(posedge clk);
    r = rsp.pop_front();
    check(r.dst == pe_nodes[pe], "reply to the requester");
  endtask

  function automatic logic [31:0] ppn_of(msg_t fill);
    return fill.b;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t r;
    int t0;
    for (int m = 0; m < 3; m++) begin awake[m] = 0; for (int w = 0; w < 3 * PW; w++) mem[m][w] = $urandom; end
    for (int k = 0; k < 8; k++) inv_count[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // MALLOC, round-robin: 2 pages -> module 0, virtual page 0
    t0 = busy_cycles;
    cmd(0, OP_MALLOC, MEM_ANY, 100, 0, r);
    check(r.op == OP_MMU_RSP && r.a == 0, $sformatf("malloc 1 address %h", r.a));
    $display("MMU_MALLOC service: %0d cycles", busy_cycles - t0);
    check(busy_cycles - t0 <= 110, "malloc within half the software bound");
    check(awake[0] && mst_active == 3'b001 && mst_count[0] == 2, "module 0 woken, 2 pages");
    cmd(1, OP_TLB_MISS, 1, 0, 0, r);
    check(r.op == OP_TLB_FILL && r.b == {1'b1, 31'({3'd0, 8'd1})}, "translation of page 1");
    // next one -> module 1
    cmd(2, OP_MALLOC, MEM_ANY, 64, 0, r);
    check(r.a == 2 * PB, "malloc 2 address");
    cmd(2, OP_TLB_MISS, 2, 0, 0, r);
    check(r.b == {1'b1, 31'({3'd1, 8'd0})}, "round-robin picked module 1");
    // explicit module, too big and fitting
    cmd(3, OP_MALLOC, 2, 200, 0, r);
    check(r.a == INVALID, "module 2 cannot take 4 pages");
    cmd(3, OP_MALLOC, 2, 64, 0, r);
    check(r.a == 3 * PB, "explicit malloc address");
    cmd(3, OP_TLB_MISS, 3, 0, 0, r);
    check(r.b[31] && r.b[10:8] == 3'd2, "explicit module 2");
    cmd(3, OP_MALLOC, 7, 64, 0, r);
    check(r.a == INVALID, "no module 7");

    // COPY the two pages of block 0 to module 1
    cmd(4, OP_COPY, 1, 0, 2, r);
    check(r.a == 4 * PB, $sformatf("copy address %h", r.a));
    check(words_copied == 2 * PW, "copied words");
    for (int w = 0; w < 2 * PW; w++)
      check(mem[1][PW + w] == mem[0][w], "copied data");

    // MOVE page 2 (module 1, local 0) to module 2 with a TLB miss racing it
    begin
      logic [31:0] saved [PW];
      for (int w = 0; w < PW; w++) saved[w] = mem[1][w];
      inq.push_back(mk(pe_nodes[5], OP_MOVE, 2, 2 * PB, 1));
      repeat (20) @(posedge clk);
      inq.push_back(mk(pe_nodes[6], OP_TLB_MISS, 2, 0, 0));
      while (rsp.size() < 2) @(posedge clk);
      r = rsp.pop_front();
      check(r.op == OP_MMU_RSP && r.a == 2 * PB && r.dst == pe_nodes[5], "move keeps the address");
      r = rsp.pop_front();
      check(r.op == OP_TLB_FILL && r.b[31] && r.b[10:8] == 3'd2, "miss answered after the move, new module");
      for (int k = 0; k < 8; k++) check(inv_count[k] == 1, "every PE invalidated once");
      for (int w = 0; w < PW; w++) check(mem[2][PW + w] == saved[w], "moved data");
      check(mst_count[1] == 2 && mst_count[2] == 2, "page counts after move");
    end

    // FREE the copy: module 1 empties and sleeps
    cmd(0, OP_FREE, 4 * PB, 0, 0, r);
    check(r.a == 0, "free ok");
    check(!awake[1] && !mst_active[1] && mst_count[1] == 0, "module 1 put to sleep");
    t0 = busy_cycles;
    cmd(0, OP_FREE, 0, 0, 0, r);
    $display("MMU_FREE service: %0d cycles", busy_cycles - t0);
    check(busy_cycles - t0 <= 48, "free within half the software bound");
    check(!awake[0] && mst_active == 3'b100 && sleeps == 2, "module 0 asleep");
    cmd(1, OP_TLB_MISS, 0, 0, 0, r);
    check(!r.b[31], "freed page has no translation");
    cmd(1, OP_FREE, 0, 0, 0, r);
    check(r.a == INVALID, "double free refused");
    // compaction: move page 3 into module 2 (already there) leaves counts
    cmd(1, OP_MALLOC, MEM_ANY, 64, 0, r);
    check(r.a == 0, "virtual page 0 reused first-fit");
    check(wakes == 4, $sformatf("wake count %0d", wakes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
