// tb_mpsoc_top: end-to-end run of the whole multiprocessor (mesh, NIs,
// 8 PE coprocessors with SD-TLBs, 3 memory modules, HwMMU) with a shared
// space of 12 pages of 64 bytes, so that page copies stay short. The
// testbench plays the eight cores. Sequence: a load of an unallocated page
// fails; MALLOC with MEM = -1 (round-robin) and with an explicit module;
// all PEs store and cross-load in parallel; COPY to another module; MOVE
// (compaction into one module) while three PEs keep loading the moved
// pages; FREE until modules fall asleep; a stale translation hitting a
// sleeping module; a message between the L2 and interrupt-controller ports.
// Every datum is checked against a model of the shared space. Mechanisms
// counted (each must happen at least once): TLB hit, TLB miss, TLB
// invalidation, module wake, module sleep, word copied, round-robin
// placement in distinct modules, a load delayed by a move, network
// back-pressure, an error reply.
module tb_mpsoc_top;
  import dsm_pkg::*;
  localparam int TP = 12, PB = 64;
  logic clk = 0, rst_n = 0;
  cpu_req_t [NUM_PE-1:0] cpu_req;
  logic     [NUM_PE-1:0] cpu_req_valid, cpu_req_ready, cpu_rsp_valid;
  cpu_rsp_t [NUM_PE-1:0] cpu_rsp;
  msg_t [2:0] ext_tx_msg, ext_rx_msg;
  logic [2:0] ext_tx_valid, ext_tx_ready, ext_rx_valid, ext_rx_ready;
  logic [2:0] sm_sleeping, mst_active;
  logic [2:0][31:0] sm_accesses;
  logic [2:0][15:0] mst_count;
  logic [NUM_PE-1:0][31:0] tlb_hits, tlb_misses, tlb_invals;
  logic [31:0] mmu_busy_cycles, mmu_words_copied;
  int checks = 0, failures = 0;
  int wakes = 0, sleeps = 0, backpressure = 0, errors = 0, delayed = 0;
  logic [2:0] prev_active = '0;
  always #5 clk = ~clk;

  mpsoc_top #(.N_SM(3), .TOTAL_PAGES(TP), .PAGE_BYTES(PB)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 3; m++) begin
      if (mst_active[m] && !prev_active[m]) wakes++;
      if (!mst_active[m] && prev_active[m]) sleeps++;
    end
    prev_active <= mst_active;
    if ((dut.ni_out_valid & ~dut.ni_out_ready) != 0) backpressure++;
  end

  // One request of core `pe`; returns the response and its latency.
  task automatic cpu(int pe, cpu_op_e op, logic [31:0] mem, logic [31:0] addr,
                     logic [31:0] data, output cpu_rsp_t r, output int cycles);
    int t0;
    @(negedge clk);
    cpu_req[pe] = '{op: op, mem: mem, addr: addr, data: data};
    cpu_req_valid[pe] = 1;
    @(posedge clk);
    while (!cpu_req_ready[pe]) @(posedge clk);
    t0 = $time;
    @(negedge clk);
    cpu_req_valid[pe] = 0;
    while (!cpu_rsp_valid[pe]) @(posedge clk);
    r = cpu_rsp[pe];
    cycles = ($time - t0) / 10;
    if (r.err) errors++;
  endtask

  logic [31:0] model [TP*PB/4];   // shared virtual space, word-indexed

  task automatic store(int pe, logic [31:0] a, logic [31:0] d);
    cpu_rsp_t r; int c;
    cpu(pe, CPU_STORE, 0, a, d, r, c);
    check(!r.err, $sformatf("store PE%0d @%h", pe, a));
    model[a / 4] = d;
  endtask

  task automatic load_chk(int pe, logic [31:0] a, output int c);
    cpu_rsp_t r;
    cpu(pe, CPU_LOAD, 0, a, 0, r, c);
    check(!r.err && r.data == model[a / 4],
          $sformatf("load PE%0d @%h got %h exp %h", pe, a, r.data, model[a / 4]));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_rsp_t r;
    int c, a_blk, b_blk, c_blk, d_blk, e_blk, mal_cycles;
    cpu_req = '0; cpu_req_valid = '0;
    ext_tx_msg = '0; ext_tx_valid = '0; ext_rx_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(sm_sleeping == 3'b111, "modules asleep after reset");

    // unallocated page
    cpu(0, CPU_LOAD, 0, 0, 0, r, c);
    check(r.err, "load of an unallocated page fails");

    // allocation
    cpu(0, CPU_MALLOC, MEM_ANY, 0, 2 * PB, r, mal_cycles);
    a_blk = r.data;
    $display("MMU_MALLOC seen by the core: %0d cycles", mal_cycles);
    check(!r.err && a_blk == 0, "malloc A");
    check(mal_cycles <= 110, "malloc within half of the software routine's 220 cycles");
    check(!sm_sleeping[0] && mst_count[0] == 2, "module 0 woken with 2 pages");
    cpu(1, CPU_MALLOC, MEM_ANY, 0, PB, r, c);  b_blk = r.data;
    check(!r.err && mst_count[1] == 1, "round-robin: module 1");
    cpu(2, CPU_MALLOC, 2, 0, PB, r, c);        c_blk = r.data;
    check(!r.err && mst_count[2] == 1, "explicit: module 2");
    cpu(2, CPU_MALLOC, 2, 0, 4 * PB, r, c);
    check(r.err && r.data == INVALID, "module 2 too full for 4 pages");

    // every PE stores 4 words of block A in parallel, then reads a neighbour's
    begin
      int done = 0;
      for (int p = 0; p < NUM_PE; p++)
        fork automatic int pp = p; begin
          for (int w = 0; w < 4; w++) store(pp, a_blk + pp * 16 + w * 4, 32'(pp * 1000 + w));
          done++;
        end join_none
      wait (done == NUM_PE);
    end
    begin
      int done = 0;
      for (int p = 0; p < NUM_PE; p++)
        fork automatic int pp = p; begin
          automatic int cc;
          for (int w = 0; w < 4; w++) load_chk(pp, a_blk + ((pp + 1) % NUM_PE) * 16 + w * 4, cc);
          done++;
        end join_none
      wait (done == NUM_PE);
    end
    store(1, b_blk, 32'hB0B0);
    store(2, c_blk + 4, 32'hC0C0);

    // COPY A (2 pages) into module 1
    cpu(3, CPU_COPY, 1, a_blk, 2, r, c);
    d_blk = r.data;
    check(!r.err && d_blk != a_blk && mst_count[1] == 3, "copy A -> D in module 1");
    $display("MMU_COPY of 2 pages of %0d bytes: %0d cycles", PB, c);
    for (int w = 0; w < 2 * PB / 4; w++) model[d_blk / 4 + w] = model[a_blk / 4 + w];
    for (int w = 0; w < 2 * PB / 4; w += 5) load_chk(3, d_blk + w * 4, c);

    // MOVE A into module 2 (compaction) while PEs 5-7 keep loading A
    begin
      int done = 0;
      for (int p = 5; p < 8; p++)
        fork automatic int pp = p; begin
          for (int k = 0; k < 6; k++) begin
            automatic int cc;
            load_chk(pp, a_blk + ((pp * 7 + k * 13) % 32) * 4, cc);
            if (cc > 200) delayed++;
          end
          done++;
        end join_none
      cpu(4, CPU_MOVE, 2, a_blk, 2, r, c);
      check(!r.err && r.data == a_blk, "move keeps the address");
      $display("MMU_MOVE of 2 pages: %0d cycles", c);
      wait (done == 3);
    end
    check(mst_count[0] == 0 && sm_sleeping[0], "module 0 emptied and asleep after the move");
    check(mst_count[2] == 3, "module 2 holds A and C");
    for (int w = 0; w < 2 * PB / 4; w += 3) load_chk(6, a_blk + w * 4, c);

    // FREE module 1's blocks; PE1's stale translation then meets a sleeping module
    load_chk(1, b_blk, c);
    cpu(3, CPU_FREE, 0, d_blk, 0, r, c);
    check(!r.err, "free D");
    cpu(1, CPU_FREE, 0, b_blk, 0, r, c);
    check(!r.err && sm_sleeping[1], "module 1 asleep");
    cpu(1, CPU_LOAD, 0, b_blk, 0, r, c);
    check(r.err, "stale translation to a sleeping module refused");

    // message between two brought-out node ports (L2 -> IC)
    @(negedge clk);
    ext_tx_msg[0] = '0;
    ext_tx_msg[0].dst = node_t'(role_node(3, R_IC, 0));
    ext_tx_msg[0].op = OP_SM_RD;
    ext_tx_msg[0].a = 32'hFEED;
    ext_tx_valid[0] = 1;
    @(posedge clk); while (!ext_tx_ready[0]) @(posedge clk);
    @(negedge clk); ext_tx_valid[0] = 0;
    while (!ext_rx_valid[2]) @(posedge clk);
    check(ext_rx_msg[2].a == 32'hFEED && ext_rx_msg[2].src == node_t'(role_node(3, R_L2, 0)),
          "L2 port to IC port");
    repeat (5) @(posedge clk);

    begin
      int hits = 0, misses = 0, invs = 0;
      for (int p = 0; p < NUM_PE; p++) begin
        hits += tlb_hits[p]; misses += tlb_misses[p]; invs += tlb_invals[p];
      end
      $display("mechanisms: tlb_hits=%0d tlb_misses=%0d tlb_invals=%0d wakes=%0d sleeps=%0d words_copied=%0d delayed_loads=%0d backpressure_cycles=%0d error_replies=%0d",
               hits, misses, invs, wakes, sleeps, mmu_words_copied, delayed, backpressure, errors);
      check(hits > 0, "TLB hit happened");
      check(misses > 0, "TLB miss happened");
      check(invs == 2 * NUM_PE, "each PE invalidated once per moved page");
      check(wakes >= 3, "wakes happened");
      check(sleeps >= 2, "sleeps happened");
      check(mmu_words_copied == 4 * PB / 4, "words copied by COPY and MOVE");
      check(delayed > 0, "a load was delayed by the move");
      check(backpressure > 0, "network back-pressure happened");
      check(errors > 0, "error replies happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
