// tb_mpsoc_full: the whole multiprocessor at its default size (three memory
// modules, 128 pages of 4 KB, 8 PEs, 8-entry SD-TLBs), taken through one
// complete sequence of the shared-memory primitives:
//   MALLOC of two pages in module 0, stores from two PEs into both pages,
//   COPY of the first page to module 1, MOVE of the two-page block to
//   module 2 while another PE keeps loading from it, loads of the copied
//   and moved data from every PE, FREE of all blocks.
// Every datum read back is compared with what was stored. The cycle counts
// of MALLOC, FREE, COPY and MOVE are printed, and the per-page cost of a
// copy is compared with a bound worked out from the message sizes: each
// 32-bit word is read and written through the network, so a page of 1024
// words may not take more than 1024 * 200 cycles nor less than 1024 * 30.
module tb_mpsoc_full;
  import dsm_pkg::*;
  localparam int PB = 4096;
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
  always #5 clk = ~clk;

  mpsoc_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

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
  endtask

  function automatic logic [31:0] pat(logic [31:0] a);
    return a * 32'h9E37_79B9 ^ 32'h5A5A_0000;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_rsp_t r;
    int c, c_copy, c_move;
    logic [31:0] a_blk, a_cp;
    cpu_req = '0; cpu_req_valid = '0;
    ext_tx_msg = '0; ext_tx_valid = '0; ext_rx_ready = '1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    cpu(0, CPU_MALLOC, 0, 0, 2 * PB, r, c);
    a_blk = r.data;
    check(!r.err && mst_count[0] == 2 && mst_active[0], "MALLOC of two pages in module 0");
    $display("MALLOC: %0d cycles at the core", c);

    // Stores: PE1 fills page 0 sparsely, PE2 page 1.
    for (int w = 0; w < PB / 4; w += 61) begin
      cpu(1, CPU_STORE, 0, a_blk + w * 4, pat(a_blk + w * 4), r, c);
      check(!r.err, "store page 0");
      cpu(2, CPU_STORE, 0, a_blk + PB + w * 4, pat(a_blk + PB + w * 4), r, c);
      check(!r.err, "store page 1");
    end

    cpu(3, CPU_COPY, 1, a_blk, 1, r, c_copy);
    a_cp = r.data;
    check(!r.err && a_cp != a_blk && mst_count[1] == 1, "COPY of one page into module 1");
    $display("COPY of one page: %0d cycles (document: 66 + 54886 per page)", c_copy);
    check(c_copy > 30 * PB / 4 && c_copy < 200 * PB / 4, "COPY per-page cost within bounds");

    fork
      begin
        cpu(4, CPU_MOVE, 2, a_blk, 2, r, c_move);
        check(!r.err && r.data == a_blk, "MOVE keeps the virtual address");
      end
      begin
        for (int k = 0; k < 8; k++) begin
          int w = (k * 97) % (2 * PB / 4);
          cpu_rsp_t rr; int cc;
          cpu(5, CPU_LOAD, 0, a_blk + w * 4, 0, rr, cc);
          if (w % 61 == 0)
            check(!rr.err && rr.data == pat(a_blk + w * 4), "load during MOVE");
          else
            check(!rr.err, "load during MOVE");
        end
      end
    join
    $display("MOVE of two pages: %0d cycles (%0d per page; document: 69 + 54886 per page)",
             c_move, c_move / 2);
    check(mst_count[0] == 0 && sm_sleeping[0] && mst_count[2] == 2,
          "MOVE empties module 0, which sleeps, and fills module 2");
    check(mmu_words_copied == 3 * PB / 4, "words copied by COPY and MOVE");

    for (int w = 0; w < PB / 4; w += 61) begin
      cpu(w % NUM_PE, CPU_LOAD, 0, a_blk + w * 4, 0, r, c);
      check(!r.err && r.data == pat(a_blk + w * 4), "moved page 0");
      cpu((w + 3) % NUM_PE, CPU_LOAD, 0, a_blk + PB + w * 4, 0, r, c);
      check(!r.err && r.data == pat(a_blk + PB + w * 4), "moved page 1");
      cpu((w + 5) % NUM_PE, CPU_LOAD, 0, a_cp + w * 4, 0, r, c);
      check(!r.err && r.data == pat(a_blk + w * 4), "copied page");
    end

    cpu(6, CPU_FREE, 0, a_cp, 0, r, c);
    check(!r.err, "FREE copy");
    $display("FREE: %0d cycles at the core", c);
    cpu(6, CPU_FREE, 0, a_blk, 0, r, c);
    check(!r.err && mst_count == '0 && sm_sleeping == 3'b111, "all freed, all modules asleep");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
