// bfs_runner: testbench helper that runs a level-synchronous parallel
// breadth-first search on one instance of the multiprocessor with N_SM
// shared memory modules, the eight PEs working on shared data.
//
// The graph (V vertices, DEG out-edges each, neighbour formula in `nbr`) is
// stored by the PEs in a shared adjacency array; the queue Q, one segment
// of Q_next per PE and the level array (the "marked" structure) are shared
// too, all allocated with MEM = -1. At each level PE p examines the entries
// p, p+8, ... of Q; for each neighbour whose level is still unset it writes
// the level and appends the vertex to its own Q_next segment. After a
// barrier the segments become the next Q. The ticket counter that hands out
// chunks of Q is replaced by this fixed split, so no atomic operation is
// needed. A vertex reached by two PEs in the same level may be queued twice;
// that changes no level.
// Outputs: done, cycles of the search, shared accesses, the number of
// vertices whose level differs from a sequential search, error replies.
module bfs_runner #(
  parameter int unsigned N_SM = 3,
  parameter int unsigned V    = 64,
  parameter int unsigned DEG  = 3
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   accesses,
  output int   wrong,
  output int   errors
);
  import dsm_pkg::*;
  cpu_req_t [NUM_PE-1:0] cpu_req;
  logic     [NUM_PE-1:0] cpu_req_valid, cpu_req_ready, cpu_rsp_valid;
  cpu_rsp_t [NUM_PE-1:0] cpu_rsp;
  msg_t [2:0] ext_tx_msg, ext_rx_msg;
  logic [2:0] ext_tx_valid, ext_tx_ready, ext_rx_valid, ext_rx_ready;
  logic [N_SM-1:0] sm_sleeping, mst_active;
  logic [N_SM-1:0][31:0] sm_accesses;
  logic [N_SM-1:0][15:0] mst_count;
  logic [NUM_PE-1:0][31:0] tlb_hits, tlb_misses, tlb_invals;
  logic [31:0] mmu_busy_cycles, mmu_words_copied;

  mpsoc_top #(.N_SM(N_SM)) dut (.*);

  localparam logic [31:0] UNSET = 32'hFFFF_FFFF;

  function automatic int nbr(int v, int e);
    return (v * 7 + e * 13 + (e + 1) * (v % 5) + 1) % V;
  endfunction

  task automatic cpu(int pe, cpu_op_e op, logic [31:0] addr, logic [31:0] data,
                     output cpu_rsp_t r);
    @(negedge clk);
    cpu_req[pe] = '{op: op, mem: MEM_ANY, addr: addr, data: data};
    cpu_req_valid[pe] = 1;
    @(posedge clk);
    while (!cpu_req_ready[pe]) @(posedge clk);
    @(negedge clk);
    cpu_req_valid[pe] = 0;
    while (!cpu_rsp_valid[pe]) @(posedge clk);
    r = cpu_rsp[pe];
    if (r.err) errors++;
    if (op == CPU_LOAD || op == CPU_STORE) accesses++;
  endtask

  logic [31:0] adj, lvl, q, qn;          // shared base addresses
  int qlen;                              // entries in Q
  int seg_len [NUM_PE];                  // entries in each Q_next segment
  int ref_lvl [V];

  initial begin
    cpu_rsp_t r;
    int t0, n_done, level, fifo [$];
    done = 0; cycles = 0; accesses = 0; wrong = 0; errors = 0;
    cpu_req = '0; cpu_req_valid = '0;
    ext_tx_msg = '0; ext_tx_valid = '0; ext_rx_ready = '1;
    @(posedge rst_n);
    repeat (4) @(posedge clk);
    cpu(0, CPU_MALLOC, 0, 32'(V * DEG * 4), r); adj = r.data;
    cpu(0, CPU_MALLOC, 0, 32'(V * 4), r);       lvl = r.data;
    cpu(0, CPU_MALLOC, 0, 32'(V * 4 * 2), r);   q   = r.data;
    cpu(0, CPU_MALLOC, 0, 32'(NUM_PE * V * 4 * 2), r); qn = r.data;

    // The PEs store the graph and clear the levels.
    n_done = 0;
    for (int p = 0; p < NUM_PE; p++)
      fork automatic int pp = p; begin
        automatic cpu_rsp_t rr;
        for (int v = pp; v < V; v += NUM_PE) begin
          for (int e = 0; e < DEG; e++)
            cpu(pp, CPU_STORE, adj + 32'((v * DEG + e) * 4), 32'(nbr(v, e)), rr);
          cpu(pp, CPU_STORE, lvl + 32'(v * 4), v == 0 ? 0 : UNSET, rr);
        end
        n_done++;
      end join_none
    wait (n_done == NUM_PE);
    cpu(0, CPU_STORE, q, 0, r);
    qlen = 1;
    accesses = 0;

    t0 = $time;
    level = 0;
    while (qlen > 0) begin
      n_done = 0;
      for (int p = 0; p < NUM_PE; p++)
        fork automatic int pp = p; begin
          automatic cpu_rsp_t rv, rn, rl, rw;
          seg_len[pp] = 0;
          for (int i = pp; i < qlen; i += NUM_PE) begin
            cpu(pp, CPU_LOAD, q + 32'(i * 4), 0, rv);
            for (int e = 0; e < DEG; e++) begin
              cpu(pp, CPU_LOAD, adj + (rv.data * DEG + 32'(e)) * 4, 0, rn);
              cpu(pp, CPU_LOAD, lvl + rn.data * 4, 0, rl);
              if (rl.data == UNSET && seg_len[pp] < 2 * V) begin
                cpu(pp, CPU_STORE, lvl + rn.data * 4, 32'(level + 1), rw);
                cpu(pp, CPU_STORE, qn + 32'((pp * 2 * V + seg_len[pp]) * 4), rn.data, rw);
                seg_len[pp]++;
              end
            end
          end
          n_done++;
        end join_none
      wait (n_done == NUM_PE);
      // Q_next segments become the new Q (PE0 gathers them).
      qlen = 0;
      for (int p = 0; p < NUM_PE; p++)
        for (int k = 0; k < seg_len[p]; k++) begin
          cpu(0, CPU_LOAD, qn + 32'((p * 2 * V + k) * 4), 0, r);
          if (qlen < 2 * V) begin
            cpu(0, CPU_STORE, q + 32'(qlen * 4), r.data, r);
            qlen++;
          end
        end
      level++;
      $display("N_SM %0d level %0d: %0d queued at %0t", N_SM, level, qlen, $time);
    end
    cycles = ($time - t0) / 10;

    // Sequential reference.
    foreach (ref_lvl[v]) ref_lvl[v] = -1;
    ref_lvl[0] = 0;
    fifo.push_back(0);
    while (fifo.size() > 0) begin
      int v;
      v = fifo.pop_front();
      for (int e = 0; e < DEG; e++)
        if (ref_lvl[nbr(v, e)] < 0) begin
          ref_lvl[nbr(v, e)] = ref_lvl[v] + 1;
          fifo.push_back(nbr(v, e));
        end
    end
    for (int v = 0; v < V; v++) begin
      cpu(0, CPU_LOAD, lvl + 32'(v * 4), 0, r);
      if (r.data != (ref_lvl[v] < 0 ? UNSET : 32'(ref_lvl[v]))) wrong++;
    end
    done = 1;
  end
endmodule
