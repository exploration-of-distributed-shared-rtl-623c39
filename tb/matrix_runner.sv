// matrix_runner: testbench helper that runs a parallel matrix
// multiplication C = A x B (N x N 32-bit integers) on one instance of the
// multiprocessor with N_SM shared memory modules, the eight PEs each
// computing N / 8 rows.
//
// Sequence: PE0 allocates A, B and C with MEM = -1, so the HwMMU places them
// round-robin over the modules; every PE stores its rows of A and B; after a
// barrier every PE computes its rows of C from shared loads and stores them;
// after a second barrier PE0 reads C back. A, B and the expected C come from
// the `a_init` / `b_init` formulas below, so the caller can check `c_ok`.
// Outputs: done, the cycles of the compute phase, the number of shared
// accesses in it, the number of wrong elements of C and of error replies.
module matrix_runner #(
  parameter int unsigned N_SM = 3,
  parameter int unsigned N    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          compute_cycles,
  output int          accesses,
  output int          wrong,
  output int          errors
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

  function automatic logic [31:0] a_init(int i, int j); return 32'(i * 3 + j + 1); endfunction
  function automatic logic [31:0] b_init(int i, int j); return 32'((i + 2 * j) % 7); endfunction

  task automatic cpu(int pe, cpu_op_e op, logic [31:0] mem, logic [31:0] addr,
                     logic [31:0] data, output cpu_rsp_t r);
    @(negedge clk);
    cpu_req[pe] = '{op: op, mem: mem, addr: addr, data: data};
    cpu_req_valid[pe] = 1;
    @(posedge clk);
    while (!cpu_req_ready[pe]) @(posedge clk);
    @(negedge clk);
    cpu_req_valid[pe] = 0;
    while (!cpu_rsp_valid[pe]) @(posedge clk);
    r = cpu_rsp[pe];
    if (r.err) errors++;
  endtask

  initial begin
    cpu_rsp_t r;
    logic [31:0] a_base, b_base, c_base;
    int t0, n_done;
    done = 0; compute_cycles = 0; accesses = 0; wrong = 0; errors = 0;
    cpu_req = '0; cpu_req_valid = '0;
    ext_tx_msg = '0; ext_tx_valid = '0; ext_rx_ready = '1;
    @(posedge rst_n);
    repeat (4) @(posedge clk);
    cpu(0, CPU_MALLOC, MEM_ANY, 0, 32'(N * N * 4), r); a_base = r.data;
    cpu(0, CPU_MALLOC, MEM_ANY, 0, 32'(N * N * 4), r); b_base = r.data;
    cpu(0, CPU_MALLOC, MEM_ANY, 0, 32'(N * N * 4), r); c_base = r.data;

    n_done = 0;
    for (int p = 0; p < NUM_PE; p++)
      fork automatic int pp = p; begin
        automatic cpu_rsp_t rr;
        for (int i = pp; i < N; i += NUM_PE)
          for (int j = 0; j < N; j++) begin
            cpu(pp, CPU_STORE, 0, a_base + 32'((i * N + j) * 4), a_init(i, j), rr);
            cpu(pp, CPU_STORE, 0, b_base + 32'((i * N + j) * 4), b_init(i, j), rr);
          end
        n_done++;
      end join_none
    wait (n_done == NUM_PE);

    t0 = $time;
    n_done = 0;
    for (int p = 0; p < NUM_PE; p++)
      fork automatic int pp = p; begin
        automatic cpu_rsp_t ra, rb, rw;
        for (int i = pp; i < N; i += NUM_PE)
          for (int j = 0; j < N; j++) begin
            automatic logic [31:0] s;
            s = 0;
            for (int k = 0; k < N; k++) begin
              cpu(pp, CPU_LOAD, 0, a_base + 32'((i * N + k) * 4), 0, ra);
              cpu(pp, CPU_LOAD, 0, b_base + 32'((k * N + j) * 4), 0, rb);
              s += ra.data * rb.data;
              accesses += 2;
            end
            cpu(pp, CPU_STORE, 0, c_base + 32'((i * N + j) * 4), s, rw);
            accesses++;
          end
        n_done++;
      end join_none
    wait (n_done == NUM_PE);
    compute_cycles = ($time - t0) / 10;

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] e;
        e = 0;
        for (int k = 0; k < N; k++) e += a_init(i, k) * b_init(k, j);
        cpu(0, CPU_LOAD, 0, c_base + 32'((i * N + j) * 4), 0, r);
        if (r.data != e) begin wrong++; if (wrong < 4) $display("C[%0d][%0d] = %0d, expected %0d (N_SM %0d)", i, j, r.data, e, N_SM); end
      end
    done = 1;
  end
endmodule
