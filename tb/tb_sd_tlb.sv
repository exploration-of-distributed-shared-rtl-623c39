// tb_sd_tlb: random lookups, fills and invalidations of the 8-entry TLB
// against a model that keeps a last-use time stamp per entry. The model
// fills the lowest-numbered invalid entry, else the entry with the oldest
// stamp (true LRU), so hits and misses must agree cycle by cycle.
module tb_sd_tlb;
  import dsm_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  vpn_t lk_vpn, fill_vpn, inv_vpn;
  ppn_t lk_ppn, fill_ppn;
  logic lk_touch, lk_hit, fill, inv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sd_tlb #(.ENTRIES(E)) dut (.*);

  bit   m_valid [E];
  vpn_t m_vpn [E];
  ppn_t m_ppn [E];
  int   m_stamp [E];
  int   now = 0;

  function automatic int m_find(vpn_t v);
    for (int i = 0; i < E; i++) if (m_valid[i] && m_vpn[i] == v) return i;
    return -1;
  endfunction

  function automatic int m_victim();
    int best = 0;
    for (int i = 0; i < E; i++) if (!m_valid[i]) return i;
    for (int i = 1; i < E; i++) if (m_stamp[i] < m_stamp[best]) best = i;
    return best;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_vpn = '0; fill_vpn = '0; inv_vpn = '0; fill_ppn = '0;
    lk_touch = 0; fill = 0; inv = 0;
    for (int i = 0; i < E; i++) begin m_valid[i] = 0; m_stamp[i] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int idx;
      @(negedge clk);
      now++;
      lk_vpn = vpn_t'($urandom % 14);   // 14 pages over 8 entries: many evictions
      lk_touch = 1; fill = 0; inv = 0;
      #1;
      idx = m_find(lk_vpn);
      checks++;
      if (lk_hit !== (idx >= 0) || (idx >= 0 && lk_ppn !== m_ppn[idx])) begin
        failures++;
        $display("FAIL it %0d vpn %0d hit=%b exp=%b", it, lk_vpn, lk_hit, idx >= 0);
      end
      if (idx >= 0) m_stamp[idx] = now;
      else if (($urandom % 8) != 0) begin
        // miss: fill in the next cycle, as the coprocessor does
        @(negedge clk);
        now++;
        lk_touch = 0; fill = 1; fill_vpn = lk_vpn; fill_ppn = ppn_t'($urandom);
        idx = m_victim();
        m_valid[idx] = 1; m_vpn[idx] = fill_vpn; m_ppn[idx] = fill_ppn; m_stamp[idx] = now;
      end
      if (($urandom % 10) == 0) begin
        @(negedge clk);
        lk_touch = 0; fill = 0; inv = 1; inv_vpn = vpn_t'($urandom % 14);
        idx = m_find(inv_vpn);
        if (idx >= 0) m_valid[idx] = 0;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
