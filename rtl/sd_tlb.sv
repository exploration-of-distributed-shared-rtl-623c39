// sd_tlb: shared-data translation look-aside buffer of one processing
// element.
//
// A fully associative table of ENTRIES {virtual page -> physical page}
// pairs that caches the HwMMU's shared page table. Ports:
//   lookup      lk_vpn -> lk_hit, lk_ppn (combinational); with lk_touch the
//               hitting entry becomes the most recently used
//   fill        fill_vpn/fill_ppn are written into a free entry, or else
//               over the least recently used one (same cycle as any lookup)
//   invalidate  inv_vpn's entry, if present, is dropped (broadcast by the
//               HwMMU before a page is moved)
// Replacement is LRU: every entry keeps an age (0 = most recent); using or
// filling an entry sets its age to 0 and ages every entry that was younger.
//
// Full associativity, eight entries and LRU replacement follow the
// document; the age-counter form of LRU and the preference for invalid
// entries on a fill are this design's choices.
module sd_tlb
  import dsm_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  vpn_t lk_vpn,
  input  logic lk_touch,
  output logic lk_hit,
  output ppn_t lk_ppn,
  input  logic fill,
  input  vpn_t fill_vpn,
  input  ppn_t fill_ppn,
  input  logic inv,
  input  vpn_t inv_vpn
);
  localparam int unsigned IW = $clog2(ENTRIES > 1 ? ENTRIES : 2);

  logic [ENTRIES-1:0]         valid;
  vpn_t                       vpn  [ENTRIES];
  ppn_t                       ppn  [ENTRIES];
  logic [ENTRIES-1:0][IW-1:0] age;

  logic [IW-1:0] hit_idx, victim;
  logic          have_free;

  always_comb begin
    lk_hit  = 1'b0;
    hit_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (valid[i] && vpn[i] == lk_vpn) begin
        lk_hit  = 1'b1;
        hit_idx = IW'(i);
      end
    lk_ppn = ppn[hit_idx];
  end

  // Victim: first invalid entry, else the oldest.
  always_comb begin
    have_free = 1'b0;
    victim    = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin
        have_free = 1'b1;
        victim    = IW'(i);
      end
    if (!have_free)
      for (int unsigned i = 0; i < ENTRIES; i++)
        if (age[i] == IW'(ENTRIES - 1)) victim = IW'(i);
  end

  logic          use_en;
  logic [IW-1:0] use_idx;
  assign use_en  = fill || (lk_touch && lk_hit);
  assign use_idx = fill ? victim : hit_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        age[i] <= IW'(i);
        vpn[i] <= '0;
        ppn[i] <= '0;
      end
    end else begin
      if (use_en) begin
        for (int unsigned i = 0; i < ENTRIES; i++)
          if (age[i] < age[use_idx]) age[i] <= age[i] + 1'b1;
        age[use_idx] <= '0;
      end
      if (fill) begin
        valid[victim] <= 1'b1;
        vpn[victim]   <= fill_vpn;
        ppn[victim]   <= fill_ppn;
      end
      if (inv)
        for (int unsigned i = 0; i < ENTRIES; i++)
          if (vpn[i] == inv_vpn && !(fill && IW'(i) == victim)) valid[i] <= 1'b0;
    end
  end

`ifndef SYNTHESIS
  // Ages stay a permutation: exactly one entry is the oldest.
  a_one_oldest: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(age_is_max()));
  function automatic logic [ENTRIES-1:0] age_is_max();
    for (int unsigned i = 0; i < ENTRIES; i++) age_is_max[i] = (age[i] == IW'(ENTRIES - 1));
  endfunction
`endif
endmodule
