// mpsoc_top: network-on-chip multiprocessor with a distributed shared
// memory managed by a hardware MMU.
//
// Eight processing elements, N_SM shared memory modules (3 by default), the
// HwMMU, and three further nodes (L2 cache, main memory controller,
// interrupt controller) sit on a 4x4 mesh of byte-wide wormhole routers,
// placed as in dsm_pkg::node_role. Every node has a network interface.
//   PE node   communication coprocessor + SD-TLB; the core itself is outside
//             and drives cpu_req / takes cpu_rsp (one port per PE, in PE
//             order = node order).
//   SM node   shared memory controller and RAM bank; the TOTAL_PAGES pages of
//             the shared space are spread over the modules (43/43/42 for
//             three modules).
//   HwMMU     page table, memory state table and the allocation, free,
//             copy, move and TLB-miss service.
//   L2/MM/IC  not built here: their network interface message ports are
//             brought out (ext_*, index 0 = L2, 1 = main memory controller,
//             2 = interrupt controller) so that such blocks can be attached.
// Shared data are never cached: a PE load or store travels as a message to
// the module that holds the page and a reply comes back.
//
// All of it runs on one clock. Structure, node placement and sizes follow
// the document; the single clock and the message protocol are this
// design's choices.
module mpsoc_top
  import dsm_pkg::*;
#(
  parameter int unsigned N_SM        = 3,
  parameter int unsigned TOTAL_PAGES = 128,
  parameter int unsigned PAGE_BYTES  = 4096,
  parameter int unsigned IN_DEPTH    = 2,
  parameter int unsigned OUT_DEPTH   = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // cores
  input  cpu_req_t [NUM_PE-1:0]       cpu_req,
  input  logic     [NUM_PE-1:0]       cpu_req_valid,
  output logic     [NUM_PE-1:0]       cpu_req_ready,
  output cpu_rsp_t [NUM_PE-1:0]       cpu_rsp,
  output logic     [NUM_PE-1:0]       cpu_rsp_valid,
  // nodes whose IP is attached from outside (L2, MM, IC)
  input  msg_t     [2:0]              ext_tx_msg,
  input  logic     [2:0]              ext_tx_valid,
  output logic     [2:0]              ext_tx_ready,
  output msg_t     [2:0]              ext_rx_msg,
  output logic     [2:0]              ext_rx_valid,
  input  logic     [2:0]              ext_rx_ready,
  // status
  output logic     [N_SM-1:0]         sm_sleeping,
  output logic     [N_SM-1:0][31:0]   sm_accesses,
  output logic     [N_SM-1:0]         mst_active,
  output logic     [N_SM-1:0][15:0]   mst_count,
  output logic     [NUM_PE-1:0][31:0] tlb_hits,
  output logic     [NUM_PE-1:0][31:0] tlb_misses,
  output logic     [NUM_PE-1:0][31:0] tlb_invals,
  output logic     [31:0]             mmu_busy_cycles,
  output logic     [31:0]             mmu_words_copied
);
  // ---- mesh
  flit_t [NUM_NODES-1:0] ni_flit_out, ni_flit_in;
  logic  [NUM_NODES-1:0] ni_out_valid, ni_out_ready, ni_in_valid, ni_in_ready;

  noc_mesh #(.N_SM(N_SM), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_mesh (
    .clk, .rst_n,
    .loc_in_flit(ni_flit_out),  .loc_in_valid(ni_out_valid), .loc_in_ready(ni_out_ready),
    .loc_out_flit(ni_flit_in),  .loc_out_valid(ni_in_valid), .loc_out_ready(ni_in_ready)
  );

  // ---- per-node IP and network interface
  msg_t [NUM_NODES-1:0] tx_msg, rx_msg;
  logic [NUM_NODES-1:0] tx_valid, tx_ready, rx_valid, rx_ready;

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    localparam role_e       ROLE = node_role(N_SM, n);
    localparam int unsigned K    = role_index(N_SM, n);

    if (ROLE == R_NONE) begin : g_none
      assign ni_flit_out[n]  = '0;
      assign ni_out_valid[n] = 1'b0;
      assign ni_in_ready[n]  = 1'b0;
      assign tx_msg[n]       = '0;
      assign tx_valid[n]     = 1'b0;
      assign rx_ready[n]     = 1'b0;
    end else begin : g_ni
      network_interface #(.NODE_ID(n)) u_ni (
        .clk, .rst_n,
        .tx_msg(tx_msg[n]), .tx_valid(tx_valid[n]), .tx_ready(tx_ready[n]),
        .rx_msg(rx_msg[n]), .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]),
        .flit_out(ni_flit_out[n]), .flit_out_valid(ni_out_valid[n]),
        .flit_out_ready(ni_out_ready[n]),
        .flit_in(ni_flit_in[n]), .flit_in_valid(ni_in_valid[n]),
        .flit_in_ready(ni_in_ready[n])
      );
    end

    if (ROLE == R_PE) begin : g_pe
      comm_coproc #(.N_SM(N_SM), .PAGE_BYTES(PAGE_BYTES)) u_cop (
        .clk, .rst_n,
        .cpu_req(cpu_req[K]), .cpu_req_valid(cpu_req_valid[K]), .cpu_req_ready(cpu_req_ready[K]),
        .cpu_rsp(cpu_rsp[K]), .cpu_rsp_valid(cpu_rsp_valid[K]),
        .tx_msg(tx_msg[n]), .tx_valid(tx_valid[n]), .tx_ready(tx_ready[n]),
        .rx_msg(rx_msg[n]), .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]),
        .tlb_hits(tlb_hits[K]), .tlb_misses(tlb_misses[K]), .tlb_invals(tlb_invals[K])
      );
    end else if (ROLE == R_SM) begin : g_sm
      sm_controller #(
        .PAGES(sm_pages(TOTAL_PAGES, N_SM, K)), .PAGE_WORDS(PAGE_BYTES / 4)
      ) u_smc (
        .clk, .rst_n,
        .rx_msg(rx_msg[n]), .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]),
        .tx_msg(tx_msg[n]), .tx_valid(tx_valid[n]), .tx_ready(tx_ready[n]),
        .sleeping(sm_sleeping[K]), .access_count(sm_accesses[K])
      );
    end else if (ROLE == R_MMU) begin : g_mmu
      hwmmu #(
        .N_SM(N_SM), .TOTAL_PAGES(TOTAL_PAGES), .PAGE_BYTES(PAGE_BYTES), .N_PE(NUM_PE)
      ) u_mmu (
        .clk, .rst_n,
        .rx_msg(rx_msg[n]), .rx_valid(rx_valid[n]), .rx_ready(rx_ready[n]),
        .tx_msg(tx_msg[n]), .tx_valid(tx_valid[n]), .tx_ready(tx_ready[n]),
        .mst_active, .mst_count,
        .busy_cycles(mmu_busy_cycles), .words_copied(mmu_words_copied)
      );
    end else if (ROLE == R_L2 || ROLE == R_MM || ROLE == R_IC) begin : g_ext
      localparam int unsigned E = (ROLE == R_L2) ? 0 : (ROLE == R_MM) ? 1 : 2;
      assign tx_msg[n]       = ext_tx_msg[E];
      assign tx_valid[n]     = ext_tx_valid[E];
      assign ext_tx_ready[E] = tx_ready[n];
      assign ext_rx_msg[E]   = rx_msg[n];
      assign ext_rx_valid[E] = rx_valid[n];
      assign rx_ready[n]     = ext_rx_ready[E];
    end
  end
endmodule
