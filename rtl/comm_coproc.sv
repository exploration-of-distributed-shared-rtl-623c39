// comm_coproc: communication coprocessor of one processing element, with
// its shared-data TLB.
//
// It stands between the core and the network interface and runs the core's
// shared-memory requests (one at a time):
//   CPU_LOAD/CPU_STORE  the shared virtual address is translated by the
//       SD-TLB. On a hit the read or write goes straight to the memory
//       module holding the page; on a miss the page's translation is asked
//       from the HwMMU (OP_TLB_MISS), written into the TLB, and the lookup
//       is repeated. A page the HwMMU does not know ends the request with
//       err set; so does an access that a sleeping module refuses.
//   CPU_MALLOC/FREE/COPY/MOVE  forwarded to the HwMMU as the primitive of
//       the same name; the HwMMU's result is returned.
// An OP_TLB_INV from the HwMMU removes the page from the TLB at once. It is
// acknowledged (OP_INV_ACK) only while no memory access of this PE is in
// flight, so the HwMMU starts copying a page only after every access that
// used the old translation has finished.
//
// Interface: cpu_req is taken when cpu_req_valid and cpu_req_ready are both
// high; the result appears on cpu_rsp for one cycle with cpu_rsp_valid.
// Shared virtual address = vpn * PAGE_BYTES + offset; the module address
// sent to a memory is local page * PAGE_BYTES + offset.
//
// The SD-TLB, the miss path to the HwMMU and the invalidation by the HwMMU
// follow the document. The acknowledgement of invalidations, the one
// outstanding request and the error replies are this design's choices.
module comm_coproc
  import dsm_pkg::*;
#(
  parameter int unsigned N_SM       = 3,
  parameter int unsigned PAGE_BYTES = 4096,
  parameter int unsigned ENTRIES    = TLB_ENTRIES
) (
  input  logic     clk,
  input  logic     rst_n,
  // core side
  input  cpu_req_t cpu_req,
  input  logic     cpu_req_valid,
  output logic     cpu_req_ready,
  output cpu_rsp_t cpu_rsp,
  output logic     cpu_rsp_valid,
  // network interface side
  output msg_t     tx_msg,
  output logic     tx_valid,
  input  logic     tx_ready,
  input  msg_t     rx_msg,
  input  logic     rx_valid,
  output logic     rx_ready,
  // event counters
  output logic [31:0] tlb_hits,     // accesses that found their page
                                    // in the TLB at the first lookup
  output logic [31:0] tlb_misses,
  output logic [31:0] tlb_invals
);
  localparam int unsigned OFF_W    = $clog2(PAGE_BYTES);
  localparam int unsigned MMU_NODE = role_node(N_SM, R_MMU, 0);

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WAIT_FILL, S_WAIT_SM, S_WAIT_MMU} state_e;
  state_e   state;
  cpu_req_t req;
  logic     inv_pend;     // an invalidation waits for its acknowledgement
  node_t    inv_src;
  logic     retry;        // lookup repeated after a TLB fill

  // ---- SD-TLB
  vpn_t lk_vpn;
  logic lk_hit, lk_touch, fill;
  ppn_t lk_ppn;
  logic rx_fire, rx_inv, fill_ok;

  assign lk_vpn   = vpn_t'(req.addr >> OFF_W);
  assign rx_ready = 1'b1;
  assign rx_fire  = rx_valid;
  assign rx_inv   = rx_fire && rx_msg.op == OP_TLB_INV;
  assign fill_ok  = rx_fire && state == S_WAIT_FILL && rx_msg.op == OP_TLB_FILL && rx_msg.b[31];
  assign fill     = fill_ok;
  assign lk_touch = (state == S_LOOK) && !tx_valid;

  sd_tlb #(.ENTRIES(ENTRIES)) u_tlb (
    .clk, .rst_n,
    .lk_vpn, .lk_touch, .lk_hit, .lk_ppn,
    .fill, .fill_vpn(vpn_t'(rx_msg.a)), .fill_ppn(ppn_t'(rx_msg.b)),
    .inv(rx_inv), .inv_vpn(vpn_t'(rx_msg.a))
  );

  // Node of the memory module that holds physical page p.
  function automatic node_t sm_node_of(ppn_t p);
    node_t n = '0;
    for (int unsigned m = 0; m < MAX_SM; m++)
      if (m < N_SM && p[PPN_W-1 -: MEM_W] == MEM_W'(m)) n = node_t'(role_node(N_SM, R_SM, m));
    return n;
  endfunction

  function automatic op_e mmu_op(cpu_op_e o);
    case (o)
      CPU_MALLOC: return OP_MALLOC;
      CPU_FREE:   return OP_FREE;
      CPU_COPY:   return OP_COPY;
      default:    return OP_MOVE;
    endcase
  endfunction

  assign cpu_req_ready = (state == S_IDLE) && !tx_valid && !(inv_pend);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      req           <= '0;
      inv_pend      <= 1'b0;
      inv_src       <= '0;
      retry         <= 1'b0;
      tx_valid      <= 1'b0;
      tx_msg        <= '0;
      cpu_rsp_valid <= 1'b0;
      cpu_rsp       <= '0;
      tlb_hits      <= '0;
      tlb_misses    <= '0;
      tlb_invals    <= '0;
    end else begin
      cpu_rsp_valid <= 1'b0;
      if (tx_valid && tx_ready) tx_valid <= 1'b0;

      if (rx_inv) begin
        inv_pend   <= 1'b1;
        inv_src    <= rx_msg.src;
        tlb_invals <= tlb_invals + 1;
      end

      // Acknowledge an invalidation when no memory access is in flight.
      if (inv_pend && !tx_valid && !rx_inv &&
          (state == S_IDLE || state == S_WAIT_FILL || state == S_WAIT_MMU)) begin
        tx_valid   <= 1'b1;
        tx_msg     <= '0;
        tx_msg.dst <= inv_src;
        tx_msg.op  <= OP_INV_ACK;
        inv_pend   <= 1'b0;
      end

      begin
        case (state)
          S_IDLE: if (cpu_req_valid && cpu_req_ready) begin
            req <= cpu_req;
            if (cpu_req.op == CPU_LOAD || cpu_req.op == CPU_STORE) begin
              state <= S_LOOK;
            end else begin
              tx_valid   <= 1'b1;
              tx_msg     <= '0;
              tx_msg.dst <= node_t'(MMU_NODE);
              tx_msg.op  <= mmu_op(cpu_req.op);
              case (cpu_req.op)
                CPU_MALLOC: begin tx_msg.a <= cpu_req.mem;  tx_msg.b <= cpu_req.data; end
                CPU_FREE:   begin tx_msg.a <= cpu_req.addr; end
                default:    begin tx_msg.a <= cpu_req.mem;  tx_msg.b <= cpu_req.addr;
                                  tx_msg.c <= cpu_req.data; end
              endcase
              state <= S_WAIT_MMU;
            end
          end
          S_LOOK: if (!tx_valid) begin
            tx_valid <= 1'b1;
            tx_msg   <= '0;
            if (lk_hit) begin
              if (!retry) tlb_hits <= tlb_hits + 1;
              retry      <= 1'b0;
              tx_msg.dst <= sm_node_of(lk_ppn);
              tx_msg.op  <= (req.op == CPU_STORE) ? OP_SM_WR : OP_SM_RD;
              tx_msg.a   <= 32'(lk_ppn[LPG_W-1:0]) * 32'(PAGE_BYTES) + 32'(req.addr[OFF_W-1:0]);
              tx_msg.b   <= req.data;
              state      <= S_WAIT_SM;
            end else begin
              tlb_misses <= tlb_misses + 1;
              tx_msg.dst <= node_t'(MMU_NODE);
              tx_msg.op  <= OP_TLB_MISS;
              tx_msg.a   <= 32'(lk_vpn);
              state      <= S_WAIT_FILL;
            end
          end
          S_WAIT_FILL: if (rx_fire && rx_msg.op == OP_TLB_FILL) begin
            if (rx_msg.b[31]) begin
              state <= S_LOOK;
              retry <= 1'b1;
            end
            else begin
              cpu_rsp_valid <= 1'b1;
              cpu_rsp       <= '{err: 1'b1, data: INVALID};
              state         <= S_IDLE;
            end
          end
          S_WAIT_SM: if (rx_fire && (rx_msg.op == OP_SM_RDATA || rx_msg.op == OP_SM_WACK ||
                                     rx_msg.op == OP_SM_ERR)) begin
            cpu_rsp_valid <= 1'b1;
            cpu_rsp.err   <= (rx_msg.op == OP_SM_ERR);
            cpu_rsp.data  <= rx_msg.a;
            state         <= S_IDLE;
          end
          S_WAIT_MMU: if (rx_fire && rx_msg.op == OP_MMU_RSP) begin
            cpu_rsp_valid <= 1'b1;
            cpu_rsp.err   <= (rx_msg.a == INVALID);
            cpu_rsp.data  <= rx_msg.a;
            state         <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

`ifndef SYNTHESIS
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_msg)));
`endif
endmodule
