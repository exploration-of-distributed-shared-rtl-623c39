// hwmmu: hardware memory management unit for the distributed shared memory.
//
// The HwMMU owns the shared address space. It keeps
//   * the shared page table: for each shared virtual page a valid bit, the
//     physical page {module, local page} and a bit marking the last page of
//     an allocation (so MMU_FREE knows where a block ends);
//   * the memory state table (MST): per module its power state (active or
//     sleep) and the number of pages allocated in it, plus a bitmap of its
//     used pages;
// and executes, one at a time, the commands the PEs send it:
//   OP_MALLOC(MEM, size)   ceil(size / PAGE_BYTES) pages in module MEM, or,
//                          with MEM = -1, in the next module (round-robin)
//                          that has room; contiguous virtual pages are taken
//                          first-fit. Returns the virtual address.
//   OP_FREE(address)       releases the block that starts at address.
//   OP_COPY(MEM, address, n)  allocates n new pages in MEM and copies the n
//                          pages there; returns the new virtual address.
//   OP_MOVE(MEM, address, n)  for each page: allocate in MEM, broadcast an
//                          SD-TLB invalidation to every PE and wait for all
//                          acknowledgements, copy, point the page table at
//                          the new page and free the old one. The virtual
//                          address does not change.
//   OP_TLB_MISS(vpn)       returns the page's translation (OP_TLB_FILL).
// Any failure returns INVALID (all ones). A module is woken (OP_SM_WAKE)
// before pages are allocated in it, and put to sleep (OP_SM_SLEEP) when its
// last page is released, so that compaction by MOVE powers modules down.
//
// Commands wait in a queue of NUM_PE entries (each PE has at most one
// outstanding); replies from memories and invalidation acknowledgements
// bypass the queue. Because commands are served in order, a TLB miss that
// arrives during a MOVE is answered only when the MOVE has finished.
// Pages are copied one 32-bit word at a time: read from the source module,
// write to the destination, wait for the write acknowledgement.
//
// From the document: the page table and MST, page-granular allocation, the
// four primitives and MEM = -1, round-robin placement, the active signal
// before allocating in a sleeping module, the invalidation broadcast and the
// delayed responses during a move, sleep for emptied modules, INVALID on
// failure. This design's own: message formats, first-fit virtual
// placement, one module per allocation, word-by-word copy, the
// acknowledgement of invalidations, no invalidation on MMU_FREE.
module hwmmu
  import dsm_pkg::*;
#(
  parameter int unsigned N_SM        = 3,
  parameter int unsigned TOTAL_PAGES = 128,
  parameter int unsigned PAGE_BYTES  = 4096,
  parameter int unsigned N_PE        = NUM_PE
) (
  input  logic clk,
  input  logic rst_n,
  input  msg_t rx_msg,
  input  logic rx_valid,
  output logic rx_ready,
  output msg_t tx_msg,
  output logic tx_valid,
  input  logic tx_ready,
  // memory state table, for observation
  output logic [N_SM-1:0]       mst_active,
  output logic [N_SM-1:0][15:0] mst_count,
  output logic [31:0]           busy_cycles,   // cycles spent on commands
  output logic [31:0]           words_copied
);
  localparam int unsigned OFF_W      = $clog2(PAGE_BYTES);
  localparam int unsigned PAGE_WORDS = PAGE_BYTES / 4;
  localparam int unsigned MAXP       = sm_pages(TOTAL_PAGES, N_SM, 0);
  localparam int unsigned VW         = $clog2(TOTAL_PAGES + 1);
  localparam int unsigned WW         = $clog2(PAGE_WORDS + 1);
  localparam int unsigned SW         = $clog2(N_SM > 1 ? N_SM : 2);
  localparam int unsigned PEW        = $clog2(N_PE + 1);

  // ---------------------------------------------------------------- tables
  logic [TOTAL_PAGES-1:0] pt_valid, pt_last;
  ppn_t                   pt_ppn [TOTAL_PAGES];
  logic [N_SM-1:0][MAXP-1:0] used;        // physical pages in use

  // ---------------------------------------------------------------- command queue
  logic is_cmd;
  msg_t cmd_head;
  logic cmd_valid, cmd_pop;

  always_comb begin
    case (rx_msg.op)
      OP_MALLOC, OP_FREE, OP_COPY, OP_MOVE, OP_TLB_MISS: is_cmd = 1'b1;
      default:                                            is_cmd = 1'b0;
    endcase
  end

  logic cmdq_ready;
  flit_fifo #(.DEPTH(N_PE), .W($bits(msg_t))) u_cmdq (
    .clk, .rst_n,
    .wr_data(rx_msg), .wr_valid(rx_valid && is_cmd), .wr_ready(cmdq_ready),
    .rd_data(cmd_head), .rd_valid(cmd_valid), .rd_ready(cmd_pop)
  );
  assign rx_ready = is_cmd ? cmdq_ready : 1'b1;

  // Replies from memories and PEs.
  logic        got_rdata, got_wack, got_ack;
  assign got_rdata = rx_valid && rx_msg.op == OP_SM_RDATA;
  assign got_wack  = rx_valid && (rx_msg.op == OP_SM_WACK || rx_msg.op == OP_SM_ERR);
  assign got_ack   = rx_valid && rx_msg.op == OP_INV_ACK;

  // ---------------------------------------------------------------- state
  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_PICK, S_VSCAN, S_WAKE, S_PAGE, S_INV, S_INV_WAIT,
    S_CP_RD, S_CP_RWAIT, S_CP_WR, S_CP_WWAIT, S_RELEASE, S_FREE, S_SLEEP, S_REPLY
  } state_e;
  state_e state, after_sleep;

  msg_t            cur;        // command being executed
  logic [31:0]     result;
  logic [VW-1:0]   npages, idx;     // pages of the command, current page
  logic [VW-1:0]   vbase;           // first virtual page of the source block
  logic [VW-1:0]   vnew;            // first virtual page of a new block
  logic [VW-1:0]   scan, run;       // first-fit search
  logic [SW-1:0]   dst, rr;         // destination module, round-robin pointer
  ppn_t            srcp, newp;
  logic [WW-1:0]   word;
  logic [31:0]     data;
  logic [PEW-1:0]  pe_k, acks;
  logic [SW-1:0]   sleep_m;         // module to put to sleep

  function automatic node_t sm_node(int unsigned m);
    node_t n = '0;
    for (int unsigned k = 0; k < MAX_SM; k++)
      if (k < N_SM && k == m) n = node_t'(role_node(N_SM, R_SM, k));
    return n;
  endfunction

  function automatic node_t pe_node(int unsigned k);
    return node_t'(role_node(N_SM, R_PE, k));
  endfunction

  function automatic logic [15:0] capacity(int unsigned m);
    return 16'(sm_pages(TOTAL_PAGES, N_SM, m));
  endfunction

  // Round-robin / explicit choice of the destination module.
  function automatic logic fits(int unsigned m, logic [15:0] cnt, logic [VW-1:0] n);
    return 32'(cnt) + 32'(n) <= 32'(capacity(m));
  endfunction

  logic          pick_ok;
  logic [SW-1:0] pick_m;
  always_comb begin
    pick_ok = 1'b0;
    pick_m  = '0;
    if (cur.a == MEM_ANY) begin
      for (int k = N_SM - 1; k >= 0; k--) begin
        if (fits((int'(rr) + k) % N_SM, mst_count[(int'(rr) + k) % N_SM], npages)) begin
          pick_ok = 1'b1;
          pick_m  = SW'((int'(rr) + k) % N_SM);
        end
      end
    end else begin
      for (int m = 0; m < N_SM; m++)
        if (cur.a == 32'(m) && fits(m, mst_count[m], npages)) begin
          pick_ok = 1'b1;
          pick_m  = SW'(m);
        end
    end
  end

  // First free physical page of the destination module.
  logic [LPG_W-1:0] free_pg;
  always_comb begin
    free_pg = '0;
    for (int p = MAXP - 1; p >= 0; p--)
      if (!used[dst][p] && p < int'(capacity(int'(dst)))) free_pg = LPG_W'(p);
  end

  function automatic logic [SW-1:0] mod_of(ppn_t p);
    return SW'(p[PPN_W-1 -: MEM_W]);
  endfunction

  assign cmd_pop = (state == S_IDLE) && cmd_valid && !tx_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      after_sleep  <= S_IDLE;
      pt_valid     <= '0;
      pt_last      <= '0;
      for (int unsigned v = 0; v < TOTAL_PAGES; v++) pt_ppn[v] <= '0;
      used         <= '0;
      mst_active   <= '0;
      mst_count    <= '0;
      cur          <= '0;
      result       <= '0;
      npages       <= '0;
      idx          <= '0;
      vbase        <= '0;
      vnew         <= '0;
      scan         <= '0;
      run          <= '0;
      dst          <= '0;
      rr           <= '0;
      srcp         <= '0;
      newp         <= '0;
      word         <= '0;
      data         <= '0;
      pe_k         <= '0;
      acks         <= '0;
      sleep_m      <= '0;
      tx_valid     <= 1'b0;
      tx_msg       <= '0;
      busy_cycles  <= '0;
      words_copied <= '0;
    end else begin
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (state != S_IDLE) busy_cycles <= busy_cycles + 1;
      if (got_ack) acks <= acks + 1'b1;

      case (state)
        // ------------------------------------------------ decode a command
        S_IDLE: if (cmd_pop) begin
          cur    <= cmd_head;
          result <= INVALID;
          idx    <= '0;
          case (cmd_head.op)
            OP_TLB_MISS: begin
              tx_valid <= 1'b1;
              tx_msg   <= '0;
              tx_msg.dst <= cmd_head.src;
              tx_msg.op  <= OP_TLB_FILL;
              tx_msg.a   <= cmd_head.a;
              if (cmd_head.a < 32'(TOTAL_PAGES) && pt_valid[VW'(cmd_head.a)])
                tx_msg.b <= {1'b1, 31'(pt_ppn[VW'(cmd_head.a)])};
            end
            OP_MALLOC: begin
              npages <= VW'((cmd_head.b + 32'(PAGE_BYTES - 1)) >> OFF_W);
              if (cmd_head.b == 0 || cmd_head.b > 32'(TOTAL_PAGES * PAGE_BYTES)) state <= S_REPLY;
              else state <= S_PICK;
            end
            OP_FREE: begin
              vbase <= VW'(cmd_head.a >> OFF_W);
              if ((cmd_head.a >> OFF_W) < 32'(TOTAL_PAGES) && cmd_head.a[OFF_W-1:0] == '0 &&
                  pt_valid[VW'(cmd_head.a >> OFF_W)])
                state <= S_FREE;
              else state <= S_REPLY;
            end
            default: begin  // OP_COPY, OP_MOVE
              vbase  <= VW'(cmd_head.b >> OFF_W);
              npages <= VW'(cmd_head.c);
              if (cmd_head.c == 0 || cmd_head.b[OFF_W-1:0] != '0 ||
                  (cmd_head.b >> OFF_W) + cmd_head.c > 32'(TOTAL_PAGES))
                state <= S_REPLY;
              else state <= S_CHECK;
            end
          endcase
        end

        // ------------------------------------------------ source pages valid?
        S_CHECK: begin
          if (!pt_valid[vbase + idx]) state <= S_REPLY;
          else if (idx == npages - 1'b1) begin
            idx   <= '0;
            state <= S_PICK;
          end else idx <= idx + 1'b1;
        end

        // ------------------------------------------------ choose the module
        S_PICK: begin
          if (!pick_ok) state <= S_REPLY;
          else begin
            dst  <= pick_m;
            if (cur.a == MEM_ANY) rr <= SW'((int'(pick_m) + 1) % N_SM);
            scan <= '0;
            run  <= '0;
            state <= (cur.op == OP_MOVE) ? S_WAKE : S_VSCAN;
          end
        end

        // ------------------------------------------------ first-fit virtual run
        S_VSCAN: begin
          if (scan == VW'(TOTAL_PAGES)) state <= S_REPLY;
          else if (!pt_valid[scan]) begin
            if (run + 1'b1 == npages) begin
              vnew  <= scan + 1'b1 - npages;
              state <= S_WAKE;
            end
            run  <= run + 1'b1;
            scan <= scan + 1'b1;
          end else begin
            run  <= '0;
            scan <= scan + 1'b1;
          end
        end

        // ------------------------------------------------ active signal
        S_WAKE: if (!tx_valid) begin
          if (!mst_active[dst]) begin
            tx_valid   <= 1'b1;
            tx_msg     <= '0;
            tx_msg.dst <= sm_node(int'(dst));
            tx_msg.op  <= OP_SM_WAKE;
            mst_active[dst] <= 1'b1;
          end
          result <= (cur.op == OP_MOVE) ? cur.b : 32'(vnew) << OFF_W;
          state  <= S_PAGE;
        end

        // ------------------------------------------------ one page
        S_PAGE: begin
          if (idx == npages) state <= S_REPLY;
          else begin
            used[dst][free_pg] <= 1'b1;
            mst_count[dst]     <= mst_count[dst] + 1'b1;
            newp <= {MEM_W'(dst), free_pg};
            srcp <= pt_ppn[vbase + idx];
            word <= '0;
            case (cur.op)
              OP_MALLOC: begin
                pt_valid[vnew + idx] <= 1'b1;
                pt_last [vnew + idx] <= (idx == npages - 1'b1);
                pt_ppn  [vnew + idx] <= {MEM_W'(dst), free_pg};
                idx <= idx + 1'b1;
              end
              OP_COPY: begin
                pt_valid[vnew + idx] <= 1'b1;
                pt_last [vnew + idx] <= (idx == npages - 1'b1);
                pt_ppn  [vnew + idx] <= {MEM_W'(dst), free_pg};
                state <= S_CP_RD;
              end
              default: begin
                pe_k  <= '0;
                acks  <= '0;
                state <= S_INV;
              end
            endcase
          end
        end

        // ------------------------------------------------ SD-TLB invalidation
        S_INV: if (!tx_valid) begin
          tx_valid   <= 1'b1;
          tx_msg     <= '0;
          tx_msg.dst <= pe_node(int'(pe_k));
          tx_msg.op  <= OP_TLB_INV;
          tx_msg.a   <= 32'(vbase + idx);
          pe_k       <= pe_k + 1'b1;
          if (pe_k == PEW'(N_PE - 1)) state <= S_INV_WAIT;
        end
        S_INV_WAIT: if (acks == PEW'(N_PE)) state <= S_CP_RD;

        // ------------------------------------------------ copy word by word
        S_CP_RD: if (!tx_valid) begin
          tx_valid   <= 1'b1;
          tx_msg     <= '0;
          tx_msg.dst <= sm_node(int'(mod_of(srcp)));
          tx_msg.op  <= OP_SM_RD;
          tx_msg.a   <= 32'(srcp[LPG_W-1:0]) * 32'(PAGE_BYTES) + 32'(word) * 4;
          state      <= S_CP_RWAIT;
        end
        S_CP_RWAIT: if (got_rdata) begin
          data  <= rx_msg.a;
          state <= S_CP_WR;
        end
        S_CP_WR: if (!tx_valid) begin
          tx_valid   <= 1'b1;
          tx_msg     <= '0;
          tx_msg.dst <= sm_node(int'(dst));
          tx_msg.op  <= OP_SM_WR;
          tx_msg.a   <= 32'(newp[LPG_W-1:0]) * 32'(PAGE_BYTES) + 32'(word) * 4;
          tx_msg.b   <= data;
          state      <= S_CP_WWAIT;
        end
        S_CP_WWAIT: if (got_wack) begin
          words_copied <= words_copied + 1;
          if (word == WW'(PAGE_WORDS - 1)) begin
            if (cur.op == OP_MOVE) state <= S_RELEASE;
            else begin
              idx   <= idx + 1'b1;
              state <= S_PAGE;
            end
          end else begin
            word  <= word + 1'b1;
            state <= S_CP_RD;
          end
        end

        // ------------------------------------------------ MOVE: retarget, free old
        S_RELEASE: begin
          pt_ppn[vbase + idx] <= newp;
          used[mod_of(srcp)][srcp[LPG_W-1:0]] <= 1'b0;
          mst_count[mod_of(srcp)] <= mst_count[mod_of(srcp)] - 1'b1;
          idx <= idx + 1'b1;
          if (mst_count[mod_of(srcp)] == 16'd1) begin
            sleep_m     <= mod_of(srcp);
            after_sleep <= S_PAGE;
            state       <= S_SLEEP;
          end else state <= S_PAGE;
        end

        // ------------------------------------------------ FREE: walk the block
        S_FREE: begin
          pt_valid[vbase] <= 1'b0;
          pt_last[vbase]  <= 1'b0;
          used[mod_of(pt_ppn[vbase])][pt_ppn[vbase][LPG_W-1:0]] <= 1'b0;
          mst_count[mod_of(pt_ppn[vbase])] <= mst_count[mod_of(pt_ppn[vbase])] - 1'b1;
          vbase  <= vbase + 1'b1;
          result <= 32'd0;
          after_sleep <= pt_last[vbase] ? S_REPLY : S_FREE;
          if (mst_count[mod_of(pt_ppn[vbase])] == 16'd1) begin
            sleep_m <= mod_of(pt_ppn[vbase]);
            state   <= S_SLEEP;
          end else if (pt_last[vbase] || vbase == VW'(TOTAL_PAGES - 1)) state <= S_REPLY;
        end

        // ------------------------------------------------ sleep an empty module
        S_SLEEP: if (!tx_valid) begin
          tx_valid   <= 1'b1;
          tx_msg     <= '0;
          tx_msg.dst <= sm_node(int'(sleep_m));
          tx_msg.op  <= OP_SM_SLEEP;
          mst_active[sleep_m] <= 1'b0;
          state      <= after_sleep;
        end

        // ------------------------------------------------ answer the PE
        S_REPLY: if (!tx_valid) begin
          tx_valid   <= 1'b1;
          tx_msg     <= '0;
          tx_msg.dst <= cur.src;
          tx_msg.op  <= OP_MMU_RSP;
          tx_msg.a   <= result;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_msg)));
`endif
endmodule
