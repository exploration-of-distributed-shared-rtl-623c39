// dsm_pkg: types, constants and node maps shared by the distributed shared
// memory multiprocessor.
//
// The system is a 4x4 mesh network-on-chip with byte-wide links. Every IP
// (processing element, shared memory module, hardware MMU, L2 cache, main
// memory controller, interrupt controller) sits on one mesh node. The node
// maps for one, two and three shared memory modules follow the published
// mesh mappings; node id = row * MESH_COLS + col. Positions that hold no IP
// have no router.
//
// IPs talk to each other with messages (msg_t). A network interface turns a
// message into a packet of byte flits: destination, source, opcode, then the
// opcode's 32-bit words, most significant byte first. The opcode set and the
// word counts are this design's own; the document only says that the NI
// packets the service requests.
package dsm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned MESH_ROWS   = 4;
  localparam int unsigned MESH_COLS   = 4;
  localparam int unsigned NUM_NODES   = MESH_ROWS * MESH_COLS;
  localparam int unsigned NUM_PE      = 8;
  localparam int unsigned MAX_SM      = 5;
  localparam int unsigned TLB_ENTRIES = 8;

  localparam int unsigned NODE_W = 8;   // a node id fills the head flit byte
  localparam int unsigned MEM_W  = 3;   // shared memory module number
  localparam int unsigned LPG_W  = 8;   // page index inside one module
  localparam int unsigned VPN_W  = 8;   // shared virtual page number
  localparam int unsigned PPN_W  = MEM_W + LPG_W;

  localparam logic [31:0] INVALID = 32'hFFFF_FFFF;  // failed primitive
  localparam logic [31:0] MEM_ANY = 32'hFFFF_FFFF;  // MEM = -1: HwMMU picks

  typedef logic [NODE_W-1:0] node_t;
  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PPN_W-1:0]  ppn_t;   // {module, local page}

  // ---------------------------------------------------------------- flits
  typedef struct packed {
    logic       head;
    logic       tail;
    logic [7:0] data;
  } flit_t;

  // Router port numbering (mesh routers have five ports).
  localparam int unsigned PORT_LOCAL = 0;
  localparam int unsigned PORT_N     = 1;
  localparam int unsigned PORT_E     = 2;
  localparam int unsigned PORT_S     = 3;
  localparam int unsigned PORT_W     = 4;

  // ---------------------------------------------------------------- messages
  typedef enum logic [7:0] {
    OP_SM_RD     = 8'h01,  // a = byte address in module           -> OP_SM_RDATA
    OP_SM_WR     = 8'h02,  // a = byte address, b = data            -> OP_SM_WACK
    OP_SM_SLEEP  = 8'h03,  // HwMMU -> module: enter sleep
    OP_SM_WAKE   = 8'h04,  // HwMMU -> module: become active
    OP_SM_RDATA  = 8'h05,  // a = data
    OP_SM_WACK   = 8'h06,
    OP_SM_ERR    = 8'h07,  // access to a sleeping module
    OP_MALLOC    = 8'h10,  // a = MEM, b = size in bytes            -> OP_MMU_RSP
    OP_FREE      = 8'h11,  // a = address                           -> OP_MMU_RSP
    OP_COPY      = 8'h12,  // a = MEM, b = address, c = page count  -> OP_MMU_RSP
    OP_MOVE      = 8'h13,  // a = MEM, b = address, c = page count  -> OP_MMU_RSP
    OP_TLB_MISS  = 8'h14,  // a = vpn                               -> OP_TLB_FILL
    OP_MMU_RSP   = 8'h15,  // a = result (INVALID on failure)
    OP_TLB_FILL  = 8'h16,  // a = vpn, b = {valid, ppn}
    OP_TLB_INV   = 8'h17,  // a = vpn
    OP_INV_ACK   = 8'h18
  } op_e;

  typedef struct packed {
    node_t       dst;
    node_t       src;
    op_e         op;
    logic [31:0] a;
    logic [31:0] b;
    logic [31:0] c;
  } msg_t;

  // Number of 32-bit words a message of this opcode carries.
  function automatic int unsigned op_words(op_e op);
    case (op)
      OP_SM_RD, OP_SM_RDATA, OP_FREE, OP_TLB_MISS, OP_MMU_RSP, OP_TLB_INV: return 1;
      OP_SM_WR, OP_MALLOC, OP_TLB_FILL:                                    return 2;
      OP_COPY, OP_MOVE:                                                    return 3;
      default:                                                             return 0;
    endcase
  endfunction

  // ---------------------------------------------------------------- core side
  typedef enum logic [2:0] {
    CPU_LOAD   = 3'd0,  // addr = shared virtual address
    CPU_STORE  = 3'd1,  // addr, data
    CPU_MALLOC = 3'd2,  // mem, data = size
    CPU_FREE   = 3'd3,  // addr
    CPU_COPY   = 3'd4,  // mem, addr, data = page count
    CPU_MOVE   = 3'd5   // mem, addr, data = page count
  } cpu_op_e;

  typedef struct packed {
    cpu_op_e     op;
    logic [31:0] mem;
    logic [31:0] addr;
    logic [31:0] data;
  } cpu_req_t;

  typedef struct packed {
    logic        err;    // TLB miss on an unallocated page or sleeping module
    logic [31:0] data;   // load data or primitive result
  } cpu_rsp_t;

  // ---------------------------------------------------------------- node map
  typedef enum logic [2:0] {
    R_NONE = 3'd0, R_PE = 3'd1, R_SM = 3'd2, R_MMU = 3'd3,
    R_L2 = 3'd4, R_MM = 3'd5, R_IC = 3'd6
  } role_e;

  // Role of each mesh position for 1, 2 or 3 shared memory modules.
  function automatic role_e node_role(int unsigned n_sm, int unsigned node);
    role_e m1 [16] = '{R_PE, R_PE, R_PE, R_MMU,
                       R_PE, R_SM, R_PE, R_L2,
                       R_PE, R_PE, R_PE, R_MM,
                       R_IC, R_NONE, R_NONE, R_NONE};
    role_e m2 [16] = '{R_MMU, R_PE, R_PE, R_PE,
                       R_PE, R_SM, R_SM, R_PE,
                       R_PE, R_PE, R_PE, R_L2,
                       R_IC, R_MM, R_NONE, R_NONE};
    role_e m3 [16] = '{R_MMU, R_PE, R_PE, R_MM,
                       R_PE, R_SM, R_SM, R_PE,
                       R_PE, R_SM, R_PE, R_L2,
                       R_IC, R_PE, R_PE, R_NONE};
    if (node >= NUM_NODES) return R_NONE;
    case (n_sm)
      1:       return m1[node];
      2:       return m2[node];
      default: return m3[node];
    endcase
  endfunction

  // Node holding the k-th IP of a role (counted in node order).
  function automatic int unsigned role_node(int unsigned n_sm, role_e r, int unsigned k);
    int unsigned cnt = 0;
    for (int unsigned n = 0; n < NUM_NODES; n++) begin
      if (node_role(n_sm, n) == r) begin
        if (cnt == k) return n;
        cnt++;
      end
    end
    return 0;
  endfunction

  // Index of a node among the nodes of the same role.
  function automatic int unsigned role_index(int unsigned n_sm, int unsigned node);
    int unsigned cnt = 0;
    for (int unsigned n = 0; n < node; n++)
      if (node_role(n_sm, n) == node_role(n_sm, node)) cnt++;
    return cnt;
  endfunction

  function automatic bit node_present(int unsigned n_sm, int unsigned node);
    return node_role(n_sm, node) != R_NONE;
  endfunction

  // Table-based routing contents: output port at router `cur` for packets to
  // `dst`. X (column) first; where the X neighbour has no router, Y first.
  function automatic logic [2:0] route_port(int unsigned n_sm, int unsigned cur, int unsigned dst);
    int unsigned cr = cur / MESH_COLS, cc = cur % MESH_COLS;
    int unsigned dr = dst / MESH_COLS, dc = dst % MESH_COLS;
    if (cur == dst) return 3'(PORT_LOCAL);
    if (dc > cc && node_present(n_sm, cur + 1)) return 3'(PORT_E);
    if (dc < cc && node_present(n_sm, cur - 1)) return 3'(PORT_W);
    if (dr > cr) return 3'(PORT_S);
    return 3'(PORT_N);
  endfunction

  // Pages of the shared space held by module m when `total` pages are spread
  // over n_sm modules.
  function automatic int unsigned sm_pages(int unsigned total, int unsigned n_sm, int unsigned m);
    return total / n_sm + ((m < total % n_sm) ? 1 : 0);
  endfunction

endpackage
