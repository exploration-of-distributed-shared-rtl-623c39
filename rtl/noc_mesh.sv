// noc_mesh: the mesh network-on-chip of the multiprocessor.
//
// A MESH_ROWS x MESH_COLS grid; a router is built only at the positions that
// hold an IP in the node map of dsm_pkg for N_SM shared memories (13, 14 or
// 15 of the 16 positions). Each router has five ports: local, north, east,
// south, west; neighbouring routers are linked in both directions, and a
// port that faces a missing router is tied off. Every router gets its own
// routing table, computed at elaboration by dsm_pkg::route_port.
//
// Interface: one local flit port per grid position, valid/ready in both
// directions; the ports of empty positions are ignored and never ready.
// Latency: a flit needs three cycles per router (input queue, crossbar,
// output queue) when the path is free.
//
// The mesh topology, the 5-port routers and the node mapping follow the
// document; the routing rule that fills the tables is this design's choice.
module noc_mesh
  import dsm_pkg::*;
#(
  parameter int unsigned N_SM      = 3,
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  flit_t [NUM_NODES-1:0] loc_in_flit,
  input  logic  [NUM_NODES-1:0] loc_in_valid,
  output logic  [NUM_NODES-1:0] loc_in_ready,
  output flit_t [NUM_NODES-1:0] loc_out_flit,
  output logic  [NUM_NODES-1:0] loc_out_valid,
  input  logic  [NUM_NODES-1:0] loc_out_ready
);
  // Per-router port bundles, indexed [node][port].
  flit_t [NUM_NODES-1:0][4:0] r_in_flit, r_out_flit;
  logic  [NUM_NODES-1:0][4:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;

  function automatic logic [3*NUM_NODES-1:0] table_for(int unsigned cur);
    logic [3*NUM_NODES-1:0] t = '0;
    for (int unsigned d = 0; d < NUM_NODES; d++)
      t[3*d +: 3] = route_port(N_SM, cur, d);
    return t;
  endfunction

  // Neighbour of node n in direction p (or n itself when there is none).
  function automatic int unsigned nbr(int unsigned n, int unsigned p);
    int unsigned r = n / MESH_COLS, c = n % MESH_COLS;
    case (p)
      PORT_N:  return (r > 0)             ? n - MESH_COLS : n;
      PORT_S:  return (r < MESH_ROWS - 1) ? n + MESH_COLS : n;
      PORT_E:  return (c < MESH_COLS - 1) ? n + 1 : n;
      PORT_W:  return (c > 0)             ? n - 1 : n;
      default: return n;
    endcase
  endfunction

  function automatic int unsigned opposite(int unsigned p);
    case (p)
      PORT_N:  return PORT_S;
      PORT_S:  return PORT_N;
      PORT_E:  return PORT_W;
      PORT_W:  return PORT_E;
      default: return PORT_LOCAL;
    endcase
  endfunction

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    if (node_present(N_SM, n)) begin : g_rt
      noc_router #(
        .P(5), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH),
        .DESTS(NUM_NODES), .ROUTE_TABLE(table_for(n))
      ) u_router (
        .clk, .rst_n,
        .in_flit(r_in_flit[n]), .in_valid(r_in_valid[n]), .in_ready(r_in_ready[n]),
        .out_flit(r_out_flit[n]), .out_valid(r_out_valid[n]), .out_ready(r_out_ready[n])
      );
    end else begin : g_empty
      assign r_in_ready[n]  = '0;
      assign r_out_flit[n]  = '0;
      assign r_out_valid[n] = '0;
    end

    // Local port.
    assign r_in_flit[n][PORT_LOCAL]   = loc_in_flit[n];
    assign r_in_valid[n][PORT_LOCAL]  = loc_in_valid[n] && node_present(N_SM, n);
    assign loc_in_ready[n]            = r_in_ready[n][PORT_LOCAL];
    assign loc_out_flit[n]            = r_out_flit[n][PORT_LOCAL];
    assign loc_out_valid[n]           = r_out_valid[n][PORT_LOCAL];
    assign r_out_ready[n][PORT_LOCAL] = loc_out_ready[n];

    // Links to the four neighbours: the input of port p comes from the
    // neighbour's output on the opposite port.
    for (genvar p = 1; p < 5; p++) begin : g_link
      localparam int unsigned M = nbr(n, p);
      localparam bit LINKED = (M != n) && node_present(N_SM, n) && node_present(N_SM, M);
      if (LINKED) begin : g_on
        assign r_in_flit[n][p]   = r_out_flit[M][opposite(p)];
        assign r_in_valid[n][p]  = r_out_valid[M][opposite(p)];
        assign r_out_ready[n][p] = r_in_ready[M][opposite(p)];
      end else begin : g_off
        assign r_in_flit[n][p]   = '0;
        assign r_in_valid[n][p]  = 1'b0;
        assign r_out_ready[n][p] = 1'b0;
      end
    end
  end
endmodule
