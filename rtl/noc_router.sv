// noc_router: wormhole router with input queues, an N x N crossbar and
// output queues, controlled by table-based routing and round-robin
// arbitration.
//
// Pipeline (three stages, one flit per port per cycle):
//   1. a flit arriving on port i is written into input queue i;
//   2. the head flit at the front of an input queue looks up its output port
//      in ROUTE_TABLE (indexed by the destination node in the head byte) and
//      requests that output; each free output grants one input round-robin
//      and stays locked to it until the packet's tail flit has crossed
//      (wormhole switching); a locked input moves one flit per cycle through
//      the crossbar into the output queue;
//   3. the output queue drives the link to the neighbour.
// Links use valid/ready: a flit moves when both are high.
//
// Crossbar, input/output queues, table-based routing, wormhole switching,
// round-robin arbitration and the three stages follow the document. The
// document does not give the queue lengths, the split of work among the
// stages or the number of virtual channels; one channel per link and queues
// of two flits are this design's choices.
module noc_router
  import dsm_pkg::*;
#(
  parameter int unsigned P         = 5,
  parameter int unsigned IN_DEPTH  = 2,
  parameter int unsigned OUT_DEPTH = 2,
  parameter int unsigned DESTS     = NUM_NODES,
  // 3 bits per destination node: the output port (entry d at [3*d +: 3]).
  parameter logic [3*DESTS-1:0] ROUTE_TABLE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  flit_t [P-1:0] in_flit,
  input  logic  [P-1:0] in_valid,
  output logic  [P-1:0] in_ready,
  output flit_t [P-1:0] out_flit,
  output logic  [P-1:0] out_valid,
  input  logic  [P-1:0] out_ready
);
  localparam int unsigned PW = $clog2(P > 1 ? P : 2);

  // ---- stage 1: input queues
  flit_t [P-1:0] iq_flit;
  logic  [P-1:0] iq_valid, iq_pop;

  // ---- stage 3: output queues
  flit_t [P-1:0] oq_flit;
  logic  [P-1:0] oq_push, oq_ready;

  for (genvar i = 0; i < P; i++) begin : g_q
    flit_fifo #(.DEPTH(IN_DEPTH), .W($bits(flit_t))) u_iq (
      .clk, .rst_n,
      .wr_data(in_flit[i]), .wr_valid(in_valid[i]), .wr_ready(in_ready[i]),
      .rd_data(iq_flit[i]), .rd_valid(iq_valid[i]), .rd_ready(iq_pop[i])
    );
    flit_fifo #(.DEPTH(OUT_DEPTH), .W($bits(flit_t))) u_oq (
      .clk, .rst_n,
      .wr_data(oq_flit[i]), .wr_valid(oq_push[i]), .wr_ready(oq_ready[i]),
      .rd_data(out_flit[i]), .rd_valid(out_valid[i]), .rd_ready(out_ready[i])
    );
  end

  // ---- stage 2: routing, arbitration, crossbar
  logic [P-1:0]          out_busy;             // output locked to a packet
  logic [P-1:0][PW-1:0]  out_owner;            // input that holds it
  logic [P-1:0]          in_bound;             // input currently owns an output
  logic [P-1:0][P-1:0]   req;                  // req[o][i]
  logic [P-1:0][P-1:0]   gnt;                  // gnt[o][i]
  logic [P-1:0]          arb_en;

  // Route lookup for the packet at the front of each input queue.
  function automatic logic [2:0] lookup(logic [7:0] dst);
    if (int'(dst) >= int'(DESTS)) return 3'(PORT_LOCAL);
    return ROUTE_TABLE[3*dst +: 3];
  endfunction

  always_comb begin
    in_bound = '0;
    for (int unsigned o = 0; o < P; o++)
      if (out_busy[o]) in_bound[out_owner[o]] = 1'b1;
    req = '0;
    for (int unsigned i = 0; i < P; i++)
      if (iq_valid[i] && iq_flit[i].head && !in_bound[i])
        req[lookup(iq_flit[i].data)][i] = 1'b1;
  end

  for (genvar o = 0; o < P; o++) begin : g_arb
    assign arb_en[o] = !out_busy[o];
    rr_arbiter #(.N(P)) u_arb (
      .clk, .rst_n,
      .req(out_busy[o] ? '0 : req[o]), .en(arb_en[o]), .gnt(gnt[o])
    );
  end

  // Crossbar: a locked output takes one flit from its owner when it has room.
  always_comb begin
    iq_pop  = '0;
    oq_push = '0;
    oq_flit = '0;
    for (int unsigned o = 0; o < P; o++) begin
      oq_flit[o] = iq_flit[out_owner[o]];
      if (out_busy[o] && iq_valid[out_owner[o]] && oq_ready[o]) begin
        oq_push[o]            = 1'b1;
        iq_pop[out_owner[o]]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_busy  <= '0;
      out_owner <= '0;
    end else begin
      for (int unsigned o = 0; o < P; o++) begin
        if (out_busy[o]) begin
          if (oq_push[o] && iq_flit[out_owner[o]].tail) out_busy[o] <= 1'b0;
        end else if (gnt[o] != '0) begin
          out_busy[o] <= 1'b1;
          for (int unsigned i = 0; i < P; i++)
            if (gnt[o][i]) out_owner[o] <= PW'(i);
        end
      end
    end
  end

`ifndef SYNTHESIS
  // A packet always starts with a head flit: a flit without the head bit
  // may only leave an input queue that owns an output.
  for (genvar i = 0; i < P; i++) begin : g_chk
    a_body_needs_owner: assert property (@(posedge clk) disable iff (!rst_n)
      !(iq_valid[i] && !iq_flit[i].head && !in_bound[i]));
  end
`endif
endmodule
