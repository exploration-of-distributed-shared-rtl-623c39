// network_interface: packetises the messages of one IP into byte flits for
// the router's local port and rebuilds received packets into messages.
//
// Packet format (one byte per flit): destination node (head flit), source
// node, opcode, then op_words(opcode) 32-bit words a, b, c, most significant
// byte first; the last byte carries the tail flag. Packets are 3 to 15
// flits long.
//
// Transmit: tx_msg is taken (tx_ready high for one cycle) when its packet
// starts; one flit leaves per cycle while the router accepts. Receive: flits
// are shifted in; when the tail arrives the message is presented on rx_msg
// with rx_valid until the IP takes it, and the NI back-pressures the router
// meanwhile. NODE_ID is written into the source field of every packet.
//
// The document says that the NI packets the IPs' service requests and
// adapts the network protocol to the IP's; the packet format, and the use
// of one clock with valid/ready instead of an asynchronous network
// protocol, are this design's choices.
module network_interface
  import dsm_pkg::*;
#(
  parameter int unsigned NODE_ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  // IP side
  input  msg_t  tx_msg,
  input  logic  tx_valid,
  output logic  tx_ready,
  output msg_t  rx_msg,
  output logic  rx_valid,
  input  logic  rx_ready,
  // router local port
  output flit_t flit_out,
  output logic  flit_out_valid,
  input  logic  flit_out_ready,
  input  flit_t flit_in,
  input  logic  flit_in_valid,
  output logic  flit_in_ready
);
  localparam int unsigned MAXB = 3 + 12;

  // ---------------------------------------------------------------- transmit
  logic [MAXB*8-1:0] tx_sh;     // bytes still to send, next one on top
  logic [3:0]        tx_left;   // bytes still to send
  logic              tx_busy;
  logic              tx_first;  // next flit is the head

  function automatic logic [MAXB*8-1:0] pack(msg_t m);
    logic [MAXB*8-1:0] v;
    v = {m.dst, node_t'(NODE_ID), m.op, m.a, m.b, m.c};
    return v;
  endfunction

  assign tx_ready       = !tx_busy;
  assign flit_out_valid = tx_busy;
  assign flit_out.head  = tx_first;
  assign flit_out.tail  = (tx_left == 4'd1);
  assign flit_out.data  = tx_sh[MAXB*8-1 -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy  <= 1'b0;
      tx_left  <= '0;
      tx_sh    <= '0;
      tx_first <= 1'b0;
    end else if (!tx_busy) begin
      if (tx_valid) begin
        tx_busy  <= 1'b1;
        tx_sh    <= pack(tx_msg);
        tx_left  <= 4'(3 + 4 * op_words(tx_msg.op));
        tx_first <= 1'b1;
      end
    end else if (flit_out_ready) begin
      tx_sh    <= tx_sh << 8;
      tx_left  <= tx_left - 1'b1;
      tx_first <= 1'b0;
      if (tx_left == 4'd1) tx_busy <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- receive
  logic [MAXB*8-1:0] rx_sh;     // bytes received so far, last one at bottom
  logic [3:0]        rx_cnt;    // bytes received of the current packet
  logic              rx_full;

  assign flit_in_ready = !rx_full;
  assign rx_valid      = rx_full;

  // Align the received bytes to the full-length layout.
  always_comb begin
    logic [MAXB*8-1:0] v;
    v = rx_sh << (8 * (int'(MAXB) - int'(rx_cnt)));
    rx_msg.dst = v[MAXB*8-1  -: 8];
    rx_msg.src = v[MAXB*8-9  -: 8];
    rx_msg.op  = op_e'(v[MAXB*8-17 -: 8]);
    rx_msg.a   = v[95:64];
    rx_msg.b   = v[63:32];
    rx_msg.c   = v[31:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sh   <= '0;
      rx_cnt  <= '0;
      rx_full <= 1'b0;
    end else if (rx_full) begin
      if (rx_ready) begin
        rx_full <= 1'b0;
        rx_cnt  <= '0;
        rx_sh   <= '0;
      end
    end else if (flit_in_valid) begin
      rx_sh  <= {rx_sh[MAXB*8-9:0], flit_in.data};
      rx_cnt <= flit_in.head ? 4'd1 : rx_cnt + 1'b1;
      if (flit_in.tail) rx_full <= 1'b1;
    end
  end

`ifndef SYNTHESIS
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (flit_out_valid && !flit_out_ready) |=> flit_out_valid);
`endif
endmodule
