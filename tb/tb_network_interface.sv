// tb_network_interface: two interfaces wired back to back (flit_out of one
// to flit_in of the other) with random stalls on both IP sides. Random
// messages of every opcode must arrive with the sender's node id as source
// and exactly the words their opcode carries; the head/tail flags and the
// packet length (3 + 4 * words flits) are checked on the wire.
module tb_network_interface;
  import dsm_pkg::*;
  logic clk = 0, rst_n = 0;
  msg_t  a_tx, b_rx, b_tx, a_rx;
  logic  a_txv, a_txr, b_rxv, b_rxr, b_txv, b_txr, a_rxv, a_rxr;
  flit_t ab, ba;
  logic  abv, abr, bav, bar;
  int checks = 0, failures = 0;
  msg_t exp_q[$];
  int flits = 0;
  always #5 clk = ~clk;

  network_interface #(.NODE_ID(7)) u_a (
    .clk, .rst_n, .tx_msg(a_tx), .tx_valid(a_txv), .tx_ready(a_txr),
    .rx_msg(a_rx), .rx_valid(a_rxv), .rx_ready(a_rxr),
    .flit_out(ab), .flit_out_valid(abv), .flit_out_ready(abr),
    .flit_in(ba), .flit_in_valid(bav), .flit_in_ready(bar));
  network_interface #(.NODE_ID(9)) u_b (
    .clk, .rst_n, .tx_msg(b_tx), .tx_valid(b_txv), .tx_ready(b_txr),
    .rx_msg(b_rx), .rx_valid(b_rxv), .rx_ready(b_rxr),
    .flit_out(ba), .flit_out_valid(bav), .flit_out_ready(bar),
    .flit_in(ab), .flit_in_valid(abv), .flit_in_ready(abr));

  assign b_txv = 1'b0;
  assign b_tx  = '0;
  assign a_rxr = 1'b1;

  op_e ops [16] = '{OP_SM_RD, OP_SM_WR, OP_SM_SLEEP, OP_SM_WAKE, OP_SM_RDATA, OP_SM_WACK,
                    OP_SM_ERR, OP_MALLOC, OP_FREE, OP_COPY, OP_MOVE, OP_TLB_MISS,
                    OP_MMU_RSP, OP_TLB_FILL, OP_TLB_INV, OP_INV_ACK};

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wire-level checks on the a->b link
  always @(posedge clk) if (rst_n && abv && abr) begin
    flits++;
    if (ab.tail) begin
      msg_t m;
      m = exp_q.size() ? exp_q[$] : '0;
      checks++;
      if (flits != 3 + 4 * int'(op_words(exp_q[0].op))) begin
        failures++;
        $display("FAIL packet length %0d for op %s", flits, exp_q[0].op.name());
      end
      flits = 0;
    end
  end

  // receiver
  initial begin
    b_rxr = 0;
    forever begin
      @(negedge clk);
      b_rxr = ($urandom % 3) != 0;
      #1;
      if (b_rxv && b_rxr) begin
        msg_t e;
        e = exp_q.pop_front();
        checks++;
        if (b_rx !== e) begin
          failures++;
          $display("FAIL got %h exp %h", b_rx, e);
        end
      end
    end
  end

  initial begin
    a_txv = 0; a_tx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      msg_t m, e;
      @(negedge clk);
      m = '0;
      m.dst = node_t'(9);
      m.src = node_t'($urandom);          // overwritten by the NI
      m.op  = ops[$urandom % 16];
      m.a = $urandom; m.b = $urandom; m.c = $urandom;
      e = m;
      e.src = node_t'(7);
      if (op_words(m.op) < 3) e.c = '0;
      if (op_words(m.op) < 2) e.b = '0;
      if (op_words(m.op) < 1) e.a = '0;
      a_tx = m; a_txv = 1;
      @(posedge clk);
      while (!a_txr) @(posedge clk);
      exp_q.push_back(e);
      @(negedge clk);
      a_txv = 0;
      repeat ($urandom % 3) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d messages lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
