// tb_sm_controller: message-level test of one shared memory module with 2
// pages of 16 words. Checks: accesses while asleep (after reset) return
// OP_SM_ERR; after OP_SM_WAKE, writes are acknowledged and reads return the
// model's data, each reply addressed to the requester; out-of-range
// addresses return an error; OP_SM_SLEEP powers the module down again; the
// reply is offered 2 cycles after the request is taken.
module tb_sm_controller;
  import dsm_pkg::*;
  localparam int PAGES = 2, PW = 16;
  logic clk = 0, rst_n = 0;
  msg_t rx_msg, tx_msg;
  logic rx_valid, rx_ready, tx_valid, tx_ready, sleeping;
  logic [31:0] access_count;
  int checks = 0, failures = 0;
  logic [31:0] model [PAGES*PW];
  always #5 clk = ~clk;

  sm_controller #(.PAGES(PAGES), .PAGE_WORDS(PW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Send one request; wait for the reply (if any) and return it.
  task automatic xact(op_e op, logic [31:0] a, logic [31:0] b, bit want_reply, output msg_t rsp);
    int t0;
    @(negedge clk);
    rx_msg = '0; rx_msg.op = op; rx_msg.a = a; rx_msg.b = b;
    rx_msg.src = node_t'($urandom % 16); rx_msg.dst = 8'd5;
    rx_valid = 1;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    t0 = $time;
    @(negedge clk);
    rx_valid = 0;
    rsp = '0;
    if (want_reply) begin
      while (!tx_valid) @(negedge clk);
      rsp = tx_msg;
      check(($time - t0 + 5) / 10 == 2, $sformatf("reply latency %0d", ($time - t0 + 5) / 10));
      check(tx_msg.dst == rx_msg.src, "reply goes to requester");
      tx_ready = ($urandom % 2);
      while (!tx_ready) begin @(negedge clk); tx_ready = 1; end
      @(posedge clk); @(negedge clk);
      tx_ready = 0;
    end else repeat (2) @(posedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t r;
    rx_valid = 0; rx_msg = '0; tx_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(sleeping, "asleep after reset");
    xact(OP_SM_WR, 32'h8, 32'h1234, 1, r);
    check(r.op == OP_SM_ERR, "write to sleeping module refused");
    xact(OP_SM_WAKE, 0, 0, 0, r);
    check(!sleeping, "awake");
    for (int i = 0; i < PAGES * PW; i++) begin
      model[i] = $urandom;
      xact(OP_SM_WR, 32'(i * 4), model[i], 1, r);
      check(r.op == OP_SM_WACK, "write ack");
    end
    for (int i = 0; i < 200; i++) begin
      int w = $urandom % (PAGES * PW);
      if ($urandom % 2) begin
        model[w] = $urandom;
        xact(OP_SM_WR, 32'(w * 4), model[w], 1, r);
        check(r.op == OP_SM_WACK, "write ack");
      end else begin
        xact(OP_SM_RD, 32'(w * 4), 0, 1, r);
        check(r.op == OP_SM_RDATA && r.a == model[w], $sformatf("read %0d", w));
      end
    end
    xact(OP_SM_RD, 32'(PAGES * PW * 4), 0, 1, r);
    check(r.op == OP_SM_ERR, "out of range");
    xact(OP_SM_SLEEP, 0, 0, 0, r);
    check(sleeping, "asleep again");
    xact(OP_SM_RD, 32'h0, 0, 1, r);
    check(r.op == OP_SM_ERR, "read of sleeping module refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
