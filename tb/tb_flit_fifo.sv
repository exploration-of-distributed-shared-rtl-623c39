// tb_flit_fifo: random pushes and pops against a queue model; checks data
// order, the full/empty flags and that a queue of DEPTH entries accepts
// exactly DEPTH writes without reads.
module tb_flit_fifo;
  localparam int DEPTH = 3, W = 10;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] wr_data, rd_data;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  always #5 clk = ~clk;

  flit_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd_ready = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill to the top
    for (int i = 0; i < DEPTH + 2; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_data = W'(i + 100);
      #1;
      check(wr_ready == (i < DEPTH), $sformatf("ready while filling %0d", i));
      @(posedge clk);
      if (wr_ready) q.push_back(wr_data);
    end
    @(negedge clk); wr_valid = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_valid = $urandom % 2;
      wr_data  = W'($urandom);
      rd_ready = $urandom % 2;
      #1;
      check(rd_valid == (q.size() != 0), "rd_valid");
      check(wr_ready == (q.size() < DEPTH), "wr_ready");
      if (rd_valid) check(rd_data == q[0], "data order");
      @(posedge clk);
      if (rd_valid && rd_ready) void'(q.pop_front());
      if (wr_valid && wr_ready) q.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
