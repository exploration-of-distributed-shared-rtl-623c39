// tb_mpsoc_bfs: the graph-exploration workload (parallel breadth-first
// search over shared queues and a shared level array) run on the 13-node
// mesh with one shared memory and on the 15-node mesh with three, side by
// side. Checks: the level of every vertex matches a sequential search, no
// access fails, and the search with three modules is not slower than with
// one. Prints the cycles and shared accesses of each configuration.
module tb_mpsoc_bfs;
  localparam int V = 64;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [1:0] done;
  int cyc [2], acc [2], wrong [2], errs [2];
  always #5 clk = ~clk;

  bfs_runner #(.N_SM(1), .V(V)) u_sm1 (.clk, .rst_n, .done(done[0]),
    .cycles(cyc[0]), .accesses(acc[0]), .wrong(wrong[0]), .errors(errs[0]));
  bfs_runner #(.N_SM(3), .V(V)) u_sm3 (.clk, .rst_n, .done(done[1]),
    .cycles(cyc[1]), .accesses(acc[1]), .wrong(wrong[1]), .errors(errs[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (done == 2'b11);
    for (int m = 0; m < 2; m++) begin
      $display("%0d shared memories: search %0d cycles, %0d shared accesses",
               2 * m + 1, cyc[m], acc[m]);
      check(wrong[m] == 0, $sformatf("levels correct, %0d wrong", wrong[m]));
      check(errs[m] == 0, "no error replies");
    end
    check(cyc[1] <= cyc[0], "three modules not slower than one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
