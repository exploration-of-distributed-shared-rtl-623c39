// tb_mpsoc_matrix: the Matrix workload (parallel matrix multiplication on
// eight PEs, shared data allocated by the HwMMU with MEM = -1) run on three
// instances of the multiprocessor side by side: with one, two and three
// shared memory modules, i.e. the 13-, 14- and 15-node meshes.
// Checks: every element of C is right in each system, no access fails, and
// the compute phase with the data spread over three modules is not slower
// than with all of it in one module (one module serialises the eight PEs'
// accesses). Prints the compute cycles and the mean cycles per shared access
// of each configuration.
module tb_mpsoc_matrix;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [2:0] done;
  int cyc [3], acc [3], wrong [3], errs [3];
  always #5 clk = ~clk;

  matrix_runner #(.N_SM(1), .N(N)) u_sm1 (.clk, .rst_n, .done(done[0]),
    .compute_cycles(cyc[0]), .accesses(acc[0]), .wrong(wrong[0]), .errors(errs[0]));
  matrix_runner #(.N_SM(2), .N(N)) u_sm2 (.clk, .rst_n, .done(done[1]),
    .compute_cycles(cyc[1]), .accesses(acc[1]), .wrong(wrong[1]), .errors(errs[1]));
  matrix_runner #(.N_SM(3), .N(N)) u_sm3 (.clk, .rst_n, .done(done[2]),
    .compute_cycles(cyc[2]), .accesses(acc[2]), .wrong(wrong[2]), .errors(errs[2]));

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
    wait (done == 3'b111);
    for (int m = 0; m < 3; m++) begin
      $display("%0d shared memories: compute %0d cycles, %0d accesses, %0d.%02d cycles per access per PE",
               m + 1, cyc[m], acc[m], cyc[m] * 8 / acc[m], (cyc[m] * 800 / acc[m]) % 100);
      check(wrong[m] == 0, $sformatf("C correct with %0d SM", m + 1));
      check(errs[m] == 0, $sformatf("no error replies with %0d SM", m + 1));
      check(acc[m] == N * N * (2 * N + 1), "access count");
    end
    check(cyc[2] <= cyc[0], "three modules not slower than one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
