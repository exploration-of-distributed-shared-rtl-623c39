// tb_rr_arbiter: random requests against a reference round-robin model.
// The model keeps its own priority pointer and predicts the one-hot grant
// every cycle; the pointer moves past the winner when en is high.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic en;
  int checks = 0, failures = 0;
  int ptr = 0;
  always #5 clk = ~clk;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .en, .gnt);

  function automatic logic [N-1:0] model(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      en  = ($urandom % 4) != 0;
      #1;
      checks++;
      if (gnt !== model(req, ptr)) begin
        failures++;
        $display("FAIL cycle %0d req=%b gnt=%b exp=%b", i, req, gnt, model(req, ptr));
      end
      @(posedge clk);
      if (en && req != 0)
        for (int k = 0; k < N; k++) if (model(req, ptr)[k]) begin ptr = (k + 1) % N; break; end
    end
    // Fairness: all requesting, every input granted once in N cycles.
    begin
      logic [N-1:0] seen = '0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk); req = '1; en = 1; #1; seen |= gnt;
        @(posedge clk);
      end
      checks++;
      if (seen != '1) begin failures++; $display("FAIL fairness %b", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
