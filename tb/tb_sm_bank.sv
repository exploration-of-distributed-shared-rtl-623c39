// tb_sm_bank: random writes and reads of a small bank against an array
// model; read data must appear one cycle after the read.
module tb_sm_bank;
  localparam int WORDS = 64;
  logic clk = 0;
  logic en, we;
  logic [$clog2(WORDS)-1:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sm_bank #(.WORDS(WORDS)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1; we = $urandom % 2; addr = 6'($urandom); wdata = $urandom;
      @(posedge clk);
      if (we) model[addr] = wdata;
      else begin
        logic [31:0] exp;
        exp = model[addr];
        #1;
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", addr, rdata, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
