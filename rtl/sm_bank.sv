// sm_bank: the RAM of one shared memory module.
//
// WORDS words of 32 bits, one access per cycle: a write stores wdata at
// addr; a read returns the word at addr on rdata in the next cycle. The
// document builds the shared memory from on-chip RAM modules, 512 KB in
// all; the 32-bit word and the one-cycle read are this design's choices.
// Written as an array so that synthesis maps it to a RAM macro.
module sm_bank #(
  parameter int unsigned WORDS = 44032
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [31:0]              wdata,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
