// flit_fifo: synchronous FIFO queue used for the router input and output
// queues (and wherever a small queue is needed).
//
// DEPTH entries of W bits, valid/ready on both sides. Data written in a cycle
// is visible at the output from the next cycle. wr_ready depends only on the
// fill level, never on rd_ready, so chains of queues (router to router
// around a mesh cycle) form no combinational loop. The
// document makes the queue length configurable with a minimum of one; the
// default of two is this design's choice.
module flit_fifo #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned W     = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] wr_data,
  input  logic         wr_valid,
  output logic         wr_ready,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  input  logic         rd_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;
  logic [AW:0]   count;
  logic          push, pop;

  assign rd_valid = (count != 0);
  assign wr_ready = (count < (AW+1)'(DEPTH));
  assign rd_data  = mem[rp];
  assign pop      = rd_valid && rd_ready;
  assign push     = wr_valid && wr_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= incr(wp);
      if (pop)  rp <= incr(rp);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= wr_data;
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));
`endif
endmodule
