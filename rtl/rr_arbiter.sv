// rr_arbiter: round-robin arbiter for N requesters.
//
// Grants one requester per cycle (combinational one-hot gnt). The search
// starts at the requester after the one granted last, so every requester is
// served within N grants. The pointer moves only when `en` is high (the
// grant is used), which lets a router hold a grant until a packet's tail
// has passed. Round-robin arbitration follows the document; the rotation
// rule (next after the last winner) is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         en,
  output logic [N-1:0] gnt
);
  logic [$clog2(N > 1 ? N : 2)-1:0] ptr;  // highest-priority requester

  always_comb begin
    gnt = '0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [$bits(ptr)-1:0] idx;
      idx = ($bits(ptr))'((int'(ptr) + k) % N);
      if (gnt == '0 && req[idx]) gnt[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) ptr <= ($bits(ptr))'((i + 1) % N);
    end
  end
endmodule
