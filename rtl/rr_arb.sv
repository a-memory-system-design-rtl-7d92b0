// rr_arb: round-robin arbiter, the arbiter placed in front of each unit.
//
// req is the set of eligible requesters; gnt is one-hot (or zero) and is
// combinational. When advance is high the priority pointer moves past the
// granted requester, so every requester that keeps asking is served within
// N grants. The round-robin policy is this design's choice.
module rr_arb #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr;

  // the first requester at or after ptr, in circular order
  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[(int'(ptr) + k) % N]) begin
        gnt_idx = IW'((int'(ptr) + k) % N);
      end
    end
    if (|req) gnt[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && |req) ptr <= (gnt_idx == IW'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
