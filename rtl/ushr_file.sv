// ushr_file: Uncached-request Status Holding Registers.
//
// Tracks requests that need no serialization, such as DMA transfers. Entry
// e carries tracking id BASE+e. The lowest free entry is offered for
// allocation; an entry stores the requesting processor (DMA channel), the
// address and the data word of the request. Retrieval is combinational;
// alloc and release take effect at the clock edge. There is no address
// lookup. The number of entries is this design's choice (the published text
// gives none).
module ushr_file
  import sm_pkg::*;
#(
  parameter int N    = NUM_USHR,
  parameter int BASE = NUM_MSHR
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              free_avail,
  output logic [TID_W-1:0]  free_id,
  input  logic              alloc,
  input  logic [TID_W-1:0]  alloc_id,
  input  logic [2:0]        alloc_proc,
  input  logic [WORD_W-1:0] alloc_addr,
  input  logic [WORD_W-1:0] alloc_data,
  input  logic [TID_W-1:0]  rd_id,
  output logic              rd_valid,
  output logic [2:0]        rd_proc,
  output logic [WORD_W-1:0] rd_addr,
  output logic [WORD_W-1:0] rd_data,
  input  logic              release_en,
  input  logic [TID_W-1:0]  release_id
);
  typedef struct packed {
    logic              valid;
    logic [2:0]        proc;
    logic [WORD_W-1:0] addr;
    logic [WORD_W-1:0] data;
  } ushr_t;

  ushr_t ent [N];

  function automatic int idx(input logic [TID_W-1:0] id);
    return int'(id) - BASE;
  endfunction

  always_comb begin
    free_avail = 1'b0;
    free_id    = '0;
    for (int e = N - 1; e >= 0; e--)
      if (!ent[e].valid) begin free_avail = 1'b1; free_id = TID_W'(e + BASE); end
    rd_valid = 1'b0;
    rd_proc  = '0;
    rd_addr  = '0;
    rd_data  = '0;
    if (idx(rd_id) >= 0 && idx(rd_id) < N) begin
      rd_valid = ent[idx(rd_id)].valid;
      rd_proc  = ent[idx(rd_id)].proc;
      rd_addr  = ent[idx(rd_id)].addr;
      rd_data  = ent[idx(rd_id)].data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) ent[e] <= '0;
    end else begin
      if (release_en && idx(release_id) >= 0 && idx(release_id) < N) ent[idx(release_id)].valid <= 1'b0;
      if (alloc && idx(alloc_id) >= 0 && idx(alloc_id) < N)
        ent[idx(alloc_id)] <= '{valid: 1'b1, proc: alloc_proc, addr: alloc_addr, data: alloc_data};
    end
  end
endmodule
