// mshr_file: Miss Status Holding Registers of the protocol controller.
//
// Entries 0..NP-1 track processor requests (cache misses), entries
// NP..NP+NC-1 track coherence requests from the main memory controller.
// Each valid entry holds the line address, the requesting processor and the
// line state to install when the line arrives. NL lookup ports compare a
// line address against all valid entries in the same cycle; the T-Unit uses
// them to hold back a request that conflicts with an outstanding one. The
// lowest free entry of each partition is offered for allocation; alloc writes
// it at the clock edge. Retrieval by id is combinational; release frees the
// entry at the clock edge. An allocation and a release may happen together.
// Partition sizes follow the published configuration (24 + 4); the lookup by
// line address and the allocation order are this design's choices.
module mshr_file
  import sm_pkg::*;
#(
  parameter int NP = NUM_MSHR_P,
  parameter int NC = NUM_MSHR_C,
  parameter int NL = NSRC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [WORD_W-1:0]    lk_addr [NL],
  output logic [NL-1:0]        lk_hit,
  output logic                 free_p_avail,
  output logic [TID_W-1:0]     free_p_id,
  output logic                 free_c_avail,
  output logic [TID_W-1:0]     free_c_id,
  input  logic                 alloc,
  input  logic [TID_W-1:0]     alloc_id,
  input  logic [WORD_W-1:0]    alloc_addr,
  input  logic [2:0]           alloc_proc,
  input  logic [1:0]           alloc_st,
  input  logic [TID_W-1:0]     rd_id,
  output logic                 rd_valid,
  output logic [WORD_W-1:0]    rd_addr,
  output logic [2:0]           rd_proc,
  output logic [1:0]           rd_st,
  input  logic                 release_en,
  input  logic [TID_W-1:0]     release_id,
  output logic [$clog2(NP+NC+1)-1:0] busy_count
);
  localparam int N = NP + NC;

  typedef struct packed {
    logic              valid;
    logic [WORD_W-6:0] line;
    logic [2:0]        proc;
    logic [1:0]        st;
  } mshr_t;

  mshr_t ent [N];

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      lk_hit[l] = 1'b0;
      for (int e = 0; e < N; e++)
        if (ent[e].valid && ent[e].line == lk_addr[l][WORD_W-1:5]) lk_hit[l] = 1'b1;
    end
    free_p_avail = 1'b0;
    free_p_id    = '0;
    for (int e = NP - 1; e >= 0; e--)
      if (!ent[e].valid) begin free_p_avail = 1'b1; free_p_id = TID_W'(e); end
    free_c_avail = 1'b0;
    free_c_id    = '0;
    for (int e = N - 1; e >= NP; e--)
      if (!ent[e].valid) begin free_c_avail = 1'b1; free_c_id = TID_W'(e); end
    rd_valid = 1'b0;
    rd_addr  = '0;
    rd_proc  = '0;
    rd_st    = '0;
    if (int'(rd_id) < N) begin
      rd_valid = ent[rd_id].valid;
      rd_addr  = {ent[rd_id].line, 5'b0};
      rd_proc  = ent[rd_id].proc;
      rd_st    = ent[rd_id].st;
    end
    busy_count = '0;
    for (int e = 0; e < N; e++) busy_count = busy_count + ent[e].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N; e++) ent[e] <= '0;
    end else begin
      if (release_en && int'(release_id) < N) ent[release_id].valid <= 1'b0;
      if (alloc && int'(alloc_id) < N)
        ent[alloc_id] <= '{valid: 1'b1, line: alloc_addr[WORD_W-1:5], proc: alloc_proc, st: alloc_st};
    end
  end
endmodule
