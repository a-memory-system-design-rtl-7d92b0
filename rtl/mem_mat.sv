// mem_mat: one memory mat, the basic storage element of a Tile.
//
// A mat holds a data array (32-bit words) and a control array (META_W
// metadata bits per word). Each access (mat_req_t) addresses one row, taken
// from the request or, in FIFO mode, from the head/tail pointer logic. The
// stored word is compared with the request's wdata (data comparator) and the
// stored metadata, under cmp_mask, with cmp_meta (metadata comparator); both
// agreeing is the "total match", which the mat can drive onto an IMCN line.
// A data write can be guarded by an IMCN line, so that a tag mat's match
// decides whether the data mats of the same cache write. The read-modify-write
// logic updates the metadata in place: a 4-entry state map on bits [1:0] and
// set/clear masks on the rest, optionally only when the data comparator
// matched (a snoop that degrades or invalidates a hit line).
//
// Timing: the array is read and compared combinationally in the cycle of the
// access (tmatch_now feeds the IMCN in that same cycle); writes and pointer
// updates happen at the clock edge; rdata/rmeta/match are registered and
// visible in the cycle after the access. Reset clears the pointers and the
// output registers; the arrays are not reset (software or the protocol
// initialises them).
//
// The mat organisation (arrays, pointer logic, RMW logic, two comparators,
// total match) follows the published Tile; depth, metadata width, the form of
// the RMW operation and the FIFO status flags are this design's choices.
module mem_mat
  import sm_pkg::*;
#(
  parameter int WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mat_req_t req,
  input  logic     guard_in,     // value of the IMCN line selected by req.guard_sel
  output logic     tmatch_now,   // combinational total match, to the IMCN
  output mat_rsp_t rsp
);
  localparam int AW = $clog2(WORDS);

  logic [WORD_W-1:0] data_arr [WORDS];
  logic [META_W-1:0] ctrl_arr [WORDS];
  logic [AW-1:0]     head, tail;
  logic [AW:0]       fcount;

  logic [AW-1:0]     addr;
  logic [WORD_W-1:0] rd_word;
  logic [META_W-1:0] rd_meta, new_meta;
  logic              dmatch, mmatch, do_wdata, do_rmw, fifo_full, fifo_empty;
  logic [1:0]        old_st;
  logic              push_ok, pop_ok;
  logic [AW:0]       fcount_nxt;

  assign fifo_full  = (fcount == (AW+1)'(WORDS));
  assign fifo_empty = (fcount == '0);

  always_comb begin
    if (req.fifo_push)     addr = tail;
    else if (req.fifo_pop) addr = head;
    else                   addr = AW'(req.row);
    rd_word = data_arr[addr];
    rd_meta = ctrl_arr[addr];
    dmatch  = (rd_word == req.wdata);
    mmatch  = ((rd_meta ^ req.cmp_meta) & req.cmp_mask) == '0;
    tmatch_now = req.en && dmatch && mmatch;

    old_st   = rd_meta[1:0];
    new_meta = (rd_meta & ~req.meta_clr) | req.meta_set;
    new_meta[1:0] = req.state_map[2*old_st +: 2];

    do_wdata = req.en && (req.we_data || (req.fifo_push && !fifo_full)) &&
               (!req.guard_en || guard_in);
    push_ok  = req.en && req.fifo_push && !fifo_full;
    pop_ok   = req.en && req.fifo_pop && !fifo_empty;
    fcount_nxt = fcount + (AW+1)'(push_ok) - (AW+1)'(pop_ok);
    do_rmw   = req.en && req.rmw_en && (!req.rmw_on_match || dmatch);
  end

  always_ff @(posedge clk) begin
    if (do_wdata) data_arr[addr] <= req.wdata;
    if (do_rmw)   ctrl_arr[addr] <= new_meta;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head   <= '0;
      tail   <= '0;
      fcount <= '0;
      rsp    <= '0;
    end else begin
      if (req.en) begin
        rsp.rdata  <= rd_word;
        rsp.rmeta  <= rd_meta;
        rsp.dmatch <= dmatch;
        rsp.tmatch <= tmatch_now;
      end
      if (push_ok) tail <= tail + 1'b1;
      if (pop_ok)  head <= head + 1'b1;
      fcount         <= fcount_nxt;
      rsp.fifo_full  <= (fcount_nxt == (AW+1)'(WORDS));
      rsp.fifo_empty <= (fcount_nxt == '0);
    end
  end
endmodule
