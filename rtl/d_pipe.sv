// d_pipe: one data pipe of the data movement engine, connected to one Tile.
//
// A pipe executes one step of a D-Unit subroutine at a time: it moves one
// 32-byte line between a group of four interleaved mats (word w in mat
// base + w mod 4, row row + w div 4) and a line buffer slot. Stages:
//   AG  the access generator steps through the line, two words per cycle in
//       64-bit mode (two adjacent mats) or one word in 32-bit mode; its
//       configuration memory, indexed by {write, wide}, gives the metadata
//       update and the condition pattern of the access; for a write it
//       reads the line buffer,
//   M1  the access goes to the mats on the pipe's Tile port,
//   M2  the registered mat response returns,
//   CC  read data is written to the line buffer; the condition check
//       compares each word's metadata, masked, with the pattern; after the
//       last word the finished step enters the output queue with the
//       condition result (all words matched).
// An op enters from the input queue only when the output queue has room
// for it and every op in flight. A line takes 4 (64-bit) or 8 (32-bit)
// cycles in AG; the step is in the output queue 3 cycles after its last AG
// cycle. The four stages and the 32/64-bit modes follow the published data
// pipe; the table layout and the condition semantics are this design's.
module d_pipe
  import sm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_wr_t         cfg,
  input  logic [1:0]      cfg_pipe,       // which pipe a CFG_DPIPE write is for
  input  logic [1:0]      pipe_id,
  // input queue
  input  logic            in_push,
  input  d_op_t           in_op,
  output logic            in_full,
  // mats
  output mat_req_t        tile_req [MATS],
  input  mat_rsp_t        tile_rsp [MATS],
  // line buffer
  output logic [TID_W+3:0]       lb_raddr,
  input  logic [1:0][WORD_W-1:0] lb_rdata,
  output logic [1:0]             lb_we,
  output logic [TID_W+3:0]       lb_waddr,
  output logic [1:0][WORD_W-1:0] lb_wdata,
  // finished steps
  output logic            done_valid,
  output d_op_t           done_op,
  output logic            done_cond,
  input  logic            done_pop
);
  typedef struct packed {
    logic              rmw_en;
    logic [META_W-1:0] meta_set;
    logic [META_W-1:0] meta_clr;
    logic [META_W-1:0] cc_mask;
    logic [META_W-1:0] cc_pat;
  } dp_uc_t;

  typedef struct packed {
    logic              valid;
    logic              last;
    d_op_t             op;
    dp_uc_t            uc;
    logic [2:0]        word;
    logic [1:0][WORD_W-1:0] wdata;
  } beat_t;

  typedef struct packed {
    d_op_t op;
    logic  cond;
  } done_t;

  dp_uc_t ucode [4];
  d_op_t  q_head;
  logic   q_empty, q_pop;
  logic [$clog2(5)-1:0] q_cnt_unused, q_free_unused;
  logic [$clog2(5)-1:0] o_free, o_cnt_unused;
  logic   o_empty, o_full_unused;
  done_t  o_head, o_in;

  pc_fifo #(.T(d_op_t), .DEPTH(4)) u_inq (
    .clk, .rst_n, .push(in_push), .din(in_op), .pop(q_pop), .head(q_head),
    .empty(q_empty), .full(in_full), .count(q_cnt_unused), .free(q_free_unused)
  );

  // access generator
  logic       busy;
  d_op_t      cur;
  logic [2:0] word;
  beat_t      ag, s1, s2, s3;
  logic       cond_acc;
  logic [1:0] ops_inflight;
  logic       start;

  assign ops_inflight = 2'(s1.valid && s1.last) + 2'(s2.valid && s2.last) + 2'(s3.valid && s3.last);
  assign start = !busy && !q_empty && (o_free > 3'(ops_inflight) + 3'(1));
  assign q_pop = start;

  assign lb_raddr = busy ? {cur.msg.tid, cur.slot, word} : {q_head.msg.tid, q_head.slot, 3'd0};

  always_comb begin
    d_op_t op;
    op = busy ? cur : q_head;
    ag       = '0;
    ag.valid = busy || start;
    ag.op    = op;
    ag.uc    = ucode[{op.write, op.wide}];
    ag.word  = busy ? word : 3'd0;
    ag.last  = op.wide ? (ag.word == 3'd6) : (ag.word == 3'd7);
    ag.wdata = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      word <= '0;
    end else if (ag.valid) begin
      busy <= !ag.last;
      cur  <= ag.op;
      word <= ag.word + (ag.op.wide ? 3'd2 : 3'd1);
    end
  end

  // M1: drive the mats
  always_comb begin
    for (int m = 0; m < MATS; m++) begin
      mat_req_t r;
      r = MAT_IDLE;
      for (int k = 0; k < 2; k++) begin
        if (s1.valid && (k == 0 || s1.op.wide) &&
            4'(m) == s1.op.base_mat + 4'(s1.word[1:0]) + 4'(k)) begin
          r.en        = 1'b1;
          r.row       = s1.op.row + ROW_W'(s1.word[2]);
          r.we_data   = s1.op.write;
          r.wdata     = s1.wdata[k];
          r.rmw_en    = s1.uc.rmw_en;
          r.state_map = 8'b11_10_01_00;
          r.meta_set  = s1.uc.meta_set;
          r.meta_clr  = s1.uc.meta_clr;
        end
      end
      tile_req[m] = r;
    end
  end

  // metadata of the words returned in M2, carried to CC
  logic [1:0][META_W-1:0] tile_meta_q;

  // CC: line buffer write and condition check
  logic [1:0] cc_ok;
  always_comb begin
    lb_we    = '0;
    lb_waddr = {s3.op.msg.tid, s3.op.slot, s3.word};
    lb_wdata = s3.wdata;
    if (s3.valid && !s3.op.write) lb_we = s3.op.wide ? 2'b11 : 2'b01;
    cc_ok = '1;
    for (int k = 0; k < 2; k++)
      if (k == 0 || s3.op.wide) begin
        cc_ok[k] = ((tile_meta_q[k] & s3.uc.cc_mask) == s3.uc.cc_pat);
      end
    o_in.op   = s3.op;
    o_in.cond = cond_acc && (&cc_ok);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
      tile_meta_q <= '0;
      cond_acc <= 1'b1;
    end else begin
      s1 <= ag;
      s1.wdata <= lb_rdata;
      s2 <= s1;
      s3 <= s2;
      if (s2.valid && !s2.op.write) begin
        for (int k = 0; k < 2; k++) begin
          s3.wdata[k] <= tile_rsp[4'(s2.op.base_mat + 4'(s2.word[1:0]) + 4'(k))].rdata;
        end
      end
      for (int k = 0; k < 2; k++) begin
        tile_meta_q[k] <= tile_rsp[4'(s2.op.base_mat + 4'(s2.word[1:0]) + 4'(k))].rmeta;
      end
      if (s3.valid) cond_acc <= s3.last ? 1'b1 : (cond_acc && (&cc_ok));
    end
  end

  pc_fifo #(.T(done_t), .DEPTH(4)) u_outq (
    .clk, .rst_n, .push(s3.valid && s3.last), .din(o_in), .pop(done_pop), .head(o_head),
    .empty(o_empty), .full(o_full_unused), .count(o_cnt_unused), .free(o_free)
  );

  assign done_valid = !o_empty;
  assign done_op    = o_head.op;
  assign done_cond  = o_head.cond;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 4; k++) ucode[k] <= '0;
    end else if (cfg.we && cfg.sel == CFG_DPIPE && cfg_pipe == pipe_id) begin
      ucode[cfg.addr[1:0]] <= dp_uc_t'(cfg.wdata[$bits(dp_uc_t)-1:0]);
    end
  end
endmodule
