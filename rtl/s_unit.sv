// s_unit: State Update unit. Reads, writes and manipulates the state kept
// with data blocks: cache tags and line states, and single words such as DMA
// index entries.
//
// Four pipeline stages after the input arbiter:
//   AG  the configuration memory, indexed by the subroutine number, selects
//       up to two mat accesses: one to the requester's own mats (probe and
//       evict, tag write, or index read) and one snoop to the tag mats of
//       the other caches, in its own Tile and in all other Tiles at once,
//   M1  the accesses go out on the S port of every Tile concerned; the
//       mats compare tags and update line states with their own RMW logic,
//   M2  the registered mat responses come back and are condensed into the
//       condition bits victim_dirty, remote_hit and remote_dirty and the
//       first cache that hit (the cache-to-cache source),
//   DM  a decision table indexed by {row, condition bits} gives up to two
//       calls into other units, the line state to install and whether the
//       word read becomes the message address,
// followed by the output queue. A request is accepted only when the queue
// can hold it together with everything in flight, so the pipeline never
// stalls; a request takes four cycles from grant to the queue.
// Both configuration memories load the default program at reset and can be
// rewritten through cfg (CFG_S: subroutine table, CFG_SDM: decision table).
// The four stages and the two accesses follow the published S-Unit; the
// access encodings, condition bits and table layout are this design's.
module s_unit
  import sm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [NSRC-1:0]  in_valid,
  input  pc_msg_t          in_msg [NSRC],
  output logic [NSRC-1:0]  in_ready,
  output mat_req_t         tile_req [NUM_TILES][MATS],
  input  mat_rsp_t         tile_rsp [NUM_TILES][MATS],
  output logic             out_valid,
  output pc_msg_t          out_msg,
  input  logic             out_ready
);
  s_uc_t ucode [32];
  s_dm_t dmtab [64];

  typedef struct packed {
    logic    valid;
    pc_msg_t msg;
  } ag_t;

  typedef struct packed {
    logic    valid;
    pc_msg_t msg;
    s_uc_t   uc;
  } m_t;

  typedef struct packed {
    logic              valid;
    pc_msg_t           msg;
    s_uc_t             uc;
    logic              vd, rh, rd;
    logic [2:0]        peer;
    logic [WORD_W-1:0] own_word;
  } dm_t;

  ag_t ag_q;
  m_t  m1_q, m2_q;
  dm_t dm_q, dm_d;

  logic [NSRC-1:0] gnt;
  logic [$clog2(NSRC)-1:0] gidx;
  logic [$clog2(9)-1:0] q_free;
  logic [2:0] inflight;
  logic accept;

  assign inflight = 3'(ag_q.valid) + 3'(m1_q.valid) + 3'(m2_q.valid) + 3'(dm_q.valid);
  assign accept   = (q_free > 4'(inflight));

  rr_arb #(.N(NSRC)) u_arb (.clk, .rst_n, .req(accept ? in_valid : '0), .advance(1'b1), .gnt, .gnt_idx(gidx));
  assign in_ready = gnt;

  function automatic logic [WORD_W-1:0] tag_word(input logic [WORD_W-1:0] a);
    return {a[WORD_W-1:TAG_LSB], {TAG_LSB{1'b0}}};
  endfunction

  // M1: the mat accesses of the request in M1
  mat_req_t snoop_r, own_r;
  logic [3:0] own_mat;
  always_comb begin
    snoop_r = MAT_IDLE;
    snoop_r.en = 1'b1;
    snoop_r.row = ROW_W'(m1_q.msg.addr[TAG_LSB-1:5]);
    snoop_r.wdata = tag_word(m1_q.msg.addr);
    snoop_r.rmw_en = 1'b1;
    snoop_r.rmw_on_match = 1'b1;
    snoop_r.state_map = m1_q.uc.snoop_map;

    own_r = MAT_IDLE;
    own_r.en = (m1_q.uc.own != SO_NONE);
    own_r.row = ROW_W'(m1_q.msg.addr[TAG_LSB-1:5]);
    own_mat = 4'(tag_mat(m1_q.msg.proc));
    case (m1_q.uc.own)
      SO_PROBE: begin
        own_r.rmw_en = 1'b1;
        own_r.state_map = MAP_ALL_I;
        own_r.meta_set[META_R_BIT] = 1'b1;
      end
      SO_TAG_WRITE: begin
        own_r.we_data = 1'b1;
        own_r.wdata = tag_word(m1_q.msg.addr);
        own_r.rmw_en = 1'b1;
        own_r.state_map = {4{m1_q.msg.st}};
        own_r.meta_clr[META_R_BIT] = 1'b1;
      end
      SO_INDEX_READ: begin
        own_r.row = ROW_W'(m1_q.msg.data);
        own_mat = 4'(IDX_MAT);
      end
      default: ;
    endcase
  end

  always_comb begin
    for (int t = 0; t < NUM_TILES; t++) begin
      for (int m = 0; m < MATS; m++) begin
        mat_req_t r;
        r = MAT_IDLE;
        if (m1_q.valid && m1_q.uc.snoop)
          for (int c = 0; c < NUM_PROCS; c++)
            if ((m1_q.uc.snoop_all || c != int'(m1_q.msg.proc)) &&
                int'(tile_of(3'(c))) == t && tag_mat(3'(c)) == m)
              r = snoop_r;
        if (m1_q.valid && own_r.en && int'(tile_of(m1_q.msg.proc)) == t && int'(own_mat) == m)
          r = own_r;
        tile_req[t][m] = r;
      end
    end
  end

  // M2: condense the mat responses into condition bits
  always_comb begin
    logic [1:0] own_t;
    mat_rsp_t r;
    r          = '0;
    dm_d       = '0;
    dm_d.valid = m2_q.valid;
    dm_d.msg   = m2_q.msg;
    dm_d.uc    = m2_q.uc;
    own_t      = tile_of(m2_q.msg.proc);
    if (m2_q.uc.own == SO_INDEX_READ) dm_d.own_word = tile_rsp[own_t][IDX_MAT].rdata;
    else                              dm_d.own_word = tile_rsp[own_t][tag_mat(m2_q.msg.proc)].rdata;
    if (m2_q.uc.own == SO_PROBE)
      dm_d.vd = (tile_rsp[own_t][tag_mat(m2_q.msg.proc)].rmeta[1:0] == ST_M);
    if (m2_q.uc.snoop) begin
      for (int c = NUM_PROCS - 1; c >= 0; c--) begin
        if (m2_q.uc.snoop_all || c != int'(m2_q.msg.proc)) begin
          r = tile_rsp[tile_of(3'(c))][tag_mat(3'(c))];
          if (r.dmatch && r.rmeta[1:0] != ST_I) begin
            dm_d.rh   = 1'b1;
            dm_d.peer = 3'(c);
            if (r.rmeta[1:0] == ST_M) dm_d.rd = 1'b1;
          end
        end
      end
      // prefer a dirty holder as the source
      for (int c = NUM_PROCS - 1; c >= 0; c--) begin
        if (m2_q.uc.snoop_all || c != int'(m2_q.msg.proc)) begin
          r = tile_rsp[tile_of(3'(c))][tag_mat(3'(c))];
          if (r.dmatch && r.rmeta[1:0] == ST_M) dm_d.peer = 3'(c);
        end
      end
    end
  end

  // DM: decision table
  s_dm_t   dec;
  pc_msg_t o_msg;
  always_comb begin
    dec   = dmtab[{dm_q.uc.dm_row, dm_q.rd, dm_q.rh, dm_q.vd}];
    o_msg = dm_q.msg;
    o_msg.peer = dm_q.peer;
    if (dm_q.uc.own == SO_PROBE)
      o_msg.data = {dm_q.own_word[WORD_W-1:TAG_LSB], dm_q.msg.addr[TAG_LSB-1:5], 5'b0};
    if (dec.set_st)       o_msg.st   = dec.st;
    if (dec.addr_from_rd) o_msg.addr = dm_q.own_word;
  end

  pc_outq #(.DEPTH(8)) u_outq (
    .clk, .rst_n,
    .push(dm_q.valid && (dec.call0.unit != U_NONE || dec.call1.unit != U_NONE)),
    .push_msg(o_msg), .push_call0(dec.call0), .push_call1(dec.call1), .free(q_free),
    .out_valid, .out_msg, .out_ready
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ag_q <= '0;
      m1_q <= '0;
      m2_q <= '0;
      dm_q <= '0;
    end else begin
      ag_q <= '{valid: |gnt, msg: in_msg[gidx]};
      m1_q <= '{valid: ag_q.valid, msg: ag_q.msg, uc: ucode[ag_q.msg.typ]};
      m2_q <= m1_q;
      dm_q <= dm_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) ucode[k] <= s_default(5'(k));
      for (int k = 0; k < 64; k++) dmtab[k] <= s_dm_default(6'(k));
    end else if (cfg.we) begin
      if (cfg.sel == CFG_S)   ucode[cfg.addr[4:0]] <= s_uc_t'(cfg.wdata[$bits(s_uc_t)-1:0]);
      if (cfg.sel == CFG_SDM) dmtab[cfg.addr]      <= s_dm_t'(cfg.wdata[$bits(s_dm_t)-1:0]);
    end
  end
endmodule
