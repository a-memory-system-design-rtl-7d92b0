// t_unit: Tracking and Serialization unit, the entry point of the
// controller's execution core.
//
// An arbiter picks one request per cycle among the callers (processor
// interface, DMA channels, network receiver and the other units). The
// configuration memory, indexed by the request's subroutine number, says
// what to do with the tracking structures:
//   - allocate an MSHR (processor or coherence partition) or a USHR and
//     store the request's tracking information, returning the tracking id,
//   - retrieve the tracking information of a returning reply by its id,
//     release the register, or both,
//   - optionally look the line address up in the MSHRs first: a request
//     that conflicts with an outstanding one is not granted until the older
//     one is released (serialization),
// and which subroutine of which unit to call next. A request is granted only
// when the register it needs is free and the output queue has room.
// Timing: one cycle from grant to the output queue; the call leaves the
// queue in the next cycle at the earliest.
// The configuration memory is written through cfg (sel CFG_T, addr = entry)
// and loads the default program at reset.
module t_unit
  import sm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [NSRC-1:0]  in_valid,
  input  pc_msg_t          in_msg [NSRC],
  output logic [NSRC-1:0]  in_ready,
  output logic             out_valid,
  output pc_msg_t          out_msg,
  input  logic             out_ready,
  output logic             stat_conflict,   // a request waited on an address conflict
  output logic [5:0]       mshr_busy
);
  t_uc_t ucode [32];

  // tracking structures
  logic [WORD_W-1:0] lk_addr [NSRC];
  logic [NSRC-1:0]   lk_hit;
  logic              fp_av, fc_av, fu_av;
  logic [TID_W-1:0]  fp_id, fc_id, fu_id;
  logic              m_alloc, u_alloc, m_rel, u_rel;
  logic [TID_W-1:0]  alloc_id;
  logic              m_rd_valid, u_rd_valid;
  logic [WORD_W-1:0] m_rd_addr, u_rd_addr, u_rd_data;
  logic [2:0]        m_rd_proc, u_rd_proc;
  logic [1:0]        m_rd_st;
  logic [$clog2(NUM_MSHR+1)-1:0] busy;

  logic [NSRC-1:0]   elig, gnt;
  logic [$clog2(NSRC)-1:0] gidx;
  logic [$clog2(9)-1:0] q_free;
  pc_msg_t           g_msg, o_msg;
  t_uc_t             g_uc;
  logic              fire;

  always_comb begin
    for (int i = 0; i < NSRC; i++) lk_addr[i] = in_msg[i].addr;
  end

  mshr_file u_mshr (
    .clk, .rst_n, .lk_addr, .lk_hit,
    .free_p_avail(fp_av), .free_p_id(fp_id), .free_c_avail(fc_av), .free_c_id(fc_id),
    .alloc(m_alloc), .alloc_id, .alloc_addr(g_msg.addr), .alloc_proc(g_msg.proc), .alloc_st(g_uc.st),
    .rd_id(g_msg.tid), .rd_valid(m_rd_valid), .rd_addr(m_rd_addr), .rd_proc(m_rd_proc), .rd_st(m_rd_st),
    .release_en(m_rel), .release_id(g_msg.tid), .busy_count(busy)
  );

  ushr_file u_ushr (
    .clk, .rst_n, .free_avail(fu_av), .free_id(fu_id),
    .alloc(u_alloc), .alloc_id, .alloc_proc(g_msg.proc), .alloc_addr(g_msg.addr), .alloc_data(g_msg.data),
    .rd_id(g_msg.tid), .rd_valid(u_rd_valid), .rd_proc(u_rd_proc), .rd_addr(u_rd_addr), .rd_data(u_rd_data),
    .release_en(u_rel), .release_id(g_msg.tid)
  );

  assign mshr_busy = 6'(busy);

  // eligibility of every input: resources, serialization and queue space
  always_comb begin
    stat_conflict = 1'b0;
    for (int i = 0; i < NSRC; i++) begin
      t_uc_t u;
      logic res_ok;
      u = ucode[in_msg[i].typ];
      case (u.act)
        TA_ALLOC_MSHR_P: res_ok = fp_av;
        TA_ALLOC_MSHR_C: res_ok = fc_av;
        TA_ALLOC_USHR:   res_ok = fu_av;
        default:         res_ok = 1'b1;
      endcase
      elig[i] = in_valid[i] && res_ok && !(u.lookup && lk_hit[i]) && (q_free != 0);
      if (in_valid[i] && u.lookup && lk_hit[i]) stat_conflict = 1'b1;
    end
  end

  rr_arb #(.N(NSRC)) u_arb (.clk, .rst_n, .req(elig), .advance(1'b1), .gnt, .gnt_idx(gidx));

  assign fire     = |gnt;
  assign in_ready = gnt;

  always_comb begin
    g_msg = in_msg[gidx];
    g_uc  = ucode[g_msg.typ];
    m_alloc = 1'b0; u_alloc = 1'b0; m_rel = 1'b0; u_rel = 1'b0;
    alloc_id = '0;
    o_msg = g_msg;
    if (fire) begin
      case (g_uc.act)
        TA_ALLOC_MSHR_P: begin m_alloc = 1'b1; alloc_id = fp_id; o_msg.tid = fp_id; o_msg.st = g_uc.st; end
        TA_ALLOC_MSHR_C: begin m_alloc = 1'b1; alloc_id = fc_id; o_msg.tid = fc_id; o_msg.st = g_uc.st; end
        TA_ALLOC_USHR:   begin u_alloc = 1'b1; alloc_id = fu_id; o_msg.tid = fu_id; end
        TA_RETRIEVE, TA_RELEASE, TA_RETRIEVE_RELEASE: begin
          if (g_msg.tid < TID_W'(NUM_MSHR)) begin
            if (g_uc.act != TA_RELEASE) begin
              o_msg.proc = m_rd_proc;
              o_msg.addr = m_rd_addr;
              o_msg.st   = m_rd_st;
            end
            m_rel = (g_uc.act != TA_RETRIEVE);
          end else begin
            if (g_uc.act != TA_RELEASE) begin
              o_msg.proc = u_rd_proc;
              o_msg.addr = u_rd_addr;
              o_msg.data = u_rd_data;
            end
            u_rel = (g_uc.act != TA_RETRIEVE);
          end
        end
        default: ;
      endcase
    end
  end

  pc_outq #(.DEPTH(8)) u_outq (
    .clk, .rst_n, .push(fire && g_uc.call.unit != U_NONE), .push_msg(o_msg),
    .push_call0(g_uc.call), .push_call1(NO_CALL), .free(q_free),
    .out_valid, .out_msg, .out_ready
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) ucode[k] <= t_default(5'(k));
    end else if (cfg.we && cfg.sel == CFG_T) begin
      ucode[cfg.addr[4:0]] <= t_uc_t'(cfg.wdata[$bits(t_uc_t)-1:0]);
    end
  end

  // a retrieval must find a live tracking register
  always @(posedge clk) begin
    if (rst_n && fire && (g_uc.act == TA_RETRIEVE || g_uc.act == TA_RETRIEVE_RELEASE))
      assert (g_msg.tid < TID_W'(NUM_MSHR) ? m_rd_valid : u_rd_valid)
        else $error("t_unit: retrieve of a free tracking register %0d", g_msg.tid);
  end
endmodule
