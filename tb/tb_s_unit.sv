// tb_s_unit: the state-update pipeline against four real Tiles.
// The tag mats of all eight caches and the index mats are preloaded through
// the Tiles' processor ports with tags and line states drawn from a small
// pool of addresses, so that snoops hit often. Then random read misses,
// write misses, coherence snoops, tag writes and index reads are fed into the
// S-Unit, several in flight at once, under random output back-pressure. A
// reference model of the caches (tags, states, R bits) predicts for every
// request the snoop results (remote hit, remote dirty, the cache chosen as
// source, dirty victim), the calls the decision table makes, the state to
// install, the victim address and, for index reads, the word read. At the end
// every tag mat's state and R bit is read back and compared with the model.
// Requests enter in order and each sees the updates of those before it.
module tb_s_unit;
  import sm_pkg::*;
  localparam int MW = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  mat_req_t s_req [NUM_TILES][MATS];
  mat_rsp_t mat_rsp [NUM_TILES][MATS];
  mat_req_t d_idle [MATS];
  mat_req_t proc_req [NUM_TILES][PROC_PORTS][MATS];
  logic [MATS-1:0] proc_gnt [NUM_TILES][PROC_PORTS];
  logic [1:0] imcn [NUM_TILES];
  logic out_valid, out_ready;
  pc_msg_t out_msg;
  int checks = 0, failures = 0;

  // reference model
  logic [31:0] m_tag [NUM_PROCS][4];
  logic [1:0]  m_st  [NUM_PROCS][4];
  logic        m_r   [NUM_PROCS][4];
  logic [31:0] m_idx [NUM_TILES][8];
  pc_msg_t expq [$];
  int n_c2c = 0, n_miss = 0, n_wb = 0, n_coh_data = 0, n_idx = 0;

  s_unit dut (.clk, .rst_n, .cfg, .in_valid, .in_msg, .in_ready, .tile_req(s_req), .tile_rsp(mat_rsp),
              .out_valid, .out_msg, .out_ready);

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    sm_tile #(.MAT_WORDS(MW)) u_tile (.clk, .rst_n, .s_req(s_req[t]), .d_req(d_idle), .proc_req(proc_req[t]),
                                      .proc_gnt(proc_gnt[t]), .mat_rsp(mat_rsp[t]), .imcn(imcn[t]));
  end

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  function automatic logic [31:0] addr_of(input int set, input int tg);
    return {18'(32'h2000 + tg), 9'(set), 5'($urandom_range(31))};
  endfunction

  task automatic clear_proc();
    for (int t = 0; t < NUM_TILES; t++)
      for (int p = 0; p < PROC_PORTS; p++)
        for (int m = 0; m < MATS; m++) proc_req[t][p][m] = MAT_IDLE;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // expected calls of one request, in the model's order
  task automatic expect_call(input pc_msg_t m, input unit_e u, input sub_e s);
    pc_msg_t e;
    e = m; e.dst = u; e.typ = s;
    expq.push_back(e);
  endtask

  task automatic model(input pc_msg_t m);
    int c, set, tt;
    logic rh, rd, vd;
    int peer;
    pc_msg_t e;
    c = m.proc; set = m.addr[5 +: 2]; tt = tile_of(m.proc);
    e = m; e.peer = 0;
    case (m.typ)
      S_READ_MISS, S_WRITE_MISS, S_SNOOP: begin
        rh = 0; rd = 0; peer = -1;
        vd = (m.typ != S_SNOOP) && (m_st[c][set] == ST_M);
        for (int k = 0; k < NUM_PROCS; k++)
          if ((m.typ == S_SNOOP || k != c) && m_tag[k][set][31:TAG_LSB] == m.addr[31:TAG_LSB] && m_st[k][set] != ST_I) begin
            rh = 1;
            if (peer < 0) peer = k;
          end
        for (int k = NUM_PROCS - 1; k >= 0; k--)
          if ((m.typ == S_SNOOP || k != c) && m_tag[k][set][31:TAG_LSB] == m.addr[31:TAG_LSB] && m_st[k][set] == ST_M) begin
            rd = 1; peer = k;
          end
        if (m.typ != S_SNOOP) e.data = {m_tag[c][set][31:TAG_LSB], m.addr[TAG_LSB-1:5], 5'b0};
        e.peer = (peer < 0) ? 3'd0 : 3'(peer);
        // state updates
        for (int k = 0; k < NUM_PROCS; k++)
          if ((m.typ == S_SNOOP || k != c) && m_tag[k][set][31:TAG_LSB] == m.addr[31:TAG_LSB]) begin
            if (m.typ == S_READ_MISS) m_st[k][set] = (m_st[k][set] == ST_M) ? ST_I : (m_st[k][set] == ST_I) ? ST_I : ST_S;
            else m_st[k][set] = ST_I;
          end
        if (m.typ != S_SNOOP) begin m_st[c][set] = ST_I; m_r[c][set] = 1; end
        if (m.typ == S_SNOOP) begin
          if (rd) begin expect_call(e, U_D, D_LINE_READ); n_coh_data++; end
          else expect_call(e, U_N, N_COH_REPLY);
        end else if (!rh) begin
          n_miss++;
          expect_call(e, U_N, N_CACHE_MISS);
          if (vd) begin expect_call(e, U_D, D_WRITEBACK); n_wb++; end
        end else begin
          n_c2c++;
          e.st = (m.typ == S_WRITE_MISS || rd) ? ST_M : ST_S;
          expect_call(e, U_D, vd ? D_WB_C2C : D_C2C);
        end
      end
      S_TAG_WRITE: begin
        m_tag[c][set] = {m.addr[31:TAG_LSB], 14'b0}; m_st[c][set] = m.st; m_r[c][set] = 0;
        expect_call(e, U_P, P_REPLY); expect_call(e, U_T, T_DONE);
      end
      default: begin // S_INDEX_READ
        e.addr = m_idx[tt][m.data[2:0]]; n_idx++;
        expect_call(e, U_DMA, DMA_ADDR);
      end
    endcase
  endtask

  // output side
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    pc_msg_t e;
    if (expq.size() == 0) begin checks++; failures++; $display("FAIL unexpected output"); end
    else begin
      e = expq.pop_front();
      chk("call dst", 64'(out_msg.dst), 64'(e.dst));
      chk("call typ", 64'(out_msg.typ), 64'(e.typ));
      chk("tid", 64'(out_msg.tid), 64'(e.tid));
      chk("addr", 64'(out_msg.addr), 64'(e.addr));
      if (e.typ == D_C2C || e.typ == D_WB_C2C || e.typ == D_LINE_READ) chk("source cache", 64'(out_msg.peer), 64'(e.peer));
      if (e.typ == D_C2C || e.typ == D_WB_C2C) chk("state to install", 64'(out_msg.st), 64'(e.st));
      if (e.typ == N_CACHE_MISS || e.typ == D_WRITEBACK || e.typ == D_WB_C2C) chk("victim", 64'(out_msg.data), 64'(e.data));
    end
  end

  initial begin
    cfg = '0; in_valid = '0; out_ready = 0;
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int m = 0; m < MATS; m++) d_idle[m] = MAT_IDLE;
    clear_proc();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // preload tags, states and index entries
    for (int c = 0; c < NUM_PROCS; c++)
      for (int set = 0; set < 4; set++) begin
        clear_proc();
        m_tag[c][set] = {18'(32'h2000 + $urandom_range(2)), 14'b0};
        m_st[c][set] = 2'($urandom());
        m_r[c][set] = 0;
        proc_req[tile_of(3'(c))][0][tag_mat(3'(c))] = '{en: 1, we_data: 1, rmw_en: 1, state_map: {4{m_st[c][set]}},
            meta_clr: 8'hFC, row: 10'(set), wdata: m_tag[c][set], default: '0};
        @(posedge clk); #1;
      end
    for (int t = 0; t < NUM_TILES; t++)
      for (int r = 0; r < 8; r++) begin
        clear_proc();
        m_idx[t][r] = $urandom();
        proc_req[t][1][IDX_MAT] = '{en: 1, we_data: 1, row: 10'(r), wdata: m_idx[t][r], default: '0};
        @(posedge clk); #1;
      end
    clear_proc();
    // random requests from the P, T, D and N inputs
    for (int n = 0; n < 600; n++) begin
      pc_msg_t m;
      int k, s;
      @(posedge clk); #1;
      out_ready = ($urandom_range(3) != 0);
      if (|(in_valid & in_ready_q)) in_valid = '0;
      if (in_valid == '0 && $urandom_range(1)) begin
        k = $urandom_range(9);
        m = '0; m.proc = 3'($urandom()); m.tid = TID_W'($urandom_range(35));
        m.addr = addr_of($urandom_range(3), $urandom_range(2));
        m.st = 2'($urandom_range(1, 3)); m.data = 32'($urandom_range(7));
        m.typ = (k < 3) ? S_READ_MISS : (k < 5) ? S_WRITE_MISS : (k < 6) ? S_SNOOP : (k < 9) ? S_TAG_WRITE : S_INDEX_READ;
        m.dst = U_S;
        s = $urandom_range(NSRC - 1);
        in_msg[s] = m; in_valid[s] = 1;
      end
    end
    @(posedge clk); #1 in_valid = '0; out_ready = 1;
    repeat (40) @(posedge clk);
    chk("all calls made", 64'(expq.size()), 0);
    chk("c2c seen", 64'(n_c2c > 0), 1); chk("miss seen", 64'(n_miss > 0), 1);
    chk("dirty victim seen", 64'(n_wb > 0), 1); chk("dirty snoop seen", 64'(n_coh_data > 0), 1);
    chk("index read seen", 64'(n_idx > 0), 1);
    // read back states
    for (int c = 0; c < NUM_PROCS; c++)
      for (int set = 0; set < 4; set++) begin
        clear_proc();
        proc_req[tile_of(3'(c))][2][tag_mat(3'(c))] = '{en: 1, row: 10'(set), default: '0};
        @(posedge clk); #1;
        clear_proc();
        chk("final state", 64'(mat_rsp[tile_of(3'(c))][tag_mat(3'(c))].rmeta[1:0]), 64'(m_st[c][set]));
        chk("final R bit", 64'(mat_rsp[tile_of(3'(c))][tag_mat(3'(c))].rmeta[META_R_BIT]), 64'(m_r[c][set]));
        chk("final tag", 64'(mat_rsp[tile_of(3'(c))][tag_mat(3'(c))].rdata), 64'(m_tag[c][set]));
      end
    $display("c2c %0d miss %0d wb %0d coh_data %0d idx %0d", n_c2c, n_miss, n_wb, n_coh_data, n_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // acceptance: the model is updated in acceptance order
  logic [NSRC-1:0] in_ready_q;
  always @(negedge clk) begin
    in_ready_q = in_ready;
    if (rst_n) for (int s = 0; s < NSRC; s++) if (in_valid[s] && in_ready[s]) model(in_msg[s]);
  end
endmodule
