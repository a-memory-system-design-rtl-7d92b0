// tb_protocol_controller: directed protocol scenarios through the whole
// controller, with four Tiles attached and the testbench as processors and
// network. Each step checks the network messages the controller sends, the
// replies the processors get and the tag states and data left in the mats:
//   1 read miss to memory: Cache Miss message, refill, line installed in E,
//     reply to the processor;
//   2 read miss that another cache holds in E (same Tile): served cache to
//     cache, no network message, both copies end in S;
//   3 write miss to a line held in S by two caches (other Tile): cache to
//     cache, requester in M, other copies invalid;
//   4 read miss on a line held in M by another cache: ownership migrates,
//     requester in M, holder invalid;
//   5 write miss whose victim is dirty, line not cached elsewhere: Write-back
//     message with the victim's address and data, then Cache Miss and refill;
//   6 coherence request for a line held in M: reply with data, holder
//     invalid; for a line held nowhere: reply without data;
//   7 indexed DMA scatter of two local-memory lines: Scatter messages to the
//     destinations the index memory gives, with the lines' data; the
//     interrupt after the replies;
//   8 two processors missing on the same line at once: the second waits on
//     the first (MSHR conflict) and is then served cache to cache.
module tb_protocol_controller;
  import sm_pkg::*;
  localparam int MW = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NUM_PROCS-1:0] preq_valid, preq_ready, prsp_valid, irq, dma_busy;
  preq_t preq [NUM_PROCS];
  prsp_t prsp [NUM_PROCS];
  logic reg_we;
  logic [2:0] reg_proc;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata;
  mat_req_t s_req [NUM_TILES][MATS], d_req [NUM_TILES][MATS];
  mat_rsp_t mat_rsp [NUM_TILES][MATS];
  mat_req_t proc_req [NUM_TILES][PROC_PORTS][MATS];
  logic [MATS-1:0] proc_gnt [NUM_TILES][PROC_PORTS];
  logic [1:0] imcn [NUM_TILES];
  logic net_out_valid, net_out_ready, net_in_valid, net_in_ready, stat_conflict;
  flit_t net_out, net_in;
  logic [5:0] mshr_busy;
  int checks = 0, failures = 0;

  protocol_controller dut (.clk, .rst_n, .cfg, .preq_valid, .preq, .preq_ready, .prsp_valid, .prsp,
    .reg_we, .reg_proc, .reg_addr, .reg_wdata, .irq, .dma_busy, .s_req, .d_req, .mat_rsp,
    .net_out_valid, .net_out, .net_out_ready, .net_in_valid, .net_in, .net_in_ready, .stat_conflict, .mshr_busy);

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    sm_tile #(.MAT_WORDS(MW)) u_tile (.clk, .rst_n, .s_req(s_req[t]), .d_req(d_req[t]), .proc_req(proc_req[t]),
                                      .proc_gnt(proc_gnt[t]), .mat_rsp(mat_rsp[t]), .imcn(imcn[t]));
  end

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h (t=%0t)", w, g, e, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------------------------------------------------------- network side
  typedef struct { flit_t hdr; logic [31:0] w [8]; int n; } pkt_t;
  pkt_t rxq [$];
  pkt_t cur;
  int conflict_cycles = 0;
  assign net_out_ready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (stat_conflict) conflict_cycles++;
    if (net_out_valid) begin
      if (net_out.head) begin cur.hdr = net_out; cur.n = 0; end
      else begin cur.w[cur.n] = net_out.data; cur.n++; end
      if (net_out.tail) rxq.push_back(cur);
    end
  end

  task automatic send(input flit_t h, input logic with_data, input logic [31:0] d [8]);
    @(posedge clk); #1;
    net_in = h; net_in.head = 1; net_in.tail = !with_data; net_in_valid = 1;
    do @(posedge clk); while (!net_in_ready);
    if (with_data)
      for (int w = 0; w < 8; w++) begin
        #1 net_in.head = 0; net_in.tail = (w == 7); net_in.data = d[w];
        do @(posedge clk); while (!net_in_ready);
      end
    #1 net_in_valid = 0;
  endtask

  task automatic expect_pkt(input string what, input net_e ty, output pkt_t p);
    int n;
    n = 0;
    while (rxq.size() == 0 && n < 300) begin @(posedge clk); n++; end
    if (rxq.size() == 0) begin checks++; failures++; $display("FAIL %s: no message", what); p = cur; return; end
    p = rxq.pop_front();
    chk({what, " message type"}, 64'(p.hdr.ntype), 64'(ty));
  endtask

  // ---------------------------------------------------------------- processor side
  logic [31:0] line_d [logic [31:0]][8];
  function automatic logic [31:0] la(input logic [31:0] a); return {a[31:5], 5'b0}; endfunction

  task automatic miss(input int p, input pmsg_e ty, input logic [31:0] a);
    @(posedge clk); #1;
    preq_valid[p] = 1; preq[p] = '{ptype: ty, addr: a};
    do @(posedge clk); while (!preq_ready[p]);
    #1 preq_valid[p] = 0;
  endtask

  task automatic wait_reply(input int p, input logic [31:0] a);
    int n;
    n = 0;
    while (!(prsp_valid[p] && la(prsp[p].addr) == la(a)) && n < 1000) begin @(posedge clk); n++; end
    chk($sformatf("reply to p%0d", p), 64'(n < 1000), 1);
  endtask

  task automatic clear_proc();
    for (int t = 0; t < NUM_TILES; t++)
      for (int q = 0; q < PROC_PORTS; q++)
        for (int m = 0; m < MATS; m++) proc_req[t][q][m] = MAT_IDLE;
  endtask

  task automatic mat_rd(input int t, input int m, input int row, output mat_rsp_t r);
    @(posedge clk); #1;
    proc_req[t][0][m] = '{en: 1, row: 10'(row), default: '0};
    @(posedge clk); #1;
    clear_proc();
    r = mat_rsp[t][m];
  endtask

  task automatic mat_wr(input int t, input int m, input int row, input logic [31:0] d, input logic [1:0] st);
    @(posedge clk); #1;
    proc_req[t][0][m] = '{en: 1, we_data: 1, rmw_en: 1, state_map: {4{st}}, meta_clr: 8'hFC,
                          row: 10'(row), wdata: d, default: '0};
    @(posedge clk); #1;
    clear_proc();
  endtask

  // state and data of a line in cache p
  task automatic line_chk(input string what, input int p, input logic [31:0] a, input logic [1:0] st, input logic check_data);
    mat_rsp_t r;
    int set;
    set = a[TAG_LSB-1:5];
    mat_rd(tile_of(3'(p)), tag_mat(3'(p)), set, r);
    if (st != ST_I) chk({what, " tag"}, 64'(r.rdata), 64'({a[31:TAG_LSB], 14'b0}));
    if (st != ST_I || r.rdata == {a[31:TAG_LSB], 14'b0}) chk({what, " state"}, 64'(r.rmeta[1:0]), 64'(st));
    if (check_data)
      for (int w = 0; w < 8; w++) begin
        mat_rd(tile_of(3'(p)), data_mat_base(3'(p)) + w % 4, 2 * set + w / 4, r);
        chk({what, " data"}, 64'(r.rdata), 64'(line_d[la(a)][w]));
      end
  endtask

  task automatic refill_for(input pkt_t m);
    flit_t h;
    logic [31:0] d [8];
    for (int w = 0; w < 8; w++) d[w] = $urandom();
    line_d[la(m.hdr.addr)] = d;
    h = '0; h.vc = 1; h.ntype = NET_REFILL; h.tid = m.hdr.tid; h.proc = m.hdr.proc; h.addr = m.hdr.addr;
    repeat (100) @(posedge clk);   // main memory latency
    send(h, 1, d);
  endtask

  // a store by processor p: the line's data changes and the tag state is set to M
  task automatic dirty(input int p, input logic [31:0] a);
    int set;
    set = a[TAG_LSB-1:5];
    for (int w = 0; w < 8; w++) begin
      line_d[la(a)][w] = $urandom();
      mat_wr(tile_of(3'(p)), data_mat_base(3'(p)) + w % 4, 2 * set + w / 4, line_d[la(a)][w], ST_I);
    end
    mat_wr(tile_of(3'(p)), tag_mat(3'(p)), set, {a[31:TAG_LSB], 14'b0}, ST_M);
  endtask

  initial begin
    pkt_t pk;
    logic [31:0] A, B, C, D, V;
    logic [31:0] nod [8];
    cfg = '0; preq_valid = '0; reg_we = 0; reg_proc = 0; reg_addr = 0; reg_wdata = 0; net_in_valid = 0; net_in = '0;
    for (int p = 0; p < NUM_PROCS; p++) preq[p] = '0;
    for (int w = 0; w < 8; w++) nod[w] = 0;
    clear_proc();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // all cache lines invalid
    for (int p = 0; p < NUM_PROCS; p++)
      for (int s = 0; s < 512; s++) mat_wr(tile_of(3'(p)), tag_mat(3'(p)), s, 32'hFFFF_FFFF, ST_I);
    A = 32'h0004_0040; B = 32'h0008_0040; C = 32'h000C_0080; D = 32'h0010_00C0;
    // 1: read miss to memory
    miss(0, PM_READ_MISS, A);
    expect_pkt("1 read miss", NET_READ_MISS, pk);
    chk("1 miss address", 64'(la(pk.hdr.addr)), 64'(A));
    refill_for(pk);
    wait_reply(0, A);
    repeat (5) @(posedge clk);
    line_chk("1 p0", 0, A, ST_E, 1);
    // 2: read miss on a line held in E in the same Tile
    miss(1, PM_READ_MISS, A);
    wait_reply(1, A);
    repeat (5) @(posedge clk);
    chk("2 no network message", 64'(rxq.size()), 0);
    line_chk("2 p1", 1, A, ST_S, 1);
    line_chk("2 p0", 0, A, ST_S, 0);
    // 3: write miss on a line held in S by two caches, from another Tile
    miss(4, PM_WRITE_MISS, A);
    wait_reply(4, A);
    repeat (5) @(posedge clk);
    chk("3 no network message", 64'(rxq.size()), 0);
    line_chk("3 p4", 4, A, ST_M, 1);
    line_chk("3 p0", 0, A, ST_I, 0);
    line_chk("3 p1", 1, A, ST_I, 0);
    // 4: read miss on a line held dirty: ownership migrates
    dirty(4, A);
    miss(6, PM_READ_MISS, A);
    wait_reply(6, A);
    repeat (5) @(posedge clk);
    line_chk("4 p6", 6, A, ST_M, 1);
    line_chk("4 p4", 4, A, ST_I, 0);
    // 5: dirty victim written back (B maps to the same set as A)
    dirty(6, A);
    V = A;
    miss(6, PM_WRITE_MISS, B);
    begin
      pkt_t p1, p2;
      expect_pkt("5 first", NET_READ_MISS, p1);
      expect_pkt("5 write-back", NET_WRITEBACK, p2);
      chk("5 write-back address", 64'(la(p2.hdr.addr)), 64'(V));
      chk("5 write-back length", 64'(p2.n), 8);
      for (int w = 0; w < 8; w++) chk("5 write-back data", 64'(p2.w[w]), 64'(line_d[V][w]));
      refill_for(p1);
    end
    wait_reply(6, B);
    repeat (5) @(posedge clk);
    line_chk("5 p6", 6, B, ST_M, 1);
    // 6: coherence requests
    dirty(6, B);
    begin
      flit_t h;
      h = '0; h.ntype = NET_COH_REQ; h.addr = B;
      send(h, 0, nod);
      expect_pkt("6 reply with data", NET_COH_REPLY, pk);
      chk("6 reply length", 64'(pk.n), 8);
      for (int w = 0; w < 8; w++) chk("6 reply data", 64'(pk.w[w]), 64'(line_d[la(B)][w]));
      repeat (5) @(posedge clk);
      line_chk("6 p6", 6, B, ST_I, 0);
      h.addr = C;
      send(h, 0, nod);
      expect_pkt("6 reply without data", NET_COH_REPLY, pk);
      chk("6 reply length", 64'(pk.n), 0);
    end
    // 7: indexed scatter of two local-memory lines by processor 3
    begin
      logic [31:0] dst [2];
      dst[0] = 32'h4000_0100; dst[1] = 32'h4000_0900;
      for (int e = 0; e < 2; e++) begin
        mat_wr(tile_of(3'd3), IDX_MAT, 5 + e, dst[e], ST_I);
        for (int w = 0; w < 8; w++) begin
          line_d[dst[e]][w] = $urandom();
          mat_wr(tile_of(3'd3), LM_BASE_MAT + w % 4, 2 * (7 + e) + w / 4, line_d[dst[e]][w], ST_I);
        end
      end
      @(posedge clk); #1;
      reg_we = 1; reg_proc = 3; reg_addr = 0; reg_wdata = 7; @(posedge clk); #1;
      reg_addr = 1; reg_wdata = 5; @(posedge clk); #1;
      reg_addr = 2; reg_wdata = 2; @(posedge clk); #1;
      reg_addr = 3; reg_wdata = 1; @(posedge clk); #1;
      reg_we = 0;
      for (int e = 0; e < 2; e++) begin
        flit_t h;
        expect_pkt("7 scatter", NET_SCATTER, pk);
        chk("7 destination", 64'(pk.hdr.addr), 64'(dst[e]));
        for (int w = 0; w < 8; w++) chk("7 data", 64'(pk.w[w]), 64'(line_d[dst[e]][w]));
        chk("7 no interrupt yet", 64'(irq[3]), 0);
        h = '0; h.ntype = NET_SCATTER_REPLY; h.tid = pk.hdr.tid; h.proc = pk.hdr.proc; h.addr = pk.hdr.addr;
        send(h, 0, nod);
      end
      repeat (20) @(posedge clk);
      chk("7 interrupt", 64'(irq), 64'(8'h08));
      chk("7 channel idle", 64'(dma_busy), 0);
    end
    // 8: two misses on one line at once
    begin
      int c0;
      c0 = conflict_cycles;
      fork
        miss(2, PM_READ_MISS, D);
        begin @(posedge clk); miss(3, PM_WRITE_MISS, D); end
      join
      expect_pkt("8 read miss", NET_READ_MISS, pk);
      repeat (20) @(posedge clk);
      chk("8 second miss held back", 64'(rxq.size()), 0);
      refill_for(pk);
      wait_reply(2, D);
      wait_reply(3, D);
      repeat (5) @(posedge clk);
      chk("8 conflict stall seen", 64'(conflict_cycles > c0), 1);
      line_chk("8 p3", 3, D, ST_M, 1);
      line_chk("8 p2", 2, D, ST_I, 0);
      chk("8 MSHRs free", 64'(mshr_busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
