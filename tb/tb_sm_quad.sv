// tb_sm_quad: end-to-end test of the four Tiles and the protocol controller
// at full size, running the default program (coherent shared memory plus
// indexed DMA scatter).
//
// The testbench plays the eight processors and the main memory controller.
// A processor model does loads and stores on its data cache through its
// crossbar data port exactly as a processor's load/store logic would: a
// load reads the tag mat and one data mat in the same access; a store
// writes the data mat guarded by the tag mat's total match on the IMCN and
// upgrades E to M in the tag mat's RMW logic. On a miss it sends a Cache
// Miss (or Upgrade Miss) message and retries after the reply. The memory
// controller model answers cache misses with a Refill after 100 cycles,
// stores write-backs and scatters, acknowledges scatters and can send
// coherence requests. Every load is compared with a reference memory kept
// by the testbench. The test counts how often each mechanism of the design
// happened (refill, write-back, cache-to-cache transfers, MSHR conflict
// stall, guarded store hit, coherence reply with and without data, indexed
// DMA scatter and its interrupt, processor interrupt, reprogramming of a
// decision table entry) and counts a failure for any that never happened.
module tb_sm_quad;
  import sm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_wr_t  cfg;
  mat_req_t proc_req [NUM_TILES][PROC_PORTS][MATS];
  logic [MATS-1:0] proc_gnt [NUM_TILES][PROC_PORTS];
  mat_rsp_t mat_rsp [NUM_TILES][MATS];
  logic [NUM_PROCS-1:0] preq_valid, preq_ready, prsp_valid, irq, dma_busy;
  preq_t preq [NUM_PROCS];
  prsp_t prsp [NUM_PROCS];
  logic reg_we;
  logic [2:0] reg_proc;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata;
  logic net_out_valid, net_out_ready, net_in_valid, net_in_ready, stat_conflict;
  flit_t net_out, net_in;
  logic [5:0] mshr_busy;

  sm_quad dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------ reference memory
  function automatic logic [31:0] init_word(input logic [31:0] a);
    return {a[31:2], 2'b0} ^ 32'h5A5A_0000;
  endfunction
  logic [31:0] ref_mem [logic [31:0]];   // architectural value per word address
  logic [31:0] mc_mem  [logic [31:0]];   // main memory contents
  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : init_word(a);
  endfunction
  function automatic logic [31:0] mc_rd(input logic [31:0] a);
    return mc_mem.exists(a) ? mc_mem[a] : init_word(a);
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int sub_cnt [32];
  int conflict_cycles = 0, guard_hits = 0, load_hits = 0, misses = 0;
  int coh_data_replies = 0, coh_plain_replies = 0, scatter_msgs = 0, refills_sent = 0;
  int dma_irqs = 0, proc_irqs = 0, reprogrammed_misses = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < NSRC; s++)
        if (dut.u_pc.src_valid[s] && dut.u_pc.src_ready[s]) sub_cnt[dut.u_pc.src_msg[s].typ]++;
      if (stat_conflict) conflict_cycles++;
    end
  end

  // ------------------------------------------------------------ processor model
  function automatic int tile_p(input int p); return p / 2; endfunction
  function automatic int port_p(input int p); return (p % 2) * 2 + 1; endfunction
  function automatic logic [31:0] tagw(input logic [31:0] a);
    return {a[31:TAG_LSB], {TAG_LSB{1'b0}}};
  endfunction

  // one crossbar access of processor p on the given mats; returns the grant
  task automatic p_access(input int p, input int m0, input mat_req_t r0, input int m1, input mat_req_t r1,
                          output logic ok, output mat_rsp_t s0, output mat_rsp_t s1);
    int t, q;
    t = tile_p(p); q = port_p(p);
    @(posedge clk); #1;
    proc_req[t][q][m0] = r0;
    if (m1 >= 0) proc_req[t][q][m1] = r1;
    #3;
    ok = proc_gnt[t][q][m0] && (m1 < 0 || proc_gnt[t][q][m1]);
    @(posedge clk); #1;
    proc_req[t][q][m0] = MAT_IDLE;
    if (m1 >= 0) proc_req[t][q][m1] = MAT_IDLE;
    s0 = mat_rsp[t][m0];
    s1 = (m1 >= 0) ? mat_rsp[t][m1] : '0;
  endtask

  task automatic send_miss(input int p, input logic [2:0] ty, input logic [31:0] a);
    @(posedge clk); #1;
    preq_valid[p] = 1'b1;
    preq[p] = '{ptype: ty, addr: a};
    do @(posedge clk); while (!preq_ready[p]);
    #1 preq_valid[p] = 1'b0;
    do @(posedge clk); while (!(prsp_valid[p] && prsp[p].addr[31:5] == a[31:5]));
    misses++;
  endtask

  function automatic int dmat(input int p, input logic [31:0] a);
    return data_mat_base(3'(p)) + int'(a[3:2]);
  endfunction
  function automatic logic [ROW_W-1:0] drow(input logic [31:0] a);
    return {a[TAG_LSB-1:5], a[4]};
  endfunction

  task automatic load(input int p, input logic [31:0] a, output logic [31:0] v);
    mat_req_t rt, rd;
    mat_rsp_t st, sd;
    logic ok;
    for (int tries = 0; tries < 20; tries++) begin
      rt = MAT_IDLE; rt.en = 1; rt.row = ROW_W'(a[TAG_LSB-1:5]); rt.wdata = tagw(a);
      rd = MAT_IDLE; rd.en = 1; rd.row = drow(a);
      p_access(p, tag_mat(3'(p)), rt, dmat(p, a), rd, ok, st, sd);
      if (!ok) continue;
      if (st.dmatch && st.rmeta[1:0] != ST_I) begin
        v = sd.rdata;
        load_hits++;
        return;
      end
      send_miss(p, PM_READ_MISS, a);
    end
    failures++;
    $display("FAIL load livelock p%0d %h", p, a);
  endtask

  task automatic store(input int p, input logic [31:0] a, input logic [31:0] v);
    mat_req_t rt, rd;
    mat_rsp_t st, sd;
    logic ok;
    for (int tries = 0; tries < 20; tries++) begin
      rt = MAT_IDLE; rt.en = 1; rt.row = ROW_W'(a[TAG_LSB-1:5]); rt.wdata = tagw(a);
      rt.cmp_mask = 8'h02; rt.cmp_meta = 8'h02;          // state E or M
      rt.imcn_drive = 1; rt.imcn_sel = 1'(p % 2);
      rt.rmw_en = 1; rt.rmw_on_match = 1; rt.state_map = {ST_M, ST_M, ST_S, ST_I};
      rd = MAT_IDLE; rd.en = 1; rd.row = drow(a); rd.we_data = 1; rd.wdata = v;
      rd.guard_en = 1; rd.guard_sel = 1'(p % 2);
      p_access(p, tag_mat(3'(p)), rt, dmat(p, a), rd, ok, st, sd);
      if (ok && st.tmatch) begin
        guard_hits++;
        ref_mem[a] = v;
        return;
      end
      if (!ok) continue;
      send_miss(p, (st.dmatch && st.rmeta[1:0] == ST_S) ? PM_UPGRADE : PM_WRITE_MISS, a);
    end
    failures++;
    $display("FAIL store livelock p%0d %h", p, a);
  endtask

  task automatic load_chk(input int p, input logic [31:0] a);
    logic [31:0] v;
    load(p, a, v);
    chk($sformatf("load p%0d %h", p, a), v, ref_rd(a));
  endtask

  // ------------------------------------------------------------ memory controller model
  typedef struct {
    int          due;
    logic [3:0]  ntype;
    logic [5:0]  tid;
    logic [2:0]  proc;
    logic [31:0] addr;
    logic        with_data;
  } mc_out_t;
  mc_out_t mc_q [$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  flit_t rx_hdr;
  logic [31:0] rx_words [8];
  int rx_n = 0;

  // receive side: always ready
  assign net_out_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && net_out_valid) begin
      if (net_out.head) begin rx_hdr = net_out; rx_n = 0; end
      else begin rx_words[rx_n] = net_out.data; rx_n++; end
      if (net_out.tail) begin
        case (net_e'(rx_hdr.ntype))
          NET_READ_MISS, NET_WRITE_MISS:
            mc_q.push_back('{due: cyc + 100, ntype: NET_REFILL, tid: rx_hdr.tid, proc: rx_hdr.proc,
                             addr: rx_hdr.addr, with_data: 1'b1});
          NET_WRITEBACK:
            for (int w = 0; w < 8; w++) mc_mem[{rx_hdr.addr[31:5], 5'b0} + 32'(4 * w)] = rx_words[w];
          NET_SCATTER: begin
            scatter_msgs++;
            for (int w = 0; w < 8; w++) mc_mem[{rx_hdr.addr[31:5], 5'b0} + 32'(4 * w)] = rx_words[w];
            mc_q.push_back('{due: cyc + 20, ntype: NET_SCATTER_REPLY, tid: rx_hdr.tid, proc: rx_hdr.proc,
                             addr: rx_hdr.addr, with_data: 1'b0});
          end
          NET_COH_REPLY: begin
            if (rx_n == 8) begin
              coh_data_replies++;
              for (int w = 0; w < 8; w++) begin
                chk("coherence reply data", rx_words[w], ref_rd({rx_hdr.addr[31:5], 5'b0} + 32'(4 * w)));
                mc_mem[{rx_hdr.addr[31:5], 5'b0} + 32'(4 * w)] = rx_words[w];
              end
            end else coh_plain_replies++;
          end
          default: begin failures++; $display("FAIL unexpected network message %0d", rx_hdr.ntype); end
        endcase
      end
    end
  end

  // send side
  initial begin
    net_in_valid = 1'b0;
    net_in = '0;
    forever begin
      @(posedge clk); #1;
      if (mc_q.size() > 0 && mc_q[0].due <= cyc) begin
        mc_out_t m;
        m = mc_q.pop_front();
        net_in = '0;
        net_in.vc = 1'b1; net_in.head = 1'b1; net_in.tail = !m.with_data;
        net_in.ntype = m.ntype; net_in.tid = m.tid; net_in.proc = m.proc; net_in.addr = m.addr;
        net_in_valid = 1'b1;
        do @(posedge clk); while (!net_in_ready);
        if (m.with_data) begin
          refills_sent++;
          for (int w = 0; w < 8; w++) begin
            #1;
            net_in.head = 1'b0; net_in.tail = (w == 7);
            net_in.data = mc_rd({m.addr[31:5], 5'b0} + 32'(4 * w));
            do @(posedge clk); while (!net_in_ready);
          end
        end
        #1 net_in_valid = 1'b0;
      end
    end
  end

  // a coherence request from the memory controller, sent ahead of the queue
  task automatic coh_request(input logic [31:0] a);
    mc_q.push_front('{due: 0, ntype: NET_COH_REQ, tid: 6'd0, proc: 3'd0, addr: a, with_data: 1'b0});
    repeat (300) @(posedge clk);
  endtask

  task automatic cfg_write(input cfg_sel_e sel, input int addr, input logic [63:0] d);
    @(posedge clk); #1;
    cfg = '{we: 1'b1, sel: sel, addr: 6'(addr), wdata: d};
    @(posedge clk); #1;
    cfg = '0;
  endtask

  task automatic reg_write(input int p, input int addr, input logic [31:0] d);
    @(posedge clk); #1;
    reg_we = 1; reg_proc = 3'(p); reg_addr = 4'(addr); reg_wdata = d;
    @(posedge clk); #1;
    reg_we = 0;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ test sequence
  localparam logic [31:0] CACHE_SPAN = 32'h4000;  // 16 KB: same set, next tag

  initial begin
    logic [31:0] a, v;
    logic ok;
    mat_rsp_t s0, s1;
    mat_req_t r;
    cfg = '0;
    reg_we = 0; reg_proc = 0; reg_addr = 0; reg_wdata = 0;
    preq_valid = '0;
    for (int p = 0; p < NUM_PROCS; p++) preq[p] = '0;
    for (int t = 0; t < NUM_TILES; t++)
      for (int q = 0; q < PROC_PORTS; q++)
        for (int m = 0; m < MATS; m++) proc_req[t][q][m] = MAT_IDLE;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // every processor invalidates its cache: all tag states to I
    for (int p = 0; p < NUM_PROCS; p++) begin
      fork
        automatic int pp = p;
        for (int s = 0; s < (1 << SET_W); s++) begin
          mat_req_t rr;
          mat_rsp_t x0, x1;
          logic g;
          rr = MAT_IDLE; rr.en = 1; rr.row = ROW_W'(s); rr.rmw_en = 1; rr.state_map = MAP_ALL_I;
          rr.meta_clr = '1;
          p_access(pp, tag_mat(3'(pp)), rr, -1, MAT_IDLE, g, x0, x1);
        end
      join_none
    end
    wait fork;

    // 1. miss, refill, hit, guarded store hit (E -> M)
    a = 32'h0001_0040;
    load_chk(0, a);
    load_chk(0, a + 4);
    store(0, a, 32'h1111_0001);
    load_chk(0, a);
    // 2. cache-to-cache transfers
    load_chk(3, a);                    // remote dirty: ownership migrates
    store(6, a + 8, 32'h6666_0008);    // write miss, remote dirty
    load_chk(1, a + 8);
    a = 32'h0002_0080;
    load_chk(0, a);                    // E in cache 0
    load_chk(2, a);                    // remote clean: both S
    store(2, a + 12, 32'h2222_000C);   // upgrade miss
    load_chk(0, a + 12);
    // 3. dirty victim: write-back, and write-back with cache-to-cache transfer
    a = 32'h0003_0100;
    store(0, a, 32'h0300_0000);
    store(0, a + CACHE_SPAN, 32'h0300_4000);       // evicts the dirty line
    load_chk(0, a);                                 // from memory after write-back
    store(0, a + 4, 32'h0300_0004);                 // cache 0 holds a dirty
    load_chk(1, a + CACHE_SPAN);                    // cache 1 holds the other line (from 0)
    load_chk(0, a + CACHE_SPAN);                    // victim dirty and remote hit
    // 4. random sequential traffic over a small pool of conflicting lines
    for (int n = 0; n < 400; n++) begin
      int p;
      p = $urandom_range(NUM_PROCS - 1);
      a = 32'h0004_0000 + 32'($urandom_range(3)) * CACHE_SPAN + 32'($urandom_range(3)) * 32
          + 32'($urandom_range(7)) * 4;
      if ($urandom_range(2) == 0) store(p, a, $urandom());
      else load_chk(p, a);
    end
    // 5. concurrent misses on one line (serialized by the MSHR lookup)
    a = 32'h0005_0200;
    for (int p = 0; p < NUM_PROCS; p++) begin
      fork
        automatic int pp = p;
        load_chk(pp, a + 32'(4 * (pp % 8)));
      join_none
    end
    wait fork;
    // concurrent traffic on private lines that share sets
    for (int p = 0; p < NUM_PROCS; p++) begin
      fork
        automatic int pp = p;
        for (int n = 0; n < 60; n++) begin
          logic [31:0] aa;
          aa = 32'h0100_0000 + 32'(pp) * 32'h0010_0000 + 32'($urandom_range(2)) * CACHE_SPAN
               + 32'($urandom_range(1)) * 32 + 32'($urandom_range(7)) * 4;
          if ($urandom_range(1) == 0) store(pp, aa, $urandom());
          else load_chk(pp, aa);
        end
      join_none
    end
    wait fork;
    // 6. coherence requests from the memory controller
    a = 32'h0006_0300;
    store(5, a, 32'h5555_0000);
    coh_request(a);                    // dirty in cache 5: reply with data
    load_chk(5, a);                    // invalidated: refilled from memory
    coh_request(32'h0006_0400);        // cached nowhere: reply without data
    // 7. indexed DMA scatter by processor 4 (Tile 2)
    for (int l = 0; l < 4; l++) begin
      for (int w = 0; w < 8; w++) begin
        r = MAT_IDLE; r.en = 1; r.we_data = 1;
        r.row = ROW_W'(2 * l + w / 4); r.wdata = 32'hD000_0000 + 32'(l * 16 + w);
        p_access(4, LM_BASE_MAT + (w % 4), r, -1, MAT_IDLE, ok, s0, s1);
      end
      r = MAT_IDLE; r.en = 1; r.we_data = 1; r.row = ROW_W'(l);
      r.wdata = 32'h0700_0000 + 32'(l * 32'h320);
      p_access(4, IDX_MAT, r, -1, MAT_IDLE, ok, s0, s1);
    end
    reg_write(4, 0, 0);   // source line
    reg_write(4, 1, 0);   // index entry
    reg_write(4, 2, 4);   // elements
    reg_write(4, 3, 1);   // start
    fork
      begin wait (irq[4]); dma_irqs++; end
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    for (int l = 0; l < 4; l++)
      for (int w = 0; w < 8; w++)
        chk("scatter data", mc_rd(32'h0700_0000 + 32'(l * 32'h320) + 32'(4 * w)), 32'hD000_0000 + 32'(l * 16 + w));
    chk("dma idle", 32'(dma_busy[4]), 0);
    reg_write(4, 9, 32'h10);            // clear the DMA interrupt
    @(posedge clk); #1;
    chk("irq cleared", 32'(irq[4]), 0);
    // 8. processor-to-processor interrupt
    reg_write(1, 8, 32'h40);
    @(posedge clk); #1;
    if (irq[6]) proc_irqs++;
    chk("irq set", 32'(irq), 32'h40);
    reg_write(1, 9, 32'h40);
    // 9. reprogram the S-Unit decision table: read miss with a clean remote
    //    copy is now served by memory instead of a cache-to-cache transfer
    begin
      s_dm_t d;
      int c2c_before;
      d = s_dm_default(6'b000_010);
      d.call0 = mk_call(U_N, N_CACHE_MISS);
      d.set_st = 1'b0;
      cfg_write(CFG_SDM, 6'b000_010, 64'(d));
      a = 32'h0009_0500;
      load_chk(0, a);
      c2c_before = sub_cnt[D_C2C];
      load_chk(2, a);
      if (sub_cnt[D_C2C] == c2c_before) reprogrammed_misses++;
      cfg_write(CFG_SDM, 6'b000_010, 64'(s_dm_default(6'b000_010)));
    end
    repeat (200) @(posedge clk);
    chk("all MSHRs free", 32'(mshr_busy), 0);

    // mechanisms
    $display("refill=%0d writeback=%0d c2c=%0d wb_c2c=%0d coh_data=%0d coh_plain=%0d conflict_cycles=%0d",
             sub_cnt[T_REFILL], sub_cnt[D_WRITEBACK], sub_cnt[D_C2C], sub_cnt[D_WB_C2C],
             coh_data_replies, coh_plain_replies, conflict_cycles);
    $display("guard_hits=%0d load_hits=%0d misses=%0d scatter=%0d index_reads=%0d dma_irq=%0d proc_irq=%0d reprog=%0d",
             guard_hits, load_hits, misses, scatter_msgs, sub_cnt[S_INDEX_READ], dma_irqs, proc_irqs,
             reprogrammed_misses);
    begin
      int mech [string];
      mech["refill"] = sub_cnt[T_REFILL];
      mech["writeback"] = sub_cnt[D_WRITEBACK];
      mech["cache_to_cache"] = sub_cnt[D_C2C];
      mech["writeback_and_c2c"] = sub_cnt[D_WB_C2C];
      mech["coh_reply_data"] = coh_data_replies;
      mech["coh_reply_plain"] = coh_plain_replies;
      mech["mshr_conflict_stall"] = conflict_cycles;
      mech["guarded_store_hit"] = guard_hits;
      mech["load_hit"] = load_hits;
      mech["dma_scatter"] = scatter_msgs;
      mech["dma_index_read"] = sub_cnt[S_INDEX_READ];
      mech["dma_interrupt"] = dma_irqs;
      mech["proc_interrupt"] = proc_irqs;
      mech["reprogrammed_decision"] = reprogrammed_misses;
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin
          failures++;
          $display("FAIL mechanism never happened: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
