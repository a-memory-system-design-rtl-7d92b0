// tb_d_unit: the data movement engine against four real Tiles.
// The cache data mats and local memories of all Tiles are preloaded with
// random words. Batches of up to four subroutine calls (write-back,
// cache-to-cache, write-back plus cache-to-cache, refill line write, line
// read for a coherence reply, local-memory line read for a scatter) are made
// at once from random inputs, each with its own tracking id and cache set,
// so they run on the four pipes concurrently. A reference model predicts
// what each subroutine leaves in its line buffer slots, what it writes into
// the requester's cache lines, and which calls it makes afterwards, in
// which order. Refill data is written into the line buffer through the
// network port first. Every line written and every line buffer slot filled
// is read back and compared.
module tb_d_unit;
  import sm_pkg::*;
  localparam int MW = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  mat_req_t d_req [NUM_TILES][MATS], s_idle [MATS];
  mat_rsp_t mat_rsp [NUM_TILES][MATS];
  mat_req_t proc_req [NUM_TILES][PROC_PORTS][MATS];
  logic [MATS-1:0] proc_gnt [NUM_TILES][PROC_PORTS];
  logic [1:0] imcn [NUM_TILES];
  logic [TID_W+3:0] n_raddr, n_waddr;
  logic [31:0] n_rdata, n_wdata;
  logic n_we;
  logic out_valid, out_ready;
  pc_msg_t out_msg;
  int checks = 0, failures = 0;

  // model: cache lines (per processor and set) and local-memory lines (per Tile)
  logic [31:0] c_line [NUM_PROCS][16][8];
  logic [31:0] lm_line [NUM_TILES][16][8];
  logic [31:0] lb_exp [NUM_TID][2][8];
  logic        lb_chk [NUM_TID][2];
  pc_msg_t expq [NUM_TID][$];
  int counts [32];
  logic [4:0] lb_typ [NUM_TID];

  d_unit dut (.clk, .rst_n, .cfg, .cfg_pipe(2'd0), .in_valid, .in_msg, .in_ready, .tile_req(d_req), .tile_rsp(mat_rsp),
              .n_raddr, .n_rdata, .n_we, .n_waddr, .n_wdata, .out_valid, .out_msg, .out_ready);

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    sm_tile #(.MAT_WORDS(MW)) u_tile (.clk, .rst_n, .s_req(s_idle), .d_req(d_req[t]), .proc_req(proc_req[t]),
                                      .proc_gnt(proc_gnt[t]), .mat_rsp(mat_rsp[t]), .imcn(imcn[t]));
  end

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  task automatic clear_proc();
    for (int t = 0; t < NUM_TILES; t++)
      for (int p = 0; p < PROC_PORTS; p++)
        for (int m = 0; m < MATS; m++) proc_req[t][p][m] = MAT_IDLE;
  endtask

  // word w of a line: mat base + w mod 4, row 2*line + w div 4
  task automatic mat_write(input int t, input int mat, input int row, input logic [31:0] d);
    clear_proc();
    proc_req[t][0][mat] = '{en: 1, we_data: 1, row: 10'(row), wdata: d, default: '0};
    @(posedge clk); #1 clear_proc();
  endtask
  task automatic mat_read(input int t, input int mat, input int row, output logic [31:0] d);
    clear_proc();
    proc_req[t][0][mat] = '{en: 1, row: 10'(row), default: '0};
    @(posedge clk); #1 clear_proc();
    d = mat_rsp[t][mat].rdata;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic pc_msg_t call_of(input pc_msg_t m, input unit_e u, input sub_e s);
    pc_msg_t e;
    e = m; e.dst = u; e.typ = s;
    return e;
  endfunction

  // what a subroutine does, applied to the model
  task automatic model(input pc_msg_t m);
    int set, p, q, lm;
    set = m.addr[5 +: 4]; p = m.proc; q = m.peer; lm = m.data[3:0];
    counts[m.typ]++;
    lb_typ[m.tid] = m.typ;
    case (m.typ)
      D_WRITEBACK: begin
        lb_exp[m.tid][1] = c_line[p][set]; lb_chk[m.tid][1] = 1;
        expq[m.tid].push_back(call_of(m, U_N, N_WRITEBACK));
      end
      D_C2C: begin
        lb_exp[m.tid][0] = c_line[q][set]; lb_chk[m.tid][0] = 1;
        c_line[p][set] = c_line[q][set];
        expq[m.tid].push_back(call_of(m, U_S, S_TAG_WRITE));
      end
      D_WB_C2C: begin
        lb_exp[m.tid][1] = c_line[p][set]; lb_chk[m.tid][1] = 1;
        lb_exp[m.tid][0] = c_line[q][set]; lb_chk[m.tid][0] = 1;
        c_line[p][set] = c_line[q][set];
        expq[m.tid].push_back(call_of(m, U_S, S_TAG_WRITE));
        expq[m.tid].push_back(call_of(m, U_N, N_WRITEBACK));
      end
      D_LINE_WRITE: begin
        c_line[p][set] = lb_exp[m.tid][0]; lb_chk[m.tid][0] = 1;
        expq[m.tid].push_back(call_of(m, U_S, S_TAG_WRITE));
      end
      D_LINE_READ: begin
        lb_exp[m.tid][0] = c_line[q][set]; lb_chk[m.tid][0] = 1;
        expq[m.tid].push_back(call_of(m, U_N, N_COH_REPLY_DATA));
      end
      default: begin // D_LINE_READ_SCAT
        lb_exp[m.tid][0] = lm_line[tile_of(3'(p))][lm]; lb_chk[m.tid][0] = 1;
        expq[m.tid].push_back(call_of(m, U_N, N_SCATTER));
      end
    endcase
  endtask

  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    if (expq[out_msg.tid].size() == 0) begin checks++; failures++; $display("FAIL unexpected call for id %0d", out_msg.tid); end
    else begin
      pc_msg_t e;
      e = expq[out_msg.tid].pop_front();
      chk("call dst", 64'(out_msg.dst), 64'(e.dst));
      chk("call typ", 64'(out_msg.typ), 64'(e.typ));
      chk("call addr", 64'(out_msg.addr), 64'(e.addr));
      chk("call proc", 64'(out_msg.proc), 64'(e.proc));
    end
  end

  always @(posedge clk) #1 out_ready = ($urandom_range(3) != 0);

  function automatic int pending();
    int n;
    n = 0;
    for (int i = 0; i < NUM_TID; i++) n += expq[i].size();
    return n;
  endfunction

  initial begin
    cfg = '0; in_valid = '0; out_ready = 0; n_we = 0; n_raddr = 0; n_waddr = 0; n_wdata = 0;
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int m = 0; m < MATS; m++) s_idle[m] = MAT_IDLE;
    for (int i = 0; i < 32; i++) counts[i] = 0;
    clear_proc();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // preload 16 lines of every cache and local memory
    for (int p = 0; p < NUM_PROCS; p++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          c_line[p][l][w] = $urandom();
          mat_write(tile_of(3'(p)), data_mat_base(3'(p)) + w % 4, 2 * l + w / 4, c_line[p][l][w]);
        end
    for (int t = 0; t < NUM_TILES; t++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          lm_line[t][l][w] = $urandom();
          mat_write(t, LM_BASE_MAT + w % 4, 2 * l + w / 4, lm_line[t][l][w]);
        end
    for (int batch = 0; batch < 60; batch++) begin
      pc_msg_t calls [4];
      int nb;
      logic [4:0] typs [6];
      typs = '{D_WRITEBACK, D_C2C, D_WB_C2C, D_LINE_WRITE, D_LINE_READ, D_LINE_READ_SCAT};
      for (int i = 0; i < NUM_TID; i++) begin lb_chk[i][0] = 0; lb_chk[i][1] = 0; end
      nb = $urandom_range(1, 4);
      for (int k = 0; k < nb; k++) begin
        pc_msg_t m;
        int set;
        m = '0;
        m.typ = typs[$urandom_range(5)];
        m.tid = TID_W'(k * 9 + $urandom_range(8));
        m.proc = 3'($urandom());
        m.peer = 3'($urandom());
        if (m.peer == m.proc) m.peer = m.proc ^ 3'd1;
        set = batch % 4 * 4 + k;
        m.addr = {18'h2AAAA, 5'b0, 4'(set), 5'($urandom())};
        m.data = 32'($urandom_range(15));
        if (m.typ == D_LINE_WRITE)
          for (int w = 0; w < 8; w++) begin
            lb_exp[m.tid][0][w] = $urandom();
            n_we = 1; n_waddr = {m.tid, 1'b0, 3'(w)}; n_wdata = lb_exp[m.tid][0][w];
            @(posedge clk); #1 n_we = 0;
          end
        calls[k] = m;
      end
      // offer all calls at once, one input each
      for (int k = 0; k < nb; k++) begin in_msg[k + 1] = calls[k]; in_valid[k + 1] = 1; model(calls[k]); end
      while (in_valid != '0) begin
        @(negedge clk);
        for (int s = 0; s < NSRC; s++) if (in_valid[s] && in_ready[s]) begin @(posedge clk); #1 in_valid[s] = 0; end
      end
      for (int w = 0; w < 400 && pending() != 0; w++) @(posedge clk);
      #1 chk("batch finished", 64'(pending()), 0);
      // line buffer slots
      for (int i = 0; i < NUM_TID; i++)
        for (int sl = 0; sl < 2; sl++)
          if (lb_chk[i][sl])
            for (int w = 0; w < 8; w++) begin
              n_raddr = {6'(i), 1'(sl), 3'(w)};
               #1 chk($sformatf("line buffer id %0d slot %0d word %0d after subroutine %0d", i, sl, w, lb_typ[i]), 64'(n_rdata), 64'(lb_exp[i][sl][w]));
            end
      // the requesters' cache lines
      for (int k = 0; k < nb; k++) begin
        int p, set;
        p = calls[k].proc; set = calls[k].addr[5 +: 4];
        for (int w = 0; w < 8; w++) begin
          logic [31:0] d;
          mat_read(tile_of(3'(p)), data_mat_base(3'(p)) + w % 4, 2 * set + w / 4, d);
          chk("cache line", 64'(d), 64'(c_line[p][set][w]));
        end
      end
    end
    for (int i = 0; i < 6; i++) begin
      logic [4:0] typs [6];
      typs = '{D_WRITEBACK, D_C2C, D_WB_C2C, D_LINE_WRITE, D_LINE_READ, D_LINE_READ_SCAT};
      chk("subroutine exercised", 64'(counts[typs[i]] > 0), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
