// tb_d_pipe: one data pipe against a real Tile and a line-buffer model.
// Mats 1..13 are preloaded with random words and line states. Random line
// reads (mats to a line buffer slot) and line writes (slot to mats), in
// 64-bit and 32-bit mode, at random first mats and rows, are queued under
// random completion back-pressure. A reference model checks every word that
// reaches the line buffer and, at the end, every mat word; finished steps
// must leave in order with the operation they belong to. Read and write
// operations use disjoint tracking ids, so no read-after-write hazard through
// the line buffer arises (the D-Unit serializes dependent steps itself).
// The configuration memory is then programmed so that a 64-bit read checks
// that all eight words are in state M and marks them (metadata bit 3); the
// condition result and the marking are checked. Isolated steps check the
// latency: 8 cycles from queueing to completion in 64-bit mode, 12 in 32-bit.
module tb_d_pipe;
  import sm_pkg::*;
  localparam int MW = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic in_push, in_full, done_valid, done_cond, done_pop;
  d_op_t in_op, done_op;
  mat_req_t tile_req [MATS], s_idle [MATS], proc_req [PROC_PORTS][MATS];
  mat_rsp_t tile_rsp [MATS];
  logic [MATS-1:0] proc_gnt [PROC_PORTS];
  logic [1:0] imcn;
  logic [TID_W+3:0] lb_raddr, lb_waddr;
  logic [1:0][31:0] lb_rdata, lb_wdata;
  logic [1:0] lb_we;
  int checks = 0, failures = 0;

  logic [31:0] lb [1024];
  logic [31:0] m_data [MATS][MW];
  logic [7:0]  m_meta [MATS][MW];
  d_op_t expq [$];
  logic  expc [$];
  int cyc = 0;

  d_pipe dut (.clk, .rst_n, .cfg, .cfg_pipe(2'd1), .pipe_id(2'd1), .in_push, .in_op, .in_full,
              .tile_req, .tile_rsp, .lb_raddr, .lb_rdata, .lb_we, .lb_waddr, .lb_wdata,
              .done_valid, .done_op, .done_cond, .done_pop);
  sm_tile #(.MAT_WORDS(MW)) u_tile (.clk, .rst_n, .s_req(s_idle), .d_req(tile_req), .proc_req, .proc_gnt,
                                    .mat_rsp(tile_rsp), .imcn);

  assign lb_rdata[0] = lb[lb_raddr];
  assign lb_rdata[1] = lb[lb_raddr + 1];
  always @(posedge clk) begin
    if (lb_we[0]) lb[lb_waddr] <= lb_wdata[0];
    if (lb_we[1]) lb[lb_waddr + 1] <= lb_wdata[1];
  end
  always @(posedge clk) cyc++;

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int mat_of(input d_op_t o, input int w);
    return o.base_mat + (w % 4);
  endfunction
  function automatic int row_of(input d_op_t o, input int w);
    return o.row + w / 4;
  endfunction

  // reference: apply an op to the model at queueing time (ops run in order)
  function automatic logic model(input d_op_t o, input logic marking);
    logic c;
    c = 1;
    for (int w = 0; w < 8; w++) begin
      if (o.wide || 1) begin end
      if (o.write) m_data[mat_of(o, w)][row_of(o, w)] = lb[{o.msg.tid, o.slot, 3'(w)}];
      else begin
        if (m_meta[mat_of(o, w)][row_of(o, w)][1:0] != ST_M) c = 0;
        if (marking) m_meta[mat_of(o, w)][row_of(o, w)] |= 8'h08;
      end
    end
    return marking ? c : 1'b1;
  endfunction

  logic draining;
  always @(negedge clk) if (rst_n) begin
    if (done_valid && done_pop) begin
      d_op_t e;
      logic ec;
      e = expq.pop_front(); ec = expc.pop_front();
      chk("finished op", 64'(done_op.msg.tid), 64'(e.msg.tid));
      chk("finished op row", 64'(done_op.row), 64'(e.row));
      chk("condition", 64'(done_cond), 64'(ec));
      if (!e.write)
        for (int w = 0; w < 8; w++)
          chk("line read", 64'(lb[{e.msg.tid, e.slot, 3'(w)}]), 64'(m_data_at_queue[{e.msg.tid, e.slot, 3'(w)}]));
    end
  end
  logic [31:0] m_data_at_queue [1024];

  task automatic push(input d_op_t o, input logic marking);
    logic c;
    while (in_full) begin @(posedge clk); #1; end
    in_push = 1; in_op = o;
    c = model(o, marking);
    if (!o.write) for (int w = 0; w < 8; w++) m_data_at_queue[{o.msg.tid, o.slot, 3'(w)}] = m_data[mat_of(o, w)][row_of(o, w)];
    expq.push_back(o); expc.push_back(c);
    @(posedge clk); #1 in_push = 0;
  endtask

  int rd_next = 0;
  function automatic d_op_t rnd_op(input logic wr);
    d_op_t o;
    int b [3];
    b = '{1, 6, 10};
    o = '0;
    o.write = wr; o.wide = $urandom_range(1);
    o.msg.tid = TID_W'(wr ? $urandom_range(18, 35) : (rd_next / 2) % 18);
    o.slot = wr ? 1'($urandom_range(1)) : 1'(rd_next % 2);
    if (!wr) rd_next++;
    o.base_mat = 4'(b[$urandom_range(2)]);
    o.row = ROW_W'($urandom_range(MW / 2 - 1) * 2);
    return o;
  endfunction

  initial begin
    cfg = '0; in_push = 0; in_op = '0; done_pop = 0;
    for (int m = 0; m < MATS; m++) begin
      s_idle[m] = MAT_IDLE;
      for (int p = 0; p < PROC_PORTS; p++) proc_req[p][m] = MAT_IDLE;
    end
    for (int a = 0; a < 1024; a++) begin lb[a] = $urandom(); m_data_at_queue[a] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // preload mats 1..13; every second line entirely in state M
    for (int m = 1; m < 14; m++)
      for (int r = 0; r < MW; r++) begin
        m_data[m][r] = $urandom();
        m_meta[m][r] = ((r / 2) % 2 == 0) ? 8'h03 : 8'(2'($urandom()));
        proc_req[m % 4][m] = '{en: 1, we_data: 1, rmw_en: 1, state_map: {4{m_meta[m][r][1:0]}}, meta_clr: 8'hFC,
                               row: 10'(r), wdata: m_data[m][r], default: '0};
        @(posedge clk); #1 proc_req[m % 4][m] = MAT_IDLE;
      end
    // latency of isolated steps
    for (int wide = 1; wide >= 0; wide--) begin
      d_op_t o;
      int t0;
      done_pop = 0;
      o = rnd_op(0); o.wide = wide[0];
      t0 = cyc;
      push(o, 0);
      while (!done_valid) begin @(posedge clk); #1; end
      chk(wide ? "64-bit step latency" : "32-bit step latency", 64'(cyc - t0), wide ? 8 : 12);
      done_pop = 1;
      @(negedge clk); @(posedge clk); #1 done_pop = 0;
    end
    // random traffic
    fork
      begin
        for (int n = 0; n < 300; n++) push(rnd_op($urandom_range(1)), 0);
      end
      begin
        repeat (3500) begin @(posedge clk); #1 done_pop = $urandom_range(1); end
      end
    join
    done_pop = 1;
    repeat (100) @(posedge clk);
    chk("all steps finished", 64'(expq.size()), 0);
    // condition check and metadata marking through the configuration memory
    @(posedge clk); #1;
    cfg.we = 1; cfg.sel = CFG_DPIPE; cfg.addr = 6'b01;  // {write=0, wide=1}
    cfg.wdata = 64'({1'b1, 8'h08, 8'h00, 8'h03, 8'h03});
    @(posedge clk); #1 cfg.we = 0;
    for (int n = 0; n < 40; n++) begin
      d_op_t o;
      o = rnd_op(0); o.wide = 1;
      push(o, 1);
    end
    repeat (100) @(posedge clk);
    chk("checked steps finished", 64'(expq.size()), 0);
    // read back every mat word and its metadata
    done_pop = 0;
    for (int m = 1; m < 14; m++)
      for (int r = 0; r < MW; r++) begin
        proc_req[0][m] = '{en: 1, row: 10'(r), default: '0};
        @(posedge clk); #1 proc_req[0][m] = MAT_IDLE;
        chk("mat word", 64'(tile_rsp[m].rdata), 64'(m_data[m][r]));
        chk("mat metadata", 64'(tile_rsp[m].rmeta), 64'(m_meta[m][r]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
