// tb_n_unit: network interface, both directions.
// Transmit: random send calls (cache miss, write-back, coherence reply with
// and without data, scatter) arrive on random inputs; the testbench keeps the
// flits each must produce (header with type, channel, id, processor and
// address taken from the message or, for a write-back, from its victim
// field; then eight data flits read from the line buffer slot the
// subroutine names; tail on the last flit) and compares them under random
// network back-pressure. Coherence replies must be followed by a T Coherence
// Done call. The line buffer is modelled as a fixed function of its address.
// Receive: refills (header plus eight data flits), coherence requests and
// scatter replies arrive with random gaps; refill data must be written to
// slot 0 of the packet's id, and every packet must produce its T-Unit call.
// Virtual-channel priority: with each channel preferred in turn, a request
// and a reply offered together must leave in the preferred channel first.
module tb_n_unit;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  logic net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  flit_t net_out, net_in;
  logic [TID_W+3:0] lb_raddr, lb_waddr;
  logic [31:0] lb_rdata, lb_wdata;
  logic lb_we;
  logic tx_call_valid, tx_call_ready, rx_call_valid, rx_call_ready;
  pc_msg_t tx_call, rx_call;
  int checks = 0, failures = 0;

  flit_t exp_flits [$];
  pc_msg_t exp_tx_calls [$], exp_rx_calls [$];
  flit_t in_flits [$];
  logic [31:0] lb_written [1024];
  logic [31:0] lb_exp [1024];
  int n_tx = 0, n_rx = 0;

  n_unit dut (.clk, .rst_n, .cfg, .in_valid, .in_msg, .in_ready,
              .net_out_valid, .net_out, .net_out_ready, .net_in_valid, .net_in, .net_in_ready,
              .lb_raddr, .lb_rdata, .lb_we, .lb_waddr, .lb_wdata,
              .tx_call_valid, .tx_call, .tx_call_ready, .rx_call_valid, .rx_call, .rx_call_ready);

  function automatic logic [31:0] lbf(input logic [TID_W+3:0] a);
    return {22'h2A5A5, a} * 32'd2654435761;
  endfunction
  assign lb_rdata = lbf(lb_raddr);

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [NSRC-1:0] acc = '0;
  always @(posedge clk) begin
    #1;
    in_valid = in_valid & ~acc;
    acc = '0;
    net_out_ready = ($urandom_range(3) != 0);
    tx_call_ready = $urandom_range(1);
    rx_call_ready = $urandom_range(1);
    if (!net_in_valid || net_in_ready_q) begin
      net_in_valid = (in_flits.size() > 0) && ($urandom_range(3) != 0);
      net_in = net_in_valid ? in_flits.pop_front() : '0;
    end
  end
  logic net_in_ready_q;
  always @(negedge clk) net_in_ready_q = net_in_valid && net_in_ready;

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < NSRC; s++) if (in_valid[s] && in_ready[s]) begin
      pc_msg_t m;
      flit_t f;
      logic wd, sl;
      m = in_msg[s];
      acc[s] = 1;
      f = '0; f.head = 1; f.tid = m.tid; f.proc = m.proc; f.data = m.data; f.addr = m.addr;
      wd = 0; sl = 0;
      case (m.typ)
        N_CACHE_MISS:     f.ntype = NET_READ_MISS;
        N_WRITEBACK:      begin f.ntype = NET_WRITEBACK; f.addr = m.data; wd = 1; sl = 1; end
        N_COH_REPLY:      begin f.ntype = NET_COH_REPLY; f.vc = 1; end
        N_COH_REPLY_DATA: begin f.ntype = NET_COH_REPLY; f.vc = 1; wd = 1; end
        default:          begin f.ntype = NET_SCATTER; wd = 1; end
      endcase
      f.tail = !wd;
      exp_flits.push_back(f);
      if (wd) for (int b = 0; b < 8; b++) begin
        flit_t d;
        d = f; d.head = 0; d.tail = (b == 7); d.data = lbf({m.tid, sl, 3'(b)});
        exp_flits.push_back(d);
      end
      if (m.typ == N_COH_REPLY || m.typ == N_COH_REPLY_DATA) begin
        pc_msg_t c;
        c = m; c.dst = U_T; c.typ = T_COH_DONE;
        exp_tx_calls.push_back(c);
      end
    end
    if (net_out_valid && net_out_ready) begin
      flit_t e;
      e = exp_flits.pop_front();
      chk("flit", 64'(net_out != e), 0);
      if (net_out != e) $display("  got %p exp %p", net_out, e);
      if (net_out.tail) n_tx++;
    end
    if (tx_call_valid && tx_call_ready) begin
      pc_msg_t e;
      e = exp_tx_calls.pop_front();
      chk("tx call", 64'(tx_call.typ), 64'(e.typ));
      chk("tx call dst", 64'(tx_call.dst), 64'(e.dst));
      chk("tx call tid", 64'(tx_call.tid), 64'(e.tid));
    end
    if (lb_we) lb_written[lb_waddr] = lb_wdata;
    if (rx_call_valid && rx_call_ready) begin
      pc_msg_t e;
      e = exp_rx_calls.pop_front();
      chk("rx call typ", 64'(rx_call.typ), 64'(e.typ));
      chk("rx call dst", 64'(rx_call.dst), 64'(U_T));
      chk("rx call tid", 64'(rx_call.tid), 64'(e.tid));
      chk("rx call proc", 64'(rx_call.proc), 64'(e.proc));
      chk("rx call addr", 64'(rx_call.addr), 64'(e.addr));
      if (e.typ == T_REFILL)
        for (int b = 0; b < 8; b++) chk("refill data in line buffer", 64'(lb_written[{e.tid, 1'b0, 3'(b)}]), 64'(lb_exp[{e.tid, 1'b0, 3'(b)}]));
      n_rx++;
    end
  end

  initial begin
    int sent_tx, sent_rx;
    cfg = '0; in_valid = '0; net_in_valid = 0; net_in = '0; net_out_ready = 0; tx_call_ready = 0; rx_call_ready = 0;
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int a = 0; a < 1024; a++) begin lb_written[a] = 0; lb_exp[a] = 0; end
    sent_tx = 0; sent_rx = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk); #2;
      if ($urandom_range(1)) begin
        int s;
        s = $urandom_range(NSRC - 1);
        if (!in_valid[s]) begin
          logic [4:0] typs [5];
          typs = '{N_CACHE_MISS, N_WRITEBACK, N_COH_REPLY, N_COH_REPLY_DATA, N_SCATTER};
          in_msg[s] = '0; in_msg[s].dst = U_N; in_msg[s].typ = typs[$urandom_range(4)];
          in_msg[s].tid = TID_W'($urandom_range(35)); in_msg[s].proc = 3'($urandom());
          in_msg[s].addr = $urandom(); in_msg[s].data = $urandom();
          in_valid[s] = 1; sent_tx++;
        end
      end
      if ($urandom_range(3) == 0 && in_flits.size() < 20) begin
        flit_t h;
        pc_msg_t c;
        int k;
        k = $urandom_range(2);
        h = '0; h.head = 1; h.vc = 1; h.tid = TID_W'($urandom_range(35)); h.proc = 3'($urandom());
        h.addr = $urandom(); h.data = $urandom();
        if (k == 0) begin h.tid = TID_W'(sent_rx % 36); end
        h.ntype = (k == 0) ? NET_REFILL : (k == 1) ? NET_COH_REQ : NET_SCATTER_REPLY;
        h.tail = (k != 0);
        in_flits.push_back(h);
        if (k == 0) for (int b = 0; b < 8; b++) begin
          flit_t d;
          d = h; d.head = 0; d.tail = (b == 7); d.data = $urandom();
          lb_exp[{h.tid, 1'b0, 3'(b)}] = d.data;
          in_flits.push_back(d);
        end
        c = '0; c.typ = (k == 0) ? T_REFILL : (k == 1) ? T_READ_EX : T_SCATTER_REPLY;
        c.tid = h.tid; c.proc = h.proc; c.addr = h.addr;
        exp_rx_calls.push_back(c);
        sent_rx++;
      end
    end
    repeat (3000) @(posedge clk);
    // virtual-channel priority: a request-channel and a reply-channel call
    // offered in the same cycle; the preferred channel's must go first
    for (int t = 0; t < 4; t++) begin
      logic pref;
      pref = t[1];
      @(posedge clk); #2;
      cfg.we = 1; cfg.sel = CFG_NTX; cfg.addr = 6'd32; cfg.wdata = {62'd0, 1'b1, pref};
      @(posedge clk); #2;
      cfg.we = 0;
      for (int s = 0; s < 2; s++) begin
        in_msg[s] = '0; in_msg[s].dst = U_N; in_msg[s].tid = TID_W'(s); in_msg[s].proc = 3'(s);
        in_msg[s].typ = ((s == 0) ^ t[0]) ? N_CACHE_MISS : N_COH_REPLY;
        in_msg[s].addr = $urandom(); in_msg[s].data = $urandom();
      end
      in_valid[1:0] = 2'b11; sent_tx += 2;
      do @(negedge clk); while (!net_out_valid);
      chk("preferred virtual channel sent first", 64'(net_out.vc), 64'(pref));
      repeat (100) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    chk("all sent", 64'(n_tx), 64'(sent_tx));
    chk("all received", 64'(n_rx), 64'(sent_rx));
    chk("tx calls made", 64'(exp_tx_calls.size()), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
