// n_unit: Network interface unit, with separate transmitter and receiver.
//
// Transmitter: an arbiter accepts one call at a time; its configuration
// memory, indexed by the subroutine number, gives the network message type,
// the virtual channel (0 request, 1 reply), whether the address comes from
// the message's data field (a victim line address), and whether the line
// in a line buffer slot follows. It sends a head flit, then, for a message
// with data, eight data flits read from the line buffer, one per cycle, and
// may then call another unit (for example to release a coherence MSHR).
// Receiver: decodes the head flit with a second table indexed by the
// network message type, writes the data flits of a message with data into
// line buffer slot 0 of the tracking id the message carries, and after the
// tail flit calls the T-Unit subroutine named by the table. Unknown types
// are dropped.
// Flits use valid/ready; a flit moves when both are high. The split into
// transmitter and receiver and the line buffer access follow the published
// unit; flit format and tables are this design's.
// Virtual-channel priority is adjustable: a CFG_NTX write to address 32 sets
// vc_prio; with bit 1 set, calls for the channel named by bit 0 win the
// transmitter's arbitration over calls for the other channel. Reset value:
// no priority, plain round robin among callers.
// The receive-queue overflow assertion is disabled during reset; verilator
// reports rst_n as used both asynchronously and synchronously (SYNCASYNCNET)
// because of that disable condition. It is a check only and adds no logic.
module n_unit
  import sm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [NSRC-1:0]  in_valid,
  input  pc_msg_t          in_msg [NSRC],
  output logic [NSRC-1:0]  in_ready,
  // network
  output logic             net_out_valid,
  output flit_t            net_out,
  input  logic             net_out_ready,
  input  logic             net_in_valid,
  input  flit_t            net_in,
  output logic             net_in_ready,
  // line buffer
  output logic [TID_W+3:0] lb_raddr,
  input  logic [WORD_W-1:0] lb_rdata,
  output logic             lb_we,
  output logic [TID_W+3:0] lb_waddr,
  output logic [WORD_W-1:0] lb_wdata,
  // calls made by the transmitter and the receiver
  output logic             tx_call_valid,
  output pc_msg_t          tx_call,
  input  logic             tx_call_ready,
  output logic             rx_call_valid,
  output pc_msg_t          rx_call,
  input  logic             rx_call_ready
);
  n_tx_uc_t tx_uc [32];
  n_rx_uc_t rx_uc [16];

  // ---------------------------------------------------------------- transmitter
  logic       tx_busy;
  pc_msg_t    tx_msg;
  n_tx_uc_t   tx_cur;
  logic [3:0] tx_beat;       // 0: head, 1..8: data words
  logic [NSRC-1:0] gnt;
  logic [$clog2(NSRC)-1:0] gidx;
  logic [$clog2(5)-1:0] txq_free;
  logic       tx_last;

  // virtual-channel priority: vc_prio[1] enables it, vc_prio[0] names the
  // channel whose messages are sent first when both are waiting
  logic [1:0]      vc_prio;
  logic [NSRC-1:0] on_pref, tx_req;
  always_comb begin
    for (int i = 0; i < NSRC; i++) on_pref[i] = (tx_uc[in_msg[i].typ].vc == vc_prio[0]);
    tx_req = (vc_prio[1] && |(in_valid & on_pref)) ? (in_valid & on_pref) : in_valid;
  end

  rr_arb #(.N(NSRC)) u_arb (.clk, .rst_n, .req((!tx_busy && txq_free != 0) ? tx_req : '0),
                            .advance(1'b1), .gnt, .gnt_idx(gidx));
  assign in_ready = gnt;

  always_comb begin
    net_out_valid = tx_busy;
    net_out       = '0;
    net_out.vc    = tx_cur.vc;
    net_out.ntype = tx_cur.ntype;
    net_out.tid   = tx_msg.tid;
    net_out.proc  = tx_msg.proc;
    net_out.addr  = tx_cur.addr_from_data ? tx_msg.data : tx_msg.addr;
    net_out.head  = (tx_beat == 4'd0);
    tx_last       = tx_cur.with_data ? (tx_beat == 4'd8) : 1'b1;
    net_out.tail  = tx_last;
    lb_raddr      = {tx_msg.tid, tx_cur.slot, 3'(tx_beat - 4'd1)};
    net_out.data  = (tx_beat == 4'd0) ? tx_msg.data : lb_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0;
      tx_msg  <= '0;
      tx_cur  <= '0;
      tx_beat <= '0;
    end else if (!tx_busy) begin
      if (|gnt) begin
        tx_busy <= 1'b1;
        tx_msg  <= in_msg[gidx];
        tx_cur  <= tx_uc[in_msg[gidx].typ];
        tx_beat <= '0;
      end
    end else if (net_out_ready) begin
      tx_beat <= tx_beat + 4'd1;
      if (tx_last) tx_busy <= 1'b0;
    end
  end

  logic txq_empty, txq_full_unused;
  logic [$clog2(5)-1:0] txq_cnt_unused;
  pc_msg_t txq_in, txq_head;
  always_comb begin
    txq_in     = tx_msg;
    txq_in.dst = tx_cur.call.unit;
    txq_in.typ = tx_cur.call.typ;
  end
  pc_fifo #(.T(pc_msg_t), .DEPTH(4)) u_txq (
    .clk, .rst_n, .push(tx_busy && net_out_ready && tx_last && tx_cur.call.unit != U_NONE),
    .din(txq_in), .pop(tx_call_ready), .head(txq_head), .empty(txq_empty), .full(txq_full_unused),
    .count(txq_cnt_unused), .free(txq_free)
  );
  assign tx_call_valid = !txq_empty;
  assign tx_call       = txq_head;

  // ---------------------------------------------------------------- receiver
  logic     rx_busy;
  flit_t    rx_hdr;
  n_rx_uc_t rx_cur, rx_dec;
  logic [3:0] rx_beat;
  logic     rxq_empty, rxq_full, rxq_push;
  logic [$clog2(5)-1:0] rxq_cnt_unused, rxq_free;
  pc_msg_t  rxq_in, rxq_head;

  assign rx_dec       = rx_uc[net_in.ntype];
  assign net_in_ready = rx_busy || (rxq_free > 1);

  always_comb begin
    flit_t h;
    n_rx_uc_t u;
    h = rx_busy ? rx_hdr : net_in;
    u = rx_busy ? rx_cur : rx_dec;
    rxq_in      = '0;
    rxq_in.dst  = U_T;
    rxq_in.typ  = u.t_typ;
    rxq_in.tid  = h.tid;
    rxq_in.proc = h.proc;
    rxq_in.addr = h.addr;
    rxq_in.data = h.data;
    rxq_push = net_in_valid && net_in_ready && u.valid && net_in.tail;
    lb_we    = rx_busy && net_in_valid && net_in_ready && u.valid;
    lb_waddr = {rx_hdr.tid, 1'b0, 3'(rx_beat)};
    lb_wdata = net_in.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_busy <= 1'b0;
      rx_hdr  <= '0;
      rx_cur  <= '0;
      rx_beat <= '0;
    end else if (net_in_valid && net_in_ready) begin
      if (!rx_busy) begin
        rx_hdr  <= net_in;
        rx_cur  <= rx_dec;
        rx_beat <= '0;
        rx_busy <= !net_in.tail;
      end else begin
        rx_beat <= rx_beat + 4'd1;
        if (net_in.tail) rx_busy <= 1'b0;
      end
    end
  end

  pc_fifo #(.T(pc_msg_t), .DEPTH(4)) u_rxq (
    .clk, .rst_n, .push(rxq_push), .din(rxq_in), .pop(rx_call_ready), .head(rxq_head),
    .empty(rxq_empty), .full(rxq_full), .count(rxq_cnt_unused), .free(rxq_free)
  );
  assign rx_call_valid = !rxq_empty;
  assign rx_call       = rxq_head;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) tx_uc[k] <= ntx_default(5'(k));
      for (int k = 0; k < 16; k++) rx_uc[k] <= nrx_default(4'(k));
      vc_prio <= '0;
    end else if (cfg.we) begin
      if (cfg.sel == CFG_NTX && cfg.addr[5]) vc_prio <= cfg.wdata[1:0];
      if (cfg.sel == CFG_NTX && !cfg.addr[5]) tx_uc[cfg.addr[4:0]] <= n_tx_uc_t'(cfg.wdata[$bits(n_tx_uc_t)-1:0]);
      if (cfg.sel == CFG_NRX) rx_uc[cfg.addr[3:0]] <= n_rx_uc_t'(cfg.wdata[$bits(n_rx_uc_t)-1:0]);
    end
  end

  a_rxq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(rxq_push && rxq_full))
    else $error("n_unit: receive queue overflow");
endmodule
