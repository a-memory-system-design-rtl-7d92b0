// p_unit: Processor interface unit. Receives request messages from all the
// processors sharing the controller and passes them to the execution core;
// sends replies back.
//
// Requests: one valid/ready port per processor (cache miss, upgrade miss).
// A round-robin arbiter takes one request per cycle, its message type is
// decoded by a small configurable table into a T-Unit subroutine, and the
// request enters a four-entry queue towards the T-Unit. A type the table
// maps to R_NOP is accepted and dropped.
// Replies: calls into the P-Unit (any subroutine, by default P_REPLY)
// are accepted every cycle, one per cycle, and appear one cycle later as a
// one-cycle pulse on the reply port of the processor named in the message;
// processors always accept replies.
// The message set follows the published processor messages of the shared
// memory model; the encodings and queue depth are this design's.
module p_unit
  import sm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [NUM_PROCS-1:0] preq_valid,
  input  preq_t            preq [NUM_PROCS],
  output logic [NUM_PROCS-1:0] preq_ready,
  output logic [NUM_PROCS-1:0] prsp_valid,
  output prsp_t            prsp [NUM_PROCS],
  // calls to the T-Unit
  output logic             out_valid,
  output pc_msg_t          out_msg,
  input  logic             out_ready,
  // replies requested by other units
  input  logic [NSRC-1:0]  in_valid,
  input  pc_msg_t          in_msg [NSRC],
  output logic [NSRC-1:0]  in_ready
);
  logic [4:0] dtab [8];

  logic [NUM_PROCS-1:0] gnt;
  logic [2:0] gidx;
  logic q_empty, q_full;
  logic [$clog2(5)-1:0] q_cnt_unused, q_free_unused;
  pc_msg_t q_in;

  rr_arb #(.N(NUM_PROCS)) u_arb (.clk, .rst_n, .req(q_full ? '0 : preq_valid), .advance(1'b1),
                                 .gnt, .gnt_idx(gidx));
  assign preq_ready = gnt;

  always_comb begin
    q_in      = '0;
    q_in.dst  = U_T;
    q_in.typ  = dtab[preq[gidx].ptype];
    q_in.proc = gidx;
    q_in.addr = preq[gidx].addr;
  end

  pc_fifo #(.T(pc_msg_t), .DEPTH(4)) u_q (
    .clk, .rst_n, .push(|gnt && q_in.typ != R_NOP), .din(q_in), .pop(out_ready), .head(out_msg),
    .empty(q_empty), .full(q_full), .count(q_cnt_unused), .free(q_free_unused)
  );
  assign out_valid = !q_empty;

  // replies
  logic [NSRC-1:0] rgnt;
  logic [$clog2(NSRC)-1:0] ridx;
  rr_arb #(.N(NSRC)) u_rarb (.clk, .rst_n, .req(in_valid), .advance(1'b1), .gnt(rgnt), .gnt_idx(ridx));
  assign in_ready = rgnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prsp_valid <= '0;
      for (int p = 0; p < NUM_PROCS; p++) prsp[p] <= '0;
    end else begin
      prsp_valid <= '0;
      if (|rgnt) begin
        prsp_valid[in_msg[ridx].proc] <= 1'b1;
        prsp[in_msg[ridx].proc] <= '{tid: in_msg[ridx].tid, addr: in_msg[ridx].addr};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) dtab[k] <= p_default(3'(k));
    end else if (cfg.we && cfg.sel == CFG_P) begin
      dtab[cfg.addr[2:0]] <= cfg.wdata[4:0];
    end
  end
endmodule
