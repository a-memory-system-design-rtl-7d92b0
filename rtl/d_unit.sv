// d_unit: Data movement engine. Moves lines between caches, local memories
// and the line buffers, one data pipe per Tile.
//
// The dispatch stage takes one request per cycle: the continuation of a
// subroutine whose previous step just finished has priority, otherwise the
// input arbiter picks among the callers. The configuration memory, indexed
// by the subroutine number, lists up to three steps (each a line read into
// or a line write out of a line buffer slot, on the requester's own cache,
// the peer cache named by the S-Unit, or the requester's local memory) and
// up to two calls made after the last step. Dispatch turns the current step
// into a pipe operation (Tile, first mat, row) and queues it at that Tile's
// data pipe. When a pipe finishes a step, the completion handler either
// sends the next step back to dispatch, so a block transfer becomes a read
// on the source pipe followed by a write on the destination pipe with the
// data staged in the line buffer, or, after the last step, places the calls
// in the output queue.
// Timing: dispatch to pipe queue in one cycle; see d_pipe for the pipes.
// Four pipes, dispatch, per-pipe queues and the line buffer follow the
// published engine; the step list format is this design's, and the
// processor reply FSM of the published engine is not included (replies are
// calls to the processor interface, see sm_pkg).
module d_unit
  import sm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic [1:0]       cfg_pipe,
  input  logic [NSRC-1:0]  in_valid,
  input  pc_msg_t          in_msg [NSRC],
  output logic [NSRC-1:0]  in_ready,
  output mat_req_t         tile_req [NUM_TILES][MATS],
  input  mat_rsp_t         tile_rsp [NUM_TILES][MATS],
  // line buffer network ports
  input  logic [TID_W+3:0] n_raddr,
  output logic [WORD_W-1:0] n_rdata,
  input  logic             n_we,
  input  logic [TID_W+3:0] n_waddr,
  input  logic [WORD_W-1:0] n_wdata,
  output logic             out_valid,
  output pc_msg_t          out_msg,
  input  logic             out_ready
);
  d_uc_t ucode [32];

  // pipe connections
  logic [NUM_TILES-1:0] p_push, p_full, p_done_valid, p_done_pop, p_done_cond;
  d_op_t p_op;
  d_op_t p_done_op [NUM_TILES];
  logic [TID_W+3:0]       lb_raddr [NUM_TILES];
  logic [1:0][WORD_W-1:0] lb_rdata [NUM_TILES];
  logic [1:0]             lb_we    [NUM_TILES];
  logic [TID_W+3:0]       lb_waddr [NUM_TILES];
  logic [1:0][WORD_W-1:0] lb_wdata [NUM_TILES];

  // ---------------------------------------------------------------- completion handler
  logic [NUM_TILES-1:0] c_gnt;
  logic [1:0]           c_idx;
  d_op_t                c_op;
  d_uc_t                c_uc;
  logic                 c_more, c_fire, cont_valid, cont_taken;
  logic [$clog2(9)-1:0] q_free;
  logic [1:0]           c_next;

  rr_arb #(.N(NUM_TILES)) u_carb (.clk, .rst_n, .req(p_done_valid), .advance(c_fire), .gnt(c_gnt), .gnt_idx(c_idx));

  always_comb begin
    c_op   = p_done_op[c_idx];
    c_uc   = ucode[c_op.msg.typ];
    c_next = c_op.nstep + 2'd1;
    // a step whose condition check failed ends the subroutine without its calls
    c_more = (c_op.nstep != 2'd2) && c_uc.step[c_next].valid && p_done_cond[c_idx];
    cont_valid = |p_done_valid && c_more;
    c_fire = |p_done_valid && (c_more ? cont_taken : (q_free != 0));
    p_done_pop = c_fire ? c_gnt : '0;
  end

  // ---------------------------------------------------------------- dispatch
  logic [NSRC-1:0] e_gnt;
  logic [$clog2(NSRC)-1:0] e_idx;
  pc_msg_t   d_msg;
  logic [1:0] d_stepi;
  d_step_t   d_step;
  logic      d_valid, d_fire;
  logic [1:0] d_tile;

  always_comb begin
    if (cont_valid) begin
      d_msg   = c_op.msg;
      d_stepi = c_next;
      d_valid = 1'b1;
    end else begin
      d_msg   = in_msg[e_idx];
      d_stepi = 2'd0;
      d_valid = |in_valid;
    end
    d_step = ucode[d_msg.typ].step[d_stepi];
    p_op = '0;
    p_op.msg   = d_msg;
    p_op.nstep = d_stepi;
    p_op.write = d_step.write;
    p_op.wide  = d_step.wide;
    p_op.slot  = d_step.slot;
    case (d_step.where)
      DW_PEER: begin
        d_tile        = tile_of(d_msg.peer);
        p_op.base_mat = 4'(data_mat_base(d_msg.peer));
        p_op.row      = {d_msg.addr[TAG_LSB-1:5], 1'b0};
      end
      DW_LM: begin
        d_tile        = tile_of(d_msg.proc);
        p_op.base_mat = 4'(LM_BASE_MAT);
        p_op.row      = {d_msg.data[SET_W-1:0], 1'b0};
      end
      default: begin
        d_tile        = tile_of(d_msg.proc);
        p_op.base_mat = 4'(data_mat_base(d_msg.proc));
        p_op.row      = {d_msg.addr[TAG_LSB-1:5], 1'b0};
      end
    endcase
    d_fire = d_valid && !p_full[d_tile] && d_step.valid;
    p_push = '0;
    p_push[d_tile] = d_fire;
    cont_taken = cont_valid && d_fire;
  end

  rr_arb #(.N(NSRC)) u_earb (.clk, .rst_n, .req(in_valid), .advance(d_fire && !cont_valid),
                             .gnt(e_gnt), .gnt_idx(e_idx));
  assign in_ready = (d_fire && !cont_valid) ? e_gnt : '0;

  // ---------------------------------------------------------------- pipes and line buffer
  for (genvar p = 0; p < NUM_TILES; p++) begin : g_pipe
    d_pipe u_pipe (
      .clk, .rst_n, .cfg, .cfg_pipe, .pipe_id(2'(p)),
      .in_push(p_push[p]), .in_op(p_op), .in_full(p_full[p]),
      .tile_req(tile_req[p]), .tile_rsp(tile_rsp[p]),
      .lb_raddr(lb_raddr[p]), .lb_rdata(lb_rdata[p]), .lb_we(lb_we[p]), .lb_waddr(lb_waddr[p]),
      .lb_wdata(lb_wdata[p]),
      .done_valid(p_done_valid[p]), .done_op(p_done_op[p]), .done_cond(p_done_cond[p]),
      .done_pop(p_done_pop[p])
    );
  end

  line_buffer u_lb (
    .clk, .p_raddr(lb_raddr), .p_rdata(lb_rdata), .p_we(lb_we), .p_waddr(lb_waddr), .p_wdata(lb_wdata),
    .n_raddr, .n_rdata, .n_we, .n_waddr, .n_wdata
  );

  pc_outq #(.DEPTH(8)) u_outq (
    .clk, .rst_n, .push(c_fire && !c_more && p_done_cond[c_idx]), .push_msg(c_op.msg),
    .push_call0(c_uc.call0), .push_call1(c_uc.call1), .free(q_free),
    .out_valid, .out_msg, .out_ready
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) ucode[k] <= d_default(5'(k));
    end else if (cfg.we && cfg.sel == CFG_D) begin
      ucode[cfg.addr[4:0]] <= d_uc_t'(cfg.wdata[$bits(d_uc_t)-1:0]);
    end
  end
endmodule
