// protocol_controller: the programmable cache and protocol controller shared
// by the four Tiles.
//
// Units: P-Unit (processor interface), T-Unit (tracking and serialization,
// with the MSHRs and USHRs), S-Unit (state update), D-Unit (data movement,
// four data pipes and the line buffers), N-Unit (network transmitter and
// receiver), the DMA channels and the interrupt unit. A message entering
// the controller runs a chain of subroutines: each unit executes the
// subroutine its configuration memory holds for the message's subroutine
// number and then calls the next unit(s). The calls are routed here: every
// producer (P, T, S, D, N receiver, N transmitter, DMA) presents at most one
// call per cycle, named by its destination field, and each destination
// unit's input arbiter picks one of the calls addressed to it.
// Configuration writes (cfg) reach every unit's tables; for the data pipes
// cfg.addr[3:2] selects the pipe and cfg.addr[1:0] the entry. Processor
// register writes (reg_*) go to the DMA channels (addresses 0..3) and the
// interrupt unit (8, 9).
// The unit set and their connections follow the published organization;
// the router that lets any unit call any other is this design's
// generalisation of the drawn connections.
module protocol_controller
  import sm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_wr_t               cfg,
  // processors
  input  logic [NUM_PROCS-1:0]  preq_valid,
  input  preq_t                 preq [NUM_PROCS],
  output logic [NUM_PROCS-1:0]  preq_ready,
  output logic [NUM_PROCS-1:0]  prsp_valid,
  output prsp_t                 prsp [NUM_PROCS],
  input  logic                  reg_we,
  input  logic [2:0]            reg_proc,
  input  logic [3:0]            reg_addr,
  input  logic [WORD_W-1:0]     reg_wdata,
  output logic [NUM_PROCS-1:0]  irq,
  output logic [NUM_PROCS-1:0]  dma_busy,
  // Tiles
  output mat_req_t              s_req [NUM_TILES][MATS],
  output mat_req_t              d_req [NUM_TILES][MATS],
  input  mat_rsp_t              mat_rsp [NUM_TILES][MATS],
  // network
  output logic                  net_out_valid,
  output flit_t                 net_out,
  input  logic                  net_out_ready,
  input  logic                  net_in_valid,
  input  flit_t                 net_in,
  output logic                  net_in_ready,
  // status
  output logic                  stat_conflict,
  output logic [5:0]            mshr_busy
);
  localparam int NDST = 7;   // indexed by unit_e

  logic [NSRC-1:0] src_valid, src_ready;
  pc_msg_t         src_msg [NSRC];
  logic [NSRC-1:0] dst_valid [NDST];
  logic [NSRC-1:0] dst_ready [NDST];

  always_comb begin
    for (int d = 0; d < NDST; d++)
      for (int s = 0; s < NSRC; s++)
        dst_valid[d][s] = src_valid[s] && (int'(src_msg[s].dst) == d);
    for (int s = 0; s < NSRC; s++)
      src_ready[s] = dst_ready[src_msg[s].dst][s];
  end

  assign dst_ready[U_NONE] = '0;

  p_unit u_p (
    .clk, .rst_n, .cfg, .preq_valid, .preq, .preq_ready, .prsp_valid, .prsp,
    .out_valid(src_valid[SRC_P]), .out_msg(src_msg[SRC_P]), .out_ready(src_ready[SRC_P]),
    .in_valid(dst_valid[U_P]), .in_msg(src_msg), .in_ready(dst_ready[U_P])
  );

  t_unit u_t (
    .clk, .rst_n, .cfg,
    .in_valid(dst_valid[U_T]), .in_msg(src_msg), .in_ready(dst_ready[U_T]),
    .out_valid(src_valid[SRC_T]), .out_msg(src_msg[SRC_T]), .out_ready(src_ready[SRC_T]),
    .stat_conflict, .mshr_busy
  );

  s_unit u_s (
    .clk, .rst_n, .cfg,
    .in_valid(dst_valid[U_S]), .in_msg(src_msg), .in_ready(dst_ready[U_S]),
    .tile_req(s_req), .tile_rsp(mat_rsp),
    .out_valid(src_valid[SRC_S]), .out_msg(src_msg[SRC_S]), .out_ready(src_ready[SRC_S])
  );

  logic [TID_W+3:0]  lb_raddr, lb_waddr;
  logic [WORD_W-1:0] lb_rdata, lb_wdata;
  logic              lb_we;

  d_unit u_d (
    .clk, .rst_n, .cfg, .cfg_pipe(cfg.addr[3:2]),
    .in_valid(dst_valid[U_D]), .in_msg(src_msg), .in_ready(dst_ready[U_D]),
    .tile_req(d_req), .tile_rsp(mat_rsp),
    .n_raddr(lb_raddr), .n_rdata(lb_rdata), .n_we(lb_we), .n_waddr(lb_waddr), .n_wdata(lb_wdata),
    .out_valid(src_valid[SRC_D]), .out_msg(src_msg[SRC_D]), .out_ready(src_ready[SRC_D])
  );

  n_unit u_n (
    .clk, .rst_n, .cfg,
    .in_valid(dst_valid[U_N]), .in_msg(src_msg), .in_ready(dst_ready[U_N]),
    .net_out_valid, .net_out, .net_out_ready, .net_in_valid, .net_in, .net_in_ready,
    .lb_raddr, .lb_rdata, .lb_we, .lb_waddr, .lb_wdata,
    .tx_call_valid(src_valid[SRC_NTX]), .tx_call(src_msg[SRC_NTX]), .tx_call_ready(src_ready[SRC_NTX]),
    .rx_call_valid(src_valid[SRC_NRX]), .rx_call(src_msg[SRC_NRX]), .rx_call_ready(src_ready[SRC_NRX])
  );

  logic [NUM_PROCS-1:0] dma_done;

  dma_unit u_dma (
    .clk, .rst_n, .reg_we, .reg_proc, .reg_addr, .reg_wdata, .busy(dma_busy), .done(dma_done),
    .out_valid(src_valid[SRC_DMA]), .out_msg(src_msg[SRC_DMA]), .out_ready(src_ready[SRC_DMA]),
    .in_valid(dst_valid[U_DMA]), .in_msg(src_msg), .in_ready(dst_ready[U_DMA])
  );

  int_unit u_int (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .dma_done, .irq
  );
endmodule
