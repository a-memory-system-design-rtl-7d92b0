// sm_quad: four Tiles and their shared protocol controller.
//
// Each Tile contributes 16 memory mats behind its crossbar; the processors'
// ports into the crossbars (four per Tile: instruction and data port of two
// processors) are brought out, since the processors themselves are outside
// this RTL. The protocol controller reaches every Tile through two ports,
// the S-Unit port and the Tile's D-Unit data pipe, and connects the group
// to the processors (miss requests, replies, control registers,
// interrupts), to the system network (flits) and to whoever programs its
// configuration memories (cfg). At reset the configuration memories hold
// the default program of sm_pkg (cache-coherent shared memory with indexed
// DMA scatter).
// MAT_WORDS sets the depth of every mat; 1024 words gives 16 KB data caches.
module sm_quad
  import sm_pkg::*;
#(
  parameter int MAT_WORDS = 1024
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  cfg_wr_t               cfg,
  // processor ports into the Tile crossbars
  input  mat_req_t              proc_req [NUM_TILES][PROC_PORTS][MATS],
  output logic [MATS-1:0]       proc_gnt [NUM_TILES][PROC_PORTS],
  output mat_rsp_t              mat_rsp  [NUM_TILES][MATS],
  // processor messages to and from the controller
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
  // system network
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
  mat_req_t s_req [NUM_TILES][MATS];
  mat_req_t d_req [NUM_TILES][MATS];
  logic [1:0] imcn [NUM_TILES];

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    sm_tile #(.MAT_WORDS(MAT_WORDS)) u_tile (
      .clk, .rst_n, .s_req(s_req[t]), .d_req(d_req[t]), .proc_req(proc_req[t]),
      .proc_gnt(proc_gnt[t]), .mat_rsp(mat_rsp[t]), .imcn(imcn[t])
    );
  end

  protocol_controller u_pc (
    .clk, .rst_n, .cfg, .preq_valid, .preq, .preq_ready, .prsp_valid, .prsp,
    .reg_we, .reg_proc, .reg_addr, .reg_wdata, .irq, .dma_busy,
    .s_req, .d_req, .mat_rsp,
    .net_out_valid, .net_out, .net_out_ready, .net_in_valid, .net_in, .net_in_ready,
    .stat_conflict, .mshr_busy
  );
endmodule
