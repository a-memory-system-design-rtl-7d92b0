// sm_tile: the memory side of one Tile: 16 memory mats, the Tile crossbar and
// the two-line Inter-Mat Communication Network (IMCN).
//
// Mats are aggregated into caches, scratchpads and FIFOs by how the
// processors and the protocol controller address them (see sm_pkg for the
// layout used by the default program). The IMCN carries each mat's total
// match to the other mats in the same cycle: a line is the OR of the total
// matches of the mats that drive it, and a mat may guard its data write with
// one of the two lines, so a cache tag match enables the write in the data
// mats. Requests enter through tile_xbar; mat responses are registered and
// returned one cycle after the access.
//
// The two IMCN lines follow the published Tile; the OR combining and the
// guard use are this design's choices.
module sm_tile
  import sm_pkg::*;
#(
  parameter int MAT_WORDS = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mat_req_t s_req    [MATS],          // from the protocol controller S-Unit
  input  mat_req_t d_req    [MATS],          // from the D-Unit data pipe of this Tile
  input  mat_req_t proc_req [PROC_PORTS][MATS],
  output logic [MATS-1:0] proc_gnt [PROC_PORTS],
  output mat_rsp_t mat_rsp  [MATS],
  output logic [1:0] imcn
);
  mat_req_t m_req [NUM_XB_MASTERS][MATS];
  logic [MATS-1:0] m_gnt [NUM_XB_MASTERS];
  mat_req_t mreq [MATS];
  logic [MATS-1:0] tmatch;

  always_comb begin
    m_req[0] = s_req;
    m_req[1] = d_req;
    for (int p = 0; p < PROC_PORTS; p++) m_req[p+2] = proc_req[p];
    for (int p = 0; p < PROC_PORTS; p++) proc_gnt[p] = m_gnt[p+2];
  end

  tile_xbar u_xbar (.m_req, .m_gnt, .mat_req(mreq));

  always_comb begin
    imcn = '0;
    for (int t = 0; t < MATS; t++)
      if (mreq[t].en && mreq[t].imcn_drive && tmatch[t]) imcn[mreq[t].imcn_sel] = 1'b1;
  end

  for (genvar t = 0; t < MATS; t++) begin : g_mat
    mem_mat #(.WORDS(MAT_WORDS)) u_mat (
      .clk, .rst_n,
      .req(mreq[t]),
      .guard_in(imcn[mreq[t].guard_sel]),
      .tmatch_now(tmatch[t]),
      .rsp(mat_rsp[t])
    );
  end
endmodule
