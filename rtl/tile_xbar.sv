// tile_xbar: the Tile crossbar between the access ports and the 16 mats.
//
// Masters are the protocol controller's S-Unit port (index 0), its data-pipe
// port (index 1) and the four processor ports (2..5: processor 0 instruction
// and data, processor 1 instruction and data). Each master presents one
// mat_req_t per mat, so one access can touch several mats at once (a tag mat
// and its data mats). For every mat the crossbar passes the request of the
// lowest-numbered requesting master and reports the grant; the controller
// ports therefore never wait, which keeps the S-Unit and data pipes at fixed
// latency, and a processor that loses must retry. Mat responses (registered
// in the mats) are returned to all masters; a master uses the ones it asked
// for in the previous cycle.
//
// Fixed priority and the per-mat request form are this design's choices.
module tile_xbar
  import sm_pkg::*;
(
  input  mat_req_t m_req [NUM_XB_MASTERS][MATS],
  output logic [MATS-1:0] m_gnt [NUM_XB_MASTERS],
  output mat_req_t mat_req [MATS]
);
  always_comb begin
    for (int t = 0; t < MATS; t++) begin
      mat_req[t] = MAT_IDLE;
      for (int m = 0; m < NUM_XB_MASTERS; m++) m_gnt[m][t] = 1'b0;
      for (int m = NUM_XB_MASTERS - 1; m >= 0; m--) begin
        if (m_req[m][t].en) begin
          mat_req[t] = m_req[m][t];
          for (int k = 0; k < NUM_XB_MASTERS; k++) m_gnt[k][t] = (k == m);
        end
      end
    end
  end
endmodule
