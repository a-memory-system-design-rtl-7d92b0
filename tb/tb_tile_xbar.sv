// tb_tile_xbar: random requests from all six masters; for every mat the
// request of the lowest-numbered requesting master must pass and only that
// master is granted.
module tb_tile_xbar;
  import sm_pkg::*;
  mat_req_t m_req [NUM_XB_MASTERS][MATS];
  logic [MATS-1:0] m_gnt [NUM_XB_MASTERS];
  mat_req_t mat_req [MATS];
  int checks = 0, failures = 0;

  tile_xbar dut (.m_req, .m_gnt, .mat_req);

  initial begin
    #100000;
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int m = 0; m < NUM_XB_MASTERS; m++)
        for (int t = 0; t < MATS; t++) begin
          m_req[m][t] = MAT_IDLE;
          m_req[m][t].en = ($urandom_range(3) == 0);
          m_req[m][t].row = 10'($urandom());
          m_req[m][t].wdata = $urandom();
        end
      #1;
      for (int t = 0; t < MATS; t++) begin
        int w;
        w = -1;
        for (int m = NUM_XB_MASTERS - 1; m >= 0; m--) if (m_req[m][t].en) w = m;
        checks++;
        if (w < 0) begin
          if (mat_req[t].en) begin failures++; $display("FAIL idle mat %0d enabled", t); end
        end else if (mat_req[t] !== m_req[w][t]) begin
          failures++; $display("FAIL mat %0d not from master %0d", t, w);
        end
        for (int m = 0; m < NUM_XB_MASTERS; m++) begin
          checks++;
          if (m_gnt[m][t] !== (m == w)) begin failures++; $display("FAIL grant m%0d t%0d", m, t); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
