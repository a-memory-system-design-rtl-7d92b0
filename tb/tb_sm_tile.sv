// tb_sm_tile: a Tile's crossbar, mats and IMCN together.
// Phase 1 writes random words through the processor ports and reads them back
// (one cycle later) against a reference copy. Phase 2 issues a protocol
// controller access and a processor access to the same mat in one cycle: the
// controller must win and the processor must see no grant. Phase 3 is the
// cache store path: a tag mat compares a tag and drives IMCN line 0 in the
// same cycle as a data mat write guarded by that line, so the data changes
// only when the tag matched; the imcn output is checked too.
module tb_sm_tile;
  import sm_pkg::*;
  localparam int W = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  mat_req_t s_req [MATS], d_req [MATS], proc_req [PROC_PORTS][MATS];
  logic [MATS-1:0] proc_gnt [PROC_PORTS];
  mat_rsp_t mat_rsp [MATS];
  logic [1:0] imcn;
  logic [31:0] refm [MATS][W];
  int checks = 0, failures = 0;

  sm_tile #(.MAT_WORDS(W)) dut (.clk, .rst_n, .s_req, .d_req, .proc_req, .proc_gnt, .mat_rsp, .imcn);

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  task automatic idle();
    for (int t = 0; t < MATS; t++) begin
      s_req[t] = MAT_IDLE; d_req[t] = MAT_IDLE;
      for (int p = 0; p < PROC_PORTS; p++) proc_req[p][t] = MAT_IDLE;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // phase 1: fill every mat, then random read-back
    for (int t = 0; t < MATS; t++)
      for (int r = 0; r < W; r++) begin
        idle();
        proc_req[r % PROC_PORTS][t].en = 1; proc_req[r % PROC_PORTS][t].we_data = 1;
        proc_req[r % PROC_PORTS][t].row = 10'(r);
        proc_req[r % PROC_PORTS][t].wdata = $urandom(); refm[t][r] = proc_req[r % PROC_PORTS][t].wdata;
        @(posedge clk); #1;
      end
    for (int n = 0; n < 300; n++) begin
      int t, r, p;
      t = $urandom_range(MATS - 1); r = $urandom_range(W - 1); p = $urandom_range(PROC_PORTS - 1);
      idle();
      proc_req[p][t].en = 1; proc_req[p][t].row = 10'(r);
      #1 chk("grant", 32'(proc_gnt[p][t]), 1);
      @(posedge clk); #1;
      idle();
      chk("read back", mat_rsp[t].rdata, refm[t][r]);
    end
    // phase 2: controller beats processor on the same mat
    for (int n = 0; n < 50; n++) begin
      int t, r;
      t = $urandom_range(MATS - 1); r = $urandom_range(W - 1);
      idle();
      s_req[t].en = 1; s_req[t].we_data = 1; s_req[t].row = 10'(r); s_req[t].wdata = $urandom();
      proc_req[1][t].en = 1; proc_req[1][t].we_data = 1; proc_req[1][t].row = 10'(r); proc_req[1][t].wdata = ~s_req[t].wdata;
      #1 chk("no grant under conflict", 32'(proc_gnt[1][t]), 0);
      refm[t][r] = s_req[t].wdata;
      @(posedge clk); #1;
      idle(); proc_req[0][t].en = 1; proc_req[0][t].row = 10'(r);
      @(posedge clk); #1;
      chk("controller write won", mat_rsp[t].rdata, refm[t][r]);
    end
    // phase 3: tag compare on mat 0 guards a store into mat 1
    for (int n = 0; n < 100; n++) begin
      int r;
      logic hit;
      r = $urandom_range(W - 1);
      hit = $urandom_range(1);
      idle();
      proc_req[0][0].en = 1; proc_req[0][0].imcn_drive = 1; proc_req[0][0].imcn_sel = 0;
      proc_req[0][0].row = 10'(r); proc_req[0][0].wdata = hit ? refm[0][r] : ~refm[0][r];
      proc_req[1][1].en = 1; proc_req[1][1].we_data = 1; proc_req[1][1].guard_en = 1; proc_req[1][1].guard_sel = 0;
      proc_req[1][1].row = 10'(r); proc_req[1][1].wdata = $urandom();
      #1 chk("imcn line 0", 32'(imcn[0]), 32'(hit));
      chk("imcn line 1 idle", 32'(imcn[1]), 0);
      if (hit) refm[1][r] = proc_req[1][1].wdata;
      @(posedge clk); #1;
      idle(); proc_req[2][1].en = 1; proc_req[2][1].row = 10'(r);
      @(posedge clk); #1;
      chk("guarded store", mat_rsp[1].rdata, refm[1][r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
