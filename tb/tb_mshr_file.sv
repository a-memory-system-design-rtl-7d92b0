// tb_mshr_file: allocation order per partition, lookup by line address
// (word offsets ignored), retrieval, release and the busy count, against a
// reference model kept in the testbench.
module tb_mshr_file;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] lk_addr [NSRC];
  logic [NSRC-1:0] lk_hit;
  logic fp_av, fc_av, alloc, rel, rd_valid;
  logic [5:0] fp_id, fc_id, alloc_id, rd_id, rel_id;
  logic [31:0] alloc_addr, rd_addr;
  logic [2:0] alloc_proc, rd_proc;
  logic [1:0] alloc_st, rd_st;
  logic [4:0] busy;
  int checks = 0, failures = 0;
  logic        m_v [28];
  logic [31:0] m_a [28];

  mshr_file dut (.clk, .rst_n, .lk_addr, .lk_hit, .free_p_avail(fp_av), .free_p_id(fp_id),
    .free_c_avail(fc_av), .free_c_id(fc_id), .alloc, .alloc_id, .alloc_addr, .alloc_proc, .alloc_st,
    .rd_id, .rd_valid, .rd_addr, .rd_proc, .rd_st, .release_en(rel), .release_id(rel_id), .busy_count(busy));

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alloc = 0; rel = 0; rd_id = 0; rel_id = 0; alloc_id = 0; alloc_addr = 0; alloc_proc = 0; alloc_st = 0;
    for (int i = 0; i < NSRC; i++) lk_addr[i] = 0;
    for (int e = 0; e < 28; e++) m_v[e] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int exp_p, exp_c, cnt;
      #1;
      // expected free entries
      exp_p = -1; exp_c = -1; cnt = 0;
      for (int e = 27; e >= 0; e--) begin
        if (!m_v[e] && e < 24) exp_p = e;
        if (!m_v[e] && e >= 24) exp_c = e;
        if (m_v[e]) cnt++;
      end
      chk("p avail", fp_av, exp_p >= 0);
      if (exp_p >= 0) chk("p id", fp_id, exp_p);
      chk("c avail", fc_av, exp_c >= 0);
      if (exp_c >= 0) chk("c id", fc_id, exp_c);
      chk("busy", busy, cnt);
      // lookups
      for (int l = 0; l < NSRC; l++) begin
        logic h;
        int pick;
        pick = $urandom_range(27);
        lk_addr[l] = (m_v[pick] && $urandom_range(1)) ? (m_a[pick] | 32'($urandom_range(31))) : $urandom();
        #0;
        h = 0;
        for (int e = 0; e < 28; e++) if (m_v[e] && m_a[e][31:5] == lk_addr[l][31:5]) h = 1;
        #1 chk("lookup", lk_hit[l], h);
      end
      // retrieve
      rd_id = 6'($urandom_range(27));
      #1 chk("rd valid", rd_valid, m_v[rd_id]);
      if (m_v[rd_id]) chk("rd addr", rd_addr, {m_a[rd_id][31:5], 5'b0});
      // random alloc / release
      alloc = 0; rel = 0;
      if ($urandom_range(1) && exp_p >= 0) begin
        alloc = 1; alloc_id = 6'(exp_p); alloc_addr = $urandom(); alloc_proc = 3'($urandom()); alloc_st = 2'($urandom());
      end else if ($urandom_range(3) == 0 && exp_c >= 0) begin
        alloc = 1; alloc_id = 6'(exp_c); alloc_addr = $urandom(); alloc_proc = 3'($urandom()); alloc_st = 2'($urandom());
      end
      if ($urandom_range(2) == 0) begin rel = 1; rel_id = 6'($urandom_range(27)); if (alloc && rel_id == alloc_id) rel = 0; end
      @(posedge clk);
      if (rel) m_v[rel_id] = 0;
      if (alloc) begin m_v[alloc_id] = 1; m_a[alloc_id] = alloc_addr; end
      #1 alloc = 0; rel = 0;
      if (alloc_id < 28 && m_v[alloc_id]) begin
        rd_id = alloc_id;
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
