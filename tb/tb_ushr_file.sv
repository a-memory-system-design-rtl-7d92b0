// tb_ushr_file: allocation of the lowest free entry with ids starting after
// the MSHRs, stored tracking information, release, exhaustion.
module tb_ushr_file;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fa, alloc, rel, rv;
  logic [5:0] fid, aid, rid, relid;
  logic [2:0] ap, rp;
  logic [31:0] aa, ad, ra, rdd;
  int checks = 0, failures = 0;

  ushr_file dut (.clk, .rst_n, .free_avail(fa), .free_id(fid), .alloc, .alloc_id(aid), .alloc_proc(ap),
    .alloc_addr(aa), .alloc_data(ad), .rd_id(rid), .rd_valid(rv), .rd_proc(rp), .rd_addr(ra), .rd_data(rdd),
    .release_en(rel), .release_id(relid));

  task automatic chk(input string w, input logic [31:0] g, input logic [31:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    alloc = 0; rel = 0; aid = 0; rid = 0; relid = 0; ap = 0; aa = 0; ad = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int e = 0; e < NUM_USHR; e++) begin
      #1 chk("free", fa, 1); chk("id", fid, NUM_MSHR + e);
      alloc = 1; aid = fid; ap = 3'(e); aa = 32'h100 * e; ad = 32'hD0 + e;
      @(posedge clk); #1 alloc = 0;
    end
    #1 chk("exhausted", fa, 0);
    for (int e = 0; e < NUM_USHR; e++) begin
      rid = 6'(NUM_MSHR + e);
      #1 chk("valid", rv, 1); chk("proc", rp, e); chk("addr", ra, 32'h100 * e); chk("data", rdd, 32'hD0 + e);
    end
    rel = 1; relid = 6'(NUM_MSHR + 3);
    @(posedge clk); #1 rel = 0;
    rid = 6'(NUM_MSHR + 3);
    #1 chk("released", rv, 0); chk("free again", fa, 1); chk("free id", fid, NUM_MSHR + 3);
    rid = 6'(5);
    #1 chk("mshr id is not a ushr", rv, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
