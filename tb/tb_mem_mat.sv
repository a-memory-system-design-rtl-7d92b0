// tb_mem_mat: self-checking test of one memory mat.
// Checks: data write and registered read (one-cycle latency), the data and
// metadata comparators and total match, the guarded write, the state-map
// read-modify-write with and without "only on match", and FIFO mode
// (pointer logic, full/empty). Expected values come from a reference array
// kept in the testbench.
module tb_mem_mat;
  import sm_pkg::*;
  localparam int W = 64;
  logic clk = 0, rst_n = 0;
  mat_req_t req;
  logic guard_in, tmatch_now;
  mat_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [31:0] ref_d [W];
  logic [7:0]  ref_m [W];

  mem_mat #(.WORDS(W)) dut (.clk, .rst_n, .req, .guard_in, .tmatch_now, .rsp);

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic access(input mat_req_t r, input logic g = 1'b0);
    req = r; guard_in = g;
    @(posedge clk); #1;
    req = MAT_IDLE;
  endtask

  function automatic mat_req_t wr(input int row, input logic [31:0] d);
    mat_req_t r = MAT_IDLE;
    r.en = 1; r.we_data = 1; r.row = 10'(row); r.wdata = d;
    return r;
  endfunction

  function automatic mat_req_t rd(input int row, input logic [31:0] cmp = '0);
    mat_req_t r = MAT_IDLE;
    r.en = 1; r.row = 10'(row); r.wdata = cmp;
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_req_t r;
    req = MAT_IDLE; guard_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise: data and metadata of every row
    for (int i = 0; i < W; i++) begin
      r = wr(i, 32'h1000_0000 + 32'(i * 7));
      r.rmw_en = 1; r.state_map = '0; r.meta_clr = '1; r.meta_set = 8'(i);
      access(r);
      ref_d[i] = 32'h1000_0000 + 32'(i * 7);
      ref_m[i] = {8'(i) & 8'hFC};   // state bits forced to 0 by the map
    end
    // random reads with compare
    for (int n = 0; n < 200; n++) begin
      int i;
      logic [31:0] c;
      i = $urandom_range(W - 1);
      c = ($urandom_range(1) == 1) ? ref_d[i] : $urandom();
      r = rd(i, c);
      r.cmp_mask = 8'hF0; r.cmp_meta = ref_m[i] & 8'hF0;
      req = r; guard_in = 0;
      #1 chk("tmatch_now", tmatch_now, (c == ref_d[i]));
      @(posedge clk); #1;
      req = MAT_IDLE;
      chk("rdata", rsp.rdata, ref_d[i]);
      chk("rmeta", rsp.rmeta, ref_m[i]);
      chk("dmatch", rsp.dmatch, c == ref_d[i]);
      chk("tmatch", rsp.tmatch, c == ref_d[i]);
    end
    // metadata comparator alone decides total match
    r = rd(5, ref_d[5]); r.cmp_mask = 8'hFF; r.cmp_meta = ref_m[5] ^ 8'h10;
    access(r);
    chk("tmatch meta mismatch", rsp.tmatch, 0);
    chk("dmatch meta mismatch", rsp.dmatch, 1);
    // guarded write: blocked when guard low, done when guard high
    r = wr(3, 32'hDEAD_BEEF); r.guard_en = 1;
    access(r, 1'b0);
    access(rd(3));
    chk("guard low keeps data", rsp.rdata, ref_d[3]);
    access(r, 1'b1);
    access(rd(3));
    chk("guard high writes", rsp.rdata, 32'hDEAD_BEEF);
    ref_d[3] = 32'hDEAD_BEEF;
    // state map RMW: set states, then map I->I S->S E->S M->I on match only
    for (int i = 0; i < 4; i++) begin
      r = rd(10 + i); r.rmw_en = 1; r.state_map = {4{2'(i)}};
      access(r);
    end
    for (int i = 0; i < 4; i++) begin
      r = rd(10 + i, (i == 2) ? 32'h0 : ref_d[10 + i]); r.rmw_en = 1; r.rmw_on_match = 1;
      r.state_map = MAP_READ; r.meta_set = 8'h04;
      access(r);
      chk("rmw returns old state", 64'(rsp.rmeta[1:0]), 64'(i));
    end
    for (int i = 0; i < 4; i++) begin
      logic [1:0] exp;
      access(rd(10 + i));
      exp = (i == 2) ? 2'(i) : MAP_READ[2*i +: 2];
      chk("state after map", rsp.rmeta[1:0], exp);
      chk("R bit after map", rsp.rmeta[2], (i != 2) ? 1'b1 : ref_m[10 + i][2]);
    end
    // FIFO mode
    for (int i = 0; i < W; i++) begin
      r = MAT_IDLE; r.en = 1; r.fifo_push = 1; r.wdata = 32'hF000_0000 + 32'(i);
      access(r);
    end
    chk("fifo full", rsp.fifo_full, 1);
    r = MAT_IDLE; r.en = 1; r.fifo_push = 1; r.wdata = 32'h1234_5678;
    access(r);  // dropped: full
    for (int i = 0; i < W; i++) begin
      r = MAT_IDLE; r.en = 1; r.fifo_pop = 1;
      access(r);
      chk("fifo order", rsp.rdata, 32'hF000_0000 + 32'(i));
    end
    chk("fifo empty", rsp.fifo_empty, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
