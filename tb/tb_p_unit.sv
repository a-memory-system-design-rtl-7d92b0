// tb_p_unit: the processor interface.
// Random cache-miss requests from all eight processors, with random
// back-pressure from the T-Unit side. Every accepted request must reach the
// output, in acceptance order, as the T-Unit subroutine its type selects
// (read miss -> T Read Miss, write miss and upgrade -> T Write Miss, other
// types dropped), carrying processor number and address. Every processor must
// be served (round-robin arbitration). Replies called by other units must
// appear one cycle later as a pulse on the addressed processor's reply port.
// Finally the decode table is reprogrammed through the configuration bus.
module tb_p_unit;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NUM_PROCS-1:0] preq_valid, preq_ready, prsp_valid;
  preq_t preq [NUM_PROCS];
  prsp_t prsp [NUM_PROCS];
  logic out_valid, out_ready;
  pc_msg_t out_msg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  int checks = 0, failures = 0;
  pc_msg_t expq [$];
  int served [NUM_PROCS];
  logic [4:0] dec [8];

  p_unit dut (.clk, .rst_n, .cfg, .preq_valid, .preq, .preq_ready, .prsp_valid, .prsp,
              .out_valid, .out_msg, .out_ready, .in_valid, .in_msg, .in_ready);

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int cycles);
    logic             rv;
    logic [2:0]       rproc;
    logic [TID_W-1:0] rtid;
    logic [31:0]      raddr;
    rv = 0; rproc = 0; rtid = 0; raddr = 0;
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk); #1;
      if (rv) begin
        chk("reply pulse", 64'(prsp_valid), 64'(1 << rproc));
        chk("reply tid", 64'(prsp[rproc].tid), 64'(rtid));
        chk("reply addr", 64'(prsp[rproc].addr), 64'(raddr));
      end else chk("no reply", 64'(prsp_valid), 0);
      for (int p = 0; p < NUM_PROCS; p++) begin
        preq_valid[p] = ($urandom_range(2) == 0);
        preq[p].ptype = 3'($urandom_range(3));
        preq[p].addr  = $urandom();
      end
      out_ready = $urandom_range(1);
      in_valid = '0;
      for (int s = 0; s < NSRC; s++) begin
        in_msg[s] = '0;
        in_msg[s].proc = 3'($urandom()); in_msg[s].tid = TID_W'($urandom()); in_msg[s].addr = $urandom();
      end
      if ($urandom_range(3) == 0) in_valid[$urandom_range(NSRC - 1)] = 1'b1;
      @(negedge clk);
      // output side
      if (out_valid && out_ready) begin
        if (expq.size() == 0) begin checks++; failures++; $display("FAIL unexpected output"); end
        else begin
          pc_msg_t e;
          e = expq.pop_front();
          chk("out typ", 64'(out_msg.typ), 64'(e.typ));
          chk("out proc", 64'(out_msg.proc), 64'(e.proc));
          chk("out addr", 64'(out_msg.addr), 64'(e.addr));
          chk("out dst", 64'(out_msg.dst), 64'(U_T));
        end
      end
      // request side
      chk("at most one grant", 64'($countones(preq_ready) <= 1), 1);
      for (int p = 0; p < NUM_PROCS; p++)
        if (preq_valid[p] && preq_ready[p]) begin
          pc_msg_t e;
          e = '0; e.typ = dec[preq[p].ptype]; e.proc = 3'(p); e.addr = preq[p].addr;
          served[p]++;
          if (e.typ != R_NOP) expq.push_back(e);
        end
      // reply side
      rv = 0; rproc = 0; rtid = 0; raddr = 0;
      for (int s = 0; s < NSRC; s++)
        if (in_valid[s] && in_ready[s]) begin rv = 1; rproc = in_msg[s].proc; rtid = in_msg[s].tid; raddr = in_msg[s].addr; end
    end
  endtask

  initial begin
    cfg = '0; preq_valid = '0; out_ready = 0; in_valid = '0;
    for (int p = 0; p < NUM_PROCS; p++) begin preq[p] = '0; served[p] = 0; end
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int k = 0; k < 8; k++) dec[k] = R_NOP;
    dec[PM_READ_MISS] = T_READ_MISS; dec[PM_WRITE_MISS] = T_WRITE_MISS; dec[PM_UPGRADE] = T_WRITE_MISS;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(1500);
    for (int p = 0; p < NUM_PROCS; p++) chk("processor served", 64'(served[p] > 20), 1);
    // reprogram: read misses become T Read Exclusive
    @(posedge clk); #1;
    preq_valid = '0;
    cfg.we = 1; cfg.sel = CFG_P; cfg.addr = 6'(PM_READ_MISS); cfg.wdata = 64'(T_READ_EX);
    @(posedge clk); #1 cfg.we = 0;
    dec[PM_READ_MISS] = T_READ_EX;
    run(500);
    @(posedge clk); #1;
    out_ready = 1; preq_valid = '0; in_valid = '0;
    repeat (10) begin
      @(negedge clk);
      if (out_valid) begin
        pc_msg_t e;
        e = expq.pop_front();
        chk("drain typ", 64'(out_msg.typ), 64'(e.typ));
        chk("drain addr", 64'(out_msg.addr), 64'(e.addr));
      end
    end
    chk("all requests delivered", 64'(expq.size()), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
