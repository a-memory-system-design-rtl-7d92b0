// tb_t_unit: tracking and serialization.
// Processor misses (read and write) to a small pool of lines, coherence
// requests and scatter requests arrive on their usual inputs; a model of the
// other units answers every call the T-Unit makes: an S Read/Write Miss is
// answered later with a T Refill, the D Line Write that follows with a
// T Done, an S Snoop with a T Coherence Done, a D Line Read (scatter) with a
// T Scatter Reply. The testbench checks: processor misses get MSHRs 0..23,
// coherence requests 24..27, scatters USHRs from 28; no id is handed out
// twice while live; two live processor MSHRs never hold the same line (the
// serialization), and a conflict stall is reported; retrievals return the
// stored processor, address and state (E for read, M for write); the MSHR
// busy count follows; every request completes.
module tb_t_unit;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t cfg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  logic out_valid, out_ready, stat_conflict;
  pc_msg_t out_msg;
  logic [5:0] mshr_busy;
  int checks = 0, failures = 0;

  pc_msg_t srcq [NSRC][$];
  logic        live [64];
  logic [31:0] l_addr [64];
  logic [2:0]  l_proc [64];
  logic [1:0]  l_st [64];
  logic [31:0] l_data [64];
  int issued = 0, completed = 0, conflicts = 0, max_busy = 0, n_coh = 0, n_scat = 0;

  t_unit dut (.clk, .rst_n, .cfg, .in_valid, .in_msg, .in_ready, .out_valid, .out_msg, .out_ready,
              .stat_conflict, .mshr_busy);

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  function automatic pc_msg_t mk(input logic [4:0] typ, input logic [5:0] tid, input logic [2:0] proc,
                                 input logic [31:0] addr, input logic [31:0] data);
    pc_msg_t m;
    m = '0; m.dst = U_T; m.typ = typ; m.tid = tid; m.proc = proc; m.addr = addr; m.data = data;
    return m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // drive the head of every source queue
  always @(posedge clk) begin
    #1;
    for (int s = 0; s < NSRC; s++) begin
      in_valid[s] = srcq[s].size() > 0;
      in_msg[s] = in_valid[s] ? srcq[s][0] : '0;
    end
    out_ready = ($urandom_range(3) != 0);
  end

  always @(negedge clk) if (rst_n) begin
    if (stat_conflict) conflicts++;
    if (int'(mshr_busy) > max_busy) max_busy = int'(mshr_busy);
    for (int s = 0; s < NSRC; s++) if (in_valid[s] && in_ready[s]) begin
      pc_msg_t m;
      m = srcq[s].pop_front();
      if (m.typ == T_DONE || m.typ == T_COH_DONE) begin live[m.tid] = 0; completed++; end
    end
    if (out_valid && out_ready) begin
      pc_msg_t o;
      o = out_msg;
      case (o.typ)
        S_READ_MISS, S_WRITE_MISS: begin
          chk("miss goes to S", 64'(o.dst), 64'(U_S));
          chk("processor MSHR range", 64'(o.tid < 24), 1);
          chk("id not live", 64'(live[o.tid]), 0);
          chk("state to install", 64'(o.st), 64'(o.typ == S_READ_MISS ? ST_E : ST_M));
          for (int e = 0; e < 28; e++)
            if (live[e] && l_addr[e][31:5] == o.addr[31:5]) begin
              checks++; failures++; $display("FAIL two MSHRs for line %h", o.addr);
            end
          live[o.tid] = 1; l_addr[o.tid] = o.addr; l_proc[o.tid] = o.proc; l_st[o.tid] = o.st;
          srcq[SRC_NRX].push_back(mk(T_REFILL, o.tid, 0, 0, 0));
        end
        D_LINE_WRITE: begin
          chk("refill live", 64'(live[o.tid]), 1);
          chk("retrieved proc", 64'(o.proc), 64'(l_proc[o.tid]));
          chk("retrieved addr", 64'(o.addr[31:5]), 64'(l_addr[o.tid][31:5]));
          chk("retrieved state", 64'(o.st), 64'(l_st[o.tid]));
          srcq[SRC_S].push_back(mk(T_DONE, o.tid, 0, 0, 0));
        end
        S_SNOOP: begin
          chk("coherence MSHR range", 64'(o.tid >= 24 && o.tid < 28), 1);
          chk("id not live", 64'(live[o.tid]), 0);
          live[o.tid] = 1; n_coh++;
          srcq[SRC_S].push_back(mk(T_COH_DONE, o.tid, 0, 0, 0));
        end
        D_LINE_READ_SCAT: begin
          chk("USHR range", 64'(o.tid >= 28 && o.tid < 36), 1);
          chk("id not live", 64'(live[o.tid]), 0);
          live[o.tid] = 1; l_proc[o.tid] = o.proc; l_addr[o.tid] = o.addr; l_data[o.tid] = o.data;
          srcq[SRC_NRX].push_back(mk(T_SCATTER_REPLY, o.tid, 0, 0, 0));
        end
        DMA_ACK: begin
          chk("scatter live", 64'(live[o.tid]), 1);
          chk("ushr proc", 64'(o.proc), 64'(l_proc[o.tid]));
          chk("ushr addr", 64'(o.addr), 64'(l_addr[o.tid]));
          chk("ushr data", 64'(o.data), 64'(l_data[o.tid]));
          live[o.tid] = 0; completed++; n_scat++;
        end
        default: begin checks++; failures++; $display("FAIL unexpected call %0d", o.typ); end
      endcase
    end
  end

  initial begin
    cfg = '0; in_valid = '0; out_ready = 0;
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int e = 0; e < 64; e++) live[e] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int k;
      k = $urandom_range(9);
      if (k < 7) begin
        logic [31:0] a;
        a = {22'(32'h100 + $urandom_range(40)), 5'($urandom_range(31)), 5'b0} >> 5;
        a = a << 5 | 32'($urandom_range(31));
        srcq[SRC_P].push_back(mk(k < 4 ? T_READ_MISS : T_WRITE_MISS, 0, 3'($urandom()), a, 0));
      end else if (k == 7) srcq[SRC_NRX].push_back(mk(T_READ_EX, 0, 3'($urandom()), $urandom(), 0));
      else srcq[SRC_DMA].push_back(mk(T_SCATTER, 0, 3'($urandom()), $urandom(), $urandom()));
      issued++;
      if ($urandom_range(1)) @(posedge clk);
    end
    for (int w = 0; w < 20000 && completed < issued; w++) @(posedge clk);
    repeat (10) @(posedge clk);
    chk("every request completed", 64'(completed), 64'(issued));
    chk("conflict stall seen", 64'(conflicts > 0), 1);
    chk("MSHRs filled up", 64'(max_busy > 20), 1);
    chk("coherence requests seen", 64'(n_coh > 0), 1);
    chk("scatters seen", 64'(n_scat > 0), 1);
    chk("MSHRs empty at the end", 64'(mshr_busy), 0);
    $display("conflict cycles %0d, max busy %0d", conflicts, max_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
