// tb_dma_unit: the DMA channels running indexed scatters.
// Several channels are programmed with random source line, index start and
// element count and started. A model of the rest of the controller answers
// each Index Read, after a random delay, with a destination address that is
// a fixed function of the index entry, and acknowledges each Scatter after a
// random delay. The testbench checks that every Scatter carries the expected
// destination and source for its element, in element order per channel, that
// each channel issues exactly its count, that done pulses once per transfer
// and only after the last acknowledgement, and that busy covers the transfer.
module tb_dma_unit;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic reg_we;
  logic [2:0] reg_proc;
  logic [3:0] reg_addr;
  logic [31:0] reg_wdata;
  logic [NUM_PROCS-1:0] busy, done;
  logic out_valid, out_ready;
  pc_msg_t out_msg;
  logic [NSRC-1:0] in_valid, in_ready;
  pc_msg_t in_msg [NSRC];
  int checks = 0, failures = 0;

  typedef struct { int due; pc_msg_t m; } pend_t;
  pend_t pend [$];
  int cyc = 0;
  int exp_src [NUM_PROCS], exp_idx [NUM_PROCS], left [NUM_PROCS], acks_left [NUM_PROCS], dones [NUM_PROCS];
  int waiting_addr [NUM_PROCS];

  dma_unit dut (.clk, .rst_n, .reg_we, .reg_proc, .reg_addr, .reg_wdata, .busy, .done,
                .out_valid, .out_msg, .out_ready, .in_valid, .in_msg, .in_ready);

  function automatic logic [31:0] dest_of(input logic [31:0] idx);
    return 32'h8000_0000 ^ (idx * 32'd97 << 5);
  endfunction

  task automatic chk(input string w, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int p, input int a, input logic [31:0] d);
    reg_we = 1; reg_proc = 3'(p); reg_addr = 4'(a); reg_wdata = d;
    @(posedge clk); #1 reg_we = 0;
  endtask

  // the rest of the controller
  always @(negedge clk) if (rst_n) begin
    cyc++;
    // handshake of the driven reply
    for (int s = 0; s < NSRC; s++) if (in_valid[s] && in_ready[s]) void'(pend.pop_front());
    if (out_valid && out_ready) begin
      int c;
      pend_t r;
      c = out_msg.proc;
      if (out_msg.typ == T_INDEX_READ) begin
        chk("index entry", 64'(out_msg.data), 64'(exp_idx[c]));
        r.due = cyc + $urandom_range(1, 12); r.m = '0; r.m.dst = U_DMA; r.m.typ = DMA_ADDR; r.m.proc = 3'(c);
        r.m.addr = dest_of(out_msg.data);
        pend.push_back(r);
      end else begin
        chk("scatter typ", 64'(out_msg.typ), 64'(T_SCATTER));
        chk("scatter dest", 64'(out_msg.addr), 64'(dest_of(exp_idx[c])));
        chk("scatter src", 64'(out_msg.data), 64'(exp_src[c]));
        chk("element left", 64'(left[c] > 0), 1);
        exp_src[c]++; exp_idx[c]++; left[c]--;
        r.due = cyc + $urandom_range(1, 30); r.m = '0; r.m.dst = U_DMA; r.m.typ = DMA_ACK; r.m.proc = 3'(c);
        pend.push_back(r);
      end
    end
    for (int c = 0; c < NUM_PROCS; c++) if (done[c]) begin
      dones[c]++;
      chk("done after all acks", 64'(acks_left[c]), 0);
      chk("done after all elements", 64'(left[c]), 0);
    end
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    out_ready = ($urandom_range(3) != 0);
    in_valid = '0;
    if (pend.size() > 0 && pend[0].due <= cyc) begin
      int s;
      s = $urandom_range(NSRC - 1);
      in_valid[s] = 1; in_msg[s] = pend[0].m;
      if (pend[0].m.typ == DMA_ACK) acks_left[pend[0].m.proc]--;
      // the ack count is decremented when the ack is offered; it is
      // accepted in the same cycle since only one call is offered at a time
    end
  end

  initial begin
    reg_we = 0; reg_proc = 0; reg_addr = 0; reg_wdata = 0; out_ready = 0; in_valid = '0;
    for (int s = 0; s < NSRC; s++) in_msg[s] = '0;
    for (int c = 0; c < NUM_PROCS; c++) begin left[c] = 0; acks_left[c] = 0; dones[c] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int started [NUM_PROCS];
      for (int c = 0; c < NUM_PROCS; c++) begin
        started[c] = 0;
        if ($urandom_range(2) != 0) begin
          int n;
          n = $urandom_range(1, 7);
          exp_src[c] = $urandom_range(0, 1000); exp_idx[c] = $urandom_range(0, 1000);
          left[c] = n; acks_left[c] = n; started[c] = 1;
          wr(c, 0, 32'(exp_src[c])); wr(c, 1, 32'(exp_idx[c])); wr(c, 2, 32'(n)); wr(c, 3, 1);
          chk("busy after start", 64'(busy[c]), 1);
        end
      end
      repeat (400) @(posedge clk);
      for (int c = 0; c < NUM_PROCS; c++) begin
        chk("finished", 64'(busy[c]), 0);
        chk("one done per transfer", 64'(dones[c]), 64'(started[c]));
        chk("all elements sent", 64'(left[c]), 0);
        dones[c] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
