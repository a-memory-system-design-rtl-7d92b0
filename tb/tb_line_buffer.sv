// tb_line_buffer: random word and word-pair writes through the pipe and
// network ports, read back through the other ports and compared with a
// reference array.
module tb_line_buffer;
  import sm_pkg::*;
  localparam int NW = NUM_TID * 2 * LINE_WORDS;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0] p_raddr [4], p_waddr [4];
  logic [1:0][31:0] p_rdata [4], p_wdata [4];
  logic [1:0] p_we [4];
  logic [9:0] n_raddr, n_waddr;
  logic [31:0] n_rdata, n_wdata;
  logic n_we;
  logic [31:0] refm [NW];
  int checks = 0, failures = 0;

  line_buffer dut (.clk, .p_raddr, .p_rdata, .p_we, .p_waddr, .p_wdata, .n_raddr, .n_rdata, .n_we, .n_waddr, .n_wdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin p_we[p] = 0; p_raddr[p] = 0; p_waddr[p] = 0; p_wdata[p] = '0; end
    n_we = 0; n_raddr = 0; n_waddr = 0; n_wdata = 0;
    // fill through the network port
    for (int i = 0; i < NW; i++) begin
      n_we = 1; n_waddr = 10'(i); n_wdata = $urandom(); refm[i] = n_wdata;
      @(posedge clk); #1;
    end
    n_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int p, a;
      p = $urandom_range(3);
      a = $urandom_range(NW / 2 - 1) * 2;
      // pipe write of a pair
      p_we[p] = 2'($urandom_range(3)); p_waddr[p] = 10'(a); p_wdata[p][0] = $urandom(); p_wdata[p][1] = $urandom();
      @(posedge clk); #1;
      if (p_we[p][0]) refm[a] = p_wdata[p][0];
      if (p_we[p][1]) refm[a + 1] = p_wdata[p][1];
      p_we[p] = 0;
      // read back on a different pipe and on the network port
      p_raddr[(p + 1) % 4] = 10'(a);
      n_raddr = 10'(a + 1);
      #1;
      checks += 3;
      if (p_rdata[(p + 1) % 4][0] !== refm[a]) begin failures++; $display("FAIL pipe read word0 %0d", a); end
      if (p_rdata[(p + 1) % 4][1] !== refm[a + 1]) begin failures++; $display("FAIL pipe read word1 %0d", a); end
      if (n_rdata !== refm[a + 1]) begin failures++; $display("FAIL net read %0d", a + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
