// tb_int_unit: DMA completion raises its processor's interrupt; INT_SET and
// INT_CLR register writes raise and clear any processors' interrupts.
module tb_int_unit;
  import sm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we;
  logic [3:0] addr;
  logic [31:0] wd;
  logic [7:0] done, irq, exp;
  int checks = 0, failures = 0;

  int_unit dut (.clk, .rst_n, .reg_we(we), .reg_addr(addr), .reg_wdata(wd), .dma_done(done), .irq);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; addr = 0; wd = 0; done = 0; exp = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [7:0] s, c;
      @(posedge clk); #1;
      done = 8'($urandom()) & 8'($urandom());
      we = $urandom_range(1);
      addr = $urandom_range(1) ? 4'd8 : ($urandom_range(1) ? 4'd9 : 4'd2);
      wd = $urandom();
      s = done; c = 0;
      if (we && addr == 8) s |= wd[7:0];
      if (we && addr == 9) c = wd[7:0];
      exp = (exp & ~c) | s;
      @(posedge clk); #1;
      we = 0; done = 0;
      checks++;
      if (irq !== exp) begin failures++; $display("FAIL irq %h exp %h", irq, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
