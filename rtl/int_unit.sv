// int_unit: Interrupt unit. Keeps one pending interrupt bit per processor
// and drives the Tiles' interrupt lines.
//
// Sources: a DMA channel that finishes raises its own processor's bit
// (dma_done pulse), and any processor can raise or clear bits of any
// processors by writing its control registers: register INT_SET (address
// 8) ORs the written mask into the pending bits, register INT_CLR (address
// 9) clears the masked bits. A clear and a set in the same cycle leave the
// bit set. irq is the registered pending vector. The register map is this
// design's choice.
module int_unit
  import sm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reg_we,
  input  logic [3:0]            reg_addr,
  input  logic [WORD_W-1:0]     reg_wdata,
  input  logic [NUM_PROCS-1:0]  dma_done,
  output logic [NUM_PROCS-1:0]  irq
);
  localparam logic [3:0] INT_SET = 4'd8, INT_CLR = 4'd9;

  logic [NUM_PROCS-1:0] set_m, clr_m;
  always_comb begin
    set_m = dma_done;
    clr_m = '0;
    if (reg_we && reg_addr == INT_SET) set_m = set_m | reg_wdata[NUM_PROCS-1:0];
    if (reg_we && reg_addr == INT_CLR) clr_m = reg_wdata[NUM_PROCS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= '0;
    else        irq <= (irq & ~clr_m) | set_m;
  end
endmodule
