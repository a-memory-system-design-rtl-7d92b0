// line_buffer: the controller's line buffers, where the data of a line is
// staged between two data pipes, or between a data pipe and the network.
//
// There are two 8-word line entries (slots) per tracking id: slot 0 holds the
// line being brought in (refill or cache-to-cache transfer), slot 1 a victim
// line being written back. A word is addressed by {tid, slot, word}. Each data
// pipe has a read port and a write port of two words (an even-aligned pair;
// a 32-bit access uses only the first word); the network unit has a
// one-word read port for the transmitter and a one-word write port for the
// receiver. Reads are combinational, writes take effect at the clock edge.
// Indexing the buffers by tracking id is this design's choice.
module line_buffer
  import sm_pkg::*;
#(
  parameter int NPIPE = NUM_TILES
) (
  input  logic                    clk,
  // data pipe ports
  input  logic [TID_W+3:0]        p_raddr [NPIPE],   // {tid, slot, word}
  output logic [1:0][WORD_W-1:0]  p_rdata [NPIPE],
  input  logic [1:0]              p_we    [NPIPE],
  input  logic [TID_W+3:0]        p_waddr [NPIPE],
  input  logic [1:0][WORD_W-1:0]  p_wdata [NPIPE],
  // network ports
  input  logic [TID_W+3:0]        n_raddr,
  output logic [WORD_W-1:0]       n_rdata,
  input  logic                    n_we,
  input  logic [TID_W+3:0]        n_waddr,
  input  logic [WORD_W-1:0]       n_wdata
);
  localparam int NW = NUM_TID * 2 * LINE_WORDS;
  logic [WORD_W-1:0] mem [NW];

  function automatic int widx(input logic [TID_W+3:0] a, input int k);
    return (int'(a) + k) % NW;
  endfunction

  always_comb begin
    for (int p = 0; p < NPIPE; p++) begin
      p_rdata[p][0] = mem[widx(p_raddr[p], 0)];
      p_rdata[p][1] = mem[widx(p_raddr[p], 1)];
    end
    n_rdata = mem[widx(n_raddr, 0)];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPIPE; p++) begin
      if (p_we[p][0]) mem[widx(p_waddr[p], 0)] <= p_wdata[p][0];
      if (p_we[p][1]) mem[widx(p_waddr[p], 1)] <= p_wdata[p][1];
    end
    if (n_we) mem[widx(n_waddr, 0)] <= n_wdata;
  end
endmodule
