// dma_unit: the controller's DMA channels, one per processor, each a
// programmable request generator. Implemented here: the indexed scatter of
// the streaming model.
//
// A processor programs its channel by register writes (reg_proc selects the
// channel): SRC (address 0) is the first local-memory line to send, IDX
// (1) the first entry of the index memory, CNT (2) the number of elements,
// and a write to CTRL (3) starts the transfer. For every element the
// channel issues an Index Read (returns the destination address from the
// index memory), then a line-size Scatter request carrying the destination
// address and the source line, then moves to the next element. Scatters
// are not waited for; every Scatter Reply comes back as an acknowledgement
// and the channel finishes, pulsing done (to the interrupt unit), when all
// elements are issued and acknowledged.
// One request leaves per cycle through a round-robin arbiter over the
// channels; incoming calls (DMA_ADDR, DMA_ACK) are accepted every cycle.
// Elements are one 32-byte line; element size is not programmable here.
// The register map is this design's choice.
module dma_unit
  import sm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  reg_we,
  input  logic [2:0]            reg_proc,
  input  logic [3:0]            reg_addr,
  input  logic [WORD_W-1:0]     reg_wdata,
  output logic [NUM_PROCS-1:0]  busy,
  output logic [NUM_PROCS-1:0]  done,
  // requests to the T-Unit
  output logic                  out_valid,
  output pc_msg_t               out_msg,
  input  logic                  out_ready,
  // calls into the DMA channels
  input  logic [NSRC-1:0]       in_valid,
  input  pc_msg_t               in_msg [NSRC],
  output logic [NSRC-1:0]       in_ready
);
  typedef enum logic [2:0] {CH_IDLE, CH_IDX, CH_WAIT_ADDR, CH_SCAT, CH_WAIT_ACK} ch_state_e;

  typedef struct packed {
    ch_state_e         state;
    logic [WORD_W-1:0] src;
    logic [WORD_W-1:0] idx;
    logic [WORD_W-1:0] cnt;
    logic [WORD_W-1:0] dst;
    logic [7:0]        outstanding;
  } ch_t;

  ch_t ch [NUM_PROCS];

  logic [NUM_PROCS-1:0] want, gnt;
  logic [2:0] gidx;
  logic [NSRC-1:0] igng;
  logic [$clog2(NSRC)-1:0] iidx;
  pc_msg_t im;

  always_comb begin
    for (int c = 0; c < NUM_PROCS; c++) begin
      want[c] = (ch[c].state == CH_IDX) || (ch[c].state == CH_SCAT);
      busy[c] = (ch[c].state != CH_IDLE);
    end
  end

  rr_arb #(.N(NUM_PROCS)) u_arb (.clk, .rst_n, .req(want), .advance(out_ready), .gnt, .gnt_idx(gidx));

  always_comb begin
    out_valid = |want;
    out_msg = '0;
    out_msg.dst  = U_T;
    out_msg.proc = gidx;
    if (ch[gidx].state == CH_IDX) begin
      out_msg.typ  = T_INDEX_READ;
      out_msg.data = ch[gidx].idx;
    end else begin
      out_msg.typ  = T_SCATTER;
      out_msg.addr = ch[gidx].dst;
      out_msg.data = ch[gidx].src;
    end
  end

  rr_arb #(.N(NSRC)) u_iarb (.clk, .rst_n, .req(in_valid), .advance(1'b1), .gnt(igng), .gnt_idx(iidx));
  assign in_ready = igng;
  assign im = in_msg[iidx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_PROCS; c++) ch[c] <= '0;
      done <= '0;
    end else begin
      done <= '0;
      for (int c = 0; c < NUM_PROCS; c++) begin
        logic ack;
        ack = |igng && im.proc == 3'(c) && im.typ == DMA_ACK;
        // register writes
        if (reg_we && reg_proc == 3'(c) && ch[c].state == CH_IDLE) begin
          case (reg_addr)
            4'd0: ch[c].src <= reg_wdata;
            4'd1: ch[c].idx <= reg_wdata;
            4'd2: ch[c].cnt <= reg_wdata;
            4'd3: if (ch[c].cnt != 0) ch[c].state <= CH_IDX;
            default: ;
          endcase
        end
        case (ch[c].state)
          CH_IDX: if (out_ready && gnt[c]) ch[c].state <= CH_WAIT_ADDR;
          CH_WAIT_ADDR:
            if (|igng && im.proc == 3'(c) && im.typ == DMA_ADDR) begin
              ch[c].dst   <= im.addr;
              ch[c].state <= CH_SCAT;
            end
          CH_SCAT:
            if (out_ready && gnt[c]) begin
              ch[c].src <= ch[c].src + 1;
              ch[c].idx <= ch[c].idx + 1;
              ch[c].cnt <= ch[c].cnt - 1;
              ch[c].state <= (ch[c].cnt == 1) ? CH_WAIT_ACK : CH_IDX;
            end
          CH_WAIT_ACK:
            if (ch[c].outstanding == 8'(ack)) begin
              ch[c].state <= CH_IDLE;
              done[c] <= 1'b1;
            end
          default: ;
        endcase
        ch[c].outstanding <= ch[c].outstanding
                             + ((ch[c].state == CH_SCAT && out_ready && gnt[c]) ? 8'd1 : 8'd0)
                             - (ack ? 8'd1 : 8'd0);
      end
    end
  end
endmodule
