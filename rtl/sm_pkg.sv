// sm_pkg: types, sizes and the default microcode shared by the Tile memory
// and the programmable protocol controller.
//
// The controller is built from units (P, T, S, D, N, DMA) that call each
// other's "subroutines" by passing a request message (pc_msg_t) that names the
// destination unit and a subroutine number. Every unit holds a configuration
// memory indexed by that number; the default contents below program a
// cache-coherent shared memory (a MESI-style write-invalidate protocol over
// direct-mapped data caches) plus the indexed DMA scatter of the streaming
// model. The sizes that come from the published design are the 4 Tiles of
// 2 processors, 16 mats per Tile, 32-byte lines and 28 MSHRs (24 for processor
// requests, 4 for coherence requests). Mat depth, metadata width, subroutine
// numbering, message formats and the cache layout inside a Tile are this
// implementation's own choices.
package sm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int NUM_TILES      = 4;
  localparam int PROCS_PER_TILE = 2;
  localparam int NUM_PROCS      = NUM_TILES * PROCS_PER_TILE;
  localparam int MATS           = 16;     // memory mats per Tile
  localparam int WORD_W         = 32;
  localparam int META_W         = 8;      // control-array bits per word
  localparam int ROW_W          = 10;     // mat row address width (1024 words)
  localparam int LINE_WORDS     = 8;      // 32-byte line
  localparam int NUM_MSHR_P     = 24;     // MSHRs for processor requests
  localparam int NUM_MSHR_C     = 4;      // MSHRs for coherence requests
  localparam int NUM_MSHR       = NUM_MSHR_P + NUM_MSHR_C;
  localparam int NUM_USHR       = 8;
  localparam int NUM_TID        = NUM_MSHR + NUM_USHR;  // 0..27 MSHR, 28..35 USHR
  localparam int TID_W          = 6;
  localparam int NSRC           = 7;      // producers of calls inside the controller
  localparam int PROC_PORTS     = 4;      // crossbar ports per Tile: 2 procs x (instr, data)
  localparam int NUM_XB_MASTERS = PROC_PORTS + 2;  // + S-Unit port + D-Unit data pipe port

  // Cache layout inside a Tile (this design's choice, after the Tile
  // example with one tag mat and four interleaved data mats):
  //   processor 0 of the Tile: tag mat 0, data mats 1..4
  //   processor 1 of the Tile: tag mat 5, data mats 6..9
  //   local (scratchpad) memory: mats 10..13, index memory: mat 14, FIFO: mat 15
  localparam int LM_BASE_MAT  = 10;
  localparam int IDX_MAT      = 14;
  localparam int FIFO_MAT     = 15;
  localparam int SET_W        = 9;        // 512 sets x 32 B = 16 KB per data cache
  localparam int TAG_LSB      = SET_W + 5;

  function automatic int tag_mat(input logic [2:0] proc);
    return proc[0] ? 5 : 0;
  endfunction
  function automatic int data_mat_base(input logic [2:0] proc);
    return proc[0] ? 6 : 1;
  endfunction
  function automatic logic [1:0] tile_of(input logic [2:0] proc);
    return proc[2:1];
  endfunction

  // ---------------------------------------------------------------- cache state
  // metadata bits of a tag word: [1:0] line state, [2] R (reserved) bit
  typedef enum logic [1:0] {ST_I = 2'd0, ST_S = 2'd1, ST_E = 2'd2, ST_M = 2'd3} cstate_e;
  localparam int META_R_BIT = 2;

  // ---------------------------------------------------------------- mat access
  typedef struct packed {
    logic                en;
    logic                we_data;     // write wdata into the data array
    logic                guard_en;    // data write only when the selected IMCN line is high
    logic                guard_sel;
    logic                imcn_drive;  // drive total match onto an IMCN line
    logic                imcn_sel;
    logic                rmw_en;      // update the control array (metadata)
    logic                rmw_on_match;// ... only if the data comparator matched
    logic [7:0]          state_map;   // new state = state_map[2*old +: 2]
    logic [META_W-1:0]   meta_set;
    logic [META_W-1:0]   meta_clr;
    logic [META_W-1:0]   cmp_mask;    // metadata comparator mask
    logic [META_W-1:0]   cmp_meta;
    logic                fifo_push;   // address from the tail pointer
    logic                fifo_pop;    // address from the head pointer
    logic [ROW_W-1:0]    row;
    logic [WORD_W-1:0]   wdata;       // write data and data-comparator operand
  } mat_req_t;

  typedef struct packed {
    logic [WORD_W-1:0] rdata;
    logic [META_W-1:0] rmeta;
    logic              dmatch;   // data comparator
    logic              tmatch;   // total match (data and metadata comparators)
    logic              fifo_empty;
    logic              fifo_full;
  } mat_rsp_t;

  localparam mat_req_t MAT_IDLE = '0;

  // ---------------------------------------------------------------- controller messages
  typedef enum logic [2:0] {
    U_NONE = 3'd0, U_T = 3'd1, U_S = 3'd2, U_D = 3'd3, U_N = 3'd4, U_P = 3'd5, U_DMA = 3'd6
  } unit_e;

  // subroutine numbers; each unit uses its own subset
  typedef enum logic [4:0] {
    R_NOP            = 5'd0,
    T_READ_MISS      = 5'd1,
    T_WRITE_MISS     = 5'd2,
    T_REFILL         = 5'd3,
    T_DONE           = 5'd4,
    T_READ_EX        = 5'd5,
    T_COH_DONE       = 5'd6,
    T_INDEX_READ     = 5'd7,
    T_SCATTER        = 5'd8,
    T_SCATTER_REPLY  = 5'd9,
    S_READ_MISS      = 5'd10,
    S_WRITE_MISS     = 5'd11,
    S_TAG_WRITE      = 5'd12,
    S_SNOOP          = 5'd13,
    S_INDEX_READ     = 5'd14,
    D_WRITEBACK      = 5'd15,
    D_WB_C2C         = 5'd16,
    D_C2C            = 5'd17,
    D_LINE_WRITE     = 5'd18,
    D_LINE_READ      = 5'd19,
    D_LINE_READ_SCAT = 5'd20,
    N_CACHE_MISS     = 5'd21,
    N_WRITEBACK      = 5'd22,
    N_COH_REPLY      = 5'd23,
    N_COH_REPLY_DATA = 5'd24,
    N_SCATTER        = 5'd25,
    P_REPLY          = 5'd26,
    DMA_ADDR         = 5'd27,
    DMA_ACK          = 5'd28
  } sub_e;

  typedef struct packed {
    unit_e             dst;
    logic [4:0]        typ;
    logic [TID_W-1:0]  tid;
    logic [2:0]        proc;    // requesting processor (its cache, Tile, DMA channel)
    logic [2:0]        peer;    // another cache taking part (cache-to-cache source)
    logic [1:0]        st;      // line state to install
    logic [WORD_W-1:0] addr;
    logic [WORD_W-1:0] data;    // victim line address, index pointer or source line
  } pc_msg_t;

  typedef struct packed {
    unit_e      unit;
    logic [4:0] typ;
  } call_t;

  localparam call_t NO_CALL = '{unit: U_NONE, typ: 5'd0};

  // call producers (index of the router inputs)
  localparam int SRC_P = 0, SRC_T = 1, SRC_S = 2, SRC_D = 3, SRC_NRX = 4, SRC_NTX = 5, SRC_DMA = 6;

  // ---------------------------------------------------------------- processor side
  typedef enum logic [2:0] {
    PM_READ_MISS = 3'd0, PM_WRITE_MISS = 3'd1, PM_UPGRADE = 3'd2
  } pmsg_e;

  typedef struct packed {
    logic [2:0]        ptype;
    logic [WORD_W-1:0] addr;
  } preq_t;

  typedef struct packed {
    logic [TID_W-1:0]  tid;
    logic [WORD_W-1:0] addr;
  } prsp_t;

  // ---------------------------------------------------------------- network
  typedef enum logic [3:0] {
    NET_READ_MISS  = 4'd0, NET_WRITE_MISS = 4'd1, NET_WRITEBACK = 4'd2, NET_REFILL = 4'd3,
    NET_COH_REQ    = 4'd4, NET_COH_REPLY  = 4'd5, NET_SCATTER   = 4'd6, NET_SCATTER_REPLY = 4'd7
  } net_e;

  typedef struct packed {
    logic              vc;       // 0: request channel, 1: reply channel
    logic              head;
    logic              tail;
    logic [3:0]        ntype;
    logic [TID_W-1:0]  tid;
    logic [2:0]        proc;
    logic [WORD_W-1:0] addr;
    logic [WORD_W-1:0] data;
  } flit_t;

  // ---------------------------------------------------------------- microcode formats
  typedef enum logic [2:0] {
    TA_NONE = 3'd0, TA_ALLOC_MSHR_P = 3'd1, TA_ALLOC_MSHR_C = 3'd2, TA_ALLOC_USHR = 3'd3,
    TA_RETRIEVE = 3'd4, TA_RELEASE = 3'd5, TA_RETRIEVE_RELEASE = 3'd6
  } t_act_e;

  typedef struct packed {
    t_act_e     act;
    logic       lookup;     // serialize against outstanding MSHRs with the same line
    logic [1:0] st;         // state to install, kept in the tracking register
    call_t      call;
  } t_uc_t;

  typedef enum logic [1:0] {
    SO_NONE = 2'd0, SO_PROBE = 2'd1, SO_TAG_WRITE = 2'd2, SO_INDEX_READ = 2'd3
  } s_own_e;

  typedef struct packed {
    s_own_e     own;        // access to the requester's own mats
    logic       snoop;      // access to the tag mats of other caches
    logic       snoop_all;  // include the requester's own cache in the snoop
    logic [7:0] snoop_map;  // state map applied to matching snooped lines
    logic [2:0] dm_row;     // row of the decision table
  } s_uc_t;

  typedef struct packed {
    call_t      call0;
    call_t      call1;
    logic       set_st;     // overwrite msg.st with st
    logic [1:0] st;
    logic       addr_from_rd; // msg.addr <= word read by the own access
  } s_dm_t;

  // one step of a D-Unit subroutine: a line moved between a mat group and the line buffer
  typedef enum logic [1:0] {DW_OWN = 2'd0, DW_PEER = 2'd1, DW_LM = 2'd2} d_where_e;

  typedef struct packed {
    logic       valid;
    logic       write;      // 1: line buffer -> mats, 0: mats -> line buffer
    logic       wide;       // 64-bit (two mats) accesses
    d_where_e   where;
    logic       slot;       // line buffer slot of this tracking id
  } d_step_t;

  typedef struct packed {
    d_step_t [2:0] step;
    call_t         call0;
    call_t         call1;
  } d_uc_t;

  // operation of one data pipe (one step, plus what remains of the subroutine)
  typedef struct packed {
    pc_msg_t       msg;
    logic [1:0]    nstep;   // index of this step
    logic          write;
    logic          wide;
    logic          slot;
    logic [3:0]    base_mat;
    logic [ROW_W-1:0] row;
  } d_op_t;

  typedef struct packed {
    logic [3:0] ntype;
    logic       vc;
    logic       addr_from_data;
    logic       with_data;
    logic       slot;
    call_t      call;       // call made after the message is sent
  } n_tx_uc_t;

  typedef struct packed {
    logic       valid;
    logic       with_data;
    logic [4:0] t_typ;
  } n_rx_uc_t;

  // ---------------------------------------------------------------- default program
  function automatic call_t mk_call(input unit_e u, input sub_e s);
    mk_call.unit = u;
    mk_call.typ  = s;
  endfunction

  localparam logic [7:0] MAP_ALL_I   = {ST_I, ST_I, ST_I, ST_I};
  // read snoop: M -> I (ownership migrates), E -> S, S -> S, I -> I
  localparam logic [7:0] MAP_READ    = {ST_I, ST_S, ST_S, ST_I};

  function automatic t_uc_t t_default(input logic [4:0] typ);
    t_uc_t u;
    u = '0;
    case (typ)
      T_READ_MISS:     begin u.act = TA_ALLOC_MSHR_P; u.lookup = 1'b1; u.st = ST_E; u.call = mk_call(U_S, S_READ_MISS);  end
      T_WRITE_MISS:    begin u.act = TA_ALLOC_MSHR_P; u.lookup = 1'b1; u.st = ST_M; u.call = mk_call(U_S, S_WRITE_MISS); end
      T_REFILL:        begin u.act = TA_RETRIEVE;                         u.call = mk_call(U_D, D_LINE_WRITE); end
      T_DONE:          begin u.act = TA_RELEASE; end
      T_READ_EX:       begin u.act = TA_ALLOC_MSHR_C;                     u.call = mk_call(U_S, S_SNOOP); end
      T_COH_DONE:      begin u.act = TA_RELEASE; end
      T_INDEX_READ:    begin u.act = TA_NONE;                             u.call = mk_call(U_S, S_INDEX_READ); end
      T_SCATTER:       begin u.act = TA_ALLOC_USHR;                       u.call = mk_call(U_D, D_LINE_READ_SCAT); end
      T_SCATTER_REPLY: begin u.act = TA_RETRIEVE_RELEASE;                 u.call = mk_call(U_DMA, DMA_ACK); end
      default: ;
    endcase
    return u;
  endfunction

  function automatic s_uc_t s_default(input logic [4:0] typ);
    s_uc_t u;
    u = '0;
    case (typ)
      S_READ_MISS:  begin u.own = SO_PROBE; u.snoop = 1'b1; u.snoop_map = MAP_READ;  u.dm_row = 3'd0; end
      S_WRITE_MISS: begin u.own = SO_PROBE; u.snoop = 1'b1; u.snoop_map = MAP_ALL_I; u.dm_row = 3'd1; end
      S_SNOOP:      begin u.snoop = 1'b1; u.snoop_all = 1'b1; u.snoop_map = MAP_ALL_I; u.dm_row = 3'd2; end
      S_INDEX_READ: begin u.own = SO_INDEX_READ; u.dm_row = 3'd3; end
      S_TAG_WRITE:  begin u.own = SO_TAG_WRITE;  u.dm_row = 3'd4; end
      default: ;
    endcase
    return u;
  endfunction

  // decision table, indexed by {row, remote_dirty, remote_hit, victim_dirty}
  function automatic s_dm_t s_dm_default(input logic [5:0] idx);
    s_dm_t d;
    logic [2:0] row;
    logic vd, rh, rd;
    d = '0;
    row = idx[5:3];
    vd = idx[0]; rh = idx[1]; rd = idx[2];
    case (row)
      3'd0, 3'd1: begin   // read miss / write miss
        if (!rh) begin
          d.call0 = mk_call(U_N, N_CACHE_MISS);
          d.call1 = vd ? mk_call(U_D, D_WRITEBACK) : NO_CALL;
        end else begin
          d.call0 = vd ? mk_call(U_D, D_WB_C2C) : mk_call(U_D, D_C2C);
          d.set_st = 1'b1;
          d.st = (row == 3'd1 || rd) ? ST_M : ST_S;
        end
      end
      3'd2: d.call0 = rd ? mk_call(U_D, D_LINE_READ) : mk_call(U_N, N_COH_REPLY);
      3'd3: begin d.call0 = mk_call(U_DMA, DMA_ADDR); d.addr_from_rd = 1'b1; end
      3'd4: begin d.call0 = mk_call(U_P, P_REPLY); d.call1 = mk_call(U_T, T_DONE); end
      default: ;
    endcase
    return d;
  endfunction

  function automatic d_uc_t d_default(input logic [4:0] typ);
    d_uc_t u;
    u = '0;
    case (typ)
      D_WRITEBACK: begin
        u.step[0] = '{valid: 1'b1, write: 1'b0, wide: 1'b1, where: DW_OWN, slot: 1'b1};
        u.call0   = mk_call(U_N, N_WRITEBACK);
      end
      D_C2C: begin
        u.step[0] = '{valid: 1'b1, write: 1'b0, wide: 1'b1, where: DW_PEER, slot: 1'b0};
        u.step[1] = '{valid: 1'b1, write: 1'b1, wide: 1'b1, where: DW_OWN,  slot: 1'b0};
        u.call0   = mk_call(U_S, S_TAG_WRITE);
      end
      D_WB_C2C: begin
        u.step[0] = '{valid: 1'b1, write: 1'b0, wide: 1'b1, where: DW_OWN,  slot: 1'b1};
        u.step[1] = '{valid: 1'b1, write: 1'b0, wide: 1'b1, where: DW_PEER, slot: 1'b0};
        u.step[2] = '{valid: 1'b1, write: 1'b1, wide: 1'b1, where: DW_OWN,  slot: 1'b0};
        u.call0   = mk_call(U_S, S_TAG_WRITE);
        u.call1   = mk_call(U_N, N_WRITEBACK);
      end
      D_LINE_WRITE: begin
        u.step[0] = '{valid: 1'b1, write: 1'b1, wide: 1'b1, where: DW_OWN, slot: 1'b0};
        u.call0   = mk_call(U_S, S_TAG_WRITE);
      end
      D_LINE_READ: begin
        u.step[0] = '{valid: 1'b1, write: 1'b0, wide: 1'b1, where: DW_PEER, slot: 1'b0};
        u.call0   = mk_call(U_N, N_COH_REPLY_DATA);
      end
      D_LINE_READ_SCAT: begin
        u.step[0] = '{valid: 1'b1, write: 1'b0, wide: 1'b0, where: DW_LM, slot: 1'b0};
        u.call0   = mk_call(U_N, N_SCATTER);
      end
      default: ;
    endcase
    return u;
  endfunction

  function automatic n_tx_uc_t ntx_default(input logic [4:0] typ);
    n_tx_uc_t u;
    u = '0;
    case (typ)
      N_CACHE_MISS:     begin u.ntype = NET_READ_MISS; end
      N_WRITEBACK:      begin u.ntype = NET_WRITEBACK; u.addr_from_data = 1'b1; u.with_data = 1'b1; u.slot = 1'b1; end
      N_COH_REPLY:      begin u.ntype = NET_COH_REPLY; u.vc = 1'b1; u.call = mk_call(U_T, T_COH_DONE); end
      N_COH_REPLY_DATA: begin u.ntype = NET_COH_REPLY; u.vc = 1'b1; u.with_data = 1'b1; u.call = mk_call(U_T, T_COH_DONE); end
      N_SCATTER:        begin u.ntype = NET_SCATTER; u.with_data = 1'b1; end
      default: ;
    endcase
    return u;
  endfunction

  function automatic n_rx_uc_t nrx_default(input logic [3:0] ntype);
    n_rx_uc_t u;
    u = '0;
    case (ntype)
      NET_REFILL:        begin u.valid = 1'b1; u.with_data = 1'b1; u.t_typ = T_REFILL; end
      NET_COH_REQ:       begin u.valid = 1'b1; u.t_typ = T_READ_EX; end
      NET_SCATTER_REPLY: begin u.valid = 1'b1; u.t_typ = T_SCATTER_REPLY; end
      default: ;
    endcase
    return u;
  endfunction

  function automatic logic [4:0] p_default(input logic [2:0] ptype);
    case (ptype)
      PM_READ_MISS:  return T_READ_MISS;
      PM_WRITE_MISS: return T_WRITE_MISS;
      PM_UPGRADE:    return T_WRITE_MISS;
      default:       return R_NOP;
    endcase
  endfunction

  // configuration-write bus: selects a unit's configuration memory
  typedef enum logic [2:0] {
    CFG_P = 3'd0, CFG_T = 3'd1, CFG_S = 3'd2, CFG_SDM = 3'd3, CFG_D = 3'd4,
    CFG_NTX = 3'd5, CFG_NRX = 3'd6, CFG_DPIPE = 3'd7
  } cfg_sel_e;

  typedef struct packed {
    logic       we;
    cfg_sel_e   sel;
    logic [5:0] addr;
    logic [63:0] wdata;
  } cfg_wr_t;

endpackage
