// Task reservation station (TRS): in-flight task storage and operand readiness.
//
// A TRS keeps the meta-data of its tasks in its eDRAM, an array of 128-byte
// blocks. A task gets one main block holding the task-global fields and its
// first 4 operands, plus up to three indirect blocks of 5 operands each (up
// to 19 operands); the slot number of a task is its main block number, so
// every message can address the task directly, with no associative lookup.
// Block layout (this design's): main block = 256-bit globals followed by four
// 192-bit operand entries; indirect block = five 192-bit entries and 64 bits
// of padding. Free blocks are managed by trs_block_alloc.
//
// Messages handled, one at a time from an input FIFO:
//   ALLOC_REQ  allocate the blocks, initialise the task, reply ALLOC_REP with
//              the slot (and whether a full-size task still fits).
//   SCALAR     store a scalar operand (needs no dependency tracking).
//   OP_INFO    store a decoded memory operand. A reader with a previous user
//              sends REGISTER CONSUMER to the TRS holding that user.
//   REG_CONS   record the consumer in the operand (consumer chaining: each
//              operand has at most one consumer, consumers form a list). If
//              the operand is a reader that is already ready, or its task is
//              gone, the consumer gets DATA_READY at once.
//   DATA_READY input side: the operand's data is in place; a reader
//              forwards it at once to its own consumer. Output side (from
//              the OVT): the output buffer may be written.
//   TASK_DONE  walk all operands: DATA_READY to every consumer still
//              waiting, RELEASE to the OVT of every memory operand, then
//              free the blocks and, if room came back, tell the gateway.
// A task whose operands have all arrived and are all ready is sent to the
// ready queue. Readiness is counted per task: operands still undecoded, and
// ready messages still expected (signed, since an output-ready from the OVT
// may overtake the ORT's operand message).
//
// Each access is a read or write of one whole block through an edram_bank of
// latency LAT; a message costs one or two block reads and writes. A bitmap
// of live main blocks (an on-chip memory cleared by a sweep of NBLK cycles
// after reset, during which no message is taken), with the task serial
// number stored in the globals, recognises messages for tasks already gone.
// Not every message field or block field is read by every step (for example
// padding bits and fields meaningful to other modules); a linter reports
// those bits as unused.
module trs
  import ts_pkg::*;
#(
  parameter int unsigned NBLK    = 6144,
  parameter int unsigned LAT     = 22,
  parameter int unsigned TRS_IDX = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ts_msg_t in_msg,
  output logic    out_valid,
  input  logic    out_ready,
  output ts_msg_t out_msg,
  output logic [$clog2(NBLK+1)-1:0] free_blocks,
  output logic    ev_chain,       // a REGISTER CONSUMER was sent
  output logic    ev_forward,     // a reader forwarded DATA_READY along its chain
  output logic    ev_stale,       // a consumer registered with a finished task
  output logic    ev_ready,       // a task became ready
  output logic    ev_indirect,    // a task needed indirect blocks
  output logic    ev_refill,
  output logic    ev_spill
);
  localparam int unsigned BW   = $clog2(NBLK);
  localparam int unsigned CW   = $clog2(NBLK + 1);
  localparam int unsigned EP   = EP_TRS0 + TRS_IDX;
  localparam int unsigned OPW  = 192;
  localparam int unsigned GLW  = 256;

  typedef struct packed {
    logic [29:0]     pad;
    logic            scalar;
    dir_e            dir;
    logic            info;
    logic            in_need;
    logic            in_ok;
    logic            out_need;
    logic            out_ok;
    logic            cons_v;
    logic            fwded;
    opid_t           cons;
    logic [AW-1:0]   addr;
    logic [SW-1:0]   size;
    logic [AW-1:0]   buf_addr;
    logic [VERW-1:0] ver;
    logic            ort;
  } ope_t;

  typedef struct packed {
    logic [138:0]      pad;
    logic [SERW-1:0]   serial;
    logic [AW-1:0]     kernel;
    logic [IDXW-1:0]   nops;
    logic [2:0]        nblk;
    logic [MAX_IND-1:0][SLOTW-1:0] ind;
    logic [IDXW-1:0]   infos;      // operands not yet decoded
    logic signed [6:0] readies;    // ready messages still expected
    logic              dispatched;
  } glob_t;

  // ---- eDRAM and block allocator -----------------------------------------
  logic          m_req, m_we, f_req, f_we, a_req, a_we, m_rvalid;
  logic [BW-1:0] m_addr, f_addr, a_addr;
  logic [1023:0] m_wdata, f_wdata, a_wdata, m_rdata;
  edram_bank #(.WIDTH(1024), .DEPTH(NBLK), .LATENCY(LAT)) u_mem (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .rdata(m_rdata), .rvalid(m_rvalid));

  logic          al_req, al_done, fr_req, fr_done;
  logic [BW-1:0] al_blk, fr_blk;
  trs_block_alloc #(.NBLK(NBLK)) u_alloc (
    .clk, .rst_n, .alloc_req(al_req), .alloc_done(al_done), .alloc_blk(al_blk),
    .free_req(fr_req), .free_blk(fr_blk), .free_done(fr_done), .free_count(free_blocks),
    .mem_req(a_req), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .mem_rdata(m_rdata), .mem_rvalid(m_rvalid), .refill_event(ev_refill), .spill_event(ev_spill));

  typedef enum logic [4:0] {
    S_IDLE, A_ALLOC, A_WRITE, U_RDM, U_WTM, U_RDI, U_WTI, U_MOD, U_WRM, U_WRI,
    D_RDM, D_WTM, D_OP, D_NEXT, D_RDI, D_WTI, D_FREE, D_SPACE, S_EMIT
  } st_e;
  st_e st, ret;

  // the allocator drives the eDRAM while it works
  wire alloc_phase = (st == A_ALLOC) || (st == D_FREE);
  assign m_req   = alloc_phase ? a_req   : f_req;
  assign m_we    = alloc_phase ? a_we    : f_we;
  assign m_addr  = alloc_phase ? a_addr  : f_addr;
  assign m_wdata = alloc_phase ? a_wdata : f_wdata;

  // ---- input and output FIFOs -------------------------------------------
  logic    if_valid, if_pop;
  ts_msg_t if_msg;
  msg_fifo #(.DEPTH(16)) u_if (
    .clk, .rst_n, .in_valid, .in_ready, .in_msg,
    .out_valid(if_valid), .out_ready(if_pop), .out_msg(if_msg), .space());

  logic    of_push, of_in_ready;
  ts_msg_t of_msg;
  logic [$clog2(9)-1:0] of_space;
  msg_fifo #(.DEPTH(8)) u_of (
    .clk, .rst_n, .in_valid(of_push), .in_ready(of_in_ready), .in_msg(of_msg),
    .out_valid, .out_ready, .out_msg, .space(of_space));

  // ---- state -------------------------------------------------------------
  ts_msg_t         m;
  logic [1023:0]   mb, ib;          // main and indirect block images
  logic [2:0]      k;               // block counter (alloc / free)
  logic [BW-1:0]   blks [MAX_BLOCKS];
  logic [IDXW-1:0] oi;              // operand index while finishing a task
  // live main blocks: a memory with no reset, cleared by a sweep after reset
  logic            live [NBLK];
  logic [BW:0]     lclr;
  wire             clearing = (lclr != (BW+1)'(NBLK));
  logic            live_we, live_d;
  logic [BW-1:0]   live_a;
  always_ff @(posedge clk) if (live_we) live[live_a] <= live_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lclr <= '0;
    else if (clearing) lclr <= lclr + 1'b1;
  end
  logic            advertised;
  ts_msg_t         em [4];
  logic [2:0]      em_n, em_i;

  assign of_push = (st == S_EMIT) && (em_i < em_n);
  assign of_msg  = em[em_i[1:0]];

  // position of operand i in its block
  function automatic int unsigned op_off(input logic [IDXW-1:0] i);
    if (i < 5'(OPS_MAIN)) return GLW + int'(i) * OPW;
    return ((int'(i) - OPS_MAIN) % OPS_INDIRECT) * OPW;
  endfunction
  function automatic logic [1:0] op_blk(input logic [IDXW-1:0] i);  // 0 = main
    if (i < 5'(OPS_MAIN)) return 2'd0;
    return 2'((int'(i) - OPS_MAIN) / OPS_INDIRECT + 1);
  endfunction

  function automatic ts_msg_t mk(input mtype_e t, input int unsigned dst);
    ts_msg_t r;
    r = '0;
    r.mtype = t;
    r.dst   = EPW'(dst);
    r.src   = EPW'(EP);
    return r;
  endfunction

  glob_t g_cur, g_rd;
  assign g_rd = glob_t'(m_rdata[GLW-1:0]);
  assign g_cur = glob_t'(mb[GLW-1:0]);
  wire [1:0] cur_blk = op_blk(m.id.idx);

  // ---- operand update (SCALAR, OP_INFO, DATA_READY, REG_CONS) ------------
  logic [1023:0] u_mb, u_ib;
  ts_msg_t       u_em [4];
  logic [2:0]    u_n;
  always_comb begin
    glob_t g;
    ope_t  o;
    int unsigned off;
    logic in_need, out_need;
    g   = g_cur;
    off = op_off(m.id.idx);
    o   = (cur_blk == 2'd0) ? ope_t'(mb[off +: OPW]) : ope_t'(ib[off +: OPW]);
    u_n = '0;
    for (int i = 0; i < 4; i++) u_em[i] = '0;
    in_need  = (m.dir != DIR_OUT) && m.flag;
    out_need = (m.dir != DIR_IN);
    case (m.mtype)
      M_SCALAR: begin
        o.scalar = 1'b1; o.info = 1'b1; o.addr = m.addr;
        g.infos  = g.infos - 1'b1;
      end
      M_OP_INFO: begin
        o.info = 1'b1; o.dir = m.dir; o.addr = m.addr; o.size = m.size;
        o.ver = m.ver; o.ort = m.ort; o.in_need = in_need; o.out_need = out_need;
        if (!o.out_ok) o.buf_addr = m.buf_addr;
        if (m.dir == DIR_IN && !m.flag) o.in_ok = 1'b1;   // object not in flight
        g.infos   = g.infos - 1'b1;
        g.readies = g.readies + 7'(in_need) + 7'(out_need);
        if (in_need) begin
          u_em[u_n[1:0]] = mk(M_REG_CONS, int'(trs_ep(m.id2.trs)));
          u_em[u_n[1:0]].id  = m.id2;
          u_em[u_n[1:0]].id2 = m.id;
          u_em[u_n[1:0]].buf_addr = m.buf_addr;
          u_n = u_n + 1'b1;
        end
      end
      M_DATA_READY: begin
        if (m.flag) begin o.out_ok = 1'b1; o.buf_addr = m.buf_addr; end
        else        o.in_ok = 1'b1;
        g.readies = g.readies - 7'sd1;
      end
      default: begin   // M_REG_CONS
        o.cons_v = 1'b1; o.cons = m.id2;
      end
    endcase
    // a reader passes the ready message down its consumer chain at once
    if (o.info && o.dir == DIR_IN && o.in_ok && o.cons_v && !o.fwded) begin
      u_em[u_n[1:0]] = mk(M_DATA_READY, int'(trs_ep(o.cons.trs)));
      u_em[u_n[1:0]].id = o.cons;
      u_em[u_n[1:0]].buf_addr = o.buf_addr;
      u_n = u_n + 1'b1;
      o.fwded = 1'b1;
    end
    if (g.infos == 0 && g.readies == 0 && !g.dispatched) begin
      g.dispatched = 1'b1;
      u_em[u_n[1:0]] = mk(M_READY_TASK, EP_RQ);
      u_em[u_n[1:0]].id = '{trs: TRSW'(TRS_IDX), slot: m.id.slot, idx: '0, serial: g.serial};
      u_em[u_n[1:0]].addr = g.kernel;
      u_n = u_n + 1'b1;
    end
    u_mb = mb;
    u_ib = ib;
    u_mb[GLW-1:0] = GLW'(g);
    if (cur_blk == 2'd0) u_mb[off +: OPW] = o;
    else                 u_ib[off +: OPW] = o;
  end

  // ---- task completion: messages for operand oi ---------------------------
  ts_msg_t d_em [2];
  logic [1:0] d_n;
  always_comb begin
    ope_t o;
    int unsigned off;
    off = op_off(oi);
    o   = (op_blk(oi) == 2'd0) ? ope_t'(mb[off +: OPW]) : ope_t'(ib[off +: OPW]);
    d_n = '0;
    d_em[0] = '0;
    d_em[1] = '0;
    if (!o.scalar) begin
      d_em[0] = mk(M_RELEASE, EP_OVT0 + int'(o.ort));
      d_em[0].ver = o.ver;
      d_em[0].id  = m.id;
      d_n = 2'd1;
    end
    if (o.cons_v && !o.fwded) begin
      d_em[d_n[0]] = mk(M_DATA_READY, int'(trs_ep(o.cons.trs)));
      d_em[d_n[0]].id = o.cons;
      d_em[d_n[0]].buf_addr = o.buf_addr;
      d_n = d_n + 1'b1;
    end
  end

  // ---- FSM driving the eDRAM ----------------------------------------------
  glob_t g_new;   // globals of a newly allocated task
  always_comb begin
    g_new = '0;
    g_new.serial = m.id.serial; g_new.kernel = m.addr; g_new.nops = m.nops;
    g_new.nblk = blocks_for(m.nops);
    for (int j = 0; j < MAX_IND; j++) g_new.ind[j] = SLOTW'(blks[j+1]);
    g_new.infos = m.nops;
  end

  always_comb begin
    f_req = 1'b0; f_we = 1'b0; f_addr = BW'(m.id.slot); f_wdata = mb;
    case (st)
      A_WRITE: begin
        f_req = 1'b1; f_we = 1'b1; f_addr = blks[k[1:0]];
        f_wdata = '0;
        if (k == 0) f_wdata[GLW-1:0] = GLW'(g_new);
      end
      U_RDM, D_RDM: f_req = 1'b1;
      U_RDI, D_RDI: begin
        f_req = 1'b1;
        f_addr = BW'(g_cur.ind[(st == U_RDI) ? cur_blk - 2'd1 : op_blk(oi) - 2'd1]);
      end
      U_WRM: begin f_req = 1'b1; f_we = 1'b1; end
      U_WRI: begin
        f_req = 1'b1; f_we = 1'b1; f_wdata = ib;
        f_addr = BW'(g_cur.ind[cur_blk - 2'd1]);
      end
      default: ;
    endcase
  end

  assign if_pop = (st == S_IDLE) && if_valid && of_space >= 4 && !clearing;

  // one write port: sweep, task start (A_WRITE, last block), task done
  always_comb begin
    live_we = 1'b0; live_d = 1'b0; live_a = blks[0];
    if (clearing) begin
      live_we = 1'b1; live_a = BW'(lclr);
    end else if (st == A_WRITE && k + 1'b1 == blocks_for(m.nops)) begin
      live_we = 1'b1; live_d = 1'b1;
    end else if (if_pop && if_msg.mtype == M_TASK_DONE) begin
      live_we = 1'b1; live_a = BW'(if_msg.id.slot);
    end
  end
  assign al_req = (st == A_ALLOC) && !al_done;
  assign fr_req = (st == D_FREE) && !fr_done && k != 0;
  assign fr_blk = blks[k[1:0] - 2'd1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ret <= S_IDLE; m <= '0; mb <= '0; ib <= '0;
      k <= '0; oi <= '0; advertised <= 1'b1; em_n <= '0; em_i <= '0;
      for (int i = 0; i < 4; i++) em[i] <= '0;
      for (int i = 0; i < MAX_BLOCKS; i++) blks[i] <= '0;
      ev_chain <= 1'b0; ev_forward <= 1'b0; ev_stale <= 1'b0; ev_ready <= 1'b0;
      ev_indirect <= 1'b0;
    end else begin
      ev_chain <= 1'b0; ev_forward <= 1'b0; ev_stale <= 1'b0; ev_ready <= 1'b0;
      ev_indirect <= 1'b0;
      case (st)
        S_IDLE: if (if_pop) begin
          m <= if_msg;
          case (if_msg.mtype)
            M_ALLOC_REQ: begin k <= '0; st <= A_ALLOC; end
            M_TASK_DONE: begin
              st <= D_RDM;
            end
            M_REG_CONS: begin
              if (!live[BW'(if_msg.id.slot)]) begin
                // the task is gone: its data is in place
                em[0] <= mk(M_DATA_READY, int'(trs_ep(if_msg.id2.trs)));
                em[0].id <= if_msg.id2;
                em[0].buf_addr <= if_msg.buf_addr;
                em_n <= 3'd1; em_i <= '0; ret <= S_IDLE; st <= S_EMIT;
                ev_stale <= 1'b1;
              end else st <= U_RDM;
            end
            default: st <= U_RDM;
          endcase
        end
        // ---- allocation -----------------------------------------------
        A_ALLOC: if (al_done) begin
          blks[k[1:0]] <= al_blk;
          if (k + 1'b1 == blocks_for(m.nops)) begin k <= '0; st <= A_WRITE; end
          else k <= k + 1'b1;
        end
        A_WRITE: begin
          if (k + 1'b1 == blocks_for(m.nops)) begin
            em[0] <= mk(M_ALLOC_REP, EP_GW);
            em[0].id <= '{trs: TRSW'(TRS_IDX), slot: SLOTW'(blks[0]), idx: '0, serial: m.id.serial};
            em[0].gwaddr <= m.gwaddr;
            em[0].flag <= free_blocks >= CW'(MAX_BLOCKS);
            advertised <= free_blocks >= CW'(MAX_BLOCKS);
            em_n <= 3'd1; em_i <= '0; ret <= S_IDLE; st <= S_EMIT;
            if (m.nops > 5'(OPS_MAIN)) ev_indirect <= 1'b1;
          end else k <= k + 1'b1;
        end
        // ---- operand update --------------------------------------------
        U_RDM: st <= U_WTM;
        U_WTM: if (m_rvalid) begin
          mb <= m_rdata;
          if (m.mtype == M_REG_CONS && g_rd.serial != m.id.serial) begin
            em[0] <= mk(M_DATA_READY, int'(trs_ep(m.id2.trs)));
            em[0].id <= m.id2;
            em[0].buf_addr <= m.buf_addr;
            em_n <= 3'd1; em_i <= '0; ret <= S_IDLE; st <= S_EMIT;
            ev_stale <= 1'b1;
          end else if (cur_blk != 2'd0) st <= U_RDI;
          else st <= U_MOD;
        end
        U_RDI: st <= U_WTI;
        U_WTI: if (m_rvalid) begin ib <= m_rdata; st <= U_MOD; end
        U_MOD: begin
          mb <= u_mb; ib <= u_ib;
          for (int i = 0; i < 4; i++) em[i] <= u_em[i];
          em_n <= u_n; em_i <= '0;
          ev_chain   <= (m.mtype == M_OP_INFO) && (m.dir != DIR_OUT) && m.flag;
          ev_forward <= (m.mtype != M_OP_INFO || !m.flag) && u_n != 0 &&
                        u_em[0].mtype == M_DATA_READY;
          ev_ready   <= u_n != 0 && u_em[2'(u_n - 1'b1)].mtype == M_READY_TASK;
          ret <= S_IDLE;
          st <= U_WRM;
        end
        U_WRM: st <= (cur_blk != 2'd0) ? U_WRI : S_EMIT;
        U_WRI: st <= S_EMIT;
        // ---- task completion --------------------------------------------
        D_RDM: st <= D_WTM;
        D_WTM: if (m_rvalid) begin
          mb <= m_rdata; oi <= '0; st <= D_OP;
          blks[0] <= BW'(m.id.slot);
          for (int j = 0; j < MAX_IND; j++) blks[j+1] <= BW'(g_rd.ind[j]);
        end
        D_OP: begin
          em[0] <= d_em[0]; em[1] <= d_em[1];
          em_n <= 3'(d_n); em_i <= '0; ret <= D_NEXT; st <= S_EMIT;
        end
        D_NEXT: begin
          if (oi + 1'b1 == g_cur.nops) begin
            k <= g_cur.nblk; st <= D_FREE;
          end else begin
            oi <= oi + 1'b1;
            if (op_blk(oi + 1'b1) != op_blk(oi)) st <= D_RDI;
            else st <= D_OP;
          end
        end
        D_RDI: st <= D_WTI;
        D_WTI: if (m_rvalid) begin ib <= m_rdata; st <= D_OP; end
        D_FREE: begin
          if (k == 0) st <= D_SPACE;
          else if (fr_done) k <= k - 1'b1;
        end
        D_SPACE: begin
          if (!advertised && free_blocks >= CW'(MAX_BLOCKS)) begin
            advertised <= 1'b1;
            em[0] <= mk(M_SPACE, EP_GW);
            em[0].id <= '{trs: TRSW'(TRS_IDX), slot: '0, idx: '0, serial: '0};
            em_n <= 3'd1; em_i <= '0; ret <= S_IDLE; st <= S_EMIT;
          end else st <= S_IDLE;
        end
        // ---- message emission -------------------------------------------
        S_EMIT: begin
          if (em_i >= em_n) st <= ret;
          else if (of_in_ready) begin
            if (em_i + 1'b1 == em_n) st <= ret;
            em_i <= em_i + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_ops: assert property (@(posedge clk) disable iff (!rst_n)
                          if_pop && if_msg.mtype == M_ALLOC_REQ |->
                          if_msg.nops != 0 && if_msg.nops <= 5'(MAX_OPS));
  a_room: assert property (@(posedge clk) disable iff (!rst_n)
                           if_pop && if_msg.mtype == M_ALLOC_REQ |->
                           free_blocks >= CW'(blocks_for(if_msg.nops)));
endmodule
