// Object versioning table (OVT): the live versions of memory objects.
//
// Each ORT owns one OVT. A version is created whenever the ORT decodes a
// writer of an object (or first meets an object). A version record holds its
// usage count (users reported by the ORT, minus tasks that finished), a
// pointer to the next version, the operand of the task that writes it, its
// buffer address and the ORT entry (set, way) that names it.
//
//  * Output operand of a known object: the version is renamed. A new buffer
//    comes from the rename buckets and a DATA_READY (output side) goes at once
//    to the writer's TRS, which breaks write-after-read and write-after-write
//    dependencies. If the region is exhausted the new version instead reuses
//    the previous buffer and waits like an inout operand.
//  * Inout operand: not renamed. The new version inherits the buffer and its
//    writer gets DATA_READY (output side) only when every user of the
//    previous version has finished.
//  * Task finished (RELEASE from a TRS): the count is decremented. A version
//    is drained when its count is zero and no older version of the object is
//    still in use (versions drain oldest first, so a renamed result is never
//    copied back while readers of an older version still read the object).
//    A drained version that has a successor unblocks a waiting successor,
//    frees its own renamed buffer, and passes on to the successor if that one
//    has drained meanwhile. A drained latest version has its renamed buffer
//    copied back to the object's address by the external DMA engine, after
//    which the ORT entry is released and the record is freed.
//
// The ORT talks to its OVT over a direct request/response link (ort_req_*,
// ort_rsp_*), served one at a time and in order with the releases, so the
// decision to retire a version never races an ORT lookup: a lookup that
// reaches a version already retired gets `stale` and is redone as a miss.
// Requests from the ORT are served before RELEASE messages.
//
// Version records live in an array standing in for the OVT eDRAM; each
// request is charged LAT cycles of eDRAM access. Free records are chained
// through their next field. Field widths, the free-list form and the
// request priority are this design's choices. From a RELEASE message only
// the version number is used; the other message fields are unused.
module ovt
  import ts_pkg::*;
#(
  parameter int unsigned NVER          = 8192,
  parameter int unsigned LAT           = 22,
  parameter int unsigned EP            = EP_OVT0,
  parameter int unsigned REGION_CHUNKS = 64,
  parameter logic [AW-1:0] REGION_BASE = 40'h80_0000_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  // direct link from the ORT
  input  logic     ort_req_valid,
  input  ovt_req_t ort_req,
  output logic     ort_rsp_valid,
  output ovt_rsp_t ort_rsp,
  // entry release to the ORT (the ORT is always ready)
  output logic     rel_valid,
  output ort_rel_t rel,
  // network
  input  logic     in_valid,
  output logic     in_ready,
  input  ts_msg_t  in_msg,
  output logic     out_valid,
  input  logic     out_ready,
  output ts_msg_t  out_msg,
  // copy-back DMA
  output logic     dma_valid,
  input  logic     dma_ready,
  output logic [AW-1:0] dma_src,
  output logic [AW-1:0] dma_dst,
  output logic [SW-1:0] dma_size,
  input  logic     dma_done,
  // activity
  output logic     ev_rename,
  output logic     ev_inout_unblock,
  output logic     ev_copyback,
  output logic     ev_stale
);
  localparam int unsigned VW = $clog2(NVER);

  typedef struct packed {
    logic            valid;
    logic [15:0]     count;
    logic            has_next;
    logic [VW-1:0]   next;       // next version, or next free record
    logic            has_prev;   // an older version of the object is still in use
    opid_t           writer;
    logic            has_writer;
    logic [AW-1:0]   buf_addr;
    logic [AW-1:0]   orig;
    logic [SW-1:0]   size;
    logic            renamed;    // buffer came from the rename buckets
    logic            owns;       // this version frees the buffer
    logic            latest;
    logic            out_pending;
    logic [SETW-1:0] set;
    logic [WAYW-1:0] way;
  } ver_t;

  ver_t vtab [NVER];

  logic [VW-1:0] free_head;
  logic          free_head_v;
  logic [VW:0]   fresh;
  wire  can_alloc = free_head_v || (fresh != (VW+1)'(NVER));

  typedef enum logic [3:0] {S_IDLE, S_WAIT_REQ, S_EXEC_REQ, S_BKT, S_WAIT_REL, S_EXEC_REL,
                            S_DMA, S_DMA_WAIT, S_RELEASE, S_RSP, S_DRAIN, S_WAIT_DR} st_e;
  st_e st;
  logic [7:0]  lat_cnt;
  ovt_req_t    rq;
  logic [VW-1:0] rv;      // version named by a RELEASE
  logic [VW-1:0] nv;      // newly allocated record

  // output FIFO
  logic    of_push;
  ts_msg_t of_msg;
  logic [$clog2(9)-1:0] of_space;
  logic    of_in_ready;
  msg_fifo #(.DEPTH(8)) u_of (
    .clk, .rst_n, .in_valid(of_push), .in_ready(of_in_ready), .in_msg(of_msg),
    .out_valid, .out_ready, .out_msg, .space(of_space));

  // rename buckets
  logic          bk_alloc, bk_done, bk_fail, bk_free, bk_free_done, bk_chunk;
  logic [AW-1:0] bk_addr, bk_faddr;
  logic [SW-1:0] bk_fsize;
  logic [15:0]   bk_lost;
  rename_buckets #(.REGION_CHUNKS(REGION_CHUNKS), .REGION_BASE(REGION_BASE)) u_bk (
    .clk, .rst_n, .alloc_req(bk_alloc), .alloc_size(rq.size), .alloc_done(bk_done),
    .alloc_fail(bk_fail), .alloc_addr(bk_addr), .free_req(bk_free), .free_addr(bk_faddr),
    .free_size(bk_fsize), .free_done(bk_free_done), .lost(bk_lost), .chunk_event(bk_chunk));

  function automatic ts_msg_t ready_msg(input opid_t w, input logic [AW-1:0] b);
    ts_msg_t m;
    m = '0;
    m.mtype    = M_DATA_READY;
    m.dst      = trs_ep(w.trs);
    m.src      = EPW'(EP);
    m.id       = w;
    m.flag     = 1'b1;
    m.buf_addr = b;
    return m;
  endfunction

  function automatic logic live(input ver_t v, input logic [AW-1:0] a);
    return v.valid && v.latest && v.orig == a;
  endfunction

  assign in_ready = (st == S_IDLE) && !(ort_req_valid && !ort_rsp_valid) && of_space >= 2;
  assign rel      = '{set: vtab[rv].set, way: vtab[rv].way};
  assign dma_src  = vtab[rv].buf_addr;
  assign dma_dst  = vtab[rv].orig;
  assign dma_size = vtab[rv].size;
  assign dma_valid = (st == S_DMA);
  assign rel_valid = (st == S_RELEASE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; lat_cnt <= '0; rq <= '0; rv <= '0; nv <= '0;
      free_head <= '0; free_head_v <= 1'b0; fresh <= '0;
      ort_rsp_valid <= 1'b0; ort_rsp <= '0;
      of_push <= 1'b0; of_msg <= '0;
      bk_alloc <= 1'b0; bk_free <= 1'b0; bk_faddr <= '0; bk_fsize <= '0;
      ev_rename <= 1'b0; ev_inout_unblock <= 1'b0; ev_copyback <= 1'b0; ev_stale <= 1'b0;
    end else begin
      ort_rsp_valid <= 1'b0;
      of_push  <= 1'b0;
      bk_alloc <= 1'b0;
      bk_free  <= 1'b0;
      ev_rename <= 1'b0; ev_inout_unblock <= 1'b0; ev_copyback <= 1'b0; ev_stale <= 1'b0;
      case (st)
        S_IDLE: begin
          if (ort_req_valid && !ort_rsp_valid && of_space >= 2 &&
              (ort_req.kind == V_USE || can_alloc)) begin
            rq <= ort_req; lat_cnt <= 8'(LAT); st <= S_WAIT_REQ;
            // take a free record now for the requests that create a version
            if (ort_req.kind != V_USE) begin
              if (free_head_v) begin
                nv <= free_head;
                free_head_v <= vtab[free_head].has_next;
                free_head   <= vtab[free_head].next;
              end else begin
                nv    <= VW'(fresh);
                fresh <= fresh + 1'b1;
              end
            end
          end else if (in_valid && in_ready) begin
            rv <= VW'(in_msg.ver); lat_cnt <= 8'(LAT); st <= S_WAIT_REL;
          end
        end
        S_WAIT_REQ: if (lat_cnt == 0) st <= S_EXEC_REQ; else lat_cnt <= lat_cnt - 1'b1;
        S_EXEC_REQ: begin
          st <= S_RSP;
          ort_rsp.stale <= 1'b0;
          if (rq.kind != V_NEW_MISS && !live(vtab[VW'(rq.ver)], rq.addr)) begin
            // the version was retired while the lookup was in flight
            ort_rsp.stale <= 1'b1;
            ev_stale <= 1'b1;
            if (rq.kind != V_USE) begin       // give the record back
              vtab[nv].has_next <= free_head_v;
              vtab[nv].next     <= free_head;
              free_head   <= nv;
              free_head_v <= 1'b1;
            end
          end else begin
            case (rq.kind)
              V_USE: begin
                vtab[VW'(rq.ver)].count <= vtab[VW'(rq.ver)].count + 1'b1;
                ort_rsp.ver      <= rq.ver;
                ort_rsp.buf_addr <= vtab[VW'(rq.ver)].buf_addr;
              end
              V_NEW_MISS: begin
                vtab[nv] <= '{valid: 1'b1, count: 16'd1, has_next: 1'b0, next: '0, has_prev: 1'b0,
                              writer: rq.writer, has_writer: rq.dir != DIR_IN,
                              buf_addr: rq.addr, orig: rq.addr, size: rq.size,
                              renamed: 1'b0, owns: 1'b0, latest: 1'b1, out_pending: 1'b0,
                              set: rq.set, way: rq.way};
                ort_rsp.ver      <= VERW'(nv);
                ort_rsp.buf_addr <= rq.addr;
                if (rq.dir != DIR_IN) begin
                  of_push <= 1'b1;
                  of_msg  <= ready_msg(rq.writer, rq.addr);
                end
              end
              V_NEW_OUT: begin
                bk_alloc <= 1'b1;
                st <= S_BKT;
              end
              default: begin  // V_NEW_INOUT: keep the buffer, wait for the old version
                vtab[nv] <= '{valid: 1'b1, count: 16'd1, has_next: 1'b0, next: '0, has_prev: 1'b1,
                              writer: rq.writer, has_writer: 1'b1,
                              buf_addr: vtab[VW'(rq.ver)].buf_addr, orig: rq.addr, size: rq.size,
                              renamed: vtab[VW'(rq.ver)].renamed, owns: vtab[VW'(rq.ver)].owns,
                              latest: 1'b1, out_pending: 1'b1, set: rq.set, way: rq.way};
                vtab[VW'(rq.ver)].owns     <= 1'b0;
                vtab[VW'(rq.ver)].latest   <= 1'b0;
                vtab[VW'(rq.ver)].has_next <= 1'b1;
                vtab[VW'(rq.ver)].next     <= nv;
                ort_rsp.ver      <= VERW'(nv);
                ort_rsp.buf_addr <= vtab[VW'(rq.ver)].buf_addr;
              end
            endcase
          end
        end
        S_BKT: if (bk_done) begin
          // output operand of a known object: rename into a fresh buffer
          // (or, with the region exhausted, reuse the buffer and wait)
          vtab[nv] <= '{valid: 1'b1, count: 16'd1, has_next: 1'b0, next: '0, has_prev: 1'b1,
                        writer: rq.writer, has_writer: 1'b1,
                        buf_addr: bk_fail ? vtab[VW'(rq.ver)].buf_addr : bk_addr,
                        orig: rq.addr, size: rq.size,
                        renamed: bk_fail ? vtab[VW'(rq.ver)].renamed : 1'b1,
                        owns: bk_fail ? vtab[VW'(rq.ver)].owns : 1'b1,
                        latest: 1'b1, out_pending: bk_fail, set: rq.set, way: rq.way};
          if (bk_fail) vtab[VW'(rq.ver)].owns <= 1'b0;
          vtab[VW'(rq.ver)].latest   <= 1'b0;
          vtab[VW'(rq.ver)].has_next <= 1'b1;
          vtab[VW'(rq.ver)].next     <= nv;
          ort_rsp.ver      <= VERW'(nv);
          ort_rsp.buf_addr <= bk_fail ? vtab[VW'(rq.ver)].buf_addr : bk_addr;
          if (!bk_fail) begin
            of_push   <= 1'b1;
            of_msg    <= ready_msg(rq.writer, bk_addr);
            ev_rename <= 1'b1;
          end
          st <= S_RSP;
        end
        S_RSP: begin
          ort_rsp_valid <= 1'b1;
          st <= S_IDLE;
        end
        S_WAIT_REL: if (lat_cnt == 0) st <= S_EXEC_REL; else lat_cnt <= lat_cnt - 1'b1;
        S_EXEC_REL: begin
          vtab[rv].count <= vtab[rv].count - 1'b1;
          st <= (vtab[rv].count == 16'd1 && !vtab[rv].has_prev) ? S_DRAIN : S_IDLE;
        end
        // version rv has no users left and no older version in use
        S_DRAIN: begin
          st <= S_IDLE;
          if (!vtab[rv].latest) begin
            if (vtab[vtab[rv].next].out_pending) begin
              vtab[vtab[rv].next].out_pending <= 1'b0;
              of_push <= 1'b1;
              of_msg  <= ready_msg(vtab[vtab[rv].next].writer, vtab[vtab[rv].next].buf_addr);
              ev_inout_unblock <= 1'b1;
            end
            if (vtab[rv].renamed && vtab[rv].owns) begin
              bk_free  <= 1'b1;
              bk_faddr <= vtab[rv].buf_addr;
              bk_fsize <= vtab[rv].size;
            end
            vtab[vtab[rv].next].has_prev <= 1'b0;
            vtab[rv].valid    <= 1'b0;
            vtab[rv].has_next <= free_head_v;
            vtab[rv].next     <= free_head;
            free_head   <= rv;
            free_head_v <= 1'b1;
            // a successor that drained while waiting for this one goes next
            if (vtab[vtab[rv].next].count == 16'd0) begin
              rv <= vtab[rv].next; lat_cnt <= 8'(LAT); st <= S_WAIT_DR;
            end
          end else if (vtab[rv].renamed && vtab[rv].owns) begin
            st <= S_DMA;
          end else begin
            st <= S_RELEASE;
          end
        end
        S_WAIT_DR: if (lat_cnt == 0) st <= S_DRAIN; else lat_cnt <= lat_cnt - 1'b1;
        S_DMA: if (dma_ready) st <= S_DMA_WAIT;
        S_DMA_WAIT: if (dma_done) begin
          ev_copyback <= 1'b1;
          bk_free  <= 1'b1;
          bk_faddr <= vtab[rv].buf_addr;
          bk_fsize <= vtab[rv].size;
          st <= S_RELEASE;
        end
        S_RELEASE: begin
          // the ORT takes the release in this cycle
          vtab[rv].valid    <= 1'b0;
          vtab[rv].has_next <= free_head_v;
          vtab[rv].next     <= free_head;
          free_head   <= rv;
          free_head_v <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_of: assert property (@(posedge clk) disable iff (!rst_n) of_push |-> of_in_ready);
  a_rel_type: assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> in_msg.mtype == M_RELEASE);
endmodule
