// Object renaming table (ORT): maps a memory object to its last user.
//
// The ORT is a 16-way set-associative logical cache of memory objects kept
// in its eDRAM and looked up by the object's base address. For every operand
// it decodes it remembers the last user of the object (the operand id of the
// most recent task touching it, reader or writer, which the TRSs need for
// consumer chaining), the object's current version in the paired OVT and
// that version's buffer address.
//
// Per operand (M_OPERAND from the gateway):
//   1. the set's tags are read from eDRAM, 8 tags (one 64-byte block) at a
//      time, block after block, and matched against the base address;
//   2. on a hit the way's data word is read; then the OVT is asked to
//      count a new reader (input), to create a renamed version (output) or
//      a chained version (inout); on a miss a free way is taken and the OVT
//      creates a first version;
//   3. the decoded operand goes to its task's TRS as M_OP_INFO, naming the
//      previous user as the producer to wait for when the operand reads the
//      object and a previous user exists; the way's entry is updated.
// Entries are never evicted. A miss in a set whose ways are all in use
// stalls the ORT (and with it the gateway) until the OVT releases an entry
// of that set; the OVT releases an entry when the last version of the
// object has no users left. Valid bits are kept in a small on-chip memory
// (one word of WAYS bits per set, two read and two write ports) so a release
// takes effect at once, in any state; after reset a sweep clears one set per
// cycle, during which no operand is accepted.
//
// The set index is an XOR fold of the address above its 6 low bits (this
// design's choice). Data words hold last user, version and buffer address.
module ort
  import ts_pkg::*;
#(
  parameter int unsigned SETS    = 1024,
  parameter int unsigned WAYS    = 16,
  parameter int unsigned LAT     = 22,
  parameter int unsigned ORT_IDX = 0,
  parameter int unsigned EP      = EP_ORT0
) (
  input  logic     clk,
  input  logic     rst_n,
  // network
  input  logic     in_valid,
  output logic     in_ready,
  input  ts_msg_t  in_msg,
  output logic     out_valid,
  input  logic     out_ready,
  output ts_msg_t  out_msg,
  // direct link to the OVT
  output logic     ovt_req_valid,
  output ovt_req_t ovt_req,
  input  logic     ovt_rsp_valid,
  input  ovt_rsp_t ovt_rsp,
  input  logic     rel_valid,
  input  ort_rel_t rel,
  // activity
  output logic     ev_hit,
  output logic     ev_miss,
  output logic     ev_full_stall
);
  localparam int unsigned TPB  = 8;                          // tags per 64-byte block
  localparam int unsigned NTB  = (WAYS + TPB - 1) / TPB;     // tag blocks per set
  localparam int unsigned SW_  = $clog2(SETS);
  localparam int unsigned TW   = $clog2(SETS * NTB);
  localparam int unsigned DW   = $clog2(SETS * WAYS);

  typedef struct packed {
    opid_t           last;
    logic [VERW-1:0] ver;
    logic [AW-1:0]   buf_addr;
  } ent_t;

  // tag store: SETS x NTB blocks of 8 x 64-bit tags
  logic          t_req, t_we;
  logic [TW-1:0] t_addr;
  logic [511:0]  t_wdata, t_rdata;
  logic          t_rvalid;
  edram_bank #(.WIDTH(512), .DEPTH(SETS * NTB), .LATENCY(LAT)) u_tags (
    .clk, .rst_n, .req(t_req), .we(t_we), .addr(t_addr), .wdata(t_wdata),
    .rdata(t_rdata), .rvalid(t_rvalid));

  // entry store: one word per way
  logic          d_req, d_we;
  logic [DW-1:0] d_addr;
  ent_t          d_wdata, d_rdata;
  logic          d_rvalid;
  edram_bank #(.WIDTH($bits(ent_t)), .DEPTH(SETS * WAYS), .LATENCY(LAT)) u_data (
    .clk, .rst_n, .req(d_req), .we(d_we), .addr(d_addr), .wdata(d_wdata),
    .rdata(d_rdata), .rvalid(d_rvalid));

  // Valid bits: a memory of one word per set with no reset; after reset a
  // sweep clears one set per cycle while the ORT accepts no operands.
  logic [WAYS-1:0] valid [SETS];

  typedef enum logic [3:0] {S_IDLE, S_TRD, S_TWAIT, S_DRD, S_DWAIT, S_MISS, S_OVT,
                            S_TRD_W, S_TWAIT_W, S_WRITE, S_OUT} st_e;
  st_e st;

  ts_msg_t         op;
  logic [SW_-1:0]  set;
  logic [$clog2(NTB+1)-1:0] tb;
  logic            hit;
  logic [WAYW-1:0] way;
  ent_t            ent;
  ovt_rsp_t        rsp;
  logic [511:0]    tblk;

  function automatic logic [SW_-1:0] set_of(input logic [AW-1:0] a);
    logic [SW_-1:0] f;
    f = '0;
    for (int i = 6; i < AW; i++) f[(i - 6) % SW_] ^= a[i];
    return f;
  endfunction

  logic [SW_:0]    clr;
  wire             clearing = (clr != (SW_+1)'(SETS));
  wire [WAYS-1:0]  vset = valid[set];
  wire [WAYS-1:0]  vrel = valid[SW_'(rel.set)];
  wire             own_wr = (st == S_WRITE) && !hit;
  wire             same   = rel_valid && (SW_'(rel.set) == set);

  always_ff @(posedge clk) begin
    if (clearing) valid[clr[SW_-1:0]] <= '0;
    else begin
      if (own_wr)
        valid[set] <= (vset | (WAYS'(1) << way)) & ~(same ? (WAYS'(1) << rel.way) : '0);
      else if (same)
        valid[set] <= vset & ~(WAYS'(1) << rel.way);
      if (rel_valid && !same)
        valid[SW_'(rel.set)] <= vrel & ~(WAYS'(1) << rel.way);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clr <= '0;
    else if (clearing) clr <= clr + 1'b1;
  end

  // tag match in the block just read
  logic            m_hit;
  logic [WAYW-1:0] m_way;
  always_comb begin
    m_hit = 1'b0;
    m_way = '0;
    for (int i = 0; i < int'(TPB); i++) begin
      int w;
      w = int'(tb) * int'(TPB) + i;
      if (w < int'(WAYS) && !m_hit && vset[w] &&
          t_rdata[i*64 +: AW] == op.addr) begin
        m_hit = 1'b1;
        m_way = WAYW'(w);
      end
    end
  end

  // first free way of the set
  logic            f_any;
  logic [WAYW-1:0] f_way;
  always_comb begin
    f_any = 1'b0;
    f_way = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!f_any && !vset[w]) begin
        f_any = 1'b1;
        f_way = WAYW'(w);
      end
  end

  // output FIFO
  logic    of_push, of_in_ready;
  ts_msg_t of_msg;
  logic [$clog2(5)-1:0] of_space;
  msg_fifo #(.DEPTH(4)) u_of (
    .clk, .rst_n, .in_valid(of_push), .in_ready(of_in_ready), .in_msg(of_msg),
    .out_valid, .out_ready, .out_msg, .space(of_space));

  assign in_ready = (st == S_IDLE) && of_space != 0 && !clearing;

  always_comb begin
    t_req = 1'b0; t_we = 1'b0; t_wdata = tblk;
    t_addr = TW'(int'(set) * int'(NTB) + int'(tb));
    d_req = 1'b0; d_we = 1'b0; d_wdata = '{last: op.id, ver: rsp.ver, buf_addr: rsp.buf_addr};
    d_addr = DW'(int'(set) * int'(WAYS) + int'(way));
    case (st)
      S_TRD, S_TRD_W: t_req = 1'b1;
      S_DRD:          d_req = 1'b1;
      S_WRITE: begin
        d_req = 1'b1; d_we = 1'b1;
        if (!hit) begin
          t_req = 1'b1; t_we = 1'b1;
          t_addr = TW'(int'(set) * int'(NTB) + int'(way) / int'(TPB));
          t_wdata[(int'(way) % int'(TPB)) * 64 +: 64] = 64'(op.addr);
        end
      end
      default: ;
    endcase
  end

  assign ovt_req_valid = (st == S_OVT);
  always_comb begin
    ovt_req.kind   = !hit ? V_NEW_MISS :
                     (op.dir == DIR_IN) ? V_USE : (op.dir == DIR_OUT) ? V_NEW_OUT : V_NEW_INOUT;
    ovt_req.ver    = ent.ver;
    ovt_req.dir    = op.dir;
    ovt_req.addr   = op.addr;
    ovt_req.size   = op.size;
    ovt_req.writer = op.id;
    ovt_req.set    = SETW'(set);
    ovt_req.way    = way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; op <= '0; set <= '0; tb <= '0; hit <= 1'b0; way <= '0;
      ent <= '0; rsp <= '0; tblk <= '0; of_push <= 1'b0; of_msg <= '0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_full_stall <= 1'b0;
    end else begin
      of_push <= 1'b0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_full_stall <= 1'b0;
      case (st)
        S_IDLE: if (in_valid && in_ready) begin
          op  <= in_msg;
          set <= set_of(in_msg.addr);
          tb  <= '0;
          st  <= S_TRD;
        end
        S_TRD: st <= S_TWAIT;
        S_TWAIT: if (t_rvalid) begin
          if (m_hit) begin
            hit <= 1'b1; way <= m_way; st <= S_DRD; ev_hit <= 1'b1;
          end else if (int'(tb) + 1 < int'(NTB)) begin
            tb <= tb + 1'b1; st <= S_TRD;
          end else begin
            hit <= 1'b0; st <= S_MISS; ev_miss <= 1'b1;
          end
        end
        S_DRD: st <= S_DWAIT;
        S_DWAIT: if (d_rvalid) begin
          ent <= d_rdata; st <= S_OVT;
        end
        S_MISS: begin
          if (f_any) begin
            way <= f_way;
            tb  <= ($clog2(NTB+1))'(int'(f_way) / int'(TPB));
            st  <= S_TRD_W;          // fetch the tag block to update
          end else begin
            ev_full_stall <= 1'b1;   // every way busy: wait for a release
          end
        end
        S_TRD_W: st <= S_TWAIT_W;
        S_TWAIT_W: if (t_rvalid) begin
          tblk <= t_rdata;
          if (!vset[way]) st <= S_OVT;
          else st <= S_MISS;         // taken meanwhile (cannot happen): retry
        end
        S_OVT: if (ovt_rsp_valid) begin
          rsp <= ovt_rsp;
          if (ovt_rsp.stale) begin
            hit <= 1'b0; st <= S_MISS; ev_miss <= 1'b1;  // version retired: decode as a miss
          end else begin
            st <= S_WRITE;
          end
        end
        S_WRITE: begin
          of_push <= 1'b1;
          of_msg  <= '0;
          of_msg.mtype    <= M_OP_INFO;
          of_msg.dst      <= trs_ep(op.id.trs);
          of_msg.src      <= EPW'(EP);
          of_msg.id       <= op.id;
          of_msg.id2      <= ent.last;
          of_msg.flag     <= hit && op.dir != DIR_OUT;
          of_msg.dir      <= op.dir;
          of_msg.addr     <= op.addr;
          of_msg.size     <= op.size;
          of_msg.buf_addr <= rsp.buf_addr;
          of_msg.ver      <= rsp.ver;
          of_msg.ort      <= 1'(ORT_IDX);
          st <= S_OUT;
        end
        S_OUT: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_type: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid |-> in_msg.mtype == M_OPERAND);
  a_of: assert property (@(posedge clk) disable iff (!rst_n) of_push |-> of_in_ready);
endmodule
