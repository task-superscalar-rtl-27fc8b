// Pipeline gateway: admits tasks into the frontend.
//
// The task-generating thread writes each task as 64-bit words: a header
// (kernel pointer, number of operands) followed by one descriptor per
// operand (scalar flag, direction, size, base address). Tasks are kept in a
// 1 KB buffer of 128 words, enough for over 20 tasks of typical size. While
// the buffer cannot take a task of the largest size (20 words) the thread is
// held off with in_ready low: this is how the thread blocks when the
// pipeline fills.
//
// For each task, in arrival order, the gateway sends ALLOC_REQ (operand
// count, kernel, the task's buffer address, a task serial number) to the TRS
// at the head of its queue of TRSs that have room; the TRS is re-queued when
// its reply or a later SPACE message says it has room again. Allocation
// requests do not wait for replies. The reply carries the buffer address
// back, so the gateway finds the pending task directly. Operands are issued
// strictly in task order (dependency decoding must see tasks in program
// order): once the oldest unissued task has its slot, each memory operand
// goes to the ORT chosen by the hash of its base address, and each scalar
// straight to the task's TRS. The hash pipeline starts when the operand word
// arrives. One message leaves per cycle; issuing has priority over
// allocation.
module gateway
  import ts_pkg::*;
#(
  parameter int unsigned BUF_WORDS = 128,
  parameter int unsigned NTRS      = NUM_TRS,
  parameter int unsigned NORT      = NUM_ORT
) (
  input  logic        clk,
  input  logic        rst_n,
  // task-generating thread
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_word,
  // network
  output logic        out_valid,
  input  logic        out_ready,
  output ts_msg_t     out_msg,
  input  logic        nin_valid,
  output logic        nin_ready,
  input  ts_msg_t     nin_msg,
  // activity
  output logic        ev_thread_stall,
  output logic        ev_no_trs
);
  localparam int unsigned PW = $clog2(BUF_WORDS);
  localparam int unsigned HW = (NORT > 1) ? $clog2(NORT) : 1;
  localparam int unsigned QW = $clog2(NTRS + 1);

  logic [63:0]     bufm [BUF_WORDS];
  logic [HW-1:0]   hsh  [BUF_WORDS];
  logic            hv   [BUF_WORDS];
  logic            rep_ok   [BUF_WORDS];
  logic [TRSW-1:0] rep_trs  [BUF_WORDS];
  logic [SLOTW-1:0] rep_slot [BUF_WORDS];
  logic [SERW-1:0] ser  [BUF_WORDS];

  logic [PW-1:0] wr, rd, al_ptr, iss_ptr;
  logic [PW:0]   used;
  logic          expect_hdr;
  logic [IDXW-1:0] remain;
  logic [7:0]    n_arr, n_full, n_alloc, n_iss;
  logic [IDXW-1:0] iss_k;
  logic [SERW-1:0] serial;

  // queue of TRSs with room
  logic [TRSW-1:0] tq [NTRS];
  logic [QW-1:0]   tq_n;
  logic [$clog2(NTRS)-1:0] tq_rd, tq_wr;

  // ---- thread input and hashing -------------------------------------------
  wire      wr_en = in_valid && in_ready;
  taskhdr_t in_hdr;
  assign in_hdr   = taskhdr_t'(in_word);
  assign in_ready = expect_hdr ? (int'(used) + 1 + MAX_OPS <= int'(BUF_WORDS)) : 1'b1;
  assign ev_thread_stall = in_valid && !in_ready;

  logic          h_valid;
  logic [HW-1:0] h_out;
  logic [PW-1:0] h_tag;
  operand_hash #(.OUTW(HW), .TAGW(PW)) u_hash (
    .clk, .rst_n, .in_valid(wr_en && !expect_hdr), .in_addr(in_word[AW-1:0]),
    .in_tag(wr), .out_valid(h_valid), .out_hash(h_out), .out_tag(h_tag));

  // ---- current header views ---------------------------------------------------
  taskhdr_t al_hdr, is_hdr;
  opdesc_t  is_op;
  assign al_hdr = taskhdr_t'(bufm[al_ptr]);
  assign is_hdr = taskhdr_t'(bufm[iss_ptr]);
  wire [PW-1:0] is_w = iss_ptr + PW'(1) + PW'(iss_k);
  assign is_op  = opdesc_t'(bufm[is_w]);

  wire can_issue = (n_iss != n_full) && rep_ok[iss_ptr] && hv[is_w];
  wire can_alloc = (n_alloc != n_arr) && (tq_n != 0);
  assign ev_no_trs = (n_alloc != n_arr) && (tq_n == 0);

  always_comb begin
    out_msg   = '0;
    out_valid = 1'b0;
    out_msg.src = EPW'(EP_GW);
    if (can_issue) begin
      out_valid = 1'b1;
      out_msg.id = '{trs: rep_trs[iss_ptr], slot: rep_slot[iss_ptr], idx: iss_k, serial: ser[iss_ptr]};
      out_msg.addr = is_op.addr;
      out_msg.size = is_op.size;
      out_msg.dir  = is_op.dir;
      if (is_op.scalar) begin
        out_msg.mtype = M_SCALAR;
        out_msg.dst   = trs_ep(rep_trs[iss_ptr]);
      end else begin
        out_msg.mtype = M_OPERAND;
        out_msg.dst   = EPW'(EP_ORT0 + int'(hsh[is_w]));
      end
    end else if (can_alloc) begin
      out_valid = 1'b1;
      out_msg.mtype  = M_ALLOC_REQ;
      out_msg.dst    = trs_ep(tq[tq_rd]);
      out_msg.nops   = al_hdr.nops;
      out_msg.addr   = al_hdr.kernel;
      out_msg.gwaddr = GWW'(al_ptr);
      out_msg.id     = '{trs: tq[tq_rd], slot: '0, idx: '0, serial: serial};
    end
  end

  wire issue_fire = out_valid && out_ready && can_issue;
  wire alloc_fire = out_valid && out_ready && !can_issue;
  wire last_op    = (iss_k + 1'b1 == is_hdr.nops);

  assign nin_ready = 1'b1;
  wire tq_push = nin_valid && (nin_msg.mtype == M_SPACE ||
                               (nin_msg.mtype == M_ALLOC_REP && nin_msg.flag));

  always_ff @(posedge clk) begin
    if (wr_en) bufm[wr] <= in_word;
    if (h_valid) hsh[h_tag] <= h_out;
    if (alloc_fire) ser[al_ptr] <= serial;
    if (nin_valid && nin_msg.mtype == M_ALLOC_REP) begin
      rep_trs[PW'(nin_msg.gwaddr)]  <= nin_msg.id.trs;
      rep_slot[PW'(nin_msg.gwaddr)] <= nin_msg.id.slot;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr <= '0; rd <= '0; al_ptr <= '0; iss_ptr <= '0; used <= '0;
      expect_hdr <= 1'b1; remain <= '0;
      n_arr <= '0; n_full <= '0; n_alloc <= '0; n_iss <= '0; iss_k <= '0; serial <= '0;
      for (int i = 0; i < int'(BUF_WORDS); i++) begin hv[i] <= 1'b0; rep_ok[i] <= 1'b0; end
      for (int i = 0; i < int'(NTRS); i++) tq[i] <= TRSW'(i);
      tq_n <= QW'(NTRS); tq_rd <= '0; tq_wr <= '0;
    end else begin
      // thread side
      if (wr_en) begin
        wr <= wr + 1'b1;
        hv[wr] <= 1'b0;
        if (expect_hdr) begin
          expect_hdr <= 1'b0;
          remain <= in_hdr.nops;
          n_arr  <= n_arr + 1'b1;
        end else begin
          remain <= remain - 1'b1;
          if (remain == 5'd1) begin
            expect_hdr <= 1'b1;
            n_full <= n_full + 1'b1;
          end
        end
      end
      if (h_valid) hv[h_tag] <= 1'b1;
      // allocation
      if (alloc_fire) begin
        al_ptr  <= al_ptr + PW'(1) + PW'(al_hdr.nops);
        n_alloc <= n_alloc + 1'b1;
        serial  <= serial + 1'b1;
        tq_rd   <= (int'(tq_rd) == int'(NTRS) - 1) ? '0 : tq_rd + 1'b1;
      end
      if (tq_push) begin
        tq[tq_wr] <= nin_msg.id.trs;
        tq_wr <= (int'(tq_wr) == int'(NTRS) - 1) ? '0 : tq_wr + 1'b1;
      end
      tq_n <= tq_n + (tq_push ? QW'(1) : QW'(0)) - (alloc_fire ? QW'(1) : QW'(0));
      if (nin_valid && nin_msg.mtype == M_ALLOC_REP) rep_ok[PW'(nin_msg.gwaddr)] <= 1'b1;
      // operand issue
      if (issue_fire) begin
        if (last_op) begin
          iss_k   <= '0;
          rep_ok[iss_ptr] <= 1'b0;
          iss_ptr <= iss_ptr + PW'(1) + PW'(is_hdr.nops);
          rd      <= iss_ptr + PW'(1) + PW'(is_hdr.nops);
          n_iss   <= n_iss + 1'b1;
        end else iss_k <= iss_k + 1'b1;
      end
      used <= used + (wr_en ? (PW+1)'(1) : '0)
                   - ((issue_fire && last_op) ? (PW+1)'(1) + (PW+1)'(is_hdr.nops) : '0);
    end
  end

  a_hdr: assert property (@(posedge clk) disable iff (!rst_n)
                          wr_en && expect_hdr |-> in_hdr.nops != 0 && in_hdr.nops <= 5'(MAX_OPS));
  a_nin: assert property (@(posedge clk) disable iff (!rst_n)
                          nin_valid |-> nin_msg.mtype inside {M_ALLOC_REP, M_SPACE});
endmodule
