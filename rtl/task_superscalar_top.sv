// Task superscalar frontend: an out-of-order pipeline for tasks.
//
// A sequential thread emits tasks whose operands are annotated as input,
// output or inout memory objects (or scalars). The frontend finds the data
// dependencies among tasks the way an out-of-order processor finds them among
// instructions, keeps a window of in-flight tasks, renames objects to remove
// false dependencies, and hands tasks whose inputs are ready to a backend of
// cores that serve as functional units.
//
// Organisation: one gateway, NUM_ORT object renaming tables (ORT) each with
// its object versioning table (OVT), NUM_TRS task reservation stations (TRS)
// and a ready queue, all exchanging single-flit messages over a crossbar
// network (msg_noc). Each ORT talks to its own OVT over a direct link. The
// default configuration is 8 TRSs and 2 ORT/OVT pairs; per module storage
// defaults to 768 KB of TRS blocks (6 MB in all), 1024 ORT sets of 16 ways and
// 8192 OVT versions, with a 22-cycle eDRAM access.
//
// Ports: the thread's task words (valid/ready); ready tasks to the backend
// (valid/ready) and finished tasks back from it (valid/ready); one copy-back
// DMA request port per OVT for the external DMA engine; an activity vector
// with one bit per mechanism for monitoring.
//
// Lint note: rst_n is an asynchronous reset of the flip-flops and also the
// `disable iff` condition of the concurrent assertions, so a linter reports
// it as used both synchronously and asynchronously; the circuit only uses
// it asynchronously.
module task_superscalar_top
  import ts_pkg::*;
#(
  parameter int unsigned TRS_BLOCKS    = 6144,
  parameter int unsigned ORT_SETS      = 1024,
  parameter int unsigned ORT_WAYS      = 16,
  parameter int unsigned OVT_VERSIONS  = 8192,
  parameter int unsigned EDRAM_LAT     = 22,
  parameter int unsigned RQ_DEPTH      = 64,
  parameter int unsigned REGION_CHUNKS = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // task-generating thread
  input  logic          task_valid,
  output logic          task_ready,
  input  logic [63:0]   task_word,
  // backend: ready tasks out, finished tasks in
  output logic          rdy_valid,
  input  logic          rdy_ready,
  output opid_t         rdy_task,
  output logic [AW-1:0] rdy_kernel,
  input  logic          done_valid,
  output logic          done_ready,
  input  opid_t         done_task,
  // copy-back DMA engine, one port per OVT
  output logic          dma_valid [NUM_ORT],
  input  logic          dma_ready [NUM_ORT],
  output logic [AW-1:0] dma_src   [NUM_ORT],
  output logic [AW-1:0] dma_dst   [NUM_ORT],
  output logic [SW-1:0] dma_size  [NUM_ORT],
  input  logic          dma_done  [NUM_ORT],
  // activity: see ts_ev_e in the README for the bit meanings
  output logic [15:0]   activity
);
  logic    s_valid [NUM_EP];
  logic    s_ready [NUM_EP];
  ts_msg_t s_msg   [NUM_EP];
  logic    d_valid [NUM_EP];
  logic    d_ready [NUM_EP];
  ts_msg_t d_msg   [NUM_EP];

  msg_noc #(.N(NUM_EP)) u_noc (
    .clk, .rst_n, .src_valid(s_valid), .src_ready(s_ready), .src_msg(s_msg),
    .dst_valid(d_valid), .dst_ready(d_ready), .dst_msg(d_msg));

  // ---- gateway -----------------------------------------------------------------
  logic ev_thread_stall, ev_no_trs;
  gateway u_gw (
    .clk, .rst_n, .in_valid(task_valid), .in_ready(task_ready), .in_word(task_word),
    .out_valid(s_valid[EP_GW]), .out_ready(s_ready[EP_GW]), .out_msg(s_msg[EP_GW]),
    .nin_valid(d_valid[EP_GW]), .nin_ready(d_ready[EP_GW]), .nin_msg(d_msg[EP_GW]),
    .ev_thread_stall, .ev_no_trs);

  // ---- task reservation stations -------------------------------------------
  logic [NUM_TRS-1:0] t_chain, t_fwd, t_stale, t_ready, t_ind, t_refill, t_spill;
  for (genvar t = 0; t < NUM_TRS; t++) begin : g_trs
    trs #(.NBLK(TRS_BLOCKS), .LAT(EDRAM_LAT), .TRS_IDX(t)) u_trs (
      .clk, .rst_n,
      .in_valid(d_valid[EP_TRS0+t]), .in_ready(d_ready[EP_TRS0+t]), .in_msg(d_msg[EP_TRS0+t]),
      .out_valid(s_valid[EP_TRS0+t]), .out_ready(s_ready[EP_TRS0+t]), .out_msg(s_msg[EP_TRS0+t]),
      .free_blocks(),
      .ev_chain(t_chain[t]), .ev_forward(t_fwd[t]), .ev_stale(t_stale[t]),
      .ev_ready(t_ready[t]), .ev_indirect(t_ind[t]), .ev_refill(t_refill[t]),
      .ev_spill(t_spill[t]));
  end

  // ---- ORT / OVT pairs -------------------------------------------------------
  logic [NUM_ORT-1:0] o_hit, o_miss, o_full, v_ren, v_unb, v_cpb, v_stale;
  for (genvar r = 0; r < NUM_ORT; r++) begin : g_ren
    logic     req_v, rsp_v, rel_v;
    ovt_req_t req;
    ovt_rsp_t rsp;
    ort_rel_t rel;
    ort #(.SETS(ORT_SETS), .WAYS(ORT_WAYS), .LAT(EDRAM_LAT), .ORT_IDX(r), .EP(EP_ORT0 + r)) u_ort (
      .clk, .rst_n,
      .in_valid(d_valid[EP_ORT0+r]), .in_ready(d_ready[EP_ORT0+r]), .in_msg(d_msg[EP_ORT0+r]),
      .out_valid(s_valid[EP_ORT0+r]), .out_ready(s_ready[EP_ORT0+r]), .out_msg(s_msg[EP_ORT0+r]),
      .ovt_req_valid(req_v), .ovt_req(req), .ovt_rsp_valid(rsp_v), .ovt_rsp(rsp),
      .rel_valid(rel_v), .rel(rel),
      .ev_hit(o_hit[r]), .ev_miss(o_miss[r]), .ev_full_stall(o_full[r]));
    ovt #(.NVER(OVT_VERSIONS), .LAT(EDRAM_LAT), .EP(EP_OVT0 + r), .REGION_CHUNKS(REGION_CHUNKS),
          .REGION_BASE(40'h80_0000_0000 + (40'(r) << 32))) u_ovt (
      .clk, .rst_n,
      .ort_req_valid(req_v), .ort_req(req), .ort_rsp_valid(rsp_v), .ort_rsp(rsp),
      .rel_valid(rel_v), .rel(rel),
      .in_valid(d_valid[EP_OVT0+r]), .in_ready(d_ready[EP_OVT0+r]), .in_msg(d_msg[EP_OVT0+r]),
      .out_valid(s_valid[EP_OVT0+r]), .out_ready(s_ready[EP_OVT0+r]), .out_msg(s_msg[EP_OVT0+r]),
      .dma_valid(dma_valid[r]), .dma_ready(dma_ready[r]), .dma_src(dma_src[r]),
      .dma_dst(dma_dst[r]), .dma_size(dma_size[r]), .dma_done(dma_done[r]),
      .ev_rename(v_ren[r]), .ev_inout_unblock(v_unb[r]), .ev_copyback(v_cpb[r]),
      .ev_stale(v_stale[r]));
  end

  // ---- ready queue -------------------------------------------------------------
  ready_queue #(.DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .in_valid(d_valid[EP_RQ]), .in_ready(d_ready[EP_RQ]), .in_msg(d_msg[EP_RQ]),
    .out_valid(rdy_valid), .out_ready(rdy_ready), .out_task(rdy_task), .out_kernel(rdy_kernel),
    .count());
  assign s_valid[EP_RQ] = 1'b0;
  assign s_msg[EP_RQ]   = '0;

  // ---- finished tasks from the backend ---------------------------------------
  always_comb begin
    s_msg[EP_BE]       = '0;
    s_msg[EP_BE].mtype = M_TASK_DONE;
    s_msg[EP_BE].dst   = trs_ep(done_task.trs);
    s_msg[EP_BE].src   = EPW'(EP_BE);
    s_msg[EP_BE].id    = done_task;
  end
  assign s_valid[EP_BE] = done_valid;
  assign done_ready     = s_ready[EP_BE];
  assign d_ready[EP_BE] = 1'b1;

  assign activity = {|t_spill, |t_refill, |t_ind, |t_ready, |t_stale, |t_fwd, |t_chain,
                     |v_stale, |v_cpb, |v_unb, |v_ren, |o_full, |o_miss, |o_hit,
                     ev_no_trs, ev_thread_stall};
endmodule
