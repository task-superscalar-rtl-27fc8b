// Test environment for the task superscalar frontend.
//
// Plays the three parties around the frontend and checks the schedule:
//  * the task-generating thread: builds a task stream and writes it word by
//    word. Phases: a blocked Cholesky decomposition of an N_CHOL x N_CHOL
//    block matrix (input/inout operands, as in the StarSs example), a
//    renaming phase where a temporary object is rewritten every round
//    (output operands), wide tasks of 8..19 operands with scalars; it is
//    preceded by a phase of tasks on many distinct objects;
//  * the backend: CORES cores that take ready tasks, run each for a random
//    time and report it finished; it accepts nothing for the first HOLD
//    cycles of every PERIOD cycles (of the first HOLD cycles if PERIOD is 0)
//    so the window fills;
//  * the copy-back DMA engine of each OVT.
// Checks, independent of the design: every task is dispatched exactly once
// and with its own kernel pointer; at dispatch the last earlier writer of
// each input or inout object has finished; for an inout operand every
// earlier task that used the current version of the object has finished;
// copy-back requests target an object address from a rename region.
module ts_env
  import ts_pkg::*;
#(
  parameter int N_CHOL = 5,
  parameter int N_REN  = 6,
  parameter int N_WIDE = 0,
  parameter int N_MANY = 0,
  parameter int CORES  = 16,
  parameter int HOLD   = 0,
  parameter int PERIOD = 0
) (
  input  logic          clk,
  output logic          rst_n,
  output logic          task_valid,
  input  logic          task_ready,
  output logic [63:0]   task_word,
  input  logic          rdy_valid,
  output logic          rdy_ready,
  input  opid_t         rdy_task,
  input  logic [AW-1:0] rdy_kernel,
  output logic          done_valid,
  input  logic          done_ready,
  output opid_t         done_task,
  input  logic          dma_valid [NUM_ORT],
  output logic          dma_ready [NUM_ORT],
  input  logic [AW-1:0] dma_src   [NUM_ORT],
  input  logic [AW-1:0] dma_dst   [NUM_ORT],
  input  logic [SW-1:0] dma_size  [NUM_ORT],
  output logic          dma_done  [NUM_ORT],
  input  logic [15:0]   activity,
  output logic          finished,
  output int            checks,
  output int            failures,
  output int            ntasks,
  output longint        ev_count [16],
  output longint        cycles
);
  localparam int MAXT = 1024;
  logic [AW-1:0] t_kernel [MAXT];
  int            t_nops   [MAXT];
  logic [63:0]   t_op     [MAXT][MAX_OPS];
  bit            dispatched [MAXT];
  bit            done_f     [MAXT];
  int            n_done;

  function automatic logic [63:0] opw(input bit scalar, input dir_e d, input int size,
                                      input logic [AW-1:0] a);
    opdesc_t o;
    o.scalar = scalar; o.dir = d; o.size = SW'(size); o.addr = a;
    return 64'(o);
  endfunction

  function automatic logic [AW-1:0] blk(input int i, input int j);
    return 40'h01_0000_0000 + (40'(i * N_CHOL + j) << 16);
  endfunction

  task automatic add1(input int kern, input logic [63:0] o0);
    t_kernel[ntasks] = 40'(kern); t_nops[ntasks] = 1; t_op[ntasks][0] = o0; ntasks++;
  endtask
  task automatic add2(input int kern, input logic [63:0] o0, input logic [63:0] o1);
    t_kernel[ntasks] = 40'(kern); t_nops[ntasks] = 2;
    t_op[ntasks][0] = o0; t_op[ntasks][1] = o1; ntasks++;
  endtask
  task automatic add3(input int kern, input logic [63:0] o0, input logic [63:0] o1,
                      input logic [63:0] o2);
    t_kernel[ntasks] = 40'(kern); t_nops[ntasks] = 3;
    t_op[ntasks][0] = o0; t_op[ntasks][1] = o1; t_op[ntasks][2] = o2; ntasks++;
  endtask

  task automatic build();
    localparam int BS = 49152;
    ntasks = 0;
    // many distinct objects
    for (int m = 0; m < N_MANY; m++)
      add3(8, opw(0, DIR_OUT, 256, 40'h04_0000_0000 + 40'(m * 3) * 40'h40),
              opw(0, DIR_OUT, 256, 40'h04_0000_0000 + 40'(m * 3 + 1) * 40'h40),
              opw(0, DIR_IN, 256, 40'h04_0000_0000 + 40'(m * 3 + 2) * 40'h40));
    // blocked Cholesky, task order of the sequential loop nest
    for (int j = 0; j < N_CHOL; j++) begin
      for (int k = 0; k < j; k++)
        for (int i = j + 1; i < N_CHOL; i++)
          add3(1, opw(0, DIR_IN, BS, blk(i, k)), opw(0, DIR_IN, BS, blk(j, k)),
                  opw(0, DIR_INOUT, BS, blk(i, j)));
      for (int i = 0; i < j; i++)
        add2(2, opw(0, DIR_IN, BS, blk(j, i)), opw(0, DIR_INOUT, BS, blk(j, j)));
      add1(3, opw(0, DIR_INOUT, BS, blk(j, j)));
      for (int i = j + 1; i < N_CHOL; i++)
        add2(4, opw(0, DIR_IN, BS, blk(j, j)), opw(0, DIR_INOUT, BS, blk(i, j)));
    end
    // renaming: a temporary written every round, read by the next task
    for (int r = 0; r < N_REN; r++) begin
      add2(5, opw(0, DIR_OUT, 4096, 40'h02_0000_0000), opw(0, DIR_IN, BS, blk(0, 0)));
      add2(6, opw(0, DIR_IN, 4096, 40'h02_0000_0000),
              opw(0, DIR_INOUT, 8192, 40'h02_1000_0000 + 40'((r % 2) << 16)));
    end
    // wide tasks with indirect blocks and scalars
    for (int w = 0; w < N_WIDE; w++) begin
      int n;
      n = 8 + (w % 12);
      t_kernel[ntasks] = 40'd7; t_nops[ntasks] = n;
      t_op[ntasks][0] = opw(0, DIR_INOUT, 1024, 40'h03_0000_0000 + 40'((w % 3) << 12));
      for (int o = 1; o < n - 1; o++) begin
        if (o % 4 == 3) t_op[ntasks][o] = opw(1, DIR_IN, 0, 40'(w * 100 + o));
        else t_op[ntasks][o] = opw(0, DIR_IN, 512, 40'h03_1000_0000 + 40'(((w + o) % 10) << 12));
      end
      t_op[ntasks][n-1] = opw(0, DIR_OUT, 2048, 40'h03_2000_0000 + 40'((w % 4) << 12));
      ntasks++;
    end
  endtask

  function automatic bit uses(input int p, input logic [AW-1:0] a, output dir_e d);
    opdesc_t o;
    for (int k = 0; k < t_nops[p]; k++) begin
      o = opdesc_t'(t_op[p][k]);
      if (!o.scalar && o.addr == a) begin d = o.dir; return 1'b1; end
    end
    d = DIR_IN;
    return 1'b0;
  endfunction

  // dependency check at dispatch of task s
  task automatic check_dispatch(input int s);
    opdesc_t o;
    dir_e    d;
    for (int k = 0; k < t_nops[s]; k++) begin
      o = opdesc_t'(t_op[s][k]);
      if (o.scalar || o.dir == DIR_OUT) continue;
      for (int p = s - 1; p >= 0; p--) begin
        if (!uses(p, o.addr, d)) continue;
        if (d != DIR_IN || o.dir == DIR_INOUT) begin
          checks++;
          if (!done_f[p]) begin
            failures++;
            $display("FAIL: task %0d dispatched before task %0d finished (object %h)", s, p, o.addr);
          end
        end
        if (d != DIR_IN) break;   // reached the writer of the current version
      end
    end
  endtask

  // ---- thread ---------------------------------------------------------------
  initial begin
    rst_n = 1'b0;
    task_valid = 1'b0; task_word = '0;
    checks = 0; failures = 0; n_done = 0; finished = 1'b0;
    for (int i = 0; i < MAXT; i++) begin dispatched[i] = 0; done_f[i] = 0; end
    build();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int t = 0; t < ntasks; t++) begin
      taskhdr_t h;
      h = '0; h.kernel = t_kernel[t]; h.nops = IDXW'(t_nops[t]);
      for (int w = 0; w <= t_nops[t]; w++) begin
        task_valid <= 1'b1;
        task_word  <= (w == 0) ? 64'(h) : t_op[t][w-1];
        @(posedge clk);
        while (!task_ready) @(posedge clk);
      end
    end
    task_valid <= 1'b0;
  end

  // ---- backend ------------------------------------------------------------------
  int    core_t   [CORES];
  opid_t core_id  [CORES];
  bit    core_busy[CORES];
  opid_t dq [$];
  int    free_core;

  always_comb begin
    free_core = -1;
    for (int c = CORES - 1; c >= 0; c--) if (!core_busy[c]) free_core = c;
  end
  wire   held = (PERIOD == 0) ? (cycles < longint'(HOLD))
                               : ((cycles % longint'(PERIOD)) < longint'(HOLD));
  assign rdy_ready  = rst_n && !held && (free_core >= 0);
  assign done_valid = rst_n && dq.size() != 0;
  assign done_task  = (dq.size() != 0) ? dq[0] : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cycles <= 0;
      for (int c = 0; c < CORES; c++) core_busy[c] <= 0;
      for (int i = 0; i < 16; i++) ev_count[i] <= 0;
    end else begin
      cycles <= cycles + 1;
      for (int i = 0; i < 16; i++) if (activity[i]) ev_count[i] <= ev_count[i] + 1;
      if (done_valid && done_ready) begin
        int s;
        s = int'(dq[0].serial);
        done_f[s] = 1;
        n_done++;
        void'(dq.pop_front());
      end
      for (int c = 0; c < CORES; c++) begin
        if (core_busy[c]) begin
          if (core_t[c] == 0) begin
            dq.push_back(core_id[c]);
            core_busy[c] <= 0;
          end else core_t[c] <= core_t[c] - 1;
        end
      end
      if (rdy_valid && rdy_ready) begin
        int s;
        s = int'(rdy_task.serial);
        checks++;
        if (s >= ntasks || dispatched[s] || rdy_kernel != t_kernel[s]) begin
          failures++;
          $display("FAIL: bad dispatch serial=%0d kernel=%h", s, rdy_kernel);
        end else begin
          dispatched[s] = 1;
          check_dispatch(s);
        end
        core_busy[free_core] <= 1;
        core_id[free_core]   <= rdy_task;
        core_t[free_core]    <= 10 + int'($urandom_range(0, 140));
      end
    end
  end

  // ---- copy-back DMA engines -----------------------------------------------
  for (genvar r = 0; r < NUM_ORT; r++) begin : g_dma
    int busy;
    assign dma_ready[r] = 1'b1;
    always @(posedge clk) begin
      if (!rst_n) begin
        busy <= 0; dma_done[r] <= 1'b0;
      end else begin
        dma_done[r] <= 1'b0;
        if (busy > 0) begin
          busy <= busy - 1;
          if (busy == 1) dma_done[r] <= 1'b1;
        end
        if (dma_valid[r]) begin
          checks++;
          if (dma_src[r][AW-1] != 1'b1 || dma_dst[r][AW-1] != 1'b0 || dma_size[r] == 0) begin
            failures++;
            $display("FAIL: copy-back %h -> %h size %0d", dma_src[r], dma_dst[r], dma_size[r]);
          end
          busy <= 8;
        end
      end
    end
  end

  // ---- end of run -------------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n && !finished && ntasks > 0 && n_done == ntasks) begin
      finished <= 1'b1;
      $display("all %0d tasks finished at cycle %0d", ntasks, cycles);
      for (int s = 0; s < ntasks; s++) begin
        checks++;
        if (!dispatched[s]) begin failures++; $display("FAIL: task %0d never dispatched", s); end
      end
    end
  end
endmodule
