// Gateway test, run inside the reduced-size frontend.
//
// The gateway is checked through the whole frontend because its job is the
// ordering of traffic among the other modules: the thread must be stalled
// when the 1KB buffer cannot take a full-size task, allocation must stop when
// no TRS has room, every arrived task must be allocated and issued, and the
// schedule checks of ts_env (which fail if operands are decoded out of
// task order) must hold.
module tb_gateway;
  import ts_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, task_valid, task_ready, rdy_valid, rdy_ready, done_valid, done_ready, finished;
  logic [63:0] task_word;
  opid_t rdy_task, done_task;
  logic [AW-1:0] rdy_kernel;
  logic dma_valid [NUM_ORT], dma_ready [NUM_ORT], dma_done [NUM_ORT];
  logic [AW-1:0] dma_src [NUM_ORT], dma_dst [NUM_ORT];
  logic [SW-1:0] dma_size [NUM_ORT];
  logic [15:0] activity;
  int checks, failures, ntasks;
  longint ev_count [16];
  longint cycles;

  task_superscalar_top #(.TRS_BLOCKS(72), .ORT_SETS(4), .ORT_WAYS(16), .OVT_VERSIONS(512),
                         .EDRAM_LAT(4), .RQ_DEPTH(512)) dut (.*);
  ts_env #(.N_CHOL(6), .N_REN(8), .N_WIDE(160), .N_MANY(60), .CORES(32), .HOLD(15000), .PERIOD(40000)) env (.*);

  localparam string NAMES [16] = '{"thread_stall", "no_trs_room", "ort_hit", "ort_miss",
    "ort_full_stall", "ovt_rename", "ovt_inout_unblock", "ovt_copyback", "ovt_stale",
    "trs_chain", "trs_forward", "trs_stale_consumer", "trs_ready", "trs_indirect",
    "trs_refill", "trs_spill"};
  localparam bit NEED [16] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0};

  int fchecks, ffail, nlive;
  task automatic chk(input bit ok, input string what);
    fchecks++;
    if (!ok) begin ffail++; $display("FAIL: %s", what); end
  endtask

  initial begin
    fchecks = 0; ffail = 0;
    wait (rst_n);
    wait (finished);
    repeat (2000) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      $display("  %-20s %0d", NAMES[i], ev_count[i]);
      if (NEED[i]) chk(ev_count[i] != 0, {NAMES[i], " never happened"});
    end
    chk(dut.u_gw.n_arr == dut.u_gw.n_iss, "gateway issued fewer tasks than arrived");
    chk(dut.u_gw.n_alloc == dut.u_gw.n_iss, "gateway allocated and issued counts differ");
    $display("tasks=%0d cycles=%0d", ntasks, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks + fchecks, failures + ffail);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL: watchdog, %0d tasks", ntasks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
