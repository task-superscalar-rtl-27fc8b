// Unit test of trs_block_alloc with 200 blocks and a 4-cycle memory model.
// Random allocations and frees; checks that no block is handed out twice,
// that only free blocks come back, that free_count tracks the model, that
// allocating every block and freeing them all spills list nodes into the
// memory, and that allocating them all again refills the buffer from those
// nodes and returns each block exactly once.
module tb_trs_block_alloc;
  localparam int NBLK = 200, LAT = 4;
  localparam int BW = $clog2(NBLK), CW = $clog2(NBLK + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc_req, alloc_done, free_req, free_done, mem_req, mem_we, mem_rvalid;
  logic refill_event, spill_event;
  logic [BW-1:0] alloc_blk, free_blk, mem_addr;
  logic [CW-1:0] free_count;
  logic [1023:0] mem_wdata, mem_rdata;
  trs_block_alloc #(.NBLK(NBLK)) dut (.*);
  edram_bank #(.WIDTH(1024), .DEPTH(NBLK), .LATENCY(LAT)) mem (
    .clk, .rst_n, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .rdata(mem_rdata), .rvalid(mem_rvalid));

  bit used [NBLK];
  int held [$];
  int checks = 0, failures = 0, nspill = 0, nrefill = 0;

  always @(posedge clk) begin
    if (spill_event) nspill++;
    if (refill_event) nrefill++;
  end

  task automatic do_alloc();
    @(negedge clk); alloc_req = 1;
    do @(posedge clk); while (!alloc_done);
    #1 alloc_req = 0;
    checks++;
    if (int'(alloc_blk) >= NBLK || used[alloc_blk]) begin
      failures++; $display("FAIL: block %0d handed out while in use", alloc_blk);
    end else begin used[alloc_blk] = 1; held.push_back(int'(alloc_blk)); end
  endtask
  task automatic do_free(input int i);
    int b;
    b = held[i]; held.delete(i);
    @(negedge clk); free_req = 1; free_blk = BW'(b);
    do @(posedge clk); while (!free_done);
    #1 free_req = 0;
    used[b] = 0;
  endtask
  task automatic chk_count();
    checks++;
    if (int'(free_count) != NBLK - held.size()) begin
      failures++; $display("FAIL: free_count %0d, model %0d", free_count, NBLK - held.size());
    end
  endtask

  initial begin
    alloc_req = 0; free_req = 0; free_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      if (held.size() < NBLK && (held.size() == 0 || $urandom % 2 == 0)) do_alloc();
      else do_free($urandom % held.size());
      chk_count();
    end
    while (held.size() < NBLK) do_alloc();
    chk_count();
    while (held.size() > 0) do_free($urandom % held.size());
    chk_count();
    checks++;
    if (nspill == 0) begin failures++; $display("FAIL: no spill"); end
    while (held.size() < NBLK) do_alloc();
    chk_count();
    checks++;
    if (nrefill == 0) begin failures++; $display("FAIL: no refill"); end
    for (int n = 0; n < 2000; n++) begin
      if (held.size() < NBLK && (held.size() == 0 || $urandom % 2 == 0)) do_alloc();
      else do_free($urandom % held.size());
    end
    chk_count();
    $display("spills=%0d refills=%0d", nspill, nrefill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
