// Unit test of rename_buckets with a small region (4 chunks of 64KB).
// Random allocations of random sizes and frees; checks that every buffer is
// at least as large as asked, lies in the region, is aligned to its bucket
// size, never overlaps a buffer in use, that freed buffers are reused, and
// that the allocator reports failure once the region is exhausted.
module tb_rename_buckets;
  import ts_pkg::*;
  localparam logic [AW-1:0] BASE = 40'h80_0000_0000;
  localparam int CH_LOG = 16, NCH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc_req, alloc_done, alloc_fail, free_req, free_done, chunk_event;
  logic [SW-1:0] alloc_size, free_size;
  logic [AW-1:0] alloc_addr, free_addr;
  logic [15:0] lost;
  rename_buckets #(.NB(8), .MIN_LOG(6), .CHUNK_LOG(CH_LOG), .REGION_CHUNKS(NCH),
                   .REGION_BASE(BASE), .FDEPTH(4)) dut (.*);

  logic [AW-1:0] h_addr [$];
  int            h_size [$];
  int            h_cap  [$];
  int checks = 0, failures = 0, nfail = 0, nreuse = 0;
  bit was_freed [logic [AW-1:0]];

  function automatic int cap_of(input int s);
    int c;
    c = 64;
    while (c < s) c = c * 2;
    return c;
  endfunction

  task automatic do_alloc(input int s);
    @(negedge clk); alloc_req = 1; alloc_size = SW'(s);
    @(negedge clk); alloc_req = 0;
    checks++;
    if (!alloc_done) begin failures++; $display("FAIL: no alloc_done"); return; end
    if (alloc_fail) begin nfail++; return; end
    if (was_freed.exists(alloc_addr)) nreuse++;
    begin
      int c;
      bit bad;
      c = cap_of(s);
      bad = alloc_addr < BASE || alloc_addr + 40'(c) > BASE + (40'(NCH) << CH_LOG) ||
            (alloc_addr % 40'(c)) != 0;
      for (int i = 0; i < h_addr.size(); i++)
        if (alloc_addr < h_addr[i] + 40'(h_cap[i]) && h_addr[i] < alloc_addr + 40'(c)) bad = 1;
      if (bad) begin failures++; $display("FAIL: buffer %h for %0d bytes", alloc_addr, s); end
      h_addr.push_back(alloc_addr); h_size.push_back(s); h_cap.push_back(c);
    end
  endtask
  task automatic do_free(input int i);
    @(negedge clk); free_req = 1; free_addr = h_addr[i]; free_size = SW'(h_size[i]);
    was_freed[h_addr[i]] = 1;
    h_addr.delete(i); h_size.delete(i); h_cap.delete(i);
    @(negedge clk); free_req = 0;
    checks++;
    if (!free_done) begin failures++; $display("FAIL: no free_done"); end
  endtask

  initial begin
    alloc_req = 0; free_req = 0; alloc_size = '0; free_size = '0; free_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      if (h_addr.size() == 0 || $urandom % 5 < 3) do_alloc(1 + $urandom % 8192);
      else do_free($urandom % h_addr.size());
    end
    checks += 2;
    if (nreuse == 0) begin failures++; $display("FAIL: freed buffers never reused"); end
    if (nfail == 0) begin failures++; $display("FAIL: region never ran out"); end
    $display("reuses=%0d failed=%0d lost=%0d", nreuse, nfail, lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
