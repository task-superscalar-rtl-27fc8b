// Rename-buffer allocator of an object versioning table.
//
// An output operand that is renamed needs a temporary buffer of at least the
// object's size. Buffers come from NB buckets, bucket b handing out buffers
// of 2^(MIN_LOG+b) bytes. The operating system gives the table a memory
// region of REGION_CHUNKS chunks of 2^CHUNK_LOG bytes starting at
// REGION_BASE. A bucket first reuses a buffer that was freed into it (a small
// per-bucket stack of FDEPTH entries), otherwise carves the next buffer from
// its current chunk, and when that chunk is used up grabs a fresh chunk from
// the region. Keeping recycled buffers in an on-chip stack rather than an
// in-memory list is this design's choice; a buffer freed into a full stack is
// not reused and is counted in `lost`.
//
// Interface: alloc_req/free_req are single-cycle strobes (not both at once);
// alloc_done (with alloc_addr, or alloc_fail when the region is exhausted)
// and free_done pulse one cycle later.
module rename_buckets
  import ts_pkg::*;
#(
  parameter int unsigned     NB            = 16,
  parameter int unsigned     MIN_LOG       = 6,
  parameter int unsigned     CHUNK_LOG     = 21,
  parameter int unsigned     REGION_CHUNKS = 64,
  parameter logic [AW-1:0]   REGION_BASE   = 40'h80_0000_0000,
  parameter int unsigned     FDEPTH        = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_req,
  input  logic [SW-1:0] alloc_size,
  output logic          alloc_done,
  output logic          alloc_fail,
  output logic [AW-1:0] alloc_addr,
  input  logic          free_req,
  input  logic [AW-1:0] free_addr,
  input  logic [SW-1:0] free_size,
  output logic          free_done,
  output logic [15:0]   lost,
  output logic          chunk_event     // a bucket took a fresh chunk
);
  localparam int unsigned BKW = $clog2(NB);
  localparam int unsigned FW  = $clog2(FDEPTH + 1);
  localparam int unsigned RCW = $clog2(REGION_CHUNKS + 1);

  logic [AW-1:0]          stack [NB][FDEPTH];
  logic [FW-1:0]          sp    [NB];
  logic [AW-1:0]          carve [NB];
  logic [CHUNK_LOG:0]     left  [NB];   // buffers left in the current chunk
  logic [RCW-1:0]         next_chunk;

  // smallest bucket whose buffer holds `s` bytes
  function automatic logic [BKW-1:0] bucket_of(input logic [SW-1:0] s);
    logic [BKW-1:0] b;
    b = BKW'(NB - 1);
    for (int i = int'(NB) - 1; i >= 0; i--)
      if ({11'd0, s} <= (32'd1 << (int'(MIN_LOG) + i))) b = BKW'(i);
    return b;
  endfunction

  wire [BKW-1:0] ab = bucket_of(alloc_size);
  wire [BKW-1:0] fb = bucket_of(free_size);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NB); b++) begin
        sp[b] <= '0; carve[b] <= '0; left[b] <= '0;
      end
      next_chunk <= '0;
      alloc_done <= 1'b0; alloc_fail <= 1'b0; alloc_addr <= '0;
      free_done <= 1'b0; lost <= '0; chunk_event <= 1'b0;
    end else begin
      alloc_done  <= 1'b0;
      alloc_fail  <= 1'b0;
      free_done   <= 1'b0;
      chunk_event <= 1'b0;
      if (alloc_req) begin
        alloc_done <= 1'b1;
        if (sp[ab] != '0) begin
          alloc_addr <= stack[ab][($clog2(FDEPTH))'(sp[ab] - 1'b1)];
          sp[ab]     <= sp[ab] - 1'b1;
        end else if (left[ab] != '0) begin
          alloc_addr <= carve[ab];
          carve[ab]  <= carve[ab] + (AW'(1) << (int'(MIN_LOG) + int'(ab)));
          left[ab]   <= left[ab] - 1'b1;
        end else if (next_chunk != RCW'(REGION_CHUNKS)) begin
          alloc_addr  <= REGION_BASE + (AW'(next_chunk) << CHUNK_LOG);
          carve[ab]   <= REGION_BASE + (AW'(next_chunk) << CHUNK_LOG)
                         + (AW'(1) << (int'(MIN_LOG) + int'(ab)));
          left[ab]    <= (CHUNK_LOG+1)'((1 << (int'(CHUNK_LOG) - int'(MIN_LOG) - int'(ab))) - 1);
          next_chunk  <= next_chunk + 1'b1;
          chunk_event <= 1'b1;
        end else begin
          alloc_fail <= 1'b1;
        end
      end else if (free_req) begin
        free_done <= 1'b1;
        if (sp[fb] != FW'(FDEPTH)) begin
          stack[fb][sp[fb][$clog2(FDEPTH)-1:0]] <= free_addr;
          sp[fb] <= sp[fb] + 1'b1;
        end else begin
          lost <= lost + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (int'(MIN_LOG) + int'(NB) - 1 <= int'(CHUNK_LOG))
      else $error("largest bucket exceeds the chunk size");
  end
  a_one_req: assert property (@(posedge clk) disable iff (!rst_n) !(alloc_req && free_req));
endmodule
