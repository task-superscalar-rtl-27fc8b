// Free-block manager of a task reservation station's eDRAM.
//
// TRS storage is an array of fixed 128-byte blocks. Free blocks are kept in
// two levels: a 64-entry SRAM buffer of free block numbers, and a linked list
// of list nodes held in the eDRAM itself, each node a free block that stores
// 63 further free block numbers and a pointer to the next node. An
// allocation served from the buffer completes one cycle after the request.
// When the buffer is empty the head node is read (one eDRAM access): its 63
// entries and the node block itself refill the buffer. When a block is freed
// into a full buffer, the freed block becomes a new list node that receives
// 63 buffer entries and the old list head (one eDRAM write).
// Blocks that have never been handed out are taken from a counter instead of
// building the list at reset; that start-up shortcut is this design's choice.
//
// Interface: alloc_req/free_req are held until alloc_done/free_done pulse;
// only one may be active at a time. The mem_* port drives the TRS eDRAM
// while a request is active. free_count is the number of free blocks.
module trs_block_alloc
  import ts_pkg::*;
#(
  parameter int unsigned NBLK  = 6144,
  parameter int unsigned BLK_W = 1024,
  localparam int unsigned BW   = $clog2(NBLK),
  localparam int unsigned CW   = $clog2(NBLK + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             alloc_req,
  output logic             alloc_done,
  output logic [BW-1:0]    alloc_blk,
  input  logic             free_req,
  input  logic [BW-1:0]    free_blk,
  output logic             free_done,
  output logic [CW-1:0]    free_count,
  output logic             mem_req,
  output logic             mem_we,
  output logic [BW-1:0]    mem_addr,
  output logic [BLK_W-1:0] mem_wdata,
  input  logic [BLK_W-1:0] mem_rdata,
  input  logic             mem_rvalid,
  output logic             refill_event,   // a list node was read into the buffer
  output logic             spill_event     // a list node was written from the buffer
);
  localparam int unsigned BUF = 64;
  localparam int unsigned PTR = BLK_W / BUF;      // 16-bit fields in a node

  logic [BW-1:0] buffer [BUF];
  logic [6:0]    cnt;
  logic [BW-1:0] head;
  logic          head_v;
  logic [CW-1:0] fresh;
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_DONE} st_e;
  st_e st;

  // node image written on a spill: entries 1..63 of the buffer, then the head
  logic [BLK_W-1:0] node_w;
  always_comb begin
    node_w = '0;
    for (int i = 0; i < 63; i++) node_w[i*PTR +: PTR] = PTR'(buffer[i+1]);
    node_w[63*PTR +: PTR] = PTR'(head) | (head_v ? PTR'(1) << (PTR - 1) : '0);
  end

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = head;
    mem_wdata = node_w;
    if (st == S_IDLE && free_req && cnt == 7'(BUF)) begin
      mem_req  = 1'b1;
      mem_we   = 1'b1;
      mem_addr = free_blk;
    end else if (st == S_READ) begin
      mem_req  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; head <= '0; head_v <= 1'b0; fresh <= '0;
      free_count <= CW'(NBLK);
      alloc_done <= 1'b0; free_done <= 1'b0; alloc_blk <= '0;
      refill_event <= 1'b0; spill_event <= 1'b0;
    end else begin
      alloc_done   <= 1'b0;
      free_done    <= 1'b0;
      refill_event <= 1'b0;
      spill_event  <= 1'b0;
      case (st)
        S_IDLE: begin
          if (alloc_req && !alloc_done) begin
            if (cnt != 0) begin
              alloc_blk  <= buffer[cnt-1];
              cnt        <= cnt - 1'b1;
              alloc_done <= 1'b1;
              free_count <= free_count - 1'b1;
            end else if (head_v) begin
              st <= S_READ;
            end else if (fresh != CW'(NBLK)) begin
              alloc_blk  <= BW'(fresh);
              fresh      <= fresh + 1'b1;
              alloc_done <= 1'b1;
              free_count <= free_count - 1'b1;
            end
          end else if (free_req && !free_done) begin
            free_done  <= 1'b1;
            free_count <= free_count + 1'b1;
            if (cnt != 7'(BUF)) begin
              buffer[cnt[5:0]] <= free_blk;
              cnt <= cnt + 1'b1;
            end else begin
              head        <= free_blk;
              head_v      <= 1'b1;
              cnt         <= 7'd1;
              spill_event <= 1'b1;
            end
          end
        end
        S_READ: st <= S_WAIT;
        S_WAIT: if (mem_rvalid) begin
          for (int i = 0; i < 63; i++) buffer[i] <= BW'(mem_rdata[i*PTR +: PTR]);
          buffer[63]   <= head;
          cnt          <= 7'(BUF);
          head         <= BW'(mem_rdata[63*PTR +: PTR]);
          head_v       <= mem_rdata[64*PTR - 1];
          refill_event <= 1'b1;
          st           <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_one_req: assert property (@(posedge clk) disable iff (!rst_n) !(alloc_req && free_req));
endmodule
