// Ready queue between the frontend and the execution backend.
//
// Task reservation stations send a READY_TASK message over the network when
// all operands of a task are ready; the queue stores them in arrival order and
// hands them to the backend's task scheduler, which treats the cores as
// functional units. Each entry holds the task id <TRS, slot, serial> and the
// kernel pointer. Input: network valid/ready (ready while not full). Output:
// valid/ready, first word-through with one cycle from accept to output. The
// queue depth is this design's choice. Only the id and addr (kernel) fields
// of the incoming message are stored; the other message fields are unused.
module ready_queue
  import ts_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  ts_msg_t       in_msg,
  output logic          out_valid,
  input  logic          out_ready,
  output opid_t         out_task,
  output logic [AW-1:0] out_kernel,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  opid_t         q_task [DEPTH];
  logic [AW-1:0] q_kern [DEPTH];
  logic [PW-1:0] rd, wr;

  assign in_ready   = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid  = (count != '0);
  assign out_task   = q_task[rd];
  assign out_kernel = q_kern[rd];

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) begin
      q_task[wr] <= in_msg.id;
      q_kern[wr] <= in_msg.addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (push) wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (pop)  rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  // Only READY_TASK messages are addressed to the queue.
  a_type: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid |-> in_msg.mtype == M_READY_TASK);
endmodule
