// Unit test of ready_queue: READY_TASK messages pushed and popped with random
// valid/ready patterns. Checks FIFO order, the task id and kernel pointer
// of each entry, the count output, and that in_ready drops exactly when the
// queue is full.
module tb_ready_queue;
  import ts_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  ts_msg_t in_msg;
  opid_t out_task;
  logic [AW-1:0] out_kernel;
  logic [$clog2(DEPTH+1)-1:0] count;
  ready_queue #(.DEPTH(DEPTH)) dut (.*);

  opid_t         q_id [$];
  logic [AW-1:0] q_k  [$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(count) != q_id.size()) begin failures++; $display("FAIL: count %0d, model %0d", count, q_id.size()); end
    checks++;
    if (in_ready != (q_id.size() < DEPTH)) begin failures++; $display("FAIL: in_ready %0d with %0d queued", in_ready, q_id.size()); end
    if (out_valid && out_ready) begin
      checks++;
      if (q_id.size() == 0 || out_task != q_id[0] || out_kernel != q_k[0]) begin
        failures++; $display("FAIL: wrong task out");
      end
      if (q_id.size() != 0) begin void'(q_id.pop_front()); void'(q_k.pop_front()); end
      got++;
    end
    if (in_valid && in_ready) begin
      q_id.push_back(in_msg.id); q_k.push_back(in_msg.addr); sent++;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = (n < 3000) && (($urandom % 3) != 0);
      in_msg = '0;
      in_msg.mtype = M_READY_TASK;
      in_msg.dst = EPW'(EP_RQ);
      in_msg.id = opid_t'({$urandom, $urandom});
      in_msg.addr = 40'({$urandom, $urandom});
      out_ready = (n < 1000) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (DEPTH + 4) @(posedge clk);
    checks++;
    if (sent != got || got == 0) begin failures++; $display("FAIL: sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #300000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
