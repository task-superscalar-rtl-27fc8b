// Unit test of msg_fifo (DEPTH 4): random pushes and pops against a queue
// model. Checks order and content, that in_ready drops exactly when full,
// that out_valid is set exactly when not empty, and the space output.
module tb_msg_fifo;
  import ts_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  ts_msg_t in_msg, out_msg;
  logic [$clog2(DEPTH+1)-1:0] space;
  msg_fifo #(.DEPTH(DEPTH)) dut (.*);

  ts_msg_t q [$];
  int checks = 0, failures = 0, moved = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(space) != DEPTH - q.size() || in_ready != (q.size() < DEPTH) ||
        out_valid != (q.size() != 0)) begin
      failures++; $display("FAIL: space %0d in_ready %0d out_valid %0d with %0d held", space, in_ready, out_valid, q.size());
    end
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_msg != q[0]) begin failures++; $display("FAIL: wrong message out"); end
      if (q.size() != 0) void'(q.pop_front());
      moved++;
    end
    if (in_valid && in_ready) q.push_back(in_msg);
  end

  initial begin
    in_valid = 0; out_ready = 0; in_msg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      in_msg = ts_msg_t'({8{$urandom}});
      out_ready = (n % 1000 < 500) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(posedge clk);
    checks++;
    if (q.size() != 0 || moved == 0) begin failures++; $display("FAIL: %0d left, %0d moved", q.size(), moved); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
