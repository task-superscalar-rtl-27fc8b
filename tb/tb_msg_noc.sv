// Unit test of msg_noc: every endpoint sends random messages to random
// destinations; sinks accept at random. Checks that every message arrives
// once, at the endpoint it names, in send order for each source/destination
// pair, and that no source waits forever: with 15 sources contending for
// random destinations all traffic must drain before the watchdog.
module tb_msg_noc;
  import ts_pkg::*;
  localparam int N = NUM_EP;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic    src_valid [N], src_ready [N], dst_valid [N], dst_ready [N];
  ts_msg_t src_msg [N], dst_msg [N];
  msg_noc #(.N(N)) dut (.*);

  int seq_sent [N][N];
  int seq_got  [N][N];
  int left [N];
  int checks = 0, failures = 0, total = 0, delivered = 0;

  function automatic ts_msg_t new_msg(input int s);
    ts_msg_t m;
    int d;
    m = '0;
    d = $urandom % N;
    m.mtype = M_DATA_READY;
    m.src = EPW'(s);
    m.dst = EPW'(d);
    m.addr = 40'(seq_sent[s][d]);
    return m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) if (dst_valid[d] && dst_ready[d]) begin
      int s;
      s = int'(dst_msg[d].src);
      checks++;
      if (int'(dst_msg[d].dst) != d || int'(dst_msg[d].addr) != seq_got[s][d]) begin
        failures++; $display("FAIL: at %0d from %0d seq %0d, expected seq %0d", d, s, dst_msg[d].addr, seq_got[s][d]);
      end
      seq_got[s][d]++;
      delivered++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) if (src_valid[s] && src_ready[s]) begin
      seq_sent[s][int'(src_msg[s].dst)]++;
      left[s]--;
      total++;
      if (left[s] > 0) src_msg[s] <= new_msg(s);
      else src_valid[s] <= 1'b0;
    end
    for (int d = 0; d < N; d++) dst_ready[d] <= ($urandom % 3) != 0;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      for (int d = 0; d < N; d++) begin seq_sent[s][d] = 0; seq_got[s][d] = 0; end
      left[s] = 300; src_valid[s] = 0; src_msg[s] = '0; dst_ready[s] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++) begin src_msg[s] = new_msg(s); src_valid[s] = 1; end
    wait (total == 300 * N);
    repeat (3) @(posedge clk);
    checks++;
    if (delivered != total) begin failures++; $display("FAIL: sent %0d delivered %0d", total, delivered); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("FAIL: watchdog, %0d of %0d delivered", delivered, 300 * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
