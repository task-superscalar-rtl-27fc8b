// Unit test of edram_bank: random writes and reads against a reference array.
// Checks that each read returns the last written word exactly LATENCY cycles
// after the request, that rvalid pulses once per read and never for a write,
// and that back-to-back reads stream one word per cycle.
module tb_edram_bank;
  localparam int W = 64, D = 32, L = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic req, we, rvalid;
  logic [4:0] addr;
  logic [W-1:0] wdata, rdata;
  edram_bank #(.WIDTH(W), .DEPTH(D), .LATENCY(L)) dut (.*);

  logic [W-1:0] ref_mem [D];
  bit           ref_ok  [D];
  logic [W-1:0] exp_q [$];
  int           due_q [$];
  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n) begin
    if (rvalid) begin
      checks++;
      if (due_q.size() == 0) begin failures++; $display("FAIL: unexpected rvalid"); end
      else begin
        if (due_q[0] != cyc || rdata !== exp_q[0]) begin
          failures++; $display("FAIL: read data %h (exp %h) at %0d (exp %0d)", rdata, exp_q[0], cyc, due_q[0]);
        end
        void'(due_q.pop_front()); void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    req = 0; we = 0; addr = '0; wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); req = 1; we = 1; addr = 5'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata; ref_ok[i] = 1;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = ($urandom % 4) != 0; we = ($urandom % 3) == 0; addr = 5'($urandom % D);
      wdata = {$urandom, $urandom};
      if (req && we) ref_mem[addr] = wdata;
      else if (req) begin exp_q.push_back(ref_mem[addr]); due_q.push_back(cyc + L); end
    end
    @(negedge clk); req = 0;
    repeat (L + 3) @(posedge clk);
    checks++;
    if (due_q.size() != 0) begin failures++; $display("FAIL: %0d reads never returned", due_q.size()); end
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
