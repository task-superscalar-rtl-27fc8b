// Unit test of operand_hash: a stream of addresses with tags, one per cycle
// with random gaps. Checks that every input comes out exactly 2 cycles later
// with its own tag, that equal addresses always hash alike, that addresses
// differing only in the 6 byte-offset bits hash alike, and that a run of
// 2048 objects at a 64KB stride spreads over both ORTs (neither gets more
// than 60%).
module tb_operand_hash;
  import ts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [AW-1:0] in_addr;
  logic [7:0] in_tag, out_tag;
  logic [0:0] out_hash;
  operand_hash #(.OUTW(1), .TAGW(8)) dut (.*);

  logic [AW-1:0] a_q [$];
  logic [7:0]    t_q [$];
  int            d_q [$];
  logic [0:0]    seen [logic [AW-1:0]];
  int checks = 0, failures = 0, cyc = 0, cnt1 = 0, nout = 0;

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    nout++;
    if (a_q.size() == 0 || d_q[0] != cyc || out_tag != t_q[0]) begin
      failures++; $display("FAIL: output at %0d tag %0d not as expected", cyc, out_tag);
    end else begin
      logic [AW-1:0] k;
      k = a_q[0] >> 6;
      if (seen.exists(k)) begin
        checks++;
        if (seen[k] != out_hash) begin failures++; $display("FAIL: address %h hashed differently", a_q[0]); end
      end else seen[k] = out_hash;
      if (out_hash == 1'b1) cnt1++;
    end
    if (a_q.size() != 0) begin void'(a_q.pop_front()); void'(t_q.pop_front()); void'(d_q.pop_front()); end
  end

  initial begin
    in_valid = 0; in_addr = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2048; n++) begin
      @(negedge clk);
      in_valid = 1; in_addr = 40'h01_0000_0000 + (40'(n) << 16) + 40'($urandom % 64);
      in_tag = 8'(n);
      a_q.push_back(in_addr); t_q.push_back(in_tag); d_q.push_back(cyc + 2);
      if ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    for (int n = 0; n < 512; n++) begin   // repeats of earlier objects
      @(negedge clk);
      in_valid = 1; in_addr = 40'h01_0000_0000 + (40'($urandom % 2048) << 16) + 40'($urandom % 64);
      in_tag = 8'(n);
      a_q.push_back(in_addr); t_q.push_back(in_tag); d_q.push_back(cyc + 2);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(posedge clk);
    checks += 2;
    if (nout != 2560) begin failures++; $display("FAIL: %0d outputs", nout); end
    if (cnt1 < 1024 || cnt1 > 1536) begin failures++; $display("FAIL: poor spread, %0d of 2560 to ORT1", cnt1); end
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
