// Pipelined address hash that picks the ORT for a memory operand.
//
// Objects differ in size, so taking the ORT number straight from address bits
// spreads the load badly; the gateway therefore hashes the base address. The
// hash runs in a two-stage pipeline that starts as soon as an operand word
// arrives, so its result is ready by the time the operand is issued. Stage 1
// drops the 6 byte-offset bits and XOR-folds the rest into 16 bits; stage 2
// mixes that value with a multiply by an odd constant and XOR-folds it down to
// OUTW bits. The hash function itself is this design's choice. A tag travels
// with each address. One address enters per cycle; out_valid follows
// in_valid by exactly 2 cycles; there is no back-pressure.
module operand_hash
  import ts_pkg::*;
#(
  parameter int unsigned OUTW = 1,
  parameter int unsigned TAGW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [AW-1:0]   in_addr,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [OUTW-1:0] out_hash,
  output logic [TAGW-1:0] out_tag
);
  logic            s1_valid;
  logic [15:0]     s1_fold;
  logic [TAGW-1:0] s1_tag;

  function automatic logic [15:0] fold16(input logic [AW-1:0] a);
    logic [AW-7:0] w;
    logic [15:0]   f;
    w = a[AW-1:6];
    f = '0;
    for (int i = 0; i < AW - 6; i++) f[i % 16] ^= w[i];
    return f;
  endfunction

  function automatic logic [OUTW-1:0] foldn(input logic [15:0] v);
    logic [31:0]     m;
    logic [OUTW-1:0] r;
    m = 32'(v) * 32'h9E37_79B1;
    r = '0;
    for (int i = 16; i < 32; i++) r[(i - 16) % OUTW] ^= m[i];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_fold   <= '0;
      s1_tag    <= '0;
      out_valid <= 1'b0;
      out_hash  <= '0;
      out_tag   <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_fold   <= fold16(in_addr);
      s1_tag    <= in_tag;
      out_valid <= s1_valid;
      out_hash  <= foldn(s1_fold);
      out_tag   <= s1_tag;
    end
  end
endmodule
