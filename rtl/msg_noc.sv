// Point-to-point message network of the frontend.
//
// Every module has one output and one input port carrying a whole ts_msg_t
// per cycle with a valid/ready handshake. The network is a crossbar: for each
// destination a round-robin arbiter picks one of the sources whose current
// message names that destination, and the transfer happens in the same cycle
// when the destination is ready. Messages between one source and one
// destination therefore stay in order, which the decode protocol relies on.
// The crossbar stands in for the on-chip interconnect the frontend is
// attached to; its arbitration is this design's choice.
module msg_noc
  import ts_pkg::*;
#(
  parameter int unsigned N = NUM_EP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    src_valid [N],
  output logic    src_ready [N],
  input  ts_msg_t src_msg   [N],
  output logic    dst_valid [N],
  input  logic    dst_ready [N],
  output ts_msg_t dst_msg   [N]
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] rr  [N];   // per destination: source with highest priority
  logic [IW-1:0] sel [N];
  logic          any [N];

  always_comb begin
    for (int s = 0; s < int'(N); s++) src_ready[s] = 1'b0;
    for (int d = 0; d < int'(N); d++) begin
      any[d] = 1'b0;
      sel[d] = '0;
      for (int k = 0; k < int'(N); k++) begin
        int s;
        s = (int'(rr[d]) + k) % int'(N);
        if (!any[d] && src_valid[s] && int'(src_msg[s].dst) == d) begin
          any[d] = 1'b1;
          sel[d] = IW'(s);
        end
      end
      dst_valid[d] = any[d];
      dst_msg[d]   = src_msg[sel[d]];
      if (any[d] && dst_ready[d]) src_ready[sel[d]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < int'(N); d++) rr[d] <= '0;
    end else begin
      for (int d = 0; d < int'(N); d++)
        if (any[d] && dst_ready[d])
          rr[d] <= (int'(sel[d]) == int'(N) - 1) ? '0 : sel[d] + 1'b1;
    end
  end

  // A message must name an existing endpoint.
  for (genvar s = 0; s < int'(N); s++) begin : g_chk
    a_dst: assert property (@(posedge clk) disable iff (!rst_n)
                            src_valid[s] |-> int'(src_msg[s].dst) < int'(N));
  end
endmodule
