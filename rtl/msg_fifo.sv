// Message FIFO used at the inputs and outputs of the frontend modules.
//
// Holds up to DEPTH ts_msg_t messages. push/pop handshake: in_ready while
// not full, out_valid while not empty; out_msg is the oldest entry (no
// added latency beyond the registered storage). space reports free entries
// so a controller can check it has room for all messages one step emits.
module msg_fifo
  import ts_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  ts_msg_t in_msg,
  output logic    out_valid,
  input  logic    out_ready,
  output ts_msg_t out_msg,
  output logic [CW-1:0] space
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  ts_msg_t       q [DEPTH];
  logic [PW-1:0] rd, wr;
  logic [CW-1:0] cnt;

  assign in_ready  = (cnt != CW'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_msg   = q[rd];
  assign space     = CW'(DEPTH) - cnt;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  always_ff @(posedge clk) if (push) q[wr] <= in_msg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; cnt <= '0;
    end else begin
      if (push) wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (pop)  rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end
endmodule
