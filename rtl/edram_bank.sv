// eDRAM storage block of a frontend module.
//
// A single-ported memory of DEPTH words of WIDTH bits with a fixed access
// latency: a read issued with req=1, we=0 returns its word on rdata with
// rvalid=1 exactly LATENCY cycles later; a write (req=1, we=1) takes effect at
// the clock edge that accepts it. Requests may be issued every cycle (the
// array is pipelined); rvalid pulses once per read. The 22-cycle default is
// the eDRAM access time the frontend is evaluated with; the array itself is a
// plain synchronous memory, standing in for the eDRAM macro. The contents are
// not reset: users write a word before they read it.
module edram_bank #(
  parameter int unsigned WIDTH   = 1024,
  parameter int unsigned DEPTH   = 6144,
  parameter int unsigned LATENCY = 22,
  localparam int unsigned ABITS  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             we,
  input  logic [ABITS-1:0] addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata,
  output logic             rvalid
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] pipe_d [LATENCY];
  logic             pipe_v [LATENCY];

  // synchronous read port: the first stage of the latency pipeline
  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
    if (req && !we) pipe_d[0] <= mem[addr];
  end

  // remaining data stages carry no reset; only the valid bits are reset
  always_ff @(posedge clk) begin
    for (int i = 1; i < int'(LATENCY); i++) pipe_d[i] <= pipe_d[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LATENCY); i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= req && !we;
      for (int i = 1; i < int'(LATENCY); i++) pipe_v[i] <= pipe_v[i-1];
    end
  end

  assign rdata  = pipe_d[LATENCY-1];
  assign rvalid = pipe_v[LATENCY-1];
endmodule
