// instr_cache: the instruction cache.
//
// A synchronous RAM of DEPTH 32-bit instruction words. The DDR side writes a
// program through (we, waddr, wdata); the decoder reads one word per request,
// rdata being valid in the cycle after raddr is presented. Each word holds two
// 16-bit instructions. That the cache keeps 32-bit compiler words and feeds
// the decoder is published; depth, ports and latency are this design's.
module instr_cache #(
  parameter int DEPTH = 4096,
  parameter int IW    = 32,
  parameter int AWID  = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AWID-1:0] waddr,
  input  logic [IW-1:0]   wdata,
  input  logic [AWID-1:0] raddr,
  output logic [IW-1:0]   rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
